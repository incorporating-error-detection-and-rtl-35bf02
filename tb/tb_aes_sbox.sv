// tb_aes_sbox: exhaustive check of the pipelined SBox.
// For every input byte and both directions it checks the value against the
// brute-force reference, the one-cycle latency, that a correct input gives a
// consistent output parity and that an input with a wrong parity bit gives an
// output whose parity is inconsistent (error propagation).  It also checks that
// a fault mask on the output shows as an inconsistency.
module tb_aes_sbox;
  import aes_pkg::*;
  import aes_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  logic in_vld, inv;
  pbyte_t din, dout;
  logic [7:0] fi_mask;
  logic dout_vld;
  int checks = 0, failures = 0;

  aes_sbox dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit cond, input string msg);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", msg);
    end
  endtask

  logic [7:0] expv;
  initial begin
    in_vld = 0; inv = 0; din = '0; fi_mask = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int m = 0; m < 2; m++) begin
      for (int x = 0; x < 256; x++) begin
        for (int bad = 0; bad < 2; bad++) begin
          @(negedge clk);
          in_vld = 1; inv = m[0]; din.d = 8'(x); din.p = (^din.d) ^ bad[0];
          expv = m ? rinv_sbox(8'(x)) : rsbox(8'(x));
          @(negedge clk);
          in_vld = 0;
          chk(dout_vld, "valid after one cycle");
          chk(dout.d == expv, $sformatf("value inv=%0d x=%02x got %02x exp %02x", m, x, dout.d, expv));
          chk((dout.p ^ (^dout.d)) == bad[0], $sformatf("parity inv=%0d x=%02x bad=%0d", m, x, bad));
        end
      end
    end
    // fault on the output is visible as a parity inconsistency
    @(negedge clk);
    in_vld = 1; inv = 0; din = mkp(8'h53); fi_mask = 8'h10;
    @(negedge clk);
    chk((dout.p ^ (^dout.d)) == 1'b1, "output fault detected");
    chk(dout.d == (8'hed ^ 8'h10), "fault mask applied");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
