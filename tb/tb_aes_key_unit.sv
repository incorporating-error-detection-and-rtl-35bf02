// tb_aes_key_unit: loads a key from the side, then steps the schedule ten
// times, acting as the borrowed SBoxes itself (it substitutes ksb_op with the
// reference SBox and returns the result one cycle later, as the last-row
// cells do).  Every round key is compared with the reference expansion, in
// encryption order from the cipher key and in decryption order from the last
// round key, together with the parity bits and the error output.  A wrong
// parity bit on a returned SBox result must show on err.
module tb_aes_key_unit;
  import aes_pkg::*;
  import aes_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  logic load, dec, step;
  pbyte_t [NROWS-1:0] kin_col;
  pbyte_t [NCOLS-1:0] ksb_res, ksb_op;
  pbyte_t [NROWS-1:0][NCOLS-1:0] rkey;
  logic err;
  int checks = 0, failures = 0;

  aes_key_unit dut (.*);

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
      if (failures < 20) $display("FAIL: %s", msg);
    end
  endtask

  function automatic logic [127:0] key_word();
    logic [127:0] b;
    for (int r = 0; r < 4; r++)
      for (int c = 0; c < 4; c++) b[127 - 8*(4*c + r) -: 8] = rkey[r][c].d;
    return b;
  endfunction

  function automatic bit par_ok();
    for (int r = 0; r < 4; r++)
      for (int c = 0; c < 4; c++) if ((^rkey[r][c].d) != rkey[r][c].p) return 0;
    return 1;
  endfunction

  task automatic load_key(input logic d, input logic [127:0] k);
    dec = d;
    for (int l = 0; l < 4; l++) begin
      @(negedge clk);
      load = 1;
      for (int r = 0; r < 4; r++) kin_col[r] = mkp(k[127 - 8*(4*(3 - l) + r) -: 8]);
    end
    @(negedge clk);
    load = 0;
  endtask

  // one schedule step: SBox operand sampled now, result one cycle later
  task automatic do_step(input bit corrupt);
    pbyte_t [3:0] op_q;
    op_q = ksb_op;
    @(negedge clk);
    for (int i = 0; i < 4; i++) ksb_res[i] = mkp(rsbox(op_q[i].d));
    if (corrupt) ksb_res[2].p = ~ksb_res[2].p;
    step = 1;
    @(negedge clk);
    step = 0;
  endtask

  logic [127:0] rk [11];
  logic [127:0] k;
  initial begin
    load = 0; dec = 0; step = 0; kin_col = '0; ksb_res = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int it = 0; it < 6; it++) begin
      k = (it == 0) ? 128'h2b7e151628aed2a6abf7158809cf4f3c : {$urandom, $urandom, $urandom, $urandom};
      expand(k, rk);
      load_key(0, k);
      chk(key_word() == rk[0] && par_ok() && !err, "loaded cipher key");
      for (int r = 1; r <= 10; r++) begin
        do_step(0);
        chk(key_word() == rk[r], $sformatf("enc round key %0d: %h exp %h", r, key_word(), rk[r]));
        chk(par_ok() && !err, $sformatf("enc round key %0d parity", r));
      end
      if (it == 0) chk(rk[10] == 128'hd014f9a8c9ee2589e13f0cc8b6630ca6, "FIPS-197 last round key");
      load_key(1, rk[10]);
      chk(key_word() == rk[10], "loaded last round key");
      for (int r = 9; r >= 0; r--) begin
        do_step(0);
        chk(key_word() == rk[r], $sformatf("dec round key %0d: %h exp %h", r, key_word(), rk[r]));
        chk(par_ok() && !err, $sformatf("dec round key %0d parity", r));
      end
    end
    load_key(0, k);
    do_step(1);
    chk(err, "corrupted SBox parity shows on err");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
