// tb_aes_reconfig_unit: drives error bits and checkpoints directly and checks
// the unit's decisions: the first erroneous cycle locates the fault even when
// more cells are flagged later, the location is translated to the physical
// cell through the existing fault map, restart pulses in the checkpoint cycle
// and the map updates after it, errors outside a computation are ignored,
// and fatal is raised for a second fault in a row (backup cell or another
// cell), for two cells of a row failing together and for a key-only error.
module tb_aes_reconfig_unit;
  import aes_pkg::*;

  logic clk = 0, rst_n = 0;
  logic active, chk_i, key_err;
  logic [NROWS-1:0][NCOLS-1:0] err;
  logic [NROWS-1:0] fault_vld;
  logic [NROWS-1:0][1:0] fault_idx;
  logic restart, fatal, detected;
  int checks = 0, failures = 0;

  aes_reconfig_unit dut (.clk, .rst_n, .active, .chk(chk_i), .err, .key_err,
                         .fault_vld, .fault_idx, .restart, .fatal, .detected);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
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

  task automatic do_reset();
    rst_n = 0;
    @(negedge clk);
    rst_n = 1;
    @(negedge clk);
  endtask

  // one cycle with the given error bits; checkpoint optional
  task automatic cyc(input logic [15:0] e, input logic k, input logic c);
    err = e; key_err = k; chk_i = c;
    #1;
  endtask

  task automatic next();
    @(negedge clk);
    err = '0; key_err = 0; chk_i = 0;
  endtask

  function automatic logic [15:0] bit_at(input int r, input int c);
    logic [15:0] v;
    v = '0;
    v[4*r + c] = 1'b1;
    return v;
  endfunction

  initial begin
    active = 0; chk_i = 0; key_err = 0; err = '0;
    do_reset();
    active = 1;
    // fault-free checkpoints
    for (int i = 0; i < 3; i++) begin
      cyc('0, 0, 1);
      chk(!restart && !fatal && !detected, "quiet checkpoint");
      next();
    end
    // first error at logical (1,2); later propagation to others
    cyc(bit_at(1, 2), 0, 0); chk(detected, "detected"); next();
    cyc(bit_at(1, 2) | bit_at(2, 2) | bit_at(1, 3), 0, 0); next();
    cyc(bit_at(0, 0) | bit_at(3, 1), 0, 1);
    chk(restart && !fatal, "restart at checkpoint");
    next();
    chk(fault_vld == 4'b0010 && fault_idx[1] == 2'd2, "row 1 maps out physical cell 2");
    cyc('0, 0, 1); chk(!restart, "capture cleared after restart"); next();
    // errors outside a computation are ignored
    active = 0;
    cyc('1, 1, 0); next();
    active = 1;
    cyc('0, 0, 1); chk(!restart && !fatal, "inactive errors ignored"); next();
    // error in the checkpoint cycle itself, logical (3,1)
    cyc(bit_at(3, 1), 0, 1); chk(restart, "same-cycle restart"); next();
    chk(fault_vld == 4'b1010 && fault_idx[3] == 2'd1, "row 3 maps out cell 1");
    // row 3, logical 1 now lives in physical 2
    // logical 3 of row 1 now lives in the backup: second fault in row 1
    cyc(bit_at(1, 3), 0, 0); next();
    cyc('0, 0, 1); chk(fatal && !restart, "backup failure is fatal"); next();
    chk(fatal && fault_vld == 4'b1010, "fatal stays, map unchanged");
    cyc(bit_at(0, 0), 0, 1); chk(!restart, "no restart once fatal"); next();
    // two cells of one row in the same cycle
    do_reset();
    chk(!fatal && fault_vld == '0, "reset clears fault map");
    cyc(bit_at(2, 0) | bit_at(2, 3), 0, 1); chk(fatal && !restart, "double fault in a row is fatal"); next();
    // faults in four rows at once are tolerated
    do_reset();
    cyc(bit_at(0, 3) | bit_at(1, 0) | bit_at(2, 1) | bit_at(3, 2), 0, 0); next();
    cyc('0, 0, 1); chk(restart && !fatal, "one fault per row tolerated"); next();
    chk(fault_vld == 4'b1111 && fault_idx == {2'd2, 2'd1, 2'd0, 2'd3}, "all rows mapped");
    // key-only error: no spare
    do_reset();
    cyc('0, 1, 0); next();
    cyc('0, 0, 1); chk(fatal, "key error is fatal"); next();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
