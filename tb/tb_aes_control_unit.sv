// tb_aes_control_unit: checks the cycle schedule of the sequencer against a
// table built in the testbench: 4 load cycles (columns 3,2,1,0), the initial
// AddRoundKey with the first key SBox operands, ten rounds of SubBytes /
// ShiftRows / MixColumns+AddRoundKey (plain AddRoundKey in round 10) with the
// key step in the first cycle, a final checkpoint and done 36 cycles after
// start.  It also checks that a restart at a checkpoint goes back to loading,
// that fatal aborts the block and blocks new starts, and that start is
// ignored while busy.
module tb_aes_control_unit;
  import aes_pkg::*;

  logic clk = 0, rst_n = 0;
  logic start, dec, restart, fatal;
  cell_op_e op;
  logic dec_q, sb_en, ksb_en, key_load, key_step, active, chk_o, accept, busy, done, aborted;
  logic [1:0] load_sel;
  int checks = 0, failures = 0;

  aes_control_unit dut (.clk, .rst_n, .start, .dec, .restart, .fatal, .op, .dec_q, .sb_en,
                        .ksb_en, .load_sel, .key_load, .key_step, .active, .chk(chk_o),
                        .accept, .busy, .done, .aborted);

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

  // expected outputs in cycle t (1 = first cycle after start)
  task automatic expect_cycle(input int t, input logic d);
    cell_op_e eop;
    logic esb, eksb, eload, estep, eact, echk;
    int rnd, ph;
    eop = OP_HOLD; esb = 0; eksb = 0; eload = 0; estep = 0; eact = 0; echk = 0;
    if (t <= 4) begin
      eop = OP_LOAD; eload = 1;
      chk(load_sel == 2'(4 - t), $sformatf("t=%0d load column", t));
    end else if (t == 5) begin
      eop = OP_ARK; eksb = 1; eact = 1;
    end else if (t <= 35) begin
      rnd = (t - 6) / 3 + 1; ph = (t - 6) % 3; eact = 1;
      case (ph)
        0: begin esb = 1; estep = 1; end
        1: eop = OP_SHIFT;
        default: begin eop = (rnd == 10) ? OP_ARK : OP_MIX; eksb = (rnd != 10); echk = 1; end
      endcase
    end else begin
      eact = 1; echk = 1;
    end
    chk(op == eop && sb_en == esb && ksb_en == eksb && key_load == eload && key_step == estep
        && active == eact && chk_o == echk && busy && dec_q == d,
        $sformatf("t=%0d op=%0d sb=%0d ksb=%0d ld=%0d st=%0d act=%0d chk=%0d", t, op, sb_en, ksb_en, key_load, key_step, active, chk_o));
  endtask

  int t;
  initial begin
    start = 0; dec = 0; restart = 0; fatal = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int d = 0; d < 2; d++) begin
      @(negedge clk);
      chk(!busy, "idle before start");
      start = 1; dec = d[0];
      @(negedge clk);
      start = 0; dec = 0;
      for (t = 1; t <= 36; t++) begin
        expect_cycle(t, d[0]);
        if (t == 10) start = 1;   // ignored while busy
        @(negedge clk);
        start = 0;
      end
      chk(done && !busy, "done 36 cycles after start");
      @(negedge clk);
      chk(!done, "done is a pulse");
    end
    // restart at the checkpoint of round 3 (cycle 14)
    @(negedge clk);
    start = 1;
    @(negedge clk);
    start = 0;
    repeat (13) @(negedge clk);
    chk(chk_o, "cycle 14 is a checkpoint");
    restart = 1;
    @(negedge clk);
    restart = 0;
    for (t = 1; t <= 36; t++) begin
      expect_cycle(t, 1'b0);
      @(negedge clk);
    end
    chk(done, "restarted block completes");
    // fatal at a checkpoint aborts
    @(negedge clk);
    start = 1;
    @(negedge clk);
    start = 0;
    repeat (7) @(negedge clk);
    chk(chk_o, "cycle 8 is a checkpoint");
    fatal = 1;
    @(negedge clk);
    chk(aborted && !busy && !done, "fatal aborts the block");
    start = 1;
    @(negedge clk);
    start = 0;
    chk(!busy, "no start while fatal");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
