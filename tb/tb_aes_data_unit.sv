// tb_aes_data_unit: drives the data array cycle by cycle like the control
// unit does, with round keys supplied by the testbench from the reference key
// expansion, and compares the final state with the reference cipher in both
// directions.  It repeats this with every row reconfigured (a different
// bypassed cell per row, each with an emulated fault) and checks the
// last-row SBoxes lent to the key schedule: operands given in the third cycle
// of a round come back, substituted and in forward direction, in the first
// cycle of the next round while the data SubBytes runs.
module tb_aes_data_unit;
  import aes_pkg::*;
  import aes_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  cell_op_e op;
  logic dec, sb_en, ksb_en;
  pbyte_t [NROWS-1:0] load_col;
  pbyte_t [NROWS-1:0][NCOLS-1:0] rkey;
  pbyte_t [NCOLS-1:0] ksb_in, ksb_out;
  logic [NROWS-1:0] fault_vld;
  logic [NROWS-1:0][1:0] fault_idx;
  cell_fi_t [NROWS-1:0][NPHYS-1:0] fi;
  pbyte_t [NROWS-1:0][NCOLS-1:0] state;
  logic [NROWS-1:0][NCOLS-1:0] err;
  int checks = 0, failures = 0;

  aes_data_unit dut (.*);

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

  function automatic void set_key(input logic [127:0] k);
    for (int r = 0; r < 4; r++)
      for (int c = 0; c < 4; c++) rkey[r][c] = mkp(k[127 - 8*(4*c + r) -: 8]);
  endfunction

  function automatic logic [127:0] get_state();
    logic [127:0] b;
    for (int r = 0; r < 4; r++)
      for (int c = 0; c < 4; c++) b[127 - 8*(4*c + r) -: 8] = state[r][c].d;
    return b;
  endfunction

  task automatic cycle_(input cell_op_e o, input logic s, input logic ks);
    op = o; sb_en = s; ksb_en = ks;
    @(negedge clk);
  endtask

  task automatic run_block(input logic d, input logic [127:0] blk, input logic [127:0] key, input string tag);
    logic [127:0] rk [11];
    logic [127:0] exp;
    logic [7:0] kop [4];
    expand(key, rk);
    exp = d ? aes_ref_pkg::decrypt(blk, key) : aes_ref_pkg::encrypt(blk, key);
    dec = d;
    for (int l = 0; l < 4; l++) begin
      for (int r = 0; r < 4; r++) load_col[r] = mkp(blk[127 - 8*(4*(3 - l) + r) -: 8]);
      cycle_(OP_LOAD, 0, 0);
    end
    set_key(d ? rk[10] : rk[0]);
    for (int i = 0; i < 4; i++) begin kop[i] = 8'($urandom); ksb_in[i] = mkp(kop[i]); end
    cycle_(OP_ARK, 0, 1);
    for (int rnd = 1; rnd <= 10; rnd++) begin
      op = OP_HOLD; sb_en = 1; ksb_en = 0;
      #1;
      begin
        for (int i = 0; i < 4; i++)
          chk(ksb_out[i].d == rsbox(kop[i]) && (^ksb_out[i].d) == ksb_out[i].p, $sformatf("%s key SBox %0d", tag, i));
      end
      @(negedge clk);
      cycle_(OP_SHIFT, 0, 0);
      set_key(d ? rk[10 - rnd] : rk[rnd]);
      for (int i = 0; i < 4; i++) begin kop[i] = 8'($urandom); ksb_in[i] = mkp(kop[i]); end
      cycle_(rnd == 10 ? OP_ARK : OP_MIX, 0, rnd != 10);
      chk(err == '0, $sformatf("%s no error bit after round %0d", tag, rnd));
    end
    op = OP_HOLD;
    chk(get_state() == exp, $sformatf("%s dec=%0d state %h exp %h", tag, d, get_state(), exp));
  endtask

  logic [127:0] k, p;
  initial begin
    op = OP_HOLD; dec = 0; sb_en = 0; ksb_en = 0; load_col = '0; rkey = '0; ksb_in = '0;
    fault_vld = '0; fault_idx = '0; fi = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    run_block(0, 128'h00112233445566778899aabbccddeeff, 128'h000102030405060708090a0b0c0d0e0f, "C.1");
    chk(get_state() == 128'h69c4e0d86a7b0430d8cdb78070b4c55a, "FIPS-197 C.1");
    for (int i = 0; i < 4; i++) begin
      k = {$urandom, $urandom, $urandom, $urandom};
      p = {$urandom, $urandom, $urandom, $urandom};
      run_block(i[0], p, k, "random");
    end
    // every row reconfigured, bypassed cells faulty
    fault_vld = 4'b1111;
    fault_idx = {2'd3, 2'd2, 2'd1, 2'd0};
    for (int r = 0; r < 4; r++) begin
      fi[r][r].st_mask = 8'h01;
      fi[r][r].sb_mask = 8'h02;
    end
    for (int i = 0; i < 4; i++) begin
      k = {$urandom, $urandom, $urandom, $urandom};
      p = {$urandom, $urandom, $urandom, $urandom};
      run_block(i[0], p, k, "reconfigured");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
