// tb_aes_ft_top: end-to-end test of the fault-tolerant AES core at its
// default configuration.
//  1. FIPS-197 example vectors, encryption and decryption.
//  2. Random blocks and keys in both directions against the reference model,
//     checking the 36-cycle latency, the output parity and the error bits.
//  3. Permanent faults, injected through the fault emulation input, in the
//     SBox of one cell (also one used by the key schedule) and in the result
//     register of another: each must be detected, the row reconfigured onto
//     its backup cell, the block restarted and the result still be correct.
//     One fault in each of the four rows is tolerated.
//  4. A second fault in an already reconfigured row must stop the core
//     (fatal, block aborted).
// Counts of each mechanism seen are checked to be non-zero.
module tb_aes_ft_top;
  import aes_pkg::*;
  import aes_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  logic start = 0, decrypt = 0;
  logic [127:0] block_in = '0, key_in = '0, block_out;
  logic [15:0]  par_out;
  logic busy, done, err_out, err_seen, restarted, fatal, aborted;
  logic [NROWS-1:0] fault_vld;
  logic [NROWS-1:0][1:0] fault_idx;
  cell_fi_t [NROWS-1:0][NPHYS-1:0] fi = '0;

  int checks = 0, failures = 0;
  int n_enc = 0, n_dec = 0, n_restart = 0, n_detect = 0, n_fatal = 0, n_reconf = 0;

  aes_ft_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (restarted) n_restart++;

  task automatic chk(input bit cond, input string msg);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", msg);
    end
  endtask

  function automatic logic [127:0] last_rk(input logic [127:0] key);
    logic [127:0] rk [11];
    expand(key, rk);
    return rk[10];
  endfunction

  // run one block; returns cycles from start to done (or -1 on abort)
  task automatic run(input logic dec, input logic [127:0] blk, input logic [127:0] key,
                     output int cycles, output logic [127:0] res);
    @(negedge clk);
    start = 1; decrypt = dec; block_in = blk; key_in = dec ? last_rk(key) : key;
    @(negedge clk);
    start = 0; block_in = '0; key_in = '0;
    cycles = 0;
    while (!done && !aborted && cycles < 2000) begin
      @(negedge clk);
      cycles++;
    end
    if (aborted || cycles >= 2000) cycles = -1;
    res = block_out;
    if (dec) n_dec++; else n_enc++;
  endtask

  task automatic check_block(input logic dec, input logic [127:0] blk, input logic [127:0] key,
                             input int exp_cycles, input string tag);
    int cyc;
    logic [127:0] res, exp;
    exp = dec ? aes_ref_pkg::decrypt(blk, key) : aes_ref_pkg::encrypt(blk, key);
    run(dec, blk, key, cyc, res);
    chk(res == exp, $sformatf("%s dec=%0d result %h exp %h", tag, dec, res, exp));
    for (int i = 0; i < 16; i++)
      chk(par_out[15-i] == ^res[127-8*i -: 8], $sformatf("%s parity byte %0d", tag, i));
    if (exp_cycles > 0)
      chk(cyc == exp_cycles, $sformatf("%s latency %0d exp %0d", tag, cyc, exp_cycles));
    else
      chk(cyc > 36, $sformatf("%s restarted latency %0d", tag, cyc));
    chk(!err_out, $sformatf("%s err_out clear", tag));
  endtask

  int cyc;
  logic [127:0] res, k, p;
  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;

    // 1. FIPS-197 vectors
    check_block(0, 128'h00112233445566778899aabbccddeeff, 128'h000102030405060708090a0b0c0d0e0f, 36, "C.1");
    chk(block_out == 128'h69c4e0d86a7b0430d8cdb78070b4c55a, "FIPS-197 C.1 ciphertext");
    check_block(1, 128'h69c4e0d86a7b0430d8cdb78070b4c55a, 128'h000102030405060708090a0b0c0d0e0f, 36, "C.1 inv");
    chk(block_out == 128'h00112233445566778899aabbccddeeff, "FIPS-197 C.1 plaintext");
    check_block(0, 128'h3243f6a8885a308d313198a2e0370734, 128'h2b7e151628aed2a6abf7158809cf4f3c, 36, "B");
    chk(block_out == 128'h3925841d02dc09fbdc118597196a0b32, "FIPS-197 B ciphertext");

    // 2. random blocks
    for (int i = 0; i < 6; i++) begin
      k = {$urandom, $urandom, $urandom, $urandom};
      p = {$urandom, $urandom, $urandom, $urandom};
      check_block(i[0], p, k, 36, "random");
      chk(!err_seen && !restarted && fault_vld == '0, "no error on fault-free run");
    end

    // 3a. permanent SBox fault in row 1, physical cell 2
    fi[1][2].sb_mask = 8'h04;
    k = {$urandom, $urandom, $urandom, $urandom};
    p = {$urandom, $urandom, $urandom, $urandom};
    check_block(0, p, k, 0, "sbox fault r1c2");
    chk(err_seen, "fault detected");
    if (err_seen) n_detect++;
    chk(fault_vld == 4'b0010 && fault_idx[1] == 2'd2, $sformatf("row 1 maps out cell 2 (%b %h)", fault_vld, fault_idx));
    if (fault_vld[1]) n_reconf++;
    // the reconfigured core keeps working without further restarts
    check_block(1, p, k, 36, "after reconfig dec");

    // 3b. permanent SBox fault in a last-row cell (key schedule uses it)
    fi[3][0].sb_mask = 8'h80;
    check_block(1, p, k, 0, "sbox fault r3c0 dec");
    chk(fault_vld[3] && fault_idx[3] == 2'd0, "row 3 maps out cell 0");
    if (fault_vld[3]) n_reconf++;
    n_detect += int'(err_seen);

    // 3c. permanent result-register fault in row 0, cell 3
    fi[0][3].st_mask = 8'h20;
    check_block(0, p, k, 0, "state fault r0c3");
    chk(fault_vld[0] && fault_idx[0] == 2'd3, "row 0 maps out cell 3");
    if (fault_vld[0]) n_reconf++;
    n_detect += int'(err_seen);

    // 3d. row 2, cell 1: four faults, one per row, all tolerated
    fi[2][1].st_mask = 8'h01;
    check_block(1, p, k, 0, "state fault r2c1");
    chk(fault_vld == 4'b1111 && fault_idx[2] == 2'd1, "row 2 maps out cell 1");
    if (fault_vld[2]) n_reconf++;
    n_detect += int'(err_seen);
    for (int i = 0; i < 2; i++) begin
      k = {$urandom, $urandom, $urandom, $urandom};
      p = {$urandom, $urandom, $urandom, $urandom};
      check_block(i[0], p, k, 36, "four rows reconfigured");
    end

    // 4. second fault in row 1 (its backup cell): cannot continue
    fi[1][4].sb_mask = 8'h40;
    run(0, p, k, cyc, res);
    chk(cyc == -1, "block aborted");
    chk(fatal, "fatal raised");
    if (fatal) n_fatal++;
    @(negedge clk);
    start = 1;
    @(negedge clk);
    start = 0;
    chk(!busy, "no new block accepted after fatal");

    chk(n_enc > 0, "encryption happened");
    chk(n_dec > 0, "decryption happened");
    chk(n_detect > 0, "error detection happened");
    chk(n_reconf == 4, $sformatf("reconfiguration happened in each row (%0d)", n_reconf));
    chk(n_restart >= 4, $sformatf("restart happened (%0d)", n_restart));
    chk(n_fatal > 0, "fatal happened");
    $display("mechanisms: enc=%0d dec=%0d detect=%0d reconf=%0d restart=%0d fatal=%0d",
             n_enc, n_dec, n_detect, n_reconf, n_restart, n_fatal);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
