// tb_aes_ft_fault_campaign: random single-fault campaign on the complete core.
// Each trial resets the core, picks a random block, key and direction, and
// injects one single-bit fault into one physical cell: into its SBox output
// or into the result it computes, either for one clock cycle at a random
// point of the computation (transient) or for the whole block (permanent).
// Whatever happens, the block must finish with the correct result.  When the
// fault was detected, exactly the injected cell must have been mapped out of
// exactly its row; a permanent fault in a cell in use must always be
// detected, and a fault in the idle backup cell never.
module tb_aes_ft_fault_campaign;
  import aes_pkg::*;
  import aes_ref_pkg::*;

  localparam int TRIALS = 120;

  logic clk = 0, rst_n = 0;
  logic start = 0, decrypt = 0;
  logic [127:0] block_in = '0, key_in = '0, block_out;
  logic [15:0]  par_out;
  logic busy, done, err_out, err_seen, restarted, fatal, aborted;
  logic [NROWS-1:0] fault_vld;
  logic [NROWS-1:0][1:0] fault_idx;
  cell_fi_t [NROWS-1:0][NPHYS-1:0] fi = '0;

  int checks = 0, failures = 0;
  int n_detected = 0, n_silent = 0, n_transient = 0, n_permanent = 0, n_key_cell = 0;

  aes_ft_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
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

  function automatic logic [127:0] last_rk(input logic [127:0] key);
    logic [127:0] rk [11];
    expand(key, rk);
    return rk[10];
  endfunction

  logic [127:0] k, p, exp;
  int row, pcell, tgt, perm, t_inj, cyc;
  logic [7:0] mask;
  logic d;
  initial begin
    for (int trial = 0; trial < TRIALS; trial++) begin
      rst_n = 0;
      fi = '0;
      repeat (2) @(negedge clk);
      rst_n = 1;
      @(negedge clk);
      k = {$urandom, $urandom, $urandom, $urandom};
      p = {$urandom, $urandom, $urandom, $urandom};
      d = 1'($urandom);
      exp = d ? aes_ref_pkg::decrypt(p, k) : aes_ref_pkg::encrypt(p, k);
      row   = $urandom_range(3, 0);
      pcell  = (trial % 10 == 9) ? 4 : $urandom_range(3, 0);
      tgt   = $urandom_range(1, 0);
      perm  = (trial % 3 == 0);
      t_inj = $urandom_range(36, 5);
      mask  = 8'(1) << $urandom_range(7, 0);
      if (perm) n_permanent++; else n_transient++;
      if (row == 3 && tgt == 0) n_key_cell++;
      start = 1; decrypt = d; block_in = p; key_in = d ? last_rk(k) : k;
      @(negedge clk);
      start = 0;
      cyc = 0;
      while (!done && !aborted && cyc < 400) begin
        cyc++;
        // cycle cyc after start: fault active for that whole cycle
        if (perm || cyc == t_inj) begin
          if (tgt == 0) fi[row][pcell].sb_mask = mask;
          else          fi[row][pcell].st_mask = mask;
        end else begin
          fi = '0;
        end
        @(negedge clk);
      end
      fi = '0;
      chk(done && !aborted && !fatal, $sformatf("trial %0d finished", trial));
      chk(block_out == exp, $sformatf("trial %0d (row %0d cell %0d tgt %0d perm %0d t %0d) result", trial, row, pcell, tgt, perm, t_inj));
      if (err_seen || fault_vld != '0) begin
        n_detected++;
        chk(fault_vld == 4'(1 << row) && fault_idx[row] == 2'(pcell),
            $sformatf("trial %0d located row %0d cell %0d: map %b idx %h", trial, row, pcell, fault_vld, fault_idx));
      end else begin
        n_silent++;
      end
      if (perm && pcell < 4) chk(fault_vld[row], $sformatf("trial %0d permanent fault detected", trial));
      if (pcell == 4) chk(fault_vld == '0, $sformatf("trial %0d idle backup fault ignored", trial));
    end
    chk(n_detected > 0, "some faults detected and repaired");
    chk(n_silent > 0, "some faults without effect");
    chk(n_transient > 0 && n_permanent > 0 && n_key_cell > 0, "fault kinds covered");
    $display("campaign: detected+repaired=%0d no-effect=%0d transient=%0d permanent=%0d key-SBox-row=%0d",
             n_detected, n_silent, n_transient, n_permanent, n_key_cell);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
