// tb_aes_reconf_row: checks the two multiplexer layers of a reconfigurable
// row.  For every configuration (no fault, cell 0..3 replaced) it loads four
// distinct bytes at the logical positions and checks they come back in
// logical order, that an emulated fault in the bypassed cell has no effect,
// and that a fault in a cell that is in use shows in the error bit of the
// right logical position (the backup cell included).
module tb_aes_reconf_row;
  import aes_pkg::*;

  logic clk = 0, rst_n = 0;
  cell_in_t  [NCOLS-1:0] lin;
  cell_fi_t  [NPHYS-1:0] fi;
  logic                  fault_vld;
  logic      [1:0]       fault_idx;
  cell_out_t [NCOLS-1:0] lout;
  int checks = 0, failures = 0;

  aes_reconf_row #(.ROW(2)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
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

  logic [7:0] v [4];
  int phys;
  initial begin
    lin = '0; fi = '0; fault_vld = 0; fault_idx = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int cfg = -1; cfg < 4; cfg++) begin
      for (int rep = 0; rep < 4; rep++) begin
        @(negedge clk);
        fault_vld = (cfg >= 0);
        fault_idx = 2'(cfg < 0 ? 0 : cfg);
        fi = '0;
        // fault in the bypassed cell (or in the idle backup) must not matter
        if (cfg >= 0) fi[cfg].st_mask = 8'hff; else fi[4].st_mask = 8'h01;
        for (int j = 0; j < 4; j++) begin
          v[j] = 8'($urandom);
          lin[j] = '0;
          lin[j].op = OP_LOAD;
          lin[j].load_in = mkp(v[j]);
          // ARK key byte of this row
          lin[j].colkey[2] = mkp(8'(j + 1));
        end
        @(negedge clk);
        for (int j = 0; j < 4; j++) begin
          chk(lout[j].st.d == v[j], $sformatf("cfg %0d logical %0d value", cfg, j));
          chk(!lout[j].err, $sformatf("cfg %0d logical %0d no error", cfg, j));
        end
        // AddRoundKey through the routing, bypassed cell still faulty
        for (int j = 0; j < 4; j++) lin[j].op = OP_ARK;
        @(negedge clk);
        for (int j = 0; j < 4; j++) begin
          chk(lout[j].st.d == (v[j] ^ 8'(j + 1)), $sformatf("cfg %0d logical %0d ARK", cfg, j));
          chk(!lout[j].err, $sformatf("cfg %0d logical %0d no error after ARK", cfg, j));
        end
        // fault in the cell serving logical position rep
        phys = (cfg >= 0 && rep >= cfg) ? rep + 1 : rep;
        fi = '0;
        fi[phys].st_mask = 8'h10;
        @(negedge clk);
        for (int j = 0; j < 4; j++) lin[j].op = OP_HOLD;
        @(negedge clk);
        for (int j = 0; j < 4; j++)
          chk(lout[j].err == (j == rep), $sformatf("cfg %0d fault in phys %0d flags logical %0d only", cfg, phys, rep));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
