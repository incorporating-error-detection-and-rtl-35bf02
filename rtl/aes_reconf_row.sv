// aes_reconf_row: one row of the state array with a backup data cell.
//
// Four logical positions are served by five physical cells of the same row
// (index 4 is the backup).  With no fault recorded, logical position j uses
// physical cell j and the backup idles.  When cell f is marked faulty, the
// upper multiplexer layer shifts the input bundles of positions f..3 one cell
// to the right, so the backup receives the last one and cell f idles; the
// lower multiplexer layer picks the outputs back into logical order.  One fault
// per row can be tolerated this way; the map is held by aes_reconfig_unit.
//
// Purely combinational routing around the five cells; timing is the cells'.
module aes_reconf_row
  import aes_pkg::*;
#(
  parameter int unsigned ROW = 0
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  cell_in_t  [NCOLS-1:0]  lin,        // logical input bundles
  input  cell_fi_t  [NPHYS-1:0]  fi,         // fault emulation, physical index
  input  logic                   fault_vld,  // a cell of this row is bypassed
  input  logic      [1:0]        fault_idx,  // physical index of that cell
  output cell_out_t [NCOLS-1:0]  lout        // logical output bundles
);

  localparam cell_in_t IDLE = '{op: OP_HOLD, default: '0};

  cell_in_t  [NPHYS-1:0] pin;
  cell_out_t [NPHYS-1:0] pout;

  // upper layer: input redirection toward the backup cell
  always_comb begin
    for (int p = 0; p < int'(NPHYS); p++) begin
      if (!fault_vld || p < int'(fault_idx))
        pin[p] = (p < int'(NCOLS)) ? lin[p % NCOLS] : IDLE;
      else if (p == int'(fault_idx))
        pin[p] = IDLE;
      else
        pin[p] = lin[(p - 1) % NCOLS];
    end
  end

  for (genvar p = 0; p < NPHYS; p++) begin : g_cell
    aes_data_cell #(.ROW(ROW)) u_cell (
      .clk  (clk),
      .rst_n(rst_n),
      .cin  (pin[p]),
      .fi   (fi[p]),
      .cout (pout[p])
    );
  end

  // lower layer: restore the logical alignment of the outputs
  always_comb begin
    for (int j = 0; j < int'(NCOLS); j++)
      lout[j] = (fault_vld && j >= int'(fault_idx)) ? pout[j + 1] : pout[j];
  end

endmodule
