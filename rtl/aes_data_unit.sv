// aes_data_unit: the 4x4 array of data cells, one aes_reconf_row per state row,
// and the wiring between them.
//
// All routing is done in logical coordinates (row r, column c), so it is
// unaffected by reconfiguration, which happens inside each row:
//  * load:    column 0 takes load_col, column c takes column c-1 (the block
//             enters from the side, one column per cycle, last column first);
//  * shift:   cell (r,c) takes the SBox output of cell (r,(c+r)%4) when
//             encrypting (ShiftRows) or (r,(c-r)%4) when decrypting;
//  * mix:     every cell sees the four state bytes and four key bytes of its
//             column (column bus);
//  * key SBox: in cycles given by ksb_en the SBoxes of the last row take the
//             four operands ksb_in from the key unit in forward direction,
//             and their results come back on ksb_out one cycle later.
//
// Control (op, dec, sb_en, ksb_en) comes from aes_control_unit; the fault map
// from aes_reconfig_unit.  Outputs are the logical state, the error bit of
// every logical cell and the key SBox results.
module aes_data_unit
  import aes_pkg::*;
(
  input  logic                          clk,
  input  logic                          rst_n,
  input  cell_op_e                      op,
  input  logic                          dec,
  input  logic                          sb_en,     // data SubBytes, stage 1
  input  logic                          ksb_en,    // key operands into row 3 SBoxes
  input  pbyte_t    [NROWS-1:0]         load_col,  // entering column, index = row
  input  pbyte_t    [NROWS-1:0][NCOLS-1:0] rkey,   // round key [row][col]
  input  pbyte_t    [NCOLS-1:0]         ksb_in,
  output pbyte_t    [NCOLS-1:0]         ksb_out,
  input  logic      [NROWS-1:0]         fault_vld,
  input  logic      [NROWS-1:0][1:0]    fault_idx,
  input  cell_fi_t  [NROWS-1:0][NPHYS-1:0] fi,
  output pbyte_t    [NROWS-1:0][NCOLS-1:0] state,  // [row][col]
  output logic      [NROWS-1:0][NCOLS-1:0] err
);

  cell_in_t  [NROWS-1:0][NCOLS-1:0] cin;
  cell_out_t [NROWS-1:0][NCOLS-1:0] cout;

  always_comb begin
    for (int r = 0; r < int'(NROWS); r++) begin
      for (int c = 0; c < int'(NCOLS); c++) begin
        cin[r][c].op       = op;
        cin[r][c].dec      = dec;
        cin[r][c].sb_en    = sb_en || (ksb_en && r == int'(NROWS) - 1);
        cin[r][c].sb_ext   = ksb_en && r == int'(NROWS) - 1;
        cin[r][c].sb_inv   = dec && !(ksb_en && r == int'(NROWS) - 1);
        cin[r][c].sb_in    = ksb_in[c];
        cin[r][c].load_in  = (c == 0) ? load_col[r] : cout[r][(c + 3) % 4].st;
        cin[r][c].shift_in = dec ? cout[r][(c + 4 - r) % 4].sb : cout[r][(c + r) % 4].sb;
        for (int i = 0; i < int'(NROWS); i++) begin
          cin[r][c].col[i]    = cout[i][c].st;
          cin[r][c].colkey[i] = rkey[i][c];
        end
      end
    end
  end

  for (genvar r = 0; r < NROWS; r++) begin : g_row
    aes_reconf_row #(.ROW(r)) u_row (
      .clk      (clk),
      .rst_n    (rst_n),
      .lin      (cin[r]),
      .fi       (fi[r]),
      .fault_vld(fault_vld[r]),
      .fault_idx(fault_idx[r]),
      .lout     (cout[r])
    );
  end

  always_comb begin
    for (int r = 0; r < int'(NROWS); r++)
      for (int c = 0; c < int'(NCOLS); c++) begin
        state[r][c] = cout[r][c].st;
        err[r][c]   = cout[r][c].err;
      end
    for (int c = 0; c < int'(NCOLS); c++) ksb_out[c] = cout[NROWS-1][c].sb;
  end

endmodule
