// aes_data_cell: one byte of the AES state with its own SBox and parity.
//
// The cell stores one state byte plus a ninth bit that holds the predicted
// parity.  Each cycle it performs the operation named in its input bundle:
// load (side load along the row), AddRoundKey, take the ShiftRows/InvShiftRows
// value (the SBox result of a neighbouring cell, delivered by the row routing),
// or compute its row of MixColumns followed by AddRoundKey (encryption) /
// AddRoundKey followed by InvMixColumns (decryption).  Parity is predicted for
// every operation: XOR for AddRoundKey, routing for ShiftRows, a rule using the
// input parities and top data bits for (Inv)MixColumns, and the table scheme
// inside aes_sbox for SubBytes.
//
// The row index ROW fixes the MixColumns coefficients, so all cells of one row,
// including the row's backup cell, are interchangeable.
//
// The SBox is a two-stage pipeline: an operand given with sb_en at one clock
// edge gives sb/sb_vld during the next cycle.  Its operand is the cell's own
// state byte, or sb_in when sb_ext is set (round-key update).
//
// err is the cell's error bit: the XOR of stored (predicted) and actual parity
// of the state byte, ORed with the same check on the SBox output while it is
// valid.  It depends only on registers.  fi is a fault emulation input: its
// st_mask corrupts the results the cell computes (AddRoundKey, ShiftRows,
// MixColumns), its sb_mask the SBox output.
module aes_data_cell
  import aes_pkg::*;
#(
  parameter int unsigned ROW = 0
) (
  input  logic      clk,
  input  logic      rst_n,
  input  cell_in_t  cin,
  input  cell_fi_t  fi,
  output cell_out_t cout
);

  pbyte_t st, st_nxt, sb;
  logic   sb_vld;

  aes_sbox u_sbox (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_vld   (cin.sb_en),
    .inv      (cin.sb_inv),
    .din      (cin.sb_ext ? cin.sb_in : st),
    .fi_mask  (fi.sb_mask),
    .dout     (sb),
    .dout_vld (sb_vld)
  );

  localparam int unsigned R0 = ROW;
  localparam int unsigned R1 = (ROW + 1) % 4;
  localparam int unsigned R2 = (ROW + 2) % 4;
  localparam int unsigned R3 = (ROW + 3) % 4;

  pbyte_t       k;
  pbyte_t [3:0] y;
  pbyte_t       mix;

  always_comb begin
    k = cin.colkey[ROW];
    // decryption adds the round key before InvMixColumns
    for (int i = 0; i < 4; i++) begin
      y[i].d = cin.col[i].d ^ (cin.dec ? cin.colkey[i].d : 8'h00);
      y[i].p = cin.col[i].p ^ (cin.dec ? cin.colkey[i].p : 1'b0);
    end
    if (!cin.dec) begin
      mix.d = xtime(y[R0].d) ^ xtime(y[R1].d) ^ y[R1].d ^ y[R2].d ^ y[R3].d ^ k.d;
      mix.p = pmul2(y[R0]) ^ pmul3(y[R1].d[7]) ^ y[R2].p ^ y[R3].p ^ k.p;
    end else begin
      mix.d = gmul(y[R0].d, 8'h0e) ^ gmul(y[R1].d, 8'h0b) ^ gmul(y[R2].d, 8'h0d) ^ gmul(y[R3].d, 8'h09);
      mix.p = pmulE(y[R0]) ^ pmulB(y[R1]) ^ pmulD(y[R2]) ^ pmul9(y[R3].d[7:5]);
    end

    unique case (cin.op)
      OP_LOAD:  st_nxt = cin.load_in;
      OP_ARK:   st_nxt = '{d: st.d ^ k.d, p: st.p ^ k.p};
      OP_SHIFT: st_nxt = cin.shift_in;
      OP_MIX:   st_nxt = mix;
      default:  st_nxt = st;
    endcase
    // emulated faults hit the computed results, not the load shift path
    if (cin.op inside {OP_ARK, OP_SHIFT, OP_MIX}) st_nxt.d = st_nxt.d ^ fi.st_mask;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) st <= '0;
    else        st <= st_nxt;
  end

  assign cout.st     = st;
  assign cout.sb     = sb;
  assign cout.sb_vld = sb_vld;
  assign cout.err    = (^st.d ^ st.p) | (sb_vld & (^sb.d ^ sb.p));

endmodule
