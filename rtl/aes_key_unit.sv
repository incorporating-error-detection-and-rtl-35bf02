// aes_key_unit: AES-128 round-key register with parity and on-the-fly key
// schedule in both directions.
//
// The 16 round-key bytes are held as a 4x4 matrix [row][col] of parity bytes.
// The unit has no SBox of its own: it hands the four operands of SubWord,
// already rotated (RotWord), to the SBoxes of the last state row (ksb_op) and
// receives their results (ksb_res) one cycle later.
//  * Encryption:  w0' = w0 ^ SubWord(RotWord(w3)) ^ Rcon, w1' = w1 ^ w0', ...
//    which turns round key i into i+1.
//  * Decryption:  w3' = w3 ^ w2, w2' = w2 ^ w1, w1' = w1 ^ w0,
//    w0' = w0 ^ SubWord(RotWord(w3')) ^ Rcon, which turns round key i into i-1;
//    decryption therefore starts from the last round key.
// Parity is propagated through the XORs; the SBox results carry the parity
// predicted in the data cells.  err reports any key byte whose stored parity
// disagrees with its data.
//
// load shifts a column in from the side like the data array (column 0 takes
// kin_col, column c takes c-1) and sets Rcon to 01 (encryption) or 36
// (decryption).  step applies one schedule step with ksb_res.
module aes_key_unit
  import aes_pkg::*;
(
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          load,
  input  logic                          dec,
  input  pbyte_t [NROWS-1:0]            kin_col,
  input  logic                          step,
  input  pbyte_t [NCOLS-1:0]            ksb_res,   // S(RotWord operand), index = word byte
  output pbyte_t [NCOLS-1:0]            ksb_op,
  output pbyte_t [NROWS-1:0][NCOLS-1:0] rkey,
  output logic                          err
);

  pbyte_t [NROWS-1:0][NCOLS-1:0] k, k_nxt;
  logic [7:0] rc, rc_nxt;

  function automatic pbyte_t px(input pbyte_t a, input pbyte_t b);
    return '{d: a.d ^ b.d, p: a.p ^ b.p};
  endfunction

  // SubWord operand: last word (encryption) or last word of the previous key
  always_comb begin
    for (int i = 0; i < 4; i++) begin
      if (!dec) ksb_op[i] = k[(i + 1) % 4][3];
      else      ksb_op[i] = px(k[(i + 1) % 4][3], k[(i + 1) % 4][2]);
    end
  end

  always_comb begin
    pbyte_t t;
    t      = '0;
    k_nxt  = k;
    rc_nxt = rc;
    if (load) begin
      for (int r = 0; r < 4; r++) begin
        k_nxt[r][0] = kin_col[r];
        for (int c = 1; c < 4; c++) k_nxt[r][c] = k[r][c-1];
      end
      rc_nxt = dec ? 8'h36 : 8'h01;
    end else if (step) begin
      for (int r = 0; r < 4; r++) begin
        t = ksb_res[r];
        if (r == 0) t = '{d: t.d ^ rc, p: t.p ^ (^rc)};
        if (!dec) begin
          k_nxt[r][0] = px(k[r][0], t);
          k_nxt[r][1] = px(k[r][1], k_nxt[r][0]);
          k_nxt[r][2] = px(k[r][2], k_nxt[r][1]);
          k_nxt[r][3] = px(k[r][3], k_nxt[r][2]);
        end else begin
          k_nxt[r][3] = px(k[r][3], k[r][2]);
          k_nxt[r][2] = px(k[r][2], k[r][1]);
          k_nxt[r][1] = px(k[r][1], k[r][0]);
          k_nxt[r][0] = px(k[r][0], t);
        end
      end
      rc_nxt = dec ? (rc[0] ? (((rc ^ 8'h1b) >> 1) | 8'h80) : (rc >> 1)) : xtime(rc);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      k  <= '0;
      rc <= 8'h01;
    end else begin
      k  <= k_nxt;
      rc <= rc_nxt;
    end
  end

  always_comb begin
    err = 1'b0;
    for (int r = 0; r < 4; r++)
      for (int c = 0; c < 4; c++) err |= ^k[r][c].d ^ k[r][c].p;
  end

  assign rkey = k;

endmodule
