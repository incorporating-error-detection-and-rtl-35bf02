// aes_pkg: types, constants and GF(2^8) helper functions shared by the
// fault-tolerant AES-128 core.
//
// Every state and key byte travels as a 9-bit "parity byte" (pbyte_t): eight
// data bits plus one parity bit that holds the *predicted* parity (even parity,
// parity bit = XOR of the data bits when the byte is correct).  A byte whose
// parity bit differs from the XOR of its data bits is erroneous.
//
// The package also holds the SBox parity tables used by the SBox parity
// predictor.  They are computed at elaboration from the textbook definition of
// the AES SBox (multiplicative inverse in GF(2^8) modulo x^8+x^4+x^3+x+1,
// followed by the affine map), independently of the composite-field datapath
// that computes the SBox values themselves.
package aes_pkg;

  typedef logic [7:0] byte_t;

  typedef struct packed {
    logic [7:0] d;   // data byte
    logic       p;   // predicted (stored) parity bit
  } pbyte_t;

  // Operation a data cell performs on its state register in one cycle.
  typedef enum logic [2:0] {
    OP_HOLD  = 3'd0,  // keep the state
    OP_LOAD  = 3'd1,  // take load_in (side load, shifting along the row)
    OP_ARK   = 3'd2,  // state ^= round key byte
    OP_SHIFT = 3'd3,  // take shift_in (SBox result of the ShiftRows source cell)
    OP_MIX   = 3'd4   // encrypt: MixColumns then AddRoundKey; decrypt: AddRoundKey then InvMixColumns
  } cell_op_e;

  // Everything one data cell receives in one cycle.  The reconfigurable row
  // routes this bundle as a whole: the upper multiplexer layer of a row.
  typedef struct packed {
    cell_op_e         op;
    logic             dec;     // 1: decryption coefficients for OP_MIX
    logic             sb_en;   // feed the SBox pipeline this cycle
    logic             sb_ext;  // SBox input is sb_in (key schedule) instead of own state
    logic             sb_inv;  // inverse SBox
    pbyte_t           sb_in;   // external SBox operand (key byte)
    pbyte_t           load_in; // byte arriving from the left neighbour / input
    pbyte_t           shift_in;// SBox result from the ShiftRows source cell
    pbyte_t [3:0]     col;     // state bytes of this cell's logical column, index = row
    pbyte_t [3:0]     colkey;  // round key bytes of the same column, index = row
  } cell_in_t;

  // Everything one data cell drives.  The lower multiplexer layer of a row
  // restores the logical alignment of these bundles.
  typedef struct packed {
    pbyte_t st;      // stored state byte with its predicted parity
    pbyte_t sb;      // SBox pipeline output with its predicted parity
    logic   sb_vld;  // sb holds a result this cycle
    logic   err;     // error bit: actual vs predicted parity (state, and SBox output when valid)
  } cell_out_t;

  // Fault emulation inputs of a data cell (tie to zero in normal use).
  typedef struct packed {
    logic [7:0] sb_mask;  // XORed into the SBox output data bits
    logic [7:0] st_mask;  // XORed into the data bits written to the state register
  } cell_fi_t;

  localparam int unsigned NROWS  = 4;
  localparam int unsigned NCOLS  = 4;
  localparam int unsigned NPHYS  = NCOLS + 1;  // four cells plus the backup cell
  localparam int unsigned NROUNDS = 10;   // AES-128

  function automatic logic par8(input logic [7:0] b);
    return ^b;
  endfunction

  function automatic pbyte_t mkp(input logic [7:0] b);
    return '{d: b, p: ^b};
  endfunction

  function automatic logic [7:0] xtime(input logic [7:0] b);
    return {b[6:0], 1'b0} ^ (b[7] ? 8'h1b : 8'h00);
  endfunction

  // GF(2^8) multiplication in the AES polynomial basis.
  function automatic logic [7:0] gmul(input logic [7:0] a, input logic [7:0] b);
    logic [7:0] r, t;
    r = '0;
    t = a;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) r ^= t;
      t = xtime(t);
    end
    return r;
  endfunction

  function automatic logic [7:0] ginv_ref(input logic [7:0] a);
    logic [7:0] r, sq;
    // a^254 = a^(2+4+8+16+32+64+128)
    r  = 8'h01;
    sq = a;
    for (int i = 1; i < 8; i++) begin
      sq = gmul(sq, sq);
      r  = gmul(r, sq);
    end
    return r;
  endfunction

  function automatic logic [7:0] affine(input logic [7:0] b);
    logic [7:0] r;
    for (int i = 0; i < 8; i++)
      r[i] = b[i] ^ b[(i+4)%8] ^ b[(i+5)%8] ^ b[(i+6)%8] ^ b[(i+7)%8];
    return r ^ 8'h63;
  endfunction

  function automatic logic [7:0] inv_affine(input logic [7:0] b);
    logic [7:0] r;
    for (int i = 0; i < 8; i++)
      r[i] = b[(i+2)%8] ^ b[(i+5)%8] ^ b[(i+7)%8];
    return r ^ 8'h05;
  endfunction

  // Parity of S(x) (inv = 0) or of S^-1(x) (inv = 1) for all 256 inputs.
  function automatic logic [255:0] gen_sbox_par(input logic inv);
    logic [255:0] t;
    for (int x = 0; x < 256; x++) begin
      if (!inv) t[x] = ^affine(ginv_ref(8'(x)));
      else      t[x] = ^ginv_ref(inv_affine(8'(x)));
    end
    return t;
  endfunction

  localparam logic [255:0] SBOX_PAR     = gen_sbox_par(1'b0);
  localparam logic [255:0] INV_SBOX_PAR = gen_sbox_par(1'b1);

  // Parity of c*a for the MixColumns coefficients, expressed through the
  // parity of a and its top bits (the 0x1b reduction has even weight).
  // For 3*a and 9*a only the top bits matter.
  function automatic logic pmul2(input pbyte_t a); return a.p ^ a.d[7];                   endfunction
  function automatic logic pmul3(input logic [7:7] a); return a[7];                      endfunction
  function automatic logic pmul9(input logic [7:5] a); return a[7] ^ a[6] ^ a[5];        endfunction
  function automatic logic pmulB(input pbyte_t a); return a.p ^ a.d[6] ^ a.d[5];          endfunction
  function automatic logic pmulD(input pbyte_t a); return a.p ^ a.d[5];                   endfunction
  function automatic logic pmulE(input pbyte_t a); return a.p ^ a.d[7] ^ a.d[5];          endfunction

endpackage
