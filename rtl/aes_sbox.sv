// aes_sbox: two-stage pipelined AES SubBytes / InvSubBytes with parity
// prediction and error propagation.
//
// The value is computed in the composite field GF((2^4)^2): GF(2^4) uses
// x^4+x+1 and the extension uses Y^2+Y+lambda with lambda = 0xC.  An element
// h*Y+l has the inverse (h*d', (h^l)*d') with d = lambda*h^2 ^ h*l ^ l^2 and
// d' = d^-1 in GF(2^4).  Stage 1 applies the inverse affine map (InvSubBytes
// only), maps the byte into the composite field and computes d; stage 2 inverts
// d, forms the inverse, maps it back and applies the affine map (SubBytes only).
//
// Parity prediction follows the scheme described for this architecture: the
// output parity is par_table(x) ^ ^x ^ p_in.  For a correct input (^x == p_in)
// this is the table parity of the correct result; for an erroneous input the
// predicted parity is complemented, so the inconsistency is carried forward
// and shows at the next check.  The parity tables are independent of the
// composite-field datapath.
//
// Interface: in_vld/inv/din are sampled at every clock edge; dout/dout_vld
// appear one cycle later (registered stage 1, combinational stage 2).
// fi_mask is a fault emulation input XORed into the output data bits.
module aes_sbox
  import aes_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_vld,
  input  logic       inv,       // 1: InvSubBytes
  input  pbyte_t     din,
  input  logic [7:0] fi_mask,
  output pbyte_t     dout,
  output logic       dout_vld
);

  // ---- GF(2^4) arithmetic, polynomial x^4+x+1 ----
  function automatic logic [3:0] g4mul(input logic [3:0] a, input logic [3:0] b);
    logic [6:0] r;
    r = '0;
    for (int n = 0; n < 4; n++)
      if (b[n]) r ^= 7'(a) << n;
    for (int n = 6; n >= 4; n--)
      if (r[n]) r ^= 7'(5'b10011) << (n - 4);
    return r[3:0];
  endfunction

  function automatic logic [3:0] g4inv(input logic [3:0] a);
    logic [3:0] a2, a4, a8;
    a2 = g4mul(a, a);
    a4 = g4mul(a2, a2);
    a8 = g4mul(a4, a4);
    return g4mul(g4mul(a2, a4), a8);  // a^14
  endfunction

  // ---- isomorphism polynomial basis <-> composite basis ----
  function automatic logic [7:0] to_cf(input logic [7:0] x);
    logic [7:0] o;
    o[0] = x[0] ^ x[1];
    o[1] = x[3] ^ x[5] ^ x[7];
    o[2] = x[2] ^ x[3] ^ x[4] ^ x[6];
    o[3] = x[3] ^ x[5] ^ x[6];
    o[4] = x[4] ^ x[5] ^ x[6];
    o[5] = x[1] ^ x[4] ^ x[6] ^ x[7];
    o[6] = x[2] ^ x[3] ^ x[5] ^ x[7];
    o[7] = x[5] ^ x[7];
    return o;
  endfunction

  function automatic logic [7:0] from_cf(input logic [7:0] x);
    logic [7:0] o;
    o[0] = x[0] ^ x[4] ^ x[5] ^ x[7];
    o[1] = x[4] ^ x[5] ^ x[7];
    o[2] = x[1] ^ x[6];
    o[3] = x[1] ^ x[7];
    o[4] = x[1] ^ x[3] ^ x[4] ^ x[7];
    o[5] = x[2] ^ x[4] ^ x[6] ^ x[7];
    o[6] = x[1] ^ x[2] ^ x[3] ^ x[4] ^ x[6];
    o[7] = x[2] ^ x[4] ^ x[6];
    return o;
  endfunction

  localparam logic [3:0] LAMBDA = 4'hC;

  // ---- stage 1 ----
  logic [7:0] s1_pre, s1_cf;
  logic [3:0] s1_d;
  logic       s1_ppred;

  always_comb begin
    s1_pre   = inv ? inv_affine(din.d) : din.d;
    s1_cf    = to_cf(s1_pre);
    s1_d     = g4mul(g4mul(s1_cf[7:4], s1_cf[7:4]), LAMBDA)
             ^ g4mul(s1_cf[7:4], s1_cf[3:0])
             ^ g4mul(s1_cf[3:0], s1_cf[3:0]);
    // parity table = predictor; ^x ^ p_in = error propagation
    s1_ppred = (inv ? INV_SBOX_PAR[din.d] : SBOX_PAR[din.d]) ^ (^din.d) ^ din.p;
  end

  logic [3:0] r_h, r_l, r_d;
  logic       r_inv, r_vld, r_p;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r_h <= '0; r_l <= '0; r_d <= '0;
      r_inv <= 1'b0; r_vld <= 1'b0; r_p <= 1'b0;
    end else begin
      r_h   <= s1_cf[7:4];
      r_l   <= s1_cf[3:0];
      r_d   <= s1_d;
      r_inv <= inv;
      r_vld <= in_vld;
      r_p   <= s1_ppred;
    end
  end

  // ---- stage 2 ----
  logic [3:0] s2_di;
  logic [7:0] s2_inv_pb, s2_res;

  always_comb begin
    s2_di     = g4inv(r_d);
    s2_inv_pb = from_cf({g4mul(r_h, s2_di), g4mul(r_h ^ r_l, s2_di)});
    s2_res    = r_inv ? s2_inv_pb : affine(s2_inv_pb);
    dout.d    = s2_res ^ fi_mask;
    dout.p    = r_p;
    dout_vld  = r_vld;
  end

endmodule
