// aes_ref_pkg: plain behavioural AES-128 reference used by the testbenches.
//
// Written straight from the FIPS-197 definitions and independent of the RTL:
// the SBox is found by brute-force search for the multiplicative inverse, and
// the cipher works on a byte array.  Block and key layout matches the core:
// bits [127:120] hold byte 0, byte i sits in row i%4, column i/4.
package aes_ref_pkg;

  typedef logic [7:0] st_t [16];

  function automatic logic [7:0] rmul(input logic [7:0] a, input logic [7:0] b);
    logic [7:0] r;
    r = 0;
    for (int i = 0; i < 8; i++) begin
      if (b[0]) r ^= a;
      a = {a[6:0], 1'b0} ^ (a[7] ? 8'h1b : 8'h00);
      b = b >> 1;
    end
    return r;
  endfunction

  function automatic logic [7:0] rsbox(input logic [7:0] x);
    logic [7:0] iv, s;
    iv = 0;
    for (int c = 1; c < 256; c++)
      if (rmul(x, 8'(c)) == 8'h01) iv = 8'(c);
    s = iv ^ {iv[6:0], iv[7]} ^ {iv[5:0], iv[7:6]} ^ {iv[4:0], iv[7:5]} ^ {iv[3:0], iv[7:4]} ^ 8'h63;
    return s;
  endfunction

  function automatic logic [7:0] rinv_sbox(input logic [7:0] y);
    for (int c = 0; c < 256; c++)
      if (rsbox(8'(c)) == y) return 8'(c);
    return 0;
  endfunction

  function automatic st_t to_st(input logic [127:0] b);
    st_t s;
    for (int i = 0; i < 16; i++) s[i] = b[127-8*i -: 8];
    return s;
  endfunction

  function automatic logic [127:0] from_st(input st_t s);
    logic [127:0] b;
    for (int i = 0; i < 16; i++) b[127-8*i -: 8] = s[i];
    return b;
  endfunction

  // Round keys 0..10 as 128-bit words.
  function automatic void expand(input logic [127:0] key, output logic [127:0] rk [11]);
    logic [31:0] w [44];
    logic [31:0] t;
    logic [7:0]  rc;
    for (int i = 0; i < 4; i++) w[i] = key[127-32*i -: 32];
    rc = 8'h01;
    for (int i = 4; i < 44; i++) begin
      t = w[i-1];
      if (i % 4 == 0) begin
        t = {rsbox(t[23:16]), rsbox(t[15:8]), rsbox(t[7:0]), rsbox(t[31:24])};
        t[31:24] ^= rc;
        rc = rmul(rc, 8'h02);
      end
      w[i] = w[i-4] ^ t;
    end
    for (int r = 0; r < 11; r++) rk[r] = {w[4*r], w[4*r+1], w[4*r+2], w[4*r+3]};
  endfunction

  function automatic logic [127:0] encrypt(input logic [127:0] pt, input logic [127:0] key);
    logic [127:0] rk [11];
    st_t s, t;
    expand(key, rk);
    s = to_st(pt ^ rk[0]);
    for (int r = 1; r <= 10; r++) begin
      for (int i = 0; i < 16; i++) s[i] = rsbox(s[i]);
      for (int rr = 0; rr < 4; rr++)
        for (int c = 0; c < 4; c++) t[rr + 4*c] = s[rr + 4*((c + rr) % 4)];
      s = t;
      if (r != 10)
        for (int c = 0; c < 4; c++)
          for (int rr = 0; rr < 4; rr++)
            t[rr + 4*c] = rmul(s[rr + 4*c], 2) ^ rmul(s[(rr+1)%4 + 4*c], 3)
                        ^ s[(rr+2)%4 + 4*c] ^ s[(rr+3)%4 + 4*c];
      s = to_st(from_st(t) ^ rk[r]);
    end
    return from_st(s);
  endfunction

  function automatic logic [127:0] decrypt(input logic [127:0] ct, input logic [127:0] key);
    logic [127:0] rk [11];
    st_t s, t;
    expand(key, rk);
    s = to_st(ct ^ rk[10]);
    for (int r = 9; r >= 0; r--) begin
      for (int rr = 0; rr < 4; rr++)
        for (int c = 0; c < 4; c++) t[rr + 4*((c + rr) % 4)] = s[rr + 4*c];
      for (int i = 0; i < 16; i++) t[i] = rinv_sbox(t[i]);
      s = to_st(from_st(t) ^ rk[r]);
      if (r != 0) begin
        for (int c = 0; c < 4; c++)
          for (int rr = 0; rr < 4; rr++)
            t[rr + 4*c] = rmul(s[rr + 4*c], 8'h0e) ^ rmul(s[(rr+1)%4 + 4*c], 8'h0b)
                        ^ rmul(s[(rr+2)%4 + 4*c], 8'h0d) ^ rmul(s[(rr+3)%4 + 4*c], 8'h09);
        s = t;
      end
    end
    return from_st(s);
  endfunction

endpackage
