// tb_aes_data_cell: checks every operation of a data cell of row 1 and of
// row 3 (different MixColumns coefficients) with random operands: load,
// AddRoundKey, ShiftRows input, MixColumns + AddRoundKey (encryption) and
// AddRoundKey + InvMixColumns (decryption), SubBytes from the own state and
// from the external key operand with one-cycle latency, the parity prediction
// of each result, and the error bit for an inconsistent state and for a
// faulty SBox output.
module tb_aes_data_cell;
  import aes_pkg::*;
  import aes_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  cell_in_t  cin1, cin3;
  cell_fi_t  fi1, fi3;
  cell_out_t co1, co3;
  int checks = 0, failures = 0;

  aes_data_cell #(.ROW(1)) dut1 (.clk, .rst_n, .cin(cin1), .fi(fi1), .cout(co1));
  aes_data_cell #(.ROW(3)) dut3 (.clk, .rst_n, .cin(cin3), .fi(fi3), .cout(co3));

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

  function automatic logic [7:0] mix_ref(input int row, input logic dec, input logic [7:0] a [4], input logic [7:0] k [4]);
    logic [7:0] y [4];
    for (int i = 0; i < 4; i++) y[i] = dec ? a[i] ^ k[i] : a[i];
    if (!dec)
      return rmul(y[row], 2) ^ rmul(y[(row+1)%4], 3) ^ y[(row+2)%4] ^ y[(row+3)%4] ^ k[row];
    else
      return rmul(y[row], 8'h0e) ^ rmul(y[(row+1)%4], 8'h0b) ^ rmul(y[(row+2)%4], 8'h0d) ^ rmul(y[(row+3)%4], 8'h09);
  endfunction

  task automatic drive(input cell_in_t c);
    @(negedge clk);
    cin1 = c; cin3 = c;
    @(negedge clk);
    cin1.op = OP_HOLD; cin3.op = OP_HOLD; cin1.sb_en = 0; cin3.sb_en = 0;
  endtask

  function automatic bit consistent(input pbyte_t b);
    return (^b.d) == b.p;
  endfunction

  cell_in_t c;
  logic [7:0] a [4], k [4], ld, prev1, prev3;
  initial begin
    cin1 = '0; cin3 = '0; fi1 = '0; fi3 = '0; c = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int it = 0; it < 60; it++) begin
      for (int i = 0; i < 4; i++) begin
        a[i] = 8'($urandom); k[i] = 8'($urandom);
        c.col[i] = mkp(a[i]); c.colkey[i] = mkp(k[i]);
      end
      // load
      ld = 8'($urandom);
      c.op = OP_LOAD; c.load_in = mkp(ld); c.dec = 0; c.sb_en = 0;
      drive(c);
      chk(co1.st.d == ld && co3.st.d == ld && consistent(co1.st), "load");
      chk(!co1.err && !co3.err, "no error after load");
      // AddRoundKey uses the key byte of the cell's own row
      c.op = OP_ARK;
      drive(c);
      chk(co1.st.d == (ld ^ k[1]) && consistent(co1.st), "ARK row 1");
      chk(co3.st.d == (ld ^ k[3]) && consistent(co3.st), "ARK row 3");
      // SubBytes of own state, forward or inverse, one cycle later
      prev1 = co1.st.d; prev3 = co3.st.d;
      c.op = OP_HOLD; c.sb_en = 1; c.sb_ext = 0; c.sb_inv = it[0];
      @(negedge clk);
      cin1 = c; cin3 = c;
      @(negedge clk);
      cin1.sb_en = 0; cin3.sb_en = 0;
      chk(co1.sb_vld, "sbox valid");
      chk(co1.sb.d == (it[0] ? rinv_sbox(prev1) : rsbox(prev1)) && consistent(co1.sb), "SubBytes own state row 1");
      chk(co3.sb.d == (it[0] ? rinv_sbox(prev3) : rsbox(prev3)) && consistent(co3.sb), "SubBytes own state row 3");
      // external operand (key schedule)
      c.sb_ext = 1; c.sb_inv = 0; c.sb_in = mkp(ld);
      @(negedge clk);
      cin3 = c;
      @(negedge clk);
      cin3.sb_en = 0;
      chk(co3.sb.d == rsbox(ld), "SubBytes of external operand");
      c.sb_en = 0; c.sb_ext = 0;
      // ShiftRows input
      c.op = OP_SHIFT; c.shift_in = mkp(8'(it * 7));
      drive(c);
      chk(co1.st.d == 8'(it * 7) && consistent(co1.st), "shift input taken");
      // MixColumns encryption and decryption
      for (int d = 0; d < 2; d++) begin
        c.op = OP_MIX; c.dec = d[0];
        drive(c);
        chk(co1.st.d == mix_ref(1, d[0], a, k), $sformatf("mix row 1 dec=%0d", d));
        chk(co3.st.d == mix_ref(3, d[0], a, k), $sformatf("mix row 3 dec=%0d", d));
        chk(consistent(co1.st) && consistent(co3.st), $sformatf("mix parity prediction dec=%0d", d));
        chk(!co1.err && !co3.err, "no error bit");
      end
    end
    // a single-bit fault in a result shows in the error bit
    fi1.st_mask = 8'h08;
    c.op = OP_ARK; c.dec = 0;
    drive(c);
    chk(co1.err && !co3.err, "state fault raises error bit");
    fi1 = '0;
    // a faulty SBox output shows in the error bit while valid
    fi3.sb_mask = 8'h01;
    c.op = OP_LOAD; c.load_in = mkp(8'h00);
    drive(c);
    c.op = OP_HOLD; c.sb_en = 1;
    @(negedge clk);
    cin1 = c; cin3 = c;
    @(negedge clk);
    cin1.sb_en = 0; cin3.sb_en = 0;
    chk(co3.err && !co1.err, "SBox fault raises error bit");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
