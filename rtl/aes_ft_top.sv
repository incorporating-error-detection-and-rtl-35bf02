// aes_ft_top: AES-128 encryption/decryption core with byte-parity error
// detection and online reconfiguration.
//
// The state is held in a 4x4 array of data cells, each storing one byte plus a
// predicted-parity bit and owning a pipelined SBox; a round takes three cycles.
// Every row has a backup cell.  When a cell's error bit rises, the
// reconfiguration unit locates the cell, routes that row around it onto the
// backup cell at the end of the round and restarts the block from the input
// buffer, so the result is still correct; up to one fault per row (four in
// all) is tolerated.  A second fault in a row, or an error in the key register,
// stops the core with fatal.
//
// Interface: with the core idle (or done), a one-cycle start captures
// block_in, key_in and decrypt into the input buffer.  For encryption key_in
// is the cipher key; for decryption it is the last (round 10) round key and
// block_in the ciphertext.  busy stays high while the block is processed;
// done pulses 36 cycles after start when no error occurred (more when blocks
// are restarted) and block_out/par_out then hold the result and its parity bits
// until the next start.  err_out is the OR of the live cell error bits,
// err_seen is sticky per block.  fault_vld/fault_idx show the row
// configuration (physical cell replaced in each row).  fi is a fault emulation
// input per physical cell ([row][cell], cell 4 = backup) and must be zero in
// normal use.
// Block layout: bits [127:120] are byte 0, byte i is row i%4, column i/4.
module aes_ft_top
  import aes_pkg::*;
(
  input  logic                               clk,
  input  logic                               rst_n,
  input  logic                               start,
  input  logic                               decrypt,
  input  logic      [127:0]                  block_in,
  input  logic      [127:0]                  key_in,
  output logic                               busy,
  output logic                               done,
  output logic      [127:0]                  block_out,
  output logic      [15:0]                   par_out,
  output logic                               err_out,
  output logic                               err_seen,
  output logic                               restarted,   // pulse: block restarted after reconfiguration
  output logic                               fatal,
  output logic                               aborted,     // pulse: block abandoned because of fatal
  output logic      [NROWS-1:0]              fault_vld,
  output logic      [NROWS-1:0][1:0]         fault_idx,
  input  cell_fi_t  [NROWS-1:0][NPHYS-1:0]   fi
);

  // ---- input buffer (kept for restarts) ----
  logic [127:0] buf_blk, buf_key;
  logic         accept;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      buf_blk <= '0;
      buf_key <= '0;
    end else if (accept) begin
      buf_blk <= block_in;
      buf_key <= key_in;
    end
  end

  // ---- control ----
  cell_op_e   op;
  logic       dec_q, sb_en, ksb_en, key_load, key_step, active, chk, restart;
  logic [1:0] load_sel;

  aes_control_unit u_ctrl (
    .clk, .rst_n, .start, .dec(decrypt), .restart, .fatal,
    .op, .dec_q, .sb_en, .ksb_en, .load_sel, .key_load, .key_step,
    .active, .chk, .accept, .busy, .done, .aborted
  );

  // side load: parity is generated as each byte enters
  pbyte_t [NROWS-1:0] load_col, kin_col;
  always_comb begin
    for (int r = 0; r < int'(NROWS); r++) begin
      load_col[r] = mkp(buf_blk[127 - 8*(4*int'(load_sel) + r) -: 8]);
      kin_col[r]  = mkp(buf_key[127 - 8*(4*int'(load_sel) + r) -: 8]);
    end
  end

  // ---- key unit ----
  pbyte_t [NCOLS-1:0]            ksb_op, ksb_res;
  pbyte_t [NROWS-1:0][NCOLS-1:0] rkey;
  logic                          key_err;

  aes_key_unit u_key (
    .clk, .rst_n, .load(key_load), .dec(dec_q), .kin_col, .step(key_step),
    .ksb_res, .ksb_op, .rkey, .err(key_err)
  );

  // ---- data unit ----
  pbyte_t [NROWS-1:0][NCOLS-1:0] state;
  logic   [NROWS-1:0][NCOLS-1:0] err;

  aes_data_unit u_data (
    .clk, .rst_n, .op, .dec(dec_q), .sb_en, .ksb_en, .load_col, .rkey,
    .ksb_in(ksb_op), .ksb_out(ksb_res), .fault_vld, .fault_idx, .fi,
    .state, .err
  );

  // ---- checkpoint / reconfiguration ----
  logic detected;

  aes_reconfig_unit u_reconf (
    .clk, .rst_n, .active, .chk, .err, .key_err,
    .fault_vld, .fault_idx, .restart, .fatal, .detected
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      err_seen  <= 1'b0;
      restarted <= 1'b0;
    end else begin
      restarted <= restart;
      if (accept)        err_seen <= 1'b0;
      else if (detected) err_seen <= 1'b1;
    end
  end

  always_comb begin
    for (int r = 0; r < int'(NROWS); r++)
      for (int c = 0; c < int'(NCOLS); c++) begin
        block_out[127 - 8*(4*c + r) -: 8] = state[r][c].d;
        par_out[15 - (4*c + r)]           = state[r][c].p;
      end
    err_out = (|err) || key_err;
  end

endmodule
