// aes_control_unit: sequencer of the fault-tolerant AES core.
//
// One block takes 36 cycles from the cycle after start to done:
//   LOAD  x4   block and key enter from the side, one column per cycle
//              (column 3 first), from the input buffer;
//   INIT       initial AddRoundKey; the last-row SBoxes start the first key
//              schedule step;
//   per round (10 rounds, three cycles each):
//     RA       SubBytes stage 1 in every cell; the key register takes the
//              key SBox results (next round key);
//     RB       SubBytes stage 2 and ShiftRows: every cell takes its
//              neighbour's SBox output;
//     RC       MixColumns + AddRoundKey (AddRoundKey only in round 10); the
//              last-row SBoxes take the next key operands (rounds 1-9);
//              checkpoint;
//   FIN        checkpoint on the final result.
// A checkpoint that asks for a restart (after reconfiguration) sends the
// sequencer back to LOAD, which reloads the same block from the buffer.  When
// fatal is set the sequencer returns to IDLE without done.
//
// start is accepted in IDLE and DONE unless fatal is set; busy is high from the cycle after start
// until done or abort.  done is a one-cycle pulse; the result stays in the
// array until the next start.
module aes_control_unit
  import aes_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  logic       dec,        // direction of the block being started
  input  logic       restart,    // from aes_reconfig_unit, valid when chk
  input  logic       fatal,
  // data unit
  output cell_op_e   op,
  output logic       dec_q,      // direction of the block in flight
  output logic       sb_en,
  output logic       ksb_en,
  output logic [1:0] load_sel,   // buffer column that enters this cycle
  // key unit
  output logic       key_load,
  output logic       key_step,
  // reconfiguration unit
  output logic       active,
  output logic       chk,
  // status
  output logic       accept,     // start taken this cycle
  output logic       busy,
  output logic       done,
  output logic       aborted
);

  typedef enum logic [2:0] {S_IDLE, S_LOAD, S_INIT, S_RA, S_RB, S_RC, S_FIN, S_DONE} state_e;

  state_e     st;
  logic [1:0] lcnt;
  logic [3:0] rnd;

  assign accept = start && !fatal && (st == S_IDLE || st == S_DONE);

  always_comb begin
    op       = OP_HOLD;
    sb_en    = 1'b0;
    ksb_en   = 1'b0;
    key_load = 1'b0;
    key_step = 1'b0;
    active   = 1'b0;
    chk      = 1'b0;
    load_sel = 2'(3 - lcnt);
    unique case (st)
      S_LOAD: begin op = OP_LOAD; key_load = 1'b1; end
      S_INIT: begin op = OP_ARK; ksb_en = 1'b1; active = 1'b1; end
      S_RA:   begin sb_en = 1'b1; key_step = 1'b1; active = 1'b1; end
      S_RB:   begin op = OP_SHIFT; active = 1'b1; end
      S_RC:   begin
                op     = (rnd == 4'(NROUNDS)) ? OP_ARK : OP_MIX;
                ksb_en = (rnd != 4'(NROUNDS));
                active = 1'b1;
                chk    = 1'b1;
              end
      S_FIN:  begin active = 1'b1; chk = 1'b1; end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st      <= S_IDLE;
      lcnt    <= '0;
      rnd     <= '0;
      dec_q   <= 1'b0;
      done    <= 1'b0;
      aborted <= 1'b0;
    end else begin
      done    <= 1'b0;
      aborted <= 1'b0;
      if (accept) begin
        st    <= S_LOAD;
        lcnt  <= '0;
        dec_q <= dec;
      end else begin
        unique case (st)
          S_LOAD: begin
            lcnt <= lcnt + 2'd1;
            if (lcnt == 2'd3) st <= S_INIT;
          end
          S_INIT: begin st <= S_RA; rnd <= 4'd1; end
          S_RA:   st <= S_RB;
          S_RB:   st <= S_RC;
          S_RC, S_FIN: begin
            if (fatal) begin
              st <= S_IDLE; aborted <= 1'b1;
            end else if (restart) begin
              st <= S_LOAD; lcnt <= '0;
            end else if (st == S_FIN) begin
              st <= S_DONE; done <= 1'b1;
            end else if (rnd == 4'(NROUNDS)) begin
              st <= S_FIN;
            end else begin
              st <= S_RA; rnd <= rnd + 4'd1;
            end
          end
          default: ;
        endcase
      end
    end
  end

  assign busy = (st != S_IDLE) && (st != S_DONE);

  // handshake rules
  a_done_ends_busy: assert property (@(posedge clk) disable iff (!rst_n) done |-> !busy);
  a_accept_busy:    assert property (@(posedge clk) disable iff (!rst_n) accept |=> busy);
  a_no_start_fatal: assert property (@(posedge clk) disable iff (!rst_n) fatal |-> !accept);

endmodule
