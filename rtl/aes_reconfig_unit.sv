// aes_reconfig_unit: checkpoint and reconfiguration logic (an extension of the
// control unit).
//
// While a computation runs (active), the unit watches the error bits of the
// sixteen logical data cells and of the key register.  The first cycle in
// which any of them is set is captured, translated from logical to physical
// cell position with the current fault map; because the error bit of a cell
// rises in the cycle after the faulty cell wrote its result, and before the
// wrong value has spread to other cells, the captured set locates the fault.
//
// At a checkpoint (chk, the last cycle of every round) a captured error is
// acted upon: each row with one newly located cell records it in the fault map
// (which drives the row multiplexers) and restart asks the control unit to
// recompute the block from the beginning.  If a row would need a second
// replacement, two cells of one row fail in the same cycle, or only the key
// register is in error (there is no spare for it), fatal is set instead and
// stays set until reset: the core cannot continue.  fatal rises in the
// checkpoint cycle itself, restart is a combinational pulse in that cycle.
//
// fault_vld/fault_idx reset to "no fault" and are kept across blocks.
module aes_reconfig_unit
  import aes_pkg::*;
(
  input  logic                             clk,
  input  logic                             rst_n,
  input  logic                             active,
  input  logic                             chk,
  input  logic      [NROWS-1:0][NCOLS-1:0] err,      // logical cell error bits
  input  logic                             key_err,
  output logic      [NROWS-1:0]            fault_vld,
  output logic      [NROWS-1:0][1:0]       fault_idx,
  output logic                             restart,
  output logic                             fatal,
  output logic                             detected  // an error was seen this cycle or earlier in the block
);

  logic                             fatal_q;
  logic                             cap_vld;
  logic [NROWS-1:0][NPHYS-1:0]      cap_phys;
  logic                             cap_key;

  logic                             cur_any;
  logic [NROWS-1:0][NPHYS-1:0]      cur_phys;
  logic [NROWS-1:0][NPHYS-1:0]      use_phys;
  logic                             use_key;

  // logical -> physical position of the current error bits
  always_comb begin
    cur_phys = '0;
    for (int r = 0; r < int'(NROWS); r++)
      for (int j = 0; j < int'(NCOLS); j++)
        if (err[r][j]) begin
          if (fault_vld[r] && j >= int'(fault_idx[r])) cur_phys[r][j + 1] = 1'b1;
          else                                          cur_phys[r][j]     = 1'b1;
        end
    cur_any = (|err) || key_err;
  end

  assign use_phys = cap_vld ? cap_phys : cur_phys;
  assign use_key  = cap_vld ? cap_key  : (key_err && !(|err));
  assign detected = cap_vld || (active && cur_any);

  // decision at a checkpoint
  logic                  act;
  logic                  bad;
  logic [NROWS-1:0]      nv;
  logic [NROWS-1:0][1:0] ni;

  always_comb begin
    act = active && chk && (cap_vld || cur_any);
    bad = use_key;
    nv  = fault_vld;
    ni  = fault_idx;
    for (int r = 0; r < int'(NROWS); r++) begin
      if (|use_phys[r]) begin
        if (((use_phys[r] & (use_phys[r] - 1'b1)) != '0) || fault_vld[r] || use_phys[r][NPHYS-1]) bad = 1'b1;
        nv[r] = 1'b1;
        for (int p = 0; p < int'(NCOLS); p++)
          if (use_phys[r][p]) ni[r] = 2'(p);
      end
    end
    restart = act && !bad && !fatal_q;
  end

  assign fatal = fatal_q || (act && bad);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cap_vld   <= 1'b0;
      cap_phys  <= '0;
      cap_key   <= 1'b0;
      fault_vld <= '0;
      fault_idx <= '0;
      fatal_q   <= 1'b0;
    end else begin
      if (!active || act) begin
        cap_vld <= 1'b0;
      end else if (!cap_vld && cur_any) begin
        cap_vld  <= 1'b1;
        cap_phys <= cur_phys;
        cap_key  <= key_err && !(|err);
      end
      if (act) begin
        if (bad) begin
          fatal_q <= 1'b1;
        end else begin
          fault_vld <= nv;
          fault_idx <= ni;
        end
      end
    end
  end

  // a repaired row stays repaired; restart and fatal exclude each other
  for (genvar r = 0; r < NROWS; r++) begin : g_chk
    a_map_kept: assert property (@(posedge clk) disable iff (!rst_n)
                                 fault_vld[r] |=> fault_vld[r] && $stable(fault_idx[r]));
  end
  a_restart_xor_fatal: assert property (@(posedge clk) disable iff (!rst_n) !(restart && fatal));

endmodule
