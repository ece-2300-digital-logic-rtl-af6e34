// forwarding_unit: select logic of the four forwarding multiplexers.
//
// Combinational. Two multiplexers sit behind the register file in ID and
// feed both ID/EX and the branch comparator; two sit in front of the ALU in
// EX. Each picks the value read or held normally, the ALU result waiting in
// EX/MEM (MEM->ID, MEM->EX), or the write-back value in MEM/WB (WB->ID,
// WB->EX). A source is forwarded only when the later stage holds an
// instruction that writes that register (LD set) and the consumer reads it.
// The nearer stage wins: when MEM and WB hold the same destination, MEM's
// value is the newer one. A load in MEM has no data yet, so a match on it
// forwards nothing; the hazard unit has held the consumer where that
// matters, and in EX the value then arrives through WB->EX.
// WB->ID is needed because the register file is written at the end of WB,
// one edge too late for the instruction reading it in the same cycle.
module forwarding_unit
  import cpu_pkg::*;
(
  input  logic     id_uses_sa,
  input  logic     id_uses_sb,
  input  reg_idx_t id_sa,
  input  reg_idx_t id_sb,
  input  logic     ex_uses_sa,
  input  logic     ex_uses_sb,
  input  reg_idx_t ex_sa,
  input  reg_idx_t ex_sb,
  input  logic     mem_ld,
  input  logic     mem_md,     // instruction in MEM is a load
  input  reg_idx_t mem_dr,
  input  logic     wb_ld,
  input  reg_idx_t wb_dr,
  output fwd_sel_e id_a_sel,
  output fwd_sel_e id_b_sel,
  output fwd_sel_e ex_a_sel,
  output fwd_sel_e ex_b_sel
);

  function automatic fwd_sel_e pick(input logic uses, input reg_idx_t src);
    if (uses && mem_ld && mem_dr == src)
      return mem_md ? FWD_NONE : FWD_MEM;
    else if (uses && wb_ld && wb_dr == src)
      return FWD_WB;
    else
      return FWD_NONE;
  endfunction

  assign id_a_sel = pick(id_uses_sa, id_sa);
  assign id_b_sel = pick(id_uses_sb, id_sb);
  assign ex_a_sel = pick(ex_uses_sa, ex_sa);
  assign ex_b_sel = pick(ex_uses_sb, ex_sb);

endmodule
