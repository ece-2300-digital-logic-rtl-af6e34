// hazard_unit: the hazard detection unit of the pipelined processor.
//
// Combinational. It finds the data hazards that forwarding cannot cover and
// inserts one bubble per cycle of the hazard: PCL and IF/IDL go low so the
// instructions in IF and ID are held, and Clear forces a NOP into ID/EX.
// Loads have no delay slot. The cases, from the lecture's list:
//   * a load in EX whose destination is read by the instruction in ID
//     (R-type, I-type ALU, load, store address or store data, branch);
//   * an ALU instruction in EX whose destination is read by a branch in ID
//     (the branch compares in ID, so it needs the value a cycle earlier);
//   * a load in MEM whose destination is read by a branch in ID (a load
//     followed by a branch waits two cycles, or one if two instructions apart).
// The lecture's drawing gives the unit ID.SA, ID.SB, ID.R-type, EX.DR and
// EX.Load; the extra class inputs and the MEM-stage inputs are what the
// other listed cases need. cause reports which case fired.
module hazard_unit
  import cpu_pkg::*;
(
  input  logic     id_uses_sa,
  input  logic     id_uses_sb,
  input  logic     id_is_branch,
  input  reg_idx_t id_sa,
  input  reg_idx_t id_sb,
  input  logic     ex_ld,        // instruction in EX writes a register
  input  logic     ex_is_load,
  input  reg_idx_t ex_dr,
  input  logic     mem_is_load,
  input  reg_idx_t mem_dr,
  output logic     pcl,          // load PC
  output logic     ifidl,        // load IF/ID
  output logic     clear,        // force a NOP into ID/EX
  output hazard_e  cause
);

  logic ex_match, mem_match;

  assign ex_match  = (id_uses_sa && id_sa == ex_dr) || (id_uses_sb && id_sb == ex_dr);
  assign mem_match = (id_uses_sa && id_sa == mem_dr) || (id_uses_sb && id_sb == mem_dr);

  always_comb begin
    if (ex_is_load && ex_match)
      cause = HZ_LOAD_USE;
    else if (id_is_branch && ex_ld && ex_match)
      cause = HZ_ALU_BRANCH;
    else if (id_is_branch && mem_is_load && mem_match)
      cause = HZ_LOAD_BRANCH;
    else
      cause = HZ_NONE;
  end

  assign clear = (cause != HZ_NONE);
  assign pcl   = !clear;
  assign ifidl = !clear;

endmodule
