// control_unit: the CU of the pipelined processor, in the ID stage.
//
// Combinational. From OP and FUNCT it produces the control word that travels
// down the pipeline with the instruction: F and MB for EX, MW and MD for MEM,
// LD for WB, plus class flags (load, store, which source registers are read)
// for the hazard detection and forwarding units. From the outputs of the
// ID-stage comparator (=?) and the sign bit of the first operand it also
// produces PCJ, which steers the PC multiplexer to the branch target. The
// ISA has a branch delay slot, so a taken branch never squashes the
// instruction already fetched behind it. Which branch conditions exist
// (BEQ, BNE, BGEZ, BLTZ) is this design's reading of the =? and sign-bit
// inputs; the lecture's examples use BEQ and BGEZ.
module control_unit
  import cpu_pkg::*;
(
  input  opcode_e op,
  input  funct_e  funct,
  input  logic    eq,         // ID operands equal (=?)
  input  logic    sign,       // sign bit of the first ID operand
  output ctrl_t   ctrl,
  output logic    is_branch,
  output logic    pcj         // take the branch target
);

  always_comb begin
    ctrl      = CTRL_BUBBLE;
    is_branch = 1'b0;
    pcj       = 1'b0;
    unique case (op)
      OP_RTYPE: begin
        ctrl.ld      = 1'b1;
        ctrl.uses_sa = 1'b1;
        ctrl.uses_sb = 1'b1;
        unique case (funct)
          FN_ADD:  ctrl.f = ALU_ADD;
          FN_SUB:  ctrl.f = ALU_SUB;
          FN_AND:  ctrl.f = ALU_AND;
          FN_OR:   ctrl.f = ALU_OR;
          default: ctrl.ld = 1'b0;  // unused FUNCT values: no-op
        endcase
      end
      OP_ADDI: begin
        ctrl.f       = ALU_ADD;
        ctrl.mb      = 1'b1;
        ctrl.ld      = 1'b1;
        ctrl.uses_sa = 1'b1;
      end
      OP_LW: begin
        ctrl.f       = ALU_ADD;
        ctrl.mb      = 1'b1;
        ctrl.md      = 1'b1;
        ctrl.ld      = 1'b1;
        ctrl.is_load = 1'b1;
        ctrl.uses_sa = 1'b1;
      end
      OP_SW: begin
        ctrl.f        = ALU_ADD;
        ctrl.mb       = 1'b1;
        ctrl.mw       = 1'b1;
        ctrl.is_store = 1'b1;
        ctrl.uses_sa  = 1'b1;
        ctrl.uses_sb  = 1'b1;
      end
      OP_BEQ: begin
        is_branch    = 1'b1;
        ctrl.uses_sa = 1'b1;
        ctrl.uses_sb = 1'b1;
        pcj          = eq;
      end
      OP_BNE: begin
        is_branch    = 1'b1;
        ctrl.uses_sa = 1'b1;
        ctrl.uses_sb = 1'b1;
        pcj          = !eq;
      end
      OP_BGEZ: begin
        is_branch    = 1'b1;
        ctrl.uses_sa = 1'b1;
        pcj          = !sign;
      end
      OP_BLTZ: begin
        is_branch    = 1'b1;
        ctrl.uses_sa = 1'b1;
        pcj          = sign;
      end
      default: ;  // OP_NOP
    endcase
  end

endmodule
