// branch_unit: the branch hardware of the ID stage.
//
// Combinational. The Adder forms the branch target from the PC+2 value held
// in IF/ID and the sign-extended immediate, target = (PC+2) + SE(IMM), with
// the immediate taken as a byte offset exactly as drawn (no shift between SE
// and the Adder). The =? comparator reports whether the two forwarded source
// operands are equal, and the sign bit of the first operand is passed on;
// the control unit turns both into PCJ. Comparing in ID is what lets a
// taken branch cost only its delay slot.
module branch_unit
  import cpu_pkg::*;
(
  input  word_t pc_plus2,
  input  word_t imm,
  input  word_t a,
  input  word_t b,
  output word_t target,
  output logic  eq,
  output logic  sign
);

  assign target = pc_plus2 + imm;
  assign eq     = (a == b);
  assign sign   = a[XLEN-1];

endmodule
