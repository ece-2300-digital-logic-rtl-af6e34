// alu: the EX-stage arithmetic/logic unit of the pipelined processor.
//
// Combinational. The function select f (F in the datapath drawings) picks
// one of the four operations the lecture's example programs use: ADD (also
// used for ADDI and for the address of LW/SW), SUB, AND and OR. The width of
// F and its encoding are this design's choice. Results wrap modulo 2^XLEN;
// no flags are produced because branches compare in ID, not in the ALU.
module alu
  import cpu_pkg::*;
(
  input  alu_fn_e f,
  input  word_t   a,
  input  word_t   b,
  output word_t   y
);

  always_comb begin
    unique case (f)
      ALU_ADD: y = a + b;
      ALU_SUB: y = a - b;
      ALU_AND: y = a & b;
      ALU_OR:  y = a | b;
      default: y = a + b;
    endcase
  end

endmodule
