// decoder: the ID-stage instruction decoder and sign extender (SE).
//
// Combinational. Splits the instruction held in IF/ID into its fields at the
// bit positions of the lecture's two formats: OP[15:12], RS[11:9], RT[8:6]
// and either RD[5:3]/FUNCT[2:0] or IMM[5:0]. RS drives register file port SA
// and RT port SB. The destination DR is RD for register-register
// instructions and RT for the immediate format, so that "ADDI R7,R1,3" and
// "LW R1,0(R2)" write their first operand, as in the lecture's examples.
// IMM is sign-extended to 16 bits.
module decoder
  import cpu_pkg::*;
(
  input  word_t    instr,
  output opcode_e  op,
  output funct_e   funct,
  output reg_idx_t sa,
  output reg_idx_t sb,
  output reg_idx_t dr,
  output word_t    imm
);

  logic [3:0] op_bits;
  reg_idx_t   rd;

  assign op_bits = instr[15:12];
  assign sa      = instr[11:9];
  assign sb      = instr[8:6];
  assign rd      = instr[5:3];
  assign funct   = funct_e'(instr[2:0]);
  assign imm     = {{(XLEN-IMM_W){instr[IMM_W-1]}}, instr[IMM_W-1:0]};

  always_comb begin
    case (op_bits)
      OP_RTYPE, OP_ADDI, OP_LW, OP_SW, OP_BEQ, OP_BNE, OP_BGEZ, OP_BLTZ:
        op = opcode_e'(op_bits);
      default:
        op = OP_NOP;  // unused opcodes execute as no-ops
    endcase
  end

  assign dr = (op == OP_RTYPE) ? rd : sb;

endmodule
