// tb_decoder: random instructions; the fields, the destination choice and the
// sign extension are recomputed here from the instruction formats.
module tb_decoder;
  import cpu_pkg::*;
  int checks = 0, failures = 0;
  word_t instr, imm;
  opcode_e op; funct_e funct; reg_idx_t sa, sb, dr;

  decoder dut (.*);

  initial begin : watchdog
    #1000000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic chk(string what, int got, int exp);
    checks++;
    if (got != exp) begin failures++; $display("%s instr=%h got %0h exp %0h", what, instr, got, exp); end
  endtask

  initial begin
    repeat (5000) begin
      int o, e_imm;
      instr = word_t'($urandom); #1;
      o = int'(instr) >> 12;
      chk("sa", sa, (int'(instr) >> 9) & 7);
      chk("sb", sb, (int'(instr) >> 6) & 7);
      chk("funct", funct, int'(instr) & 7);
      chk("op", op, (o <= 7) ? o : 15);
      chk("dr", dr, (o == 0) ? ((int'(instr) >> 3) & 7) : ((int'(instr) >> 6) & 7));
      e_imm = int'(instr) & 63;
      if (e_imm >= 32) e_imm -= 64;
      chk("imm", int'($signed(imm)), e_imm);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
