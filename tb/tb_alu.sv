// tb_alu: checks every ALU function on directed corner values and random
// operands against results computed here.
module tb_alu;
  import cpu_pkg::*;
  int checks = 0, failures = 0;
  alu_fn_e f; word_t a, b, y, exp;

  alu dut (.f(f), .a(a), .b(b), .y(y));

  function automatic word_t ref_alu(alu_fn_e fn, word_t x, word_t z);
    case (fn)
      ALU_ADD: return word_t'(int'(x) + int'(z));
      ALU_SUB: return word_t'(int'(x) - int'(z));
      ALU_AND: return x & z;
      default: return x | z;
    endcase
  endfunction

  initial begin : watchdog
    #100000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    word_t corner [5] = '{16'h0000, 16'h0001, 16'h7FFF, 16'h8000, 16'hFFFF};
    for (int k = 0; k < 4; k++)
      foreach (corner[i]) foreach (corner[j]) begin
        f = alu_fn_e'(k); a = corner[i]; b = corner[j]; #1;
        exp = ref_alu(f, a, b); checks++;
        if (y !== exp) begin failures++; $display("f=%0d a=%h b=%h y=%h exp=%h", f, a, b, y, exp); end
      end
    repeat (2000) begin
      f = alu_fn_e'($urandom_range(0, 3)); a = word_t'($urandom); b = word_t'($urandom); #1;
      exp = ref_alu(f, a, b); checks++;
      if (y !== exp) begin failures++; $display("f=%0d a=%h b=%h y=%h exp=%h", f, a, b, y, exp); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
