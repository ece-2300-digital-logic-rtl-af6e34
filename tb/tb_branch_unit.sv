// tb_branch_unit: random PC, offsets and operands; target, equality and sign
// are recomputed here with integer arithmetic.
module tb_branch_unit;
  import cpu_pkg::*;
  int checks = 0, failures = 0;
  word_t pc_plus2, imm, a, b, target; logic eq, sign;

  branch_unit dut (.*);

  initial begin : watchdog
    #1000000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (3000) begin
      int off;
      off = $urandom_range(0, 63) - 32;
      pc_plus2 = word_t'($urandom) & ~16'h1; imm = word_t'(off);
      a = word_t'($urandom);
      b = ($urandom_range(0, 3) == 0) ? a : word_t'($urandom);
      #1;
      checks++;
      if (target !== word_t'((int'(pc_plus2) + off) & 'hFFFF) || eq !== (a == b) || sign !== ($signed(a) < 0)) begin
        failures++; $display("pc+2=%h off=%0d a=%h b=%h -> %h %0d %0d", pc_plus2, off, a, b, target, eq, sign);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
