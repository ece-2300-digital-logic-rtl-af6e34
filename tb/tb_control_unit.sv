// tb_control_unit: every opcode, FUNCT and comparator outcome against a
// control table written out here.
module tb_control_unit;
  import cpu_pkg::*;
  int checks = 0, failures = 0;
  opcode_e op; funct_e funct; logic eq, sign;
  ctrl_t ctrl; logic is_branch, pcj;

  control_unit dut (.*);

  initial begin : watchdog
    #1000000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // expected {ld, mb, mw, md, is_load, is_store, uses_sa, uses_sb, is_branch}
  function automatic logic [8:0] exp_flags(logic [3:0] o, logic [2:0] fn);
    case (o)
      4'b0000: return (fn <= 3) ? 9'b1000_00110 : 9'b0000_00110;
      4'b0001: return 9'b1100_00100;
      4'b0010: return 9'b1101_10100;
      4'b0011: return 9'b0110_01110;
      4'b0100, 4'b0101: return 9'b0000_00111;
      4'b0110, 4'b0111: return 9'b0000_00101;
      default: return 9'b0;
    endcase
  endfunction

  initial begin
    for (int o = 0; o < 16; o++) begin
      if (!(o inside {[0:7], 15})) continue;
      for (int fn = 0; fn < 8; fn++)
        for (int c = 0; c < 4; c++) begin
          logic [8:0] e; logic e_pcj; alu_fn_e e_f;
          op = opcode_e'(o); funct = funct_e'(fn); eq = c[0]; sign = c[1]; #1;
          e = exp_flags(4'(o), 3'(fn));
          case (o)
            4: e_pcj = eq;  5: e_pcj = !eq;
            6: e_pcj = !sign; 7: e_pcj = sign;
            default: e_pcj = 0;
          endcase
          e_f = (o == 0 && fn <= 3) ? alu_fn_e'(fn) : ALU_ADD;
          checks++;
          if ({ctrl.ld, ctrl.mb, ctrl.mw, ctrl.md, ctrl.is_load, ctrl.is_store,
               ctrl.uses_sa, ctrl.uses_sb, is_branch} !== e || pcj !== e_pcj ||
              (ctrl.ld && ctrl.f !== e_f)) begin
            failures++;
            $display("op=%0d fn=%0d eq=%0d sign=%0d ctrl=%p br=%0d pcj=%0d", o, fn, eq, sign, ctrl, is_branch, pcj);
          end
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
