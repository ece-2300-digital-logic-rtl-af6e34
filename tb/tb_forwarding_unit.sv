// tb_forwarding_unit: the lecture's forwarding cases (MEM->EX, WB->EX,
// WB->ID, MEM->ID for a branch) directed, then random inputs against a
// reference written here.
module tb_forwarding_unit;
  import cpu_pkg::*;
  int checks = 0, failures = 0;
  logic id_uses_sa, id_uses_sb, ex_uses_sa, ex_uses_sb, mem_ld, mem_md, wb_ld;
  reg_idx_t id_sa, id_sb, ex_sa, ex_sb, mem_dr, wb_dr;
  fwd_sel_e id_a_sel, id_b_sel, ex_a_sel, ex_b_sel;

  forwarding_unit dut (.*);

  initial begin : watchdog
    #1000000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  function automatic fwd_sel_e r(bit u, reg_idx_t s);
    if (!u) return FWD_NONE;
    if (mem_ld && mem_dr == s) return mem_md ? FWD_NONE : FWD_MEM;
    if (wb_ld && wb_dr == s) return FWD_WB;
    return FWD_NONE;
  endfunction

  task automatic expect4(string what, fwd_sel_e ia, fwd_sel_e ib, fwd_sel_e ea, fwd_sel_e eb);
    #1; checks++;
    if (id_a_sel !== ia || id_b_sel !== ib || ex_a_sel !== ea || ex_b_sel !== eb) begin
      failures++;
      $display("%s: got %s %s %s %s exp %s %s %s %s", what, id_a_sel.name(), id_b_sel.name(),
               ex_a_sel.name(), ex_b_sel.name(), ia.name(), ib.name(), ea.name(), eb.name());
    end
  endtask

  initial begin
    // ADD R1 in WB... OR R1,R1,R3 in MEM, SUB R5,R2,R1 in EX, AND R6,R1,R2 in ID
    id_uses_sa = 1; id_uses_sb = 1; id_sa = 1; id_sb = 2;
    ex_uses_sa = 1; ex_uses_sb = 1; ex_sa = 2; ex_sb = 1;
    mem_ld = 1; mem_md = 0; mem_dr = 1; wb_ld = 1; wb_dr = 1;
    expect4("MEM wins over WB", FWD_MEM, FWD_NONE, FWD_NONE, FWD_MEM);
    mem_dr = 4;
    expect4("WB->EX, WB->ID", FWD_WB, FWD_NONE, FWD_NONE, FWD_WB);
    mem_dr = 1; mem_md = 1;
    expect4("load in MEM: nothing yet", FWD_NONE, FWD_NONE, FWD_NONE, FWD_NONE);
    mem_md = 0; ex_uses_sb = 0; id_uses_sa = 0;
    expect4("operand not read", FWD_NONE, FWD_NONE, FWD_NONE, FWD_NONE);
    mem_ld = 0; wb_ld = 0; id_uses_sa = 1; ex_uses_sb = 1;
    expect4("no writer", FWD_NONE, FWD_NONE, FWD_NONE, FWD_NONE);
    repeat (5000) begin
      {id_uses_sa, id_uses_sb, ex_uses_sa, ex_uses_sb, mem_ld, mem_md, wb_ld} = 7'($urandom);
      {id_sa, id_sb, ex_sa, ex_sb, mem_dr, wb_dr} = 18'($urandom);
      if ($urandom_range(0, 1)) wb_dr = mem_dr;
      expect4("random", r(id_uses_sa, id_sa), r(id_uses_sb, id_sb), r(ex_uses_sa, ex_sa), r(ex_uses_sb, ex_sb));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
