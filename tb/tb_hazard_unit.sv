// tb_hazard_unit: each hazard case of the lecture's list in a directed test,
// then random inputs against a reference written here.
module tb_hazard_unit;
  import cpu_pkg::*;
  int checks = 0, failures = 0;
  logic id_uses_sa, id_uses_sb, id_is_branch, ex_ld, ex_is_load, mem_is_load;
  reg_idx_t id_sa, id_sb, ex_dr, mem_dr;
  logic pcl, ifidl, clear; hazard_e cause;

  hazard_unit dut (.*);

  initial begin : watchdog
    #1000000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  function automatic hazard_e ref_cause();
    bit exm = (id_uses_sa && id_sa == ex_dr) || (id_uses_sb && id_sb == ex_dr);
    bit mm  = (id_uses_sa && id_sa == mem_dr) || (id_uses_sb && id_sb == mem_dr);
    if (ex_is_load && ex_ld && exm) return HZ_LOAD_USE;
    if (id_is_branch && ex_ld && exm) return HZ_ALU_BRANCH;
    if (id_is_branch && mem_is_load && mm) return HZ_LOAD_BRANCH;
    return HZ_NONE;
  endfunction

  task automatic expect_(string what, hazard_e e);
    #1; checks++;
    if (cause !== e || clear !== (e != HZ_NONE) || pcl !== (e == HZ_NONE) || ifidl !== (e == HZ_NONE)) begin
      failures++; $display("%s: cause=%s exp=%s clear=%0d pcl=%0d ifidl=%0d", what, cause.name(), e.name(), clear, pcl, ifidl);
    end
  endtask

  // set ID consumer: uses_sa, uses_sb, branch, sa, sb
  task automatic id(bit ua, bit ub, bit br, int a, int b);
    id_uses_sa = ua; id_uses_sb = ub; id_is_branch = br; id_sa = 3'(a); id_sb = 3'(b);
  endtask
  task automatic ex(bit ldv, bit load, int d); ex_ld = ldv; ex_is_load = load; ex_dr = 3'(d); endtask
  task automatic mem(bit load, int d); mem_is_load = load; mem_dr = 3'(d); endtask

  initial begin
    // LW R1 in EX; OR R4,R1,R3 in ID (R-type, SA match)
    id(1, 1, 0, 1, 3); ex(1, 1, 1); mem(0, 0); expect_("load -> R-type SA", HZ_LOAD_USE);
    id(1, 1, 0, 2, 1);                          expect_("load -> R-type SB", HZ_LOAD_USE);
    id(1, 1, 0, 2, 3);                          expect_("load -> R-type no match", HZ_NONE);
    id(1, 0, 0, 1, 1);                          expect_("load -> I-type ALU", HZ_LOAD_USE);
    id(1, 0, 0, 2, 1);                          expect_("load -> I-type, RT is dest", HZ_NONE);
    id(1, 0, 0, 1, 5);                          expect_("load -> load address", HZ_LOAD_USE);
    id(1, 1, 0, 1, 4);                          expect_("load -> store address", HZ_LOAD_USE);
    id(1, 1, 0, 4, 1);                          expect_("load -> store data", HZ_LOAD_USE);
    id(1, 1, 1, 4, 1);                          expect_("load -> branch (EX)", HZ_LOAD_USE);
    id(1, 1, 1, 4, 1); ex(0, 0, 0); mem(1, 1);  expect_("load -> branch (MEM)", HZ_LOAD_BRANCH);
    id(1, 1, 0, 4, 1);                          expect_("load in MEM -> R-type", HZ_NONE);
    id(1, 1, 1, 1, 5); ex(1, 0, 1); mem(0, 0);  expect_("ALU -> branch", HZ_ALU_BRANCH);
    id(1, 1, 0, 1, 5);                          expect_("ALU -> R-type is forwarded", HZ_NONE);
    id(1, 0, 1, 2, 1);                          expect_("ALU -> BGEZ on other reg", HZ_NONE);
    id(1, 1, 1, 1, 5); ex(0, 0, 1);             expect_("bubble in EX", HZ_NONE);
    repeat (5000) begin
      id($urandom, $urandom, $urandom, $urandom, $urandom);
      ex_ld = $urandom; ex_is_load = ex_ld & 1'($urandom); ex_dr = 3'($urandom);
      mem($urandom, $urandom);
      expect_("random", ref_cause());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
