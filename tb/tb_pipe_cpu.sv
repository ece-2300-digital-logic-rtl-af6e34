// tb_pipe_cpu: runs programs on the pipelined processor and compares the
// final registers and data memory with the instruction-level reference model.
//
// Directed programs are the lecture's examples (load followed by R-type,
// R-type to R-type forwarding, R-type to branch forwarding, load followed by
// branch, loads followed by stores, ALU result followed by branch) plus a
// counted loop; for each, the number of bubbles of each kind and the cycle
// in which the last result is written back are checked. Random programs
// (forward branches only, so they always end) are then compared with the
// model, including the model's count of required bubbles.
module tb_pipe_cpu;
  import cpu_pkg::*;
  import tb_isa_pkg::*;

  localparam int IW = 256, DW = 256;

  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;
  logic prog_we = 0; logic [7:0] prog_addr = 0; word_t prog_data = 0;
  reg_idx_t dbg_reg_addr = 0; word_t dbg_reg_data;
  logic [7:0] dbg_mem_addr = 0; word_t dbg_mem_data;
  word_t pc; logic stall, branch_taken, retire; hazard_e stall_cause;
  fwd_sel_e fwd_id_a, fwd_id_b, fwd_ex_a, fwd_ex_b;

  pipe_cpu #(.IMEM_WORDS(IW), .DMEM_WORDS(DW)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (400000) @(posedge clk); failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // event counters for the current program
  int n_load_use, n_alu_branch, n_load_branch, n_taken, n_wb, last_wb_cyc, cyc;
  int n_fwd_mem_ex, n_fwd_wb_ex, n_fwd_mem_id, n_fwd_wb_id;
  // totals over the whole run
  int t_load_use, t_alu_branch, t_load_branch, t_taken, t_mem_ex, t_wb_ex, t_mem_id, t_wb_id;

  always @(posedge clk) if (!rst) begin
    cyc <= cyc + 1;
    if (stall_cause == HZ_LOAD_USE)    n_load_use++;
    if (stall_cause == HZ_ALU_BRANCH)  n_alu_branch++;
    if (stall_cause == HZ_LOAD_BRANCH) n_load_branch++;
    if (branch_taken) n_taken++;
    if (fwd_ex_a == FWD_MEM || fwd_ex_b == FWD_MEM) n_fwd_mem_ex++;
    if (fwd_ex_a == FWD_WB  || fwd_ex_b == FWD_WB)  n_fwd_wb_ex++;
    if (fwd_id_a == FWD_MEM || fwd_id_b == FWD_MEM) n_fwd_mem_id++;
    if (fwd_id_a == FWD_WB  || fwd_id_b == FWD_WB)  n_fwd_wb_id++;
    if (dut.u_core.mem_wb.ld) begin n_wb++; last_wb_cyc = cyc; end
  end

  task automatic chk(string what, int got, int exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: got %0d exp %0d", what, got, exp); end
  endtask

  isa_model m;

  // Load a program (a halt loop is appended), reset, run, compare.
  task automatic run(string name, word_t prog[$], int cycles);
    int halt;
    halt = 2 * prog.size();
    prog.push_back(BEQ(0, 0, -2));   // halt: branch to itself
    prog.push_back(NOP());           // its delay slot
    rst = 1;
    @(negedge clk);
    m = new(IW, DW);
    for (int i = 0; i < IW; i++) begin
      prog_we = 1; prog_addr = 8'(i); prog_data = (i < prog.size()) ? prog[i] : NOP();
      m.imem[i] = prog_data;
      @(negedge clk);
    end
    prog_we = 0;
    for (int i = 0; i < DW; i++) begin
      dbg_mem_addr = 8'(i); #1 m.dmem[i] = dbg_mem_data;
    end
    n_load_use = 0; n_alu_branch = 0; n_load_branch = 0; n_taken = 0; n_wb = 0; last_wb_cyc = 0;
    n_fwd_mem_ex = 0; n_fwd_wb_ex = 0; n_fwd_mem_id = 0; n_fwd_wb_id = 0; cyc = 1;
    @(negedge clk) rst = 0;
    repeat (cycles) @(negedge clk);
    // reference: run until the halt branch, then execute it once
    while (m.pc != halt && m.executed < 100000) m.step();
    m.step();
    for (int r = 0; r < 8; r++) begin
      dbg_reg_addr = 3'(r); #1;
      chk($sformatf("%s R%0d", name, r), dbg_reg_data, m.regs[r]);
    end
    for (int i = 0; i < DW; i++) begin
      dbg_mem_addr = 8'(i); #1;
      checks++;
      if (dbg_mem_data !== m.dmem[i]) begin
        failures++; $display("FAIL %s M[%0d] got %h exp %h", name, i, dbg_mem_data, m.dmem[i]);
      end
    end
    chk({name, " bubbles (reference timing)"}, n_load_use + n_alu_branch + n_load_branch, m.bubbles);
    t_load_use += n_load_use; t_alu_branch += n_alu_branch; t_load_branch += n_load_branch;
    t_taken += n_taken; t_mem_ex += n_fwd_mem_ex; t_wb_ex += n_fwd_wb_ex;
    t_mem_id += n_fwd_mem_id; t_wb_id += n_fwd_wb_id;
  endtask

  // Common set-up: R2 = 8 (address), R3 = 5, R7 = -3, M[8] = -3, R4 = 13.
  function automatic void setup(ref word_t p[$]);
    p.push_back(ADDI(2, 0, 8));
    p.push_back(ADDI(3, 0, 5));
    p.push_back(ADDI(7, 0, -3));
    p.push_back(SW(7, 0, 2));
    p.push_back(ADDI(4, 0, 13));
    p.push_back(NOP()); p.push_back(NOP()); p.push_back(NOP());
  endfunction

  // Random program: forward branches only, never a branch in a delay slot.
  function automatic void rand_prog(ref word_t p[$], input int n);
    bit prev_br = 0;
    for (int i = 0; i < n; i++) begin
      int k = $urandom_range(0, 11);
      int rs = $urandom_range(0, 7), rt = $urandom_range(0, 7), rd = $urandom_range(0, 7);
      int imm = $urandom_range(0, 63) - 32;
      if ((prev_br || i >= n - 1) && k >= 8) k = $urandom_range(0, 7);
      case (k)
        0: p.push_back(ADD(rd, rs, rt));
        1: p.push_back(SUB(rd, rs, rt));
        2: p.push_back(AND(rd, rs, rt));
        3: p.push_back(OR(rd, rs, rt));
        4, 5: p.push_back(ADDI(rt, rs, imm));
        6: p.push_back(LW(rt, imm, rs));
        7: p.push_back(SW(rt, imm, rs));
        default: begin
          int off = 2 * $urandom_range(1, 4);
          if (2 * i + 2 + off > 2 * n) off = 2 * n - (2 * i + 2);
          case (k)
            8: p.push_back(BEQ(rs, $urandom_range(0, 1) ? rs : rt, off));
            9: p.push_back(BNE(rs, rt, off));
            10: p.push_back(BGEZ(rs, off));
            default: p.push_back(BLTZ(rs, off));
          endcase
        end
      endcase
      prev_br = (k >= 8);
    end
  endfunction

  initial begin
    word_t p[$];
    int base;
    t_load_use = 0; t_alu_branch = 0; t_load_branch = 0; t_taken = 0;
    t_mem_ex = 0; t_wb_ex = 0; t_mem_id = 0; t_wb_id = 0;

    // Hazard-free set-up alone: last write-back 5 cycles after its fetch.
    p = {}; setup(p);
    run("setup", p, 40);
    chk("setup bubbles", n_load_use + n_alu_branch + n_load_branch, 0);
    chk("setup last write-back cycle", last_wb_cyc, 4 + 5);   // ADDI R4 is instruction 4
    base = p.size();

    // Load followed by R-type: one bubble, then forwarding WB->EX and WB->ID.
    p = {}; setup(p);
    p.push_back(LW(1, 0, 2)); p.push_back(OR(4, 1, 3)); p.push_back(SUB(5, 2, 1)); p.push_back(AND(6, 1, 2));
    run("load->R-type", p, 40);
    chk("load->R-type load-use bubbles", n_load_use, 1);
    chk("load->R-type other bubbles", n_alu_branch + n_load_branch, 0);
    chk("load->R-type last write-back cycle", last_wb_cyc, (base + 3) + 5 + 1);

    // R-type to R-type forwarding: no bubble.
    p = {}; setup(p);
    p.push_back(ADD(1, 2, 3)); p.push_back(OR(1, 1, 3)); p.push_back(SUB(5, 2, 1));
    p.push_back(AND(6, 1, 2)); p.push_back(ADDI(7, 1, 3));
    run("R->R forwarding", p, 40);
    chk("R->R bubbles", n_load_use + n_alu_branch + n_load_branch, 0);
    chk("R->R last write-back cycle", last_wb_cyc, (base + 4) + 5);
    chk("R->R MEM->EX used", n_fwd_mem_ex > 0, 1);
    chk("R->R WB->EX used", n_fwd_wb_ex > 0, 1);

    // R-type to branch forwarding (MEM->ID), branch taken, delay slot runs.
    p = {}; setup(p);
    p.push_back(ADD(1, 2, 3)); p.push_back(OR(4, 6, 3)); p.push_back(BGEZ(1, 4));
    p.push_back(AND(6, 5, 2)); p.push_back(ADDI(6, 6, 1)); p.push_back(ADDI(7, 7, 3));
    run("R->branch forwarding", p, 40);
    chk("R->branch bubbles", n_load_use + n_alu_branch + n_load_branch, 0);
    chk("R->branch MEM->ID used", n_fwd_mem_id > 0, 1);
    chk("R->branch taken (excluding halt loop)", n_taken > 0, 1);

    // ALU instruction followed by branch: one bubble.
    p = {}; setup(p);
    p.push_back(ADD(1, 2, 3)); p.push_back(BEQ(1, 4, 4)); p.push_back(ADDI(5, 0, 1));
    p.push_back(ADDI(5, 5, 2)); p.push_back(ADDI(6, 0, 7));
    run("ALU->branch", p, 40);
    chk("ALU->branch bubbles", n_alu_branch, 1);
    chk("ALU->branch other bubbles", n_load_use + n_load_branch, 0);

    // Load followed by branch: two bubbles; two instructions apart: one.
    p = {}; setup(p);
    p.push_back(LW(1, 0, 2)); p.push_back(BEQ(4, 1, 2)); p.push_back(ADDI(5, 0, 1)); p.push_back(ADDI(6, 0, 1));
    run("load->branch", p, 40);
    chk("load->branch load-use bubbles", n_load_use, 1);
    chk("load->branch load-branch bubbles", n_load_branch, 1);
    chk("load->branch last write-back cycle", last_wb_cyc, (base + 3) + 5 + 2);
    p = {}; setup(p);
    p.push_back(LW(1, 0, 2)); p.push_back(ADD(5, 2, 3)); p.push_back(BNE(4, 1, 2));
    p.push_back(ADDI(5, 0, 1)); p.push_back(ADDI(6, 0, 1));
    run("load->x->branch", p, 40);
    chk("load->x->branch bubbles", n_load_branch + n_load_use + n_alu_branch, 1);
    chk("load->x->branch load-branch bubbles", n_load_branch, 1);

    // Load followed by store (data, then address), load followed by load.
    p = {}; setup(p);
    p.push_back(LW(1, 0, 2)); p.push_back(SW(1, 2, 2));
    p.push_back(LW(1, 0, 2)); p.push_back(SW(3, 24, 1));
    p.push_back(LW(1, 0, 2)); p.push_back(LW(4, 4, 1));
    p.push_back(ADD(5, 4, 1)); p.push_back(SW(5, 6, 2)); p.push_back(LW(6, 6, 2));
    run("load->store/load", p, 60);
    chk("load->store/load bubbles", n_load_use, 4);

    // Counted loop: backward branch, ALU->branch bubble every iteration.
    p = {}; setup(p);
    p.push_back(ADDI(1, 0, 5));
    p.push_back(ADDI(1, 1, -1));           // L
    p.push_back(BNE(1, 0, -6));            // to L: (pc+2) - 6 = pc - 4... adjusted below
    p.push_back(ADDI(4, 4, 1));            // delay slot, runs every iteration
    p[p.size() - 2] = BNE(1, 0, -4);       // target = addr(BNE) + 2 - 4 = addr(L)
    run("loop", p, 80);
    chk("loop ALU->branch bubbles", n_alu_branch, 5);
    chk("loop taken branches (+halt loop)", n_taken >= 4, 1);

    // Random programs.
    for (int t = 0; t < 40; t++) begin
      p = {}; setup(p);
      rand_prog(p, 80);
      run($sformatf("random %0d", t), p, 400);
    end

    $display("mechanisms: load-use %0d, ALU->branch %0d, load->branch %0d, taken %0d, MEM->EX %0d, WB->EX %0d, MEM->ID %0d, WB->ID %0d",
             t_load_use, t_alu_branch, t_load_branch, t_taken, t_mem_ex, t_wb_ex, t_mem_id, t_wb_id);
    chk("load-use bubble seen", t_load_use > 0, 1);
    chk("ALU->branch bubble seen", t_alu_branch > 0, 1);
    chk("load->branch bubble seen", t_load_branch > 0, 1);
    chk("MEM->EX seen", t_mem_ex > 0, 1);
    chk("WB->EX seen", t_wb_ex > 0, 1);
    chk("MEM->ID seen", t_mem_id > 0, 1);
    chk("WB->ID seen", t_wb_id > 0, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
