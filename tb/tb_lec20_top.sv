// tb_lec20_top: end-to-end test of the top level at its default sizes
// (256-word instruction and data RAMs, 1024-block direct-mapped cache with
// 32-bit addresses).
//
// Both processors run the same programs at the same time: first the
// lecture's hazard examples back to back in one program, then random
// programs. The cached processor's caches are backed by two behavioural
// main memories. For each processor, the final registers and data memory
// are compared with its own instruction-level reference model, and the
// bubble count with the model's count. Then the 32-bit cache serves random
// reads and writes through a third behavioural main memory, and the data is
// checked against a shadow memory. Every mechanism is counted and must
// occur at least once: the three kinds of bubble, the four forwarding paths,
// taken branches, the cached processor's instruction and data misses and
// frozen cycles, and the cache's read hits, read misses, write hits, write
// misses (allocation) and evictions.
module tb_lec20_top;
  import cpu_pkg::*;
  import tb_isa_pkg::*;

  localparam int IW = 256, DW = 256, LAT = 4;

  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;
  logic prog_we = 0; logic [7:0] prog_addr = 0; word_t prog_data = 0;
  reg_idx_t dbg_reg_addr = 0; word_t dbg_reg_data;
  logic [7:0] dbg_mem_addr = 0; word_t dbg_mem_data;
  word_t pc; logic stall, branch_taken, retire; hazard_e stall_cause;
  fwd_sel_e fwd_id_a, fwd_id_b, fwd_ex_a, fwd_ex_b;
  logic cpu_req = 0, cpu_we = 0, cpu_ready, cpu_miss;
  logic [31:0] cpu_addr = 0, cpu_wdata = 0, cpu_rdata, mem_addr, mem_wdata, mem_rdata;
  logic mem_req, mem_we, mem_ready;
  int unsigned n_reads, n_writes;
  // cached processor
  localparam int CDEPTH = 4096;
  logic cc_i_mem_req, cc_i_mem_we, cc_i_mem_ready, cc_d_mem_req, cc_d_mem_we, cc_d_mem_ready;
  word_t cc_i_mem_addr, cc_i_mem_wdata, cc_d_mem_addr, cc_d_mem_wdata;
  logic [31:0] cc_i_mem_rdata, cc_d_mem_rdata;
  reg_idx_t cc_dbg_reg_addr = 0; word_t cc_dbg_reg_data, cc_pc;
  logic cc_stall, cc_mem_stall, cc_i_miss, cc_d_miss, cc_branch_taken, cc_retire;
  hazard_e cc_stall_cause;
  fwd_sel_e cc_fwd_id_a, cc_fwd_id_b, cc_fwd_ex_a, cc_fwd_ex_b;
  int unsigned ci_reads, ci_writes, cd_reads, cd_writes;

  lec20_top dut (.*);
  main_mem_model #(.ADDR_W(16), .WORD_W(16), .BLOCK_WORDS(2), .LATENCY(LAT), .DEPTH(CDEPTH)) u_cimem (
    .clk, .mem_req(cc_i_mem_req), .mem_we(cc_i_mem_we), .mem_addr(cc_i_mem_addr),
    .mem_wdata(cc_i_mem_wdata), .mem_rdata(cc_i_mem_rdata), .mem_ready(cc_i_mem_ready),
    .n_reads(ci_reads), .n_writes(ci_writes));
  main_mem_model #(.ADDR_W(16), .WORD_W(16), .BLOCK_WORDS(2), .LATENCY(LAT), .DEPTH(CDEPTH)) u_cdmem (
    .clk, .mem_req(cc_d_mem_req), .mem_we(cc_d_mem_we), .mem_addr(cc_d_mem_addr),
    .mem_wdata(cc_d_mem_wdata), .mem_rdata(cc_d_mem_rdata), .mem_ready(cc_d_mem_ready),
    .n_reads(cd_reads), .n_writes(cd_writes));
  main_mem_model #(.ADDR_W(32), .WORD_W(32), .BLOCK_WORDS(1), .LATENCY(LAT), .DEPTH(65536)) u_mem (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (2000000) @(posedge clk); failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic chk(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: got %0h exp %0h", what, got, exp); end
  endtask

  // ------------------------------------------------------------ counters
  int c_load_use, c_alu_branch, c_load_branch, c_taken, c_mem_ex, c_wb_ex, c_mem_id, c_wb_id;
  int p_bubbles, cc_bubbles, c_imiss, c_dmiss, c_frozen, c_cc_taken;
  always @(posedge clk) if (!rst) begin
    if (cc_stall) cc_bubbles++;
    if (cc_i_miss) c_imiss++;
    if (cc_d_miss) c_dmiss++;
    if (cc_mem_stall) c_frozen++;
    if (cc_branch_taken) c_cc_taken++;
    if (stall_cause == HZ_LOAD_USE)    c_load_use++;
    if (stall_cause == HZ_ALU_BRANCH)  c_alu_branch++;
    if (stall_cause == HZ_LOAD_BRANCH) c_load_branch++;
    if (stall) p_bubbles++;
    if (branch_taken) c_taken++;
    if (fwd_ex_a == FWD_MEM || fwd_ex_b == FWD_MEM) c_mem_ex++;
    if (fwd_ex_a == FWD_WB  || fwd_ex_b == FWD_WB)  c_wb_ex++;
    if (fwd_id_a == FWD_MEM || fwd_id_b == FWD_MEM) c_mem_id++;
    if (fwd_id_a == FWD_WB  || fwd_id_b == FWD_WB)  c_wb_id++;
  end

  // ------------------------------------------------------------ processor
  isa_model m, mc;

  task automatic run_prog(string name, word_t prog[$], int cycles);
    int halt;
    halt = 2 * prog.size();
    prog.push_back(BEQ(0, 0, -2));
    prog.push_back(NOP());
    @(negedge clk);
    rst = 1;
    m = new(IW, DW);
    mc = new(CDEPTH, CDEPTH);
    for (int i = 0; i < CDEPTH; i++) begin
      u_cimem.mem[i] = (i < prog.size()) ? prog[i] : NOP();
      mc.imem[i] = u_cimem.mem[i];
      mc.dmem[i] = u_cdmem.mem[i];
    end
    for (int i = 0; i < IW; i++) begin
      prog_we = 1; prog_addr = 8'(i); prog_data = (i < prog.size()) ? prog[i] : NOP();
      m.imem[i] = prog_data;
      @(negedge clk);
    end
    prog_we = 0;
    for (int i = 0; i < DW; i++) begin dbg_mem_addr = 8'(i); #1 m.dmem[i] = dbg_mem_data; end
    p_bubbles = 0; cc_bubbles = 0;
    rst = 0;
    repeat (cycles) @(negedge clk);
    while (m.pc != halt && m.executed < 100000) m.step();
    m.step();
    while (mc.pc != halt && mc.executed < 100000) mc.step();
    mc.step();
    for (int r = 0; r < 8; r++) begin
      cc_dbg_reg_addr = 3'(r);
      #1 chk($sformatf("%s cached R%0d", name, r), cc_dbg_reg_data, mc.regs[r]);
    end
    for (int i = 0; i < CDEPTH; i++) chk($sformatf("%s cached M[%0d]", name, i), u_cdmem.mem[i], mc.dmem[i]);
    chk({name, " cached bubbles"}, cc_bubbles, mc.bubbles);
    for (int r = 0; r < 8; r++) begin
      dbg_reg_addr = 3'(r); #1 chk($sformatf("%s R%0d", name, r), dbg_reg_data, m.regs[r]);
    end
    for (int i = 0; i < DW; i++) begin
      dbg_mem_addr = 8'(i); #1 chk($sformatf("%s M[%0d]", name, i), dbg_mem_data, m.dmem[i]);
    end
    chk({name, " bubbles"}, p_bubbles, m.bubbles);
  endtask

  task automatic cpu_side();
    word_t p[$];
    // The lecture's examples in one program.
    p = {ADDI(2, 0, 8), ADDI(3, 0, 5), ADDI(7, 0, -3), SW(7, 0, 2), ADDI(4, 0, 13), NOP(), NOP(),
         LW(1, 0, 2), OR(4, 1, 3), SUB(5, 2, 1), AND(6, 1, 2),                 // load -> R-type
         ADD(1, 2, 3), OR(1, 1, 3), SUB(5, 2, 1), AND(6, 1, 2), ADDI(7, 1, 3), // R -> R forwarding
         ADD(1, 2, 3), OR(4, 6, 3), BGEZ(1, 4), AND(6, 5, 2), ADDI(6, 6, 1), ADDI(7, 7, 3), // R -> branch
         LW(1, 0, 2), BEQ(4, 1, 2), ADDI(5, 0, 1), ADDI(6, 0, 1),             // load -> branch
         LW(1, 0, 2), SW(1, 2, 2), LW(1, 0, 2), SW(3, 24, 1)};                // load -> store
    run_prog("lecture examples", p, 600);
    repeat (10) begin
      p = {ADDI(2, 0, 8), ADDI(3, 0, 5)};
      for (int i = 0; i < 100; i++) begin
        int k = $urandom_range(0, 9);
        int rs = $urandom_range(0, 7), rt = $urandom_range(0, 7), rd = $urandom_range(0, 7);
        int imm = $urandom_range(0, 63) - 32;
        if (i > 0 && is_branch_op(p[$])) k = $urandom_range(0, 6);
        if (i >= 97 && k >= 7) k = 0;   // no branch may skip the halt loop
        case (k)
          0: p.push_back(ADD(rd, rs, rt));
          1: p.push_back(SUB(rd, rs, rt));
          2: p.push_back(AND(rd, rs, rt));
          3: p.push_back(OR(rd, rs, rt));
          4: p.push_back(ADDI(rt, rs, imm));
          5: p.push_back(LW(rt, imm, rs));
          6: p.push_back(SW(rt, imm, rs));
          7: p.push_back(BEQ(rs, rt, 2));
          8: p.push_back(BLTZ(rs, 4));
          default: p.push_back(BGEZ(rs, 2));
        endcase
      end
      run_prog("random", p, 3000);
    end
  endtask

  // ------------------------------------------------------------ cache
  logic [31:0] shadow [int];
  int c_rhit, c_rmiss, c_whit, c_wmiss, c_evict;
  bit s_valid [1024];
  logic [19:0] s_tag [1024];

  task automatic cache_access(bit we, logic [31:0] addr, logic [31:0] wd);
    int idx; bit hit;
    idx = int'(addr[11:2]);
    hit = s_valid[idx] && s_tag[idx] == addr[31:12];
    if (!hit && s_valid[idx]) c_evict++;
    if (we) begin if (hit) c_whit++; else c_wmiss++; end
    else    begin if (hit) c_rhit++; else c_rmiss++; end
    @(negedge clk);
    cpu_req = 1; cpu_we = we; cpu_addr = addr; cpu_wdata = wd;
    #1 chk("cache miss flag", cpu_miss, !hit);
    while (!cpu_ready) @(negedge clk);
    if (!we) chk($sformatf("cache read %h", addr), cpu_rdata,
                 shadow.exists(addr >> 2) ? shadow[addr >> 2] : u_mem.init_word((addr >> 2) % 65536));
    @(posedge clk); #1 cpu_req = 0;
    if (we) shadow[addr >> 2] = wd;
    s_valid[idx] = 1; s_tag[idx] = addr[31:12];
  endtask

  task automatic cache_side();
    foreach (s_valid[i]) s_valid[i] = 0;
    repeat (4000) begin
      logic [31:0] a;
      // 4 tags x 32 indices: temporal reuse, conflicts and evictions
      a = {18'd0, 2'($urandom), 5'd0, 5'($urandom), 2'b00};
      cache_access($urandom_range(0, 2) == 0, a, $urandom);
    end
  endtask

  initial begin
    c_load_use = 0; c_alu_branch = 0; c_load_branch = 0; c_taken = 0;
    c_mem_ex = 0; c_wb_ex = 0; c_mem_id = 0; c_wb_id = 0;
    c_imiss = 0; c_dmiss = 0; c_frozen = 0; c_cc_taken = 0;
    c_rhit = 0; c_rmiss = 0; c_whit = 0; c_wmiss = 0; c_evict = 0;
    repeat (3) @(negedge clk);
    // Each program is loaded under reset, and the cache shares that reset,
    // so the cache traffic follows the programs; the last program keeps
    // running (in its halt loop) while the cache is exercised.
    cpu_side();
    cache_side();
    $display("processor: load-use %0d, ALU->branch %0d, load->branch %0d bubbles; taken %0d; MEM->EX %0d WB->EX %0d MEM->ID %0d WB->ID %0d",
             c_load_use, c_alu_branch, c_load_branch, c_taken, c_mem_ex, c_wb_ex, c_mem_id, c_wb_id);
    $display("cached processor: I-misses %0d, D-misses %0d, frozen cycles %0d, taken %0d",
             c_imiss, c_dmiss, c_frozen, c_cc_taken);
    $display("cache: read hits %0d, read misses %0d, write hits %0d, write misses %0d, evictions %0d; hit rate %0d%%",
             c_rhit, c_rmiss, c_whit, c_wmiss, c_evict, 100 * (c_rhit + c_whit) / (c_rhit + c_rmiss + c_whit + c_wmiss));
    chk("memory block reads = misses", n_reads, c_rmiss + c_wmiss);
    chk("memory writes = cache writes", n_writes, c_whit + c_wmiss);
    chk("load-use bubble seen", c_load_use > 0, 1);
    chk("ALU->branch bubble seen", c_alu_branch > 0, 1);
    chk("load->branch bubble seen", c_load_branch > 0, 1);
    chk("taken branch seen", c_taken > 0, 1);
    chk("MEM->EX seen", c_mem_ex > 0, 1);
    chk("WB->EX seen", c_wb_ex > 0, 1);
    chk("MEM->ID seen", c_mem_id > 0, 1);
    chk("WB->ID seen", c_wb_id > 0, 1);
    chk("cached processor I-miss seen", c_imiss > 0, 1);
    chk("cached processor D-miss seen", c_dmiss > 0, 1);
    chk("cached processor frozen", c_frozen > 0, 1);
    chk("cached processor taken branch seen", c_cc_taken > 0, 1);
    chk("cached processor wrote through", cd_writes > 0, 1);
    chk("cache read hit seen", c_rhit > 0, 1);
    chk("cache read miss seen", c_rmiss > 0, 1);
    chk("cache write hit seen", c_whit > 0, 1);
    chk("cache write miss seen", c_wmiss > 0, 1);
    chk("cache eviction seen", c_evict > 0, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
