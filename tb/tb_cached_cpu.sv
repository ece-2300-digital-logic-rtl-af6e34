// tb_cached_cpu: runs programs on the processor with instruction and data
// caches, at the default cache size, and checks results and timing.
//
// Each cache port talks to its own main_mem_model (latency LAT). The program
// is written into the instruction memory model, and the data memory model
// keeps its contents from one program to the next. After each run the
// registers and the whole data memory are compared with the instruction-level
// model. Write-through means main memory must hold every store. The checks
// also cover:
//   * the hazard bubbles, which must equal the model's count: a cache freeze
//     must neither add nor hide one;
//   * the number of misses and the cycles each cache keeps its requester
//     waiting. A reference direct-mapped cache (tags and valid bits only)
//     replays the model's fetch and data-access sequence and predicts both:
//     per miss LAT+1 cycles for a fetch or load, LAT for a write hit and
//     2*LAT+1 for a write miss;
//   * the number of memory reads (refills) and writes (one per store).
// Directed programs (straight-line fetch, load/store hits and misses, a loop
// that reuses its cached code) come first, then random programs.
module tb_cached_cpu;
  import cpu_pkg::*;
  import tb_isa_pkg::*;

  localparam int LAT = 4;            // main-memory latency in cycles
  localparam int IB = 10, OB = 2;    // cache geometry (the defaults)
  localparam int BW = (1 << OB) / 2; // 16-bit words per block
  localparam int DEPTH = 4096;       // words in each memory model

  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;

  logic i_mem_req, i_mem_we, i_mem_ready, d_mem_req, d_mem_we, d_mem_ready;
  word_t i_mem_addr, i_mem_wdata, d_mem_addr, d_mem_wdata;
  logic [BW*16-1:0] i_mem_rdata, d_mem_rdata;
  reg_idx_t dbg_reg_addr = 0; word_t dbg_reg_data, pc;
  logic stall, mem_stall, i_miss, d_miss, branch_taken, retire;
  hazard_e stall_cause;
  fwd_sel_e fwd_id_a, fwd_id_b, fwd_ex_a, fwd_ex_b;
  int unsigned i_reads, i_writes, d_reads, d_writes;

  cached_cpu dut (.*);

  main_mem_model #(.ADDR_W(16), .WORD_W(16), .BLOCK_WORDS(BW), .LATENCY(LAT), .DEPTH(DEPTH)) u_imem (
    .clk, .mem_req(i_mem_req), .mem_we(i_mem_we), .mem_addr(i_mem_addr), .mem_wdata(i_mem_wdata),
    .mem_rdata(i_mem_rdata), .mem_ready(i_mem_ready), .n_reads(i_reads), .n_writes(i_writes));
  main_mem_model #(.ADDR_W(16), .WORD_W(16), .BLOCK_WORDS(BW), .LATENCY(LAT), .DEPTH(DEPTH)) u_dmem (
    .clk, .mem_req(d_mem_req), .mem_we(d_mem_we), .mem_addr(d_mem_addr), .mem_wdata(d_mem_wdata),
    .mem_rdata(d_mem_rdata), .mem_ready(d_mem_ready), .n_reads(d_reads), .n_writes(d_writes));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (2000000) @(posedge clk); failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // per-program event counters, and totals
  int n_bubbles, n_imiss, n_dmiss, n_iwait, n_dwait, n_freeze, n_taken;
  int t_imiss, t_dmiss, t_freeze, t_whit, t_wmiss, t_rhit, t_rmiss, t_evict, t_bubbles, t_overlap;

  always @(posedge clk) if (!rst) begin
    if (stall) n_bubbles++;
    if (i_miss) n_imiss++;
    if (d_miss) n_dmiss++;
    if (dut.imem_req && !dut.imem_ready) n_iwait++;
    if (dut.dmem_req && !dut.dmem_ready) n_dwait++;
    if (mem_stall) n_freeze++;
    if (i_mem_req && d_mem_req) t_overlap++;
    if (branch_taken) n_taken++;
  end

  task automatic chk(string what, int got, int exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: got %0d exp %0d", what, got, exp); end
  endtask

  // Reference direct-mapped cache: tags and valid bits only.
  typedef struct { bit v [1 << IB]; int tag [1 << IB]; } ref_cache_t;

  function automatic bit ref_access(ref ref_cache_t c, input int addr, output bit evict);
    int idx = (addr >> OB) % (1 << IB), tag = (addr & 16'hFFFF) >> (OB + IB);
    bit hit = c.v[idx] && c.tag[idx] == tag;
    evict = !hit && c.v[idx];
    c.v[idx] = 1; c.tag[idx] = tag;
    return hit;
  endfunction

  isa_model m;
  ref_cache_t ric, rdc;

  // Load a program (a halt loop is appended), reset, run, compare.
  task automatic run(string name, word_t prog[$], int cycles);
    int halt, e_imiss, e_dmiss, e_iwait, e_dwait, e_rd, e_wr, r0, w0, ir0;
    bit hit, ev;
    halt = 2 * prog.size();
    prog.push_back(BEQ(0, 0, -2));   // halt: branch to itself
    prog.push_back(NOP());           // its delay slot
    rst = 1;
    @(negedge clk);
    m = new(DEPTH, DEPTH);
    for (int i = 0; i < DEPTH; i++) begin
      u_imem.mem[i] = (i < prog.size()) ? prog[i] : NOP();
      m.imem[i] = u_imem.mem[i];
      m.dmem[i] = u_dmem.mem[i];
    end
    for (int i = 0; i < (1 << IB); i++) begin ric.v[i] = 0; rdc.v[i] = 0; end
    n_bubbles = 0; n_imiss = 0; n_dmiss = 0; n_iwait = 0; n_dwait = 0; n_freeze = 0; n_taken = 0;
    r0 = int'(d_reads); w0 = int'(d_writes); ir0 = int'(i_reads);
    @(negedge clk) rst = 0;
    repeat (cycles) @(negedge clk);

    // reference: run until the halt branch, then execute it once
    e_imiss = 0; e_dmiss = 0; e_dwait = 0; e_rd = 0; e_wr = 0;
    do begin
      m.step();
      if (!ref_access(ric, m.last_pc, ev)) e_imiss++;
      if (m.mem_kind != 0) begin
        hit = ref_access(rdc, m.mem_addr, ev);
        if (ev) t_evict++;
        if (!hit) begin e_dmiss++; e_rd++; end
        if (m.mem_kind == 1) begin
          e_dwait += hit ? 0 : LAT + 1;
          if (hit) t_rhit++; else t_rmiss++;
        end else begin
          e_wr++;
          e_dwait += hit ? LAT : 2 * LAT + 1;
          if (hit) t_whit++; else t_wmiss++;
        end
      end
    end while (m.last_pc != halt && m.executed < 100000);
    if (!ref_access(ric, halt + 2, ev)) e_imiss++;   // the halt's delay slot is fetched too
    e_iwait = e_imiss * (LAT + 1);

    for (int r = 0; r < 8; r++) begin
      dbg_reg_addr = 3'(r); #1;
      chk($sformatf("%s R%0d", name, r), dbg_reg_data, m.regs[r]);
    end
    for (int i = 0; i < DEPTH; i++) begin
      checks++;
      if (u_dmem.mem[i] !== m.dmem[i]) begin
        failures++; $display("FAIL %s M[%0d] got %h exp %h", name, i, u_dmem.mem[i], m.dmem[i]);
      end
    end
    chk({name, " hazard bubbles"}, n_bubbles, m.bubbles);
    chk({name, " I-cache misses"}, n_imiss, e_imiss);
    chk({name, " D-cache misses"}, n_dmiss, e_dmiss);
    chk({name, " fetch wait cycles"}, n_iwait, e_iwait);
    chk({name, " data wait cycles"}, n_dwait, e_dwait);
    chk({name, " instruction refills"}, int'(i_reads) - ir0, e_imiss);
    chk({name, " data refills"}, int'(d_reads) - r0, e_rd);
    chk({name, " memory writes (write-through)"}, int'(d_writes) - w0, e_wr);
    chk({name, " no fetch write"}, int'(i_writes), 0);
    t_imiss += n_imiss; t_dmiss += n_dmiss; t_freeze += n_freeze; t_bubbles += n_bubbles;
  endtask

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
        4: p.push_back(ADDI(rt, rs, imm));
        5: p.push_back(ADDI(rt, rt, 2 * $urandom_range(0, 3)));   // walk through nearby words
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
    t_imiss = 0; t_dmiss = 0; t_freeze = 0; t_whit = 0; t_wmiss = 0; t_rhit = 0; t_rmiss = 0;
    t_evict = 0; t_bubbles = 0; t_overlap = 0;

    // Straight-line fetch: 8 instructions + halt pair = 10 words = 5 blocks,
    // each a cold miss of LAT+1 cycles; nothing else stalls.
    p = {};
    for (int i = 0; i < 8; i++) p.push_back(ADDI(i, 0, i + 1));
    run("fetch", p, 200);
    chk("fetch misses", n_imiss, 5);
    chk("fetch frozen cycles", n_freeze, 5 * (LAT + 1));

    // Loads and stores: read miss, read hit in the same block, write miss,
    // write hit, then a load that needs the stored value.
    p = {};
    p.push_back(ADDI(2, 0, 16)); p.push_back(NOP()); p.push_back(NOP());
    p.push_back(LW(1, 0, 2));    // read miss
    p.push_back(LW(3, 2, 2));    // read hit (same block)
    p.push_back(SW(3, 4, 2));    // write miss (next block)
    p.push_back(SW(1, 6, 2));    // write hit
    p.push_back(LW(4, 6, 2));    // read hit, gets R1
    p.push_back(ADD(5, 4, 3));
    run("load/store", p, 300);
    chk("load/store data misses", n_dmiss, 2);

    // Conflict: addresses 16 and 16 + 4096 share an index (4 KB cache), so
    // the second load evicts the first block and the third misses again.
    p = {};
    p.push_back(ADDI(2, 0, 16)); p.push_back(ADDI(5, 0, 16));
    for (int i = 0; i < 8; i++) p.push_back(ADD(5, 5, 5));   // R5 = 4096
    p.push_back(ADD(6, 5, 2));
    p.push_back(LW(1, 0, 2)); p.push_back(LW(3, 0, 6)); p.push_back(LW(4, 0, 2));
    p.push_back(SW(1, 2, 6));   // write miss: evicts again
    run("conflict", p, 300);
    chk("conflict data misses", n_dmiss, 4);

    // A loop: code misses only on its first pass, data hits after the first.
    p = {};
    p.push_back(ADDI(1, 0, 6)); p.push_back(ADDI(2, 0, 40));
    p.push_back(LW(3, 0, 2));              // L: load a counter word
    p.push_back(ADDI(3, 3, 1));
    p.push_back(SW(3, 0, 2));
    p.push_back(ADDI(1, 1, -1));
    p.push_back(BNE(1, 0, -10));           // to L
    p.push_back(NOP());                    // delay slot
    run("loop", p, 600);
    chk("loop fetch misses (cold only)", n_imiss, 5);
    chk("loop data misses (first pass only)", n_dmiss, 1);

    // Random programs.
    for (int t = 0; t < 40; t++) begin
      p = {};
      p.push_back(ADDI(2, 0, 8)); p.push_back(ADDI(3, 0, 5));
      rand_prog(p, 80);
      run($sformatf("random %0d", t), p, 3000);
    end

    $display("mechanisms: I-miss %0d, D-miss %0d, read hit %0d, read miss %0d, write hit %0d, write miss %0d, evictions %0d, frozen cycles %0d, parallel refills %0d, bubbles %0d",
             t_imiss, t_dmiss, t_rhit, t_rmiss, t_whit, t_wmiss, t_evict, t_freeze, t_overlap, t_bubbles);
    chk("I-cache miss seen", t_imiss > 0, 1);
    chk("read hit seen", t_rhit > 0, 1);
    chk("read miss seen", t_rmiss > 0, 1);
    chk("write hit seen", t_whit > 0, 1);
    chk("write miss seen", t_wmiss > 0, 1);
    chk("eviction seen", t_evict > 0, 1);
    chk("both caches refilling at once seen", t_overlap > 0, 1);
    chk("hazard bubble seen", t_bubbles > 0, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
