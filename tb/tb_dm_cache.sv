// tb_dm_cache: drives the direct-mapped cache with directed and random word
// reads and writes through the behavioural main memory and checks every read
// against a flat shadow memory, the hit/miss outcome against a shadow copy
// of the tag and valid arrays, and the cycle count of each access:
// read hit answers in the request cycle, a read miss after LATENCY+1 cycles,
// a write after LATENCY cycles (write-through), a write miss after
// 2*LATENCY+1 (write-allocate). Run with 8 blocks of 8 bytes (two words)
// so conflicts and the word select inside a block are exercised.
module tb_dm_cache;
  localparam int AW = 32, IB = 3, OB = 3, WW = 32, LAT = 3;
  localparam int BW = (1 << OB) / (WW / 8);
  localparam int TAGW = AW - IB - OB;

  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;
  logic cpu_req = 0, cpu_we = 0, cpu_ready, cpu_miss;
  logic [AW-1:0] cpu_addr = 0, mem_addr;
  logic [WW-1:0] cpu_wdata = 0, cpu_rdata, mem_wdata;
  logic [BW*WW-1:0] mem_rdata;
  logic mem_req, mem_we, mem_ready;
  int unsigned n_reads, n_writes;

  dm_cache #(.ADDR_W(AW), .INDEX_BITS(IB), .OFFSET_BITS(OB), .WORD_W(WW)) dut (.*);
  main_mem_model #(.ADDR_W(AW), .WORD_W(WW), .BLOCK_WORDS(BW), .LATENCY(LAT), .DEPTH(4096)) u_mem (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (200000) @(posedge clk); failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  logic [WW-1:0] shadow [int];           // word address -> value written
  bit            s_valid [1 << IB];
  logic [TAGW-1:0] s_tag [1 << IB];
  int n_hit, n_miss, n_wmiss, n_evict;
  bit last_miss;

  function automatic logic [WW-1:0] expect_word(int unsigned waddr);
    if (shadow.exists(waddr)) return shadow[waddr];
    return u_mem.init_word(waddr % 4096);
  endfunction

  task automatic chk(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: got %0h exp %0h", what, got, exp); end
  endtask

  // One access; returns after cpu_ready. Checks data, hit/miss and latency.
  task automatic access(bit we, logic [AW-1:0] addr, logic [WW-1:0] wd);
    int idx, lat, exp_lat; bit hit; logic [TAGW-1:0] tg;
    idx = int'(addr[OB +: IB]); tg = addr[AW-1 -: TAGW];
    hit = s_valid[idx] && s_tag[idx] == tg;
    if (!hit && s_valid[idx]) n_evict++;
    if (hit) n_hit++; else n_miss++;
    if (!hit && we) n_wmiss++;
    @(negedge clk);
    cpu_req = 1; cpu_we = we; cpu_addr = addr; cpu_wdata = wd;
    #1 chk("miss flag", cpu_miss, !hit);
    last_miss = cpu_miss;
    lat = 0;
    while (!cpu_ready) begin @(negedge clk); lat++; end
    if (!we) chk($sformatf("read %h", addr), cpu_rdata, expect_word(addr >> 2));
    exp_lat = we ? (hit ? LAT : 2 * LAT + 1) : (hit ? 0 : LAT + 1);
    chk($sformatf("latency %s %s", we ? "write" : "read", hit ? "hit" : "miss"), lat, exp_lat);
    @(posedge clk); #1;
    cpu_req = 0;
    if (we) shadow[addr >> 2] = wd;
    s_valid[idx] = 1; s_tag[idx] = tg;
  endtask

  initial begin
    n_hit = 0; n_miss = 0; n_wmiss = 0; n_evict = 0;
    foreach (s_valid[i]) s_valid[i] = 0;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    // Reading: cold miss, then hits on both words of the block (spatial locality).
    access(0, 32'h0000_0040, 0);
    access(0, 32'h0000_0040, 0);
    access(0, 32'h0000_0044, 0);
    // Same index, other tag: conflict miss evicts, then the first misses again.
    access(0, 32'h0000_0440, 0);
    access(0, 32'h0000_0040, 0);
    // Writing: hit, write miss (allocate), read back.
    access(1, 32'h0000_0044, 32'hDEAD_BEEF);
    access(0, 32'h0000_0044, 0);
    access(1, 32'h0000_0848, 32'h1234_5678);
    access(0, 32'h0000_0848, 0);
    access(0, 32'h0000_084C, 0);
    // Evicted written block must come back from memory with the new data.
    access(0, 32'h0000_0048, 0);
    access(0, 32'h0000_0848, 0);
    // The lecture's mapping picture: with 8 blocks, memory blocks 00001,
    // 01001, 10001 and 11001 all map to cache block 001 and 00101, 01101,
    // 10101, 11101 to block 101 (block address modulo 8).
    for (int k = 0; k < 4; k++) begin
      access(0, (5'b00001 | (k << 3)) << OB, 0);
      chk("mapping example: first touch of a block misses", last_miss, 1);
      access(0, (5'b00101 | (k << 3)) << OB, 0);
      chk("mapping example: first touch of a block misses", last_miss, 1);
      access(0, (5'b00001 | (k << 3)) << OB, 0);
      chk("mapping example: block 001 kept while 101 is used", last_miss, 0);
    end
    access(0, 5'b00001 << OB, 0);
    chk("mapping example: 11001 evicted 00001 from block 001", last_miss, 1);
    // Random traffic over a small region (many conflicts).
    repeat (3000) begin
      logic [AW-1:0] a;
      a = {2'($urandom), IB'($urandom), 1'($urandom), 2'b00};
      access($urandom_range(0, 2) == 0, a, $urandom);
    end
    $display("hits %0d misses %0d write misses %0d evictions %0d, memory reads %0d writes %0d",
             n_hit, n_miss, n_wmiss, n_evict, n_reads, n_writes);
    chk("memory reads = misses", n_reads, n_miss);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
