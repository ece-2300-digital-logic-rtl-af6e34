// main_mem_model: behavioural model of the DRAM main memory behind the
// caches, for testbenches only (not synthesizable, not part of the design).
//
// Word-addressed array of DEPTH words (the address wraps), initialised to
// init_word(word address) so a checker can predict unwritten contents.
// Request/ready handshake matching dm_cache: a request held on mem_req is
// answered with a one-cycle mem_ready in its LATENCY-th cycle (LATENCY >= 2);
// the count restarts if mem_req drops before that. A read returns the
// BLOCK_WORDS words of the block at mem_addr, a write stores mem_wdata at the
// word of mem_addr.
module main_mem_model #(
  parameter int unsigned ADDR_W      = 32,
  parameter int unsigned WORD_W      = 32,
  parameter int unsigned BLOCK_WORDS = 1,
  parameter int unsigned LATENCY     = 4,
  parameter int unsigned DEPTH       = 65536
) (
  input  logic                          clk,
  input  logic                          mem_req,
  input  logic                          mem_we,
  input  logic [ADDR_W-1:0]             mem_addr,
  input  logic [WORD_W-1:0]             mem_wdata,
  output logic [BLOCK_WORDS*WORD_W-1:0] mem_rdata,
  output logic                          mem_ready,
  output int unsigned                   n_reads,
  output int unsigned                   n_writes
);
  localparam int unsigned WB = $clog2(WORD_W / 8);

  logic [WORD_W-1:0] mem [DEPTH];
  int unsigned       wait_cnt;

  function automatic logic [WORD_W-1:0] init_word(int unsigned waddr);
    return WORD_W'(waddr * 32'h9E3779B1 ^ 32'h5A5AA5A5);
  endfunction

  initial begin
    for (int unsigned i = 0; i < DEPTH; i++) mem[i] = init_word(i);
    mem_ready = 0; mem_rdata = '0; wait_cnt = 0; n_reads = 0; n_writes = 0;
  end

  always @(posedge clk) begin
    mem_ready <= 1'b0;
    if (mem_req && !mem_ready) begin
      if (wait_cnt + 2 >= LATENCY) begin
        int unsigned w;
        w = int'(mem_addr >> WB);
        wait_cnt  <= 0;
        mem_ready <= 1'b1;
        if (mem_we) begin
          mem[w % DEPTH] <= mem_wdata;
          n_writes <= n_writes + 1;
        end else begin
          for (int unsigned k = 0; k < BLOCK_WORDS; k++)
            mem_rdata[k*WORD_W +: WORD_W] <= mem[(w + k) % DEPTH];
          n_reads <= n_reads + 1;
        end
      end else begin
        wait_cnt <= wait_cnt + 1;
      end
    end else if (!mem_req) begin
      wait_cnt <= 0;   // a request withdrawn (e.g. during reset) starts over
    end
  end
endmodule
