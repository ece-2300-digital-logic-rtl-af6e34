// dm_cache: direct-mapped cache with valid bit, tag and data per block.
//
// The address is split, from the top, into ADDR_W-INDEX_BITS-OFFSET_BITS tag
// bits, INDEX_BITS index bits and OFFSET_BITS byte-offset bits: 2^INDEX_BITS
// blocks of 2^OFFSET_BITS bytes, 2^(INDEX_BITS+OFFSET_BITS) bytes in all.
// The defaults are the lecture's example: 32-bit addresses, 20-bit tag,
// 10-bit index (1024 blocks), 2-bit byte offset, 32-bit data.
//
// Read: the index selects one entry; hit = valid AND (stored tag == address
// tag). A hit returns the word in the same cycle (cpu_ready high together
// with cpu_req, no wait). A miss fetches the whole block from main memory,
// stores it with the address tag and sets valid; the access then hits.
// Write: a hit writes the word into the block. A write miss first brings the
// block in and stores the tag (write-allocate), then writes as on a hit.
// Every write is also sent to main memory (write-through) and completes when
// memory acknowledges it; the lecture leaves the memory-side write policy
// open, this is the simplest that keeps memory correct.
//
// CPU side: hold cpu_req, cpu_we, cpu_addr and cpu_wdata stable until
// cpu_ready. Accesses are whole, aligned words; the low address bits below
// the word are ignored. cpu_miss pulses in the cycle a miss is detected.
// Memory side: mem_req stays high, with stable mem_we/mem_addr/mem_wdata,
// until mem_ready is high for one cycle; a read returns the whole block on
// mem_rdata (word 0 in the low bits), mem_addr is then the block address.
// Timing: read hit 0 wait cycles; read miss = memory latency + 1 cycle;
// write = memory latency (+ memory latency + 1 on a miss). Reset clears
// all valid bits.
module dm_cache #(
  parameter int unsigned ADDR_W      = 32,
  parameter int unsigned INDEX_BITS  = 10,
  parameter int unsigned OFFSET_BITS = 2,
  parameter int unsigned WORD_W      = 32,
  localparam int unsigned TAG_W       = ADDR_W - INDEX_BITS - OFFSET_BITS,
  localparam int unsigned BLOCKS      = 1 << INDEX_BITS,
  localparam int unsigned WBYTE_BITS  = $clog2(WORD_W / 8),
  localparam int unsigned BLOCK_WORDS = (1 << OFFSET_BITS) / (WORD_W / 8),
  localparam int unsigned BLOCK_W     = BLOCK_WORDS * WORD_W
) (
  input  logic               clk,
  input  logic               rst,
  // CPU side
  input  logic               cpu_req,
  input  logic               cpu_we,
  input  logic [ADDR_W-1:0]  cpu_addr,
  input  logic [WORD_W-1:0]  cpu_wdata,
  output logic [WORD_W-1:0]  cpu_rdata,
  output logic               cpu_ready,
  output logic               cpu_miss,
  // main-memory side
  output logic               mem_req,
  output logic               mem_we,
  output logic [ADDR_W-1:0]  mem_addr,
  output logic [WORD_W-1:0]  mem_wdata,
  input  logic [BLOCK_W-1:0] mem_rdata,
  input  logic               mem_ready
);

  typedef enum logic [1:0] {S_LOOKUP, S_REFILL, S_WRITE} state_e;

  typedef logic [WORD_W-1:0] word_t;
  typedef word_t [BLOCK_WORDS-1:0] block_t;

  state_e                state;
  logic [BLOCKS-1:0]     valid;
  logic [TAG_W-1:0]      tags  [BLOCKS];
  block_t                data  [BLOCKS];

  logic [TAG_W-1:0]      a_tag;
  logic [INDEX_BITS-1:0] a_index;
  int unsigned           a_word;
  logic                  hit;
  block_t                blk;

  assign a_tag   = cpu_addr[ADDR_W-1 -: TAG_W];
  assign a_index = cpu_addr[OFFSET_BITS +: INDEX_BITS];
  assign a_word  = (BLOCK_WORDS > 1) ? (int'(cpu_addr[OFFSET_BITS-1:0]) >> WBYTE_BITS) : 0;

  assign blk       = data[a_index];
  assign hit       = valid[a_index] && (tags[a_index] == a_tag);
  assign cpu_rdata = blk[a_word];

  always_comb begin
    cpu_ready = 1'b0;
    cpu_miss  = 1'b0;
    mem_req   = 1'b0;
    mem_we    = 1'b0;
    mem_addr  = {cpu_addr[ADDR_W-1:OFFSET_BITS], {OFFSET_BITS{1'b0}}};
    mem_wdata = cpu_wdata;
    unique case (state)
      S_LOOKUP: begin
        cpu_ready = cpu_req && hit && !cpu_we;
        cpu_miss  = cpu_req && !hit;
      end
      S_REFILL: begin
        mem_req = 1'b1;
      end
      S_WRITE: begin
        mem_req   = 1'b1;
        mem_we    = 1'b1;
        mem_addr  = {cpu_addr[ADDR_W-1:WBYTE_BITS], {WBYTE_BITS{1'b0}}};
        cpu_ready = mem_ready;
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= S_LOOKUP;
      valid <= '0;
    end else begin
      unique case (state)
        S_LOOKUP: begin
          if (cpu_req && !hit) begin
            state <= S_REFILL;
          end else if (cpu_req && cpu_we) begin
            data[a_index][a_word] <= cpu_wdata;
            state                 <= S_WRITE;
          end
        end
        S_REFILL: begin
          if (mem_ready) begin
            data[a_index]  <= mem_rdata;
            tags[a_index]  <= a_tag;
            valid[a_index] <= 1'b1;
            state          <= S_LOOKUP;
          end
        end
        S_WRITE: begin
          if (mem_ready) state <= S_LOOKUP;
        end
        default: state <= S_LOOKUP;
      endcase
    end
  end

  // Handshake rules.
  assert property (@(posedge clk) disable iff (rst) mem_req && !mem_ready |=> mem_req)
    else $error("mem_req dropped before mem_ready");
  assert property (@(posedge clk) disable iff (rst) cpu_req && !cpu_ready |=> cpu_req && $stable(cpu_addr))
    else $error("CPU request changed before cpu_ready");

endmodule
