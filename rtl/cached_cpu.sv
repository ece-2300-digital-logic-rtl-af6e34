// cached_cpu: the pipelined processor with an instruction cache in IF and a
// data cache in MEM, both backed by main memory outside this module.
//
// pipe_core fetches through one dm_cache and loads and stores through a
// second one. A hit answers in the cycle it is made, so a program that hits
// runs exactly as on single-cycle RAMs. On a miss, the cache refills the
// block from main memory while the whole pipeline is frozen, and the access
// then completes. Stores are written into the data cache on a hit
// (write-allocate on a miss) and always also to main memory
// (write-through), so main memory always holds the current data. The
// pipeline waits for that write.
//
// Each cache has its own main-memory port (i_mem_*, d_mem_*), with the
// dm_cache handshake: the request is held until a one-cycle ready, and a
// read returns one whole block. The caches use the lecture's geometry of
// 2^10 blocks of 2^2 bytes (C_INDEX_BITS, C_OFFSET_BITS) on the
// processor's 16-bit byte addresses, so a block is two 16-bit words and the
// tag is 4 bits wide. Narrowing the cache to 16 bits, the freeze on a miss,
// write-through and the separate memory ports are this design's own choices.
//
// Interface: clk, synchronous active-high rst (PC = 0, pipeline bubbles,
// both caches invalid). Observation: dbg_reg_*, pc, stall/stall_cause
// (hazard bubbles), mem_stall (frozen for a cache), i_miss/d_miss (a cache
// detects a miss this cycle), branch_taken, retire, fwd_*.
module cached_cpu
  import cpu_pkg::*;
#(
  parameter int unsigned C_INDEX_BITS  = 10,
  parameter int unsigned C_OFFSET_BITS = 2,
  localparam int unsigned C_BLOCK_W    = ((1 << C_OFFSET_BITS) / (XLEN / 8)) * XLEN
) (
  input  logic                 clk,
  input  logic                 rst,
  // instruction cache: main-memory port
  output logic                 i_mem_req,
  output logic                 i_mem_we,
  output word_t                i_mem_addr,
  output word_t                i_mem_wdata,
  input  logic [C_BLOCK_W-1:0] i_mem_rdata,
  input  logic                 i_mem_ready,
  // data cache: main-memory port
  output logic                 d_mem_req,
  output logic                 d_mem_we,
  output word_t                d_mem_addr,
  output word_t                d_mem_wdata,
  input  logic [C_BLOCK_W-1:0] d_mem_rdata,
  input  logic                 d_mem_ready,
  // observation
  input  reg_idx_t             dbg_reg_addr,
  output word_t                dbg_reg_data,
  output word_t                pc,
  output logic                 stall,
  output hazard_e              stall_cause,
  output logic                 mem_stall,
  output logic                 i_miss,
  output logic                 d_miss,
  output logic                 branch_taken,
  output logic                 retire,
  output fwd_sel_e             fwd_id_a,
  output fwd_sel_e             fwd_id_b,
  output fwd_sel_e             fwd_ex_a,
  output fwd_sel_e             fwd_ex_b
);

  logic  imem_req, imem_ready, dmem_req, dmem_we, dmem_ready;
  word_t imem_addr, imem_rdata, dmem_addr, dmem_wdata, dmem_rdata;

  pipe_core u_core (
    .clk, .rst,
    .imem_req, .imem_addr, .imem_rdata, .imem_ready,
    .dmem_req, .dmem_we, .dmem_addr, .dmem_wdata, .dmem_rdata, .dmem_ready,
    .dbg_reg_addr, .dbg_reg_data,
    .pc, .stall, .stall_cause, .branch_taken, .retire,
    .fwd_id_a, .fwd_id_b, .fwd_ex_a, .fwd_ex_b, .mem_stall
  );

  // Instruction cache: read only.
  dm_cache #(
    .ADDR_W     (XLEN),
    .INDEX_BITS (C_INDEX_BITS),
    .OFFSET_BITS(C_OFFSET_BITS),
    .WORD_W     (XLEN)
  ) u_icache (
    .clk, .rst,
    .cpu_req  (imem_req),
    .cpu_we   (1'b0),
    .cpu_addr (imem_addr),
    .cpu_wdata('0),
    .cpu_rdata(imem_rdata),
    .cpu_ready(imem_ready),
    .cpu_miss (i_miss),
    .mem_req  (i_mem_req),
    .mem_we   (i_mem_we),
    .mem_addr (i_mem_addr),
    .mem_wdata(i_mem_wdata),
    .mem_rdata(i_mem_rdata),
    .mem_ready(i_mem_ready)
  );

  dm_cache #(
    .ADDR_W     (XLEN),
    .INDEX_BITS (C_INDEX_BITS),
    .OFFSET_BITS(C_OFFSET_BITS),
    .WORD_W     (XLEN)
  ) u_dcache (
    .clk, .rst,
    .cpu_req  (dmem_req),
    .cpu_we   (dmem_we),
    .cpu_addr (dmem_addr),
    .cpu_wdata(dmem_wdata),
    .cpu_rdata(dmem_rdata),
    .cpu_ready(dmem_ready),
    .cpu_miss (d_miss),
    .mem_req  (d_mem_req),
    .mem_we   (d_mem_we),
    .mem_addr (d_mem_addr),
    .mem_wdata(d_mem_wdata),
    .mem_rdata(d_mem_rdata),
    .mem_ready(d_mem_ready)
  );

endmodule
