// lec20_top: the lecture's designs side by side.
//
//   * pipe_cpu: the five-stage 16-bit pipelined processor with forwarding,
//     hazard detection and the branch hardware in ID, on a single-cycle
//     instruction RAM and data RAM. Its program-load and observation ports
//     are brought out unchanged.
//   * cached_cpu (ports cc_*): the same processor with an instruction cache
//     in IF and a data cache in MEM. The pipeline freezes while a cache is
//     waiting. Both caches' main-memory ports are brought out, because
//     main memory (DRAM) is outside the design.
//   * dm_cache: the direct-mapped cache of the lecture's example (32-bit
//     addresses, 1024 one-word blocks), with its CPU-side port and its
//     main-memory port brought out.
//
// The three share only the clock and the reset (synchronous, active high).
// Keeping them as independent units is this design's choice.
module lec20_top
  import cpu_pkg::*;
#(
  parameter int unsigned IMEM_WORDS    = 256,
  parameter int unsigned DMEM_WORDS    = 256,
  parameter int unsigned C_ADDR_W      = 32,
  parameter int unsigned C_INDEX_BITS  = 10,
  parameter int unsigned C_OFFSET_BITS = 2,
  parameter int unsigned C_WORD_W      = 32,
  parameter int unsigned CC_INDEX_BITS  = 10,
  parameter int unsigned CC_OFFSET_BITS = 2,
  localparam int unsigned C_BLOCK_W    = ((1 << C_OFFSET_BITS) / (C_WORD_W / 8)) * C_WORD_W,
  localparam int unsigned CC_BLOCK_W   = ((1 << CC_OFFSET_BITS) / (XLEN / 8)) * XLEN
) (
  input  logic                          clk,
  input  logic                          rst,
  // processor: instruction RAM load port
  input  logic                          prog_we,
  input  logic [$clog2(IMEM_WORDS)-1:0] prog_addr,
  input  word_t                         prog_data,
  // processor: observation
  input  reg_idx_t                      dbg_reg_addr,
  output word_t                         dbg_reg_data,
  input  logic [$clog2(DMEM_WORDS)-1:0] dbg_mem_addr,
  output word_t                         dbg_mem_data,
  output word_t                         pc,
  output logic                          stall,
  output hazard_e                       stall_cause,
  output logic                          branch_taken,
  output logic                          retire,
  output fwd_sel_e                      fwd_id_a,
  output fwd_sel_e                      fwd_id_b,
  output fwd_sel_e                      fwd_ex_a,
  output fwd_sel_e                      fwd_ex_b,
  // cached processor: main-memory ports of the two caches
  output logic                          cc_i_mem_req,
  output logic                          cc_i_mem_we,
  output word_t                         cc_i_mem_addr,
  output word_t                         cc_i_mem_wdata,
  input  logic [CC_BLOCK_W-1:0]         cc_i_mem_rdata,
  input  logic                          cc_i_mem_ready,
  output logic                          cc_d_mem_req,
  output logic                          cc_d_mem_we,
  output word_t                         cc_d_mem_addr,
  output word_t                         cc_d_mem_wdata,
  input  logic [CC_BLOCK_W-1:0]         cc_d_mem_rdata,
  input  logic                          cc_d_mem_ready,
  // cached processor: observation
  input  reg_idx_t                      cc_dbg_reg_addr,
  output word_t                         cc_dbg_reg_data,
  output word_t                         cc_pc,
  output logic                          cc_stall,
  output hazard_e                       cc_stall_cause,
  output logic                          cc_mem_stall,
  output logic                          cc_i_miss,
  output logic                          cc_d_miss,
  output logic                          cc_branch_taken,
  output logic                          cc_retire,
  output fwd_sel_e                      cc_fwd_id_a,
  output fwd_sel_e                      cc_fwd_id_b,
  output fwd_sel_e                      cc_fwd_ex_a,
  output fwd_sel_e                      cc_fwd_ex_b,
  // cache: CPU side
  input  logic                          cpu_req,
  input  logic                          cpu_we,
  input  logic [C_ADDR_W-1:0]           cpu_addr,
  input  logic [C_WORD_W-1:0]           cpu_wdata,
  output logic [C_WORD_W-1:0]           cpu_rdata,
  output logic                          cpu_ready,
  output logic                          cpu_miss,
  // cache: main-memory side
  output logic                          mem_req,
  output logic                          mem_we,
  output logic [C_ADDR_W-1:0]           mem_addr,
  output logic [C_WORD_W-1:0]           mem_wdata,
  input  logic [C_BLOCK_W-1:0]          mem_rdata,
  input  logic                          mem_ready
);

  pipe_cpu #(
    .IMEM_WORDS(IMEM_WORDS),
    .DMEM_WORDS(DMEM_WORDS)
  ) u_cpu (
    .clk, .rst, .prog_we, .prog_addr, .prog_data,
    .dbg_reg_addr, .dbg_reg_data, .dbg_mem_addr, .dbg_mem_data,
    .pc, .stall, .stall_cause, .branch_taken, .retire,
    .fwd_id_a, .fwd_id_b, .fwd_ex_a, .fwd_ex_b
  );

  cached_cpu #(
    .C_INDEX_BITS (CC_INDEX_BITS),
    .C_OFFSET_BITS(CC_OFFSET_BITS)
  ) u_ccpu (
    .clk, .rst,
    .i_mem_req   (cc_i_mem_req),   .i_mem_we   (cc_i_mem_we),   .i_mem_addr (cc_i_mem_addr),
    .i_mem_wdata (cc_i_mem_wdata), .i_mem_rdata(cc_i_mem_rdata), .i_mem_ready(cc_i_mem_ready),
    .d_mem_req   (cc_d_mem_req),   .d_mem_we   (cc_d_mem_we),   .d_mem_addr (cc_d_mem_addr),
    .d_mem_wdata (cc_d_mem_wdata), .d_mem_rdata(cc_d_mem_rdata), .d_mem_ready(cc_d_mem_ready),
    .dbg_reg_addr(cc_dbg_reg_addr), .dbg_reg_data(cc_dbg_reg_data),
    .pc          (cc_pc),          .stall      (cc_stall),      .stall_cause(cc_stall_cause),
    .mem_stall   (cc_mem_stall),   .i_miss     (cc_i_miss),     .d_miss     (cc_d_miss),
    .branch_taken(cc_branch_taken), .retire    (cc_retire),
    .fwd_id_a    (cc_fwd_id_a),    .fwd_id_b   (cc_fwd_id_b),
    .fwd_ex_a    (cc_fwd_ex_a),    .fwd_ex_b   (cc_fwd_ex_b)
  );

  dm_cache #(
    .ADDR_W     (C_ADDR_W),
    .INDEX_BITS (C_INDEX_BITS),
    .OFFSET_BITS(C_OFFSET_BITS),
    .WORD_W     (C_WORD_W)
  ) u_cache (
    .clk, .rst, .cpu_req, .cpu_we, .cpu_addr, .cpu_wdata, .cpu_rdata, .cpu_ready, .cpu_miss,
    .mem_req, .mem_we, .mem_addr, .mem_wdata, .mem_rdata, .mem_ready
  );

endmodule
