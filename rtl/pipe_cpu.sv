// pipe_cpu: the five-stage pipelined 16-bit processor on single-cycle
// memories, as in the lecture's datapath drawing: pipe_core with an
// instruction RAM in IF and a data RAM in MEM.
//
// Both RAMs answer in the cycle they are addressed, so the core never
// freezes: one instruction enters per cycle unless the hazard detection unit
// inserts a bubble (load-use: 1 cycle; ALU result needed by a branch: 1;
// load result needed by the next instruction if that is a branch: 2), and an
// instruction writes the register file five cycles after it was fetched.
// Branches are resolved in ID and have one delay slot.
//
// Interface: clk, synchronous active-high rst (PC = 0, pipeline filled with
// bubbles). Programs are written into the instruction RAM through prog_*
// while reset is held. dbg_reg_* and dbg_mem_* read a register and a data
// RAM word; pc, stall, stall_cause, branch_taken, retire and fwd_* show what
// the pipeline does each cycle. The core's imem_req is not needed here: the
// instruction RAM is read every cycle. The RAM sizes (256 words each) and the ports
// are this design's own choice.
module pipe_cpu
  import cpu_pkg::*;
#(
  parameter int unsigned IMEM_WORDS = 256,
  parameter int unsigned DMEM_WORDS = 256
) (
  input  logic                          clk,
  input  logic                          rst,
  // instruction RAM load port
  input  logic                          prog_we,
  input  logic [$clog2(IMEM_WORDS)-1:0] prog_addr,
  input  word_t                         prog_data,
  // observation ports
  input  reg_idx_t                      dbg_reg_addr,
  output word_t                         dbg_reg_data,
  input  logic [$clog2(DMEM_WORDS)-1:0] dbg_mem_addr,
  output word_t                         dbg_mem_data,
  output word_t                         pc,
  output logic                          stall,         // bubble inserted this cycle
  output hazard_e                       stall_cause,
  output logic                          branch_taken,  // PCJ applied this cycle
  output logic                          retire,        // an instruction writes back or stores
  output fwd_sel_e                      fwd_id_a,
  output fwd_sel_e                      fwd_id_b,
  output fwd_sel_e                      fwd_ex_a,
  output fwd_sel_e                      fwd_ex_b
);

  logic  imem_req, dmem_req, dmem_we, mem_stall;
  word_t imem_addr, instr, dmem_addr, dmem_wdata, dmem_rdata;

  inst_ram #(.WORDS(IMEM_WORDS)) u_imem (
    .clk      (clk),
    .addr     (imem_addr),
    .instr    (instr),
    .prog_we  (prog_we),
    .prog_addr(prog_addr),
    .prog_data(prog_data)
  );

  data_ram #(.WORDS(DMEM_WORDS)) u_dmem (
    .clk     (clk),
    .addr    (dmem_addr),
    .d_in    (dmem_wdata),
    .mw      (dmem_req && dmem_we),
    .d_out   (dmem_rdata),
    .dbg_addr(dbg_mem_addr),
    .dbg_data(dbg_mem_data)
  );

  // Single-cycle RAMs: both accesses are ready in the cycle they are made.
  pipe_core u_core (
    .clk, .rst,
    .imem_req, .imem_addr, .imem_rdata(instr), .imem_ready(1'b1),
    .dmem_req, .dmem_we, .dmem_addr, .dmem_wdata, .dmem_rdata, .dmem_ready(1'b1),
    .dbg_reg_addr, .dbg_reg_data,
    .pc, .stall, .stall_cause, .branch_taken, .retire,
    .fwd_id_a, .fwd_id_b, .fwd_ex_a, .fwd_ex_b, .mem_stall
  );

  // The RAMs never make the core wait.
  assert property (@(posedge clk) disable iff (rst) !mem_stall)
    else $error("core frozen on single-cycle memories");

endmodule
