// pipe_core: the five-stage pipelined 16-bit processor without its
// memories. IF/ID/EX/MEM/WB with forwarding, the branch hardware in ID and
// the hazard detection unit; the instruction and data memories are reached
// through two request/ready ports, so the same core runs on single-cycle
// RAMs (pipe_cpu) or behind an instruction cache and a data cache
// (cached_cpu).
//
// Stages and what each holds:
//   IF   PC, the +2 incrementer, the PC multiplexer (PCJ picks the branch
//        target over PC+2); the instruction is read at imem_addr = PC.
//   ID   decoder and SE, register file, two forwarding multiplexers, the
//        branch Adder and =? comparator, the CU, the hazard detection unit.
//   EX   two forwarding multiplexers, the MB multiplexer, the ALU.
//   MEM  data access at dmem_addr = ALU result, and the MD multiplexer.
//   WB   register file write (LD, DR).
// IF/ID, ID/EX, EX/MEM and MEM/WB are the pipeline registers.
//
// Branches are resolved in ID and have one delay slot: the instruction after
// a branch always executes. A taken branch therefore costs no cycle. Loads
// have no delay slot; the hazard detection unit stalls IF and ID and sends a
// bubble into EX while a value is not yet available (load-use: 1 cycle; ALU
// result needed by a branch: 1; load result needed by the next instruction
// if that is a branch: 2). Everything else is covered by forwarding. The
// store data is taken after the EX forwarding multiplexer, not straight from
// ID/EX, so a store can forward its data like any ALU operand.
//
// Memory ports: imem_req is high outside reset; imem_rdata is used in the
// cycle imem_ready is high. dmem_req is high while the instruction in MEM is
// a load or a store; a load's dmem_rdata is used in the cycle dmem_ready is
// high, a store is complete once dmem_ready has been high. While the fetch
// or the data access is not ready, the whole pipeline is frozen (mem_stall):
// PC and all pipeline registers hold and the register file is not written,
// so a frozen cycle changes nothing and the program behaves as with
// single-cycle memories. Once a store's dmem_ready has come while the
// pipeline stays frozen for the fetch, dmem_req is dropped so the store is
// not repeated. Requests and their address and data stay stable until ready.
//
// Timing: with both memories ready every cycle, one instruction enters per
// cycle unless a bubble is inserted, and an instruction writes the register
// file five cycles after it was fetched. Reset (synchronous, active high)
// clears the PC to 0 and fills the pipeline with bubbles. The structure
// follows the lecture's datapath; the encodings, reset, the freeze on a
// memory wait and the debug ports are this design's own.
module pipe_core
  import cpu_pkg::*;
(
  input  logic                          clk,
  input  logic                          rst,
  // instruction memory port (IF)
  output logic                          imem_req,
  output word_t                         imem_addr,
  input  word_t                         imem_rdata,
  input  logic                          imem_ready,
  // data memory port (MEM)
  output logic                          dmem_req,
  output logic                          dmem_we,
  output word_t                         dmem_addr,
  output word_t                         dmem_wdata,
  input  word_t                         dmem_rdata,
  input  logic                          dmem_ready,
  // observation ports
  input  reg_idx_t                      dbg_reg_addr,
  output word_t                         dbg_reg_data,
  output word_t                         pc,
  output logic                          stall,         // bubble inserted this cycle
  output hazard_e                       stall_cause,
  output logic                          branch_taken,  // PCJ applied this cycle
  output logic                          retire,        // an instruction writes back or stores
  output fwd_sel_e                      fwd_id_a,
  output fwd_sel_e                      fwd_id_b,
  output fwd_sel_e                      fwd_ex_a,
  output fwd_sel_e                      fwd_ex_b,
  output logic                          mem_stall      // pipeline frozen for a memory
);

  if_id_t  if_id;
  id_ex_t  id_ex;
  ex_mem_t ex_mem;
  mem_wb_t mem_wb;

  // ---------------------------------------------------------------- IF
  word_t pc_plus2, instr_if, target, pc_next;
  logic  pcl, ifidl, clear, pcj;
  logic  freeze, d_access, d_done;

  assign pc_plus2 = pc + 16'd2;
  assign pc_next  = pcj ? target : pc_plus2;

  assign imem_req  = !rst;
  assign imem_addr = pc;
  assign instr_if  = imem_rdata;

  always_ff @(posedge clk) begin
    if (rst)                  pc <= '0;
    else if (pcl && !freeze)  pc <= pc_next;
  end

  always_ff @(posedge clk) begin
    if (rst)                   if_id <= '{instr: NOP_INSTR, pc_plus2: '0};
    else if (ifidl && !freeze) if_id <= '{instr: instr_if, pc_plus2: pc_plus2};
  end

  // ---------------------------------------------------------------- ID
  opcode_e  op;
  funct_e   funct;
  reg_idx_t id_sa, id_sb, id_dr;
  word_t    id_imm, rf_a, rf_b, id_a, id_b, wb_data;
  ctrl_t    id_ctrl;
  logic     id_is_branch, eq, sign;
  fwd_sel_e id_a_sel, id_b_sel, ex_a_sel, ex_b_sel;

  decoder u_dec (
    .instr(if_id.instr),
    .op   (op),
    .funct(funct),
    .sa   (id_sa),
    .sb   (id_sb),
    .dr   (id_dr),
    .imm  (id_imm)
  );

  regfile u_rf (
    .clk     (clk),
    .rst     (rst),
    .sa      (id_sa),
    .sb      (id_sb),
    .a       (rf_a),
    .b       (rf_b),
    .ld      (mem_wb.ld && !freeze),
    .dr      (mem_wb.dr),
    .d_in    (wb_data),
    .dbg_addr(dbg_reg_addr),
    .dbg_data(dbg_reg_data)
  );

  always_comb begin
    unique case (id_a_sel)
      FWD_MEM: id_a = ex_mem.alu_y;
      FWD_WB:  id_a = wb_data;
      default: id_a = rf_a;
    endcase
    unique case (id_b_sel)
      FWD_MEM: id_b = ex_mem.alu_y;
      FWD_WB:  id_b = wb_data;
      default: id_b = rf_b;
    endcase
  end

  branch_unit u_br (
    .pc_plus2(if_id.pc_plus2),
    .imm     (id_imm),
    .a       (id_a),
    .b       (id_b),
    .target  (target),
    .eq      (eq),
    .sign    (sign)
  );

  control_unit u_cu (
    .op       (op),
    .funct    (funct),
    .eq       (eq),
    .sign     (sign),
    .ctrl     (id_ctrl),
    .is_branch(id_is_branch),
    .pcj      (pcj)
  );

  hazard_unit u_hdu (
    .id_uses_sa  (id_ctrl.uses_sa),
    .id_uses_sb  (id_ctrl.uses_sb),
    .id_is_branch(id_is_branch),
    .id_sa       (id_sa),
    .id_sb       (id_sb),
    .ex_ld       (id_ex.ctrl.ld),
    .ex_is_load  (id_ex.ctrl.is_load),
    .ex_dr       (id_ex.dr),
    .mem_is_load (ex_mem.ld && ex_mem.md),
    .mem_dr      (ex_mem.dr),
    .pcl         (pcl),
    .ifidl       (ifidl),
    .clear       (clear),
    .cause       (stall_cause)
  );

  forwarding_unit u_fwd (
    .id_uses_sa(id_ctrl.uses_sa),
    .id_uses_sb(id_ctrl.uses_sb),
    .id_sa     (id_sa),
    .id_sb     (id_sb),
    .ex_uses_sa(id_ex.ctrl.uses_sa),
    .ex_uses_sb(id_ex.ctrl.uses_sb),
    .ex_sa     (id_ex.sa),
    .ex_sb     (id_ex.sb),
    .mem_ld    (ex_mem.ld),
    .mem_md    (ex_mem.md),
    .mem_dr    (ex_mem.dr),
    .wb_ld     (mem_wb.ld),
    .wb_dr     (mem_wb.dr),
    .id_a_sel  (id_a_sel),
    .id_b_sel  (id_b_sel),
    .ex_a_sel  (ex_a_sel),
    .ex_b_sel  (ex_b_sel)
  );

  always_ff @(posedge clk) begin
    if (rst || (clear && !freeze)) begin
      id_ex <= '{ctrl: CTRL_BUBBLE, default: '0};
    end else if (!freeze) begin
      id_ex <= '{ctrl: id_ctrl, a: id_a, b: id_b, imm: id_imm,
                 sa: id_sa, sb: id_sb, dr: id_dr};
    end
  end

  // ---------------------------------------------------------------- EX
  word_t ex_a, ex_b, alu_b, alu_y;

  always_comb begin
    unique case (ex_a_sel)
      FWD_MEM: ex_a = ex_mem.alu_y;
      FWD_WB:  ex_a = wb_data;
      default: ex_a = id_ex.a;
    endcase
    unique case (ex_b_sel)
      FWD_MEM: ex_b = ex_mem.alu_y;
      FWD_WB:  ex_b = wb_data;
      default: ex_b = id_ex.b;
    endcase
  end

  assign alu_b = id_ex.ctrl.mb ? id_ex.imm : ex_b;

  alu u_alu (
    .f(id_ex.ctrl.f),
    .a(ex_a),
    .b(alu_b),
    .y(alu_y)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      ex_mem <= '0;
    end else if (!freeze) begin
      ex_mem <= '{mw: id_ex.ctrl.mw, md: id_ex.ctrl.md, ld: id_ex.ctrl.ld,
                  alu_y: alu_y, store_data: ex_b, dr: id_ex.dr};
    end
  end

  // ---------------------------------------------------------------- MEM
  word_t mem_result;

  // A load or store in MEM needs the data memory; a store whose ready has
  // already come (d_done) only waits for the fetch and is not sent again.
  assign d_access   = ex_mem.mw || (ex_mem.ld && ex_mem.md);
  assign dmem_req   = d_access && !(ex_mem.mw && d_done);
  assign dmem_we    = ex_mem.mw;
  assign dmem_addr  = ex_mem.alu_y;
  assign dmem_wdata = ex_mem.store_data;
  assign freeze     = !rst && (!imem_ready || (d_access && !dmem_ready && !(ex_mem.mw && d_done)));

  always_ff @(posedge clk) begin
    if (rst || !freeze)                d_done <= 1'b0;
    else if (dmem_req && dmem_ready)   d_done <= 1'b1;
  end

  assign mem_result = ex_mem.md ? dmem_rdata : ex_mem.alu_y;

  always_ff @(posedge clk) begin
    if (rst) begin
      mem_wb <= '0;
    end else if (!freeze) begin
      mem_wb <= '{ld: ex_mem.ld, wdata: mem_result, dr: ex_mem.dr};
    end
  end

  // ---------------------------------------------------------------- WB
  assign wb_data = mem_wb.wdata;

  // ---------------------------------------------------------------- observation
  assign stall        = clear && !freeze;
  assign branch_taken = pcj && pcl && !freeze;
  assign retire       = (mem_wb.ld || ex_mem.mw) && !freeze;
  assign mem_stall    = freeze;
  assign fwd_id_a     = id_a_sel;
  assign fwd_id_b     = id_b_sel;
  assign fwd_ex_a     = ex_a_sel;
  assign fwd_ex_b     = ex_b_sel;

  // A bubble never writes anything.
  assert property (@(posedge clk) disable iff (rst) clear && !freeze |=> !id_ex.ctrl.ld && !id_ex.ctrl.mw)
    else $error("bubble in ID/EX carries a write");
  // A memory request holds its address until it is answered.
  assert property (@(posedge clk) disable iff (rst) imem_req && !imem_ready |=> $stable(imem_addr))
    else $error("fetch address changed while waiting");
  assert property (@(posedge clk) disable iff (rst) dmem_req && !dmem_ready |=> dmem_req && $stable(dmem_addr))
    else $error("data request changed while waiting");

endmodule
