// regfile: 8 x 16-bit register file (RF) of the pipelined processor.
//
// Two combinational read ports addressed by SA and SB, one write port
// addressed by DR that writes D_in on the rising clock edge when LD is set,
// as in the lecture's datapath. A value written in WB is therefore visible
// at the read ports only in the next cycle; the forwarding unit's WB->ID path
// covers the cycle of the write. All registers are ordinary registers
// (no hard-wired zero register) and reset to zero, both this design's choice.
// A third read port (dbg_*) lets a testbench or a debugger observe state.
module regfile
  import cpu_pkg::*;
(
  input  logic     clk,
  input  logic     rst,
  input  reg_idx_t sa,
  input  reg_idx_t sb,
  output word_t    a,
  output word_t    b,
  input  logic     ld,
  input  reg_idx_t dr,
  input  word_t    d_in,
  input  reg_idx_t dbg_addr,
  output word_t    dbg_data
);

  word_t regs [NREGS];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < NREGS; i++) regs[i] <= '0;
    end else if (ld) begin
      regs[dr] <= d_in;
    end
  end

  assign a        = regs[sa];
  assign b        = regs[sb];
  assign dbg_data = regs[dbg_addr];

endmodule
