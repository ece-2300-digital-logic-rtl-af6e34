// data_ram: data memory (Data RAM) of the pipelined processor.
//
// WORDS 16-bit words addressed by the byte address computed by the ALU
// (bit 0 is ignored, accesses are whole words; higher bits wrap). The read
// is combinational within the MEM stage; D_IN is written on the rising edge
// when MW is set, as in the lecture's datapath. A second, read-only port
// (dbg_*) lets a testbench observe memory. Contents are not reset. Size,
// word addressing and the debug port are this design's choices.
module data_ram
  import cpu_pkg::*;
#(
  parameter int unsigned WORDS = 256
) (
  input  logic                     clk,
  input  word_t                    addr,
  input  word_t                    d_in,
  input  logic                     mw,
  output word_t                    d_out,
  input  logic [$clog2(WORDS)-1:0] dbg_addr,
  output word_t                    dbg_data
);

  localparam int unsigned AW = $clog2(WORDS);

  word_t mem [WORDS];

  always_ff @(posedge clk) begin
    if (mw) mem[addr[AW:1]] <= d_in;
  end

  assign d_out    = mem[addr[AW:1]];
  assign dbg_data = mem[dbg_addr];

endmodule
