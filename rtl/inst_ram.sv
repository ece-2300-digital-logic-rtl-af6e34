// inst_ram: instruction memory (Inst RAM) of the pipelined processor.
//
// WORDS 16-bit instruction words, read combinationally in IF at the byte
// address held in the PC (bit 0 is ignored: instructions are two bytes and
// the PC steps by 2). Addresses beyond the array wrap. A synchronous write
// port loads programs before the processor is released from reset. The size
// is this design's choice; the lecture does not give one.
module inst_ram
  import cpu_pkg::*;
#(
  parameter int unsigned WORDS = 256
) (
  input  logic                     clk,
  input  word_t                    addr,
  output word_t                    instr,
  input  logic                     prog_we,
  input  logic [$clog2(WORDS)-1:0] prog_addr,
  input  word_t                    prog_data
);

  localparam int unsigned AW = $clog2(WORDS);

  word_t mem [WORDS];

  always_ff @(posedge clk) begin
    if (prog_we) mem[prog_addr] <= prog_data;
  end

  assign instr = mem[addr[AW:1]];

endmodule
