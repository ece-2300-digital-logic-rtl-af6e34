// tb_inst_ram: loads a pattern through the program port and reads it back
// at even byte addresses, including the ignored bit 0 and address wrap.
module tb_inst_ram;
  import cpu_pkg::*;
  localparam int W = 256;
  int checks = 0, failures = 0;
  logic clk = 0, prog_we = 0;
  logic [7:0] prog_addr = 0;
  word_t addr = 0, instr, prog_data = 0;

  inst_ram #(.WORDS(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk); failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  function automatic word_t pat(int i); return word_t'(i * 16'h9E37 + 16'h1234); endfunction

  initial begin
    for (int i = 0; i < W; i++) begin
      @(negedge clk); prog_we = 1; prog_addr = 8'(i); prog_data = pat(i);
    end
    @(negedge clk); prog_we = 0;
    for (int i = 0; i < 2 * W; i++) begin
      addr = word_t'(i); #1;   // byte address, bit 0 ignored
      checks++;
      if (instr !== pat((i >> 1) % W)) begin failures++; $display("addr %h got %h", addr, instr); end
    end
    addr = 16'h8000 + 16'd6; #1; checks++;   // wraps above the array
    if (instr !== pat(3)) begin failures++; $display("wrap got %h", instr); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
