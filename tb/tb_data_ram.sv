// tb_data_ram: random word writes (MW) and reads at byte addresses against a
// model; checks the debug port and that a write lands only at the clock edge.
module tb_data_ram;
  import cpu_pkg::*;
  localparam int W = 256;
  int checks = 0, failures = 0;
  logic clk = 0, mw = 0;
  word_t addr = 0, d_in = 0, d_out, dbg_data;
  logic [7:0] dbg_addr = 0;
  word_t model [W];

  data_ram #(.WORDS(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk); failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic chk(string what, word_t got, word_t exp);
    checks++;
    if (got !== exp) begin failures++; $display("%s got %h exp %h", what, got, exp); end
  endtask

  initial begin
    for (int i = 0; i < W; i++) begin
      @(negedge clk); mw = 1; addr = word_t'(2 * i); d_in = word_t'($urandom); model[i] = d_in;
    end
    @(negedge clk); mw = 0;
    repeat (4000) begin
      @(negedge clk);
      mw = 1'($urandom_range(0, 1)); addr = word_t'($urandom); d_in = word_t'($urandom);
      dbg_addr = 8'($urandom);
      #1;
      chk("read", d_out, model[addr[8:1]]);
      chk("dbg", dbg_data, model[dbg_addr]);
      @(posedge clk);
      if (mw) model[addr[8:1]] = d_in;
      #1 chk("after write", d_out, model[addr[8:1]]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
