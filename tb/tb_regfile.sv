// tb_regfile: random reads and writes against a model array; checks that a
// write becomes visible only after the clock edge and that reset clears.
module tb_regfile;
  import cpu_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1, ld = 0;
  reg_idx_t sa = 0, sb = 0, dr = 0, dbg_addr = 0;
  word_t a, b, d_in = 0, dbg_data;
  word_t model [8];

  regfile dut (.*);

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
    foreach (model[i]) model[i] = '0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int i = 0; i < 8; i++) begin sa = 3'(i); dbg_addr = 3'(i); #1; chk("reset", a, 0); chk("dbg", dbg_data, 0); end
    repeat (3000) begin
      @(negedge clk);
      ld = 1'($urandom_range(0, 1)); dr = 3'($urandom); d_in = word_t'($urandom);
      sa = 3'($urandom); sb = 3'($urandom); dbg_addr = 3'($urandom);
      #1;
      chk("a before edge", a, model[sa]);
      chk("b before edge", b, model[sb]);
      chk("dbg", dbg_data, model[dbg_addr]);
      @(posedge clk);
      if (ld) model[dr] = d_in;
      #1;
      chk("a after edge", a, model[sa]);
      chk("b after edge", b, model[sb]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
