// program_counter_tb: full load, in-page (jump) load that keeps the page
// bits, increments with carry into the page, and load priority.
module program_counter_tb;
  int checks = 0, failures = 0;
  logic clk = 1'b0, rst = 1'b1, load_page = 0, load_word = 0, inc = 0;
  logic [14:0] d = '0, pc;

  always #5 clk = ~clk;

  program_counter dut (.clk, .rst, .load_page, .load_word, .inc, .d, .pc);

  task automatic chk(input logic c, input string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL %s pc=%o", msg, pc); end
  endtask

  task automatic step(input logic lp, input logic lw, input logic i, input logic [14:0] dv);
    load_page <= lp; load_word <= lw; inc <= i; d <= dv;
    @(posedge clk);
    load_page <= 0; load_word <= 0; inc <= 0;
    #1;
  endtask

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(posedge clk); rst <= 1'b0; @(posedge clk); #1;
    chk(pc == 0, "reset");
    step(1, 1, 0, 15'o31234);  chk(pc == 15'o31234, "full load");
    step(0, 0, 1, 0);          chk(pc == 15'o31235, "increment");
    step(0, 1, 0, 15'o45670);  chk(pc == 15'o35670, "jump keeps page bits 03-05");
    step(0, 1, 1, 15'o00100);  chk(pc == 15'o30100, "load wins over increment");
    step(0, 1, 0, 15'o07777);  step(0, 0, 1, 0);
    chk(pc == 15'o40000, "carry into page");
    step(1, 0, 0, 15'o10000);  chk(pc == 15'o10000, "page-only load");
    for (int i = 0; i < 50; i++) step(0, 0, 1, 0);
    chk(pc == 15'o10062, "fifty increments");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
