// event_monitor_tb: checks edge latching, holding of requests, masking by the
// enables, fixed priority (event 1 first), the event table addresses 24-27
// octal, and that the exit clear empties the register but frees only the
// served latch.
module event_monitor_tb;
  import spcc_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 1'b0, rst = 1'b1, strobe = 0, clear = 0;
  logic [3:0] event_in = '0, enable = '0, latches, event_reg;
  logic pending, valid;
  logic [1:0] active_idx;
  logic [14:0] table_addr;

  always #5 clk = ~clk;

  event_monitor dut (.clk, .rst, .event_in, .enable, .strobe, .clear, .latches, .event_reg,
    .pending, .valid, .active_idx, .table_addr);

  task automatic chk(input logic c, input string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL %s latches=%b reg=%b idx=%0d", msg, latches, event_reg, active_idx); end
  endtask

  task automatic pulse(input logic [3:0] ev);
    event_in <= ev; @(posedge clk); event_in <= '0; @(posedge clk); #1;
  endtask

  task automatic do_strobe();
    strobe <= 1; @(posedge clk); strobe <= 0; #1;
  endtask

  task automatic do_clear();
    clear <= 1; @(posedge clk); clear <= 0; #1;
  endtask

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(posedge clk); rst <= 0; @(posedge clk); #1;
    chk(latches == 0 && !valid && !pending, "empty after reset");
    pulse(4'b1010);
    chk(latches == 4'b1010, "edges set latches");
    chk(!pending, "nothing pending while disabled");
    // a level held high sets the latch only once
    event_in <= 4'b0001; repeat (3) @(posedge clk); #1;
    chk(latches == 4'b1011, "level sets latch");
    enable = 4'b1110; #1;
    chk(pending, "enabled latch is pending");
    do_strobe();
    chk(event_reg == 4'b1010 && valid, "strobe copies enabled latches");
    chk(active_idx == 1 && table_addr == 15'o25, "event 2 is highest enabled, address 25");
    do_clear();
    chk(event_reg == 0 && latches == 4'b1001, "clear frees only served latch");
    event_in <= 4'b0000; @(posedge clk);
    enable = 4'b1111; #1;
    do_strobe();
    chk(active_idx == 0 && table_addr == 15'o24, "event 1 first, address 24");
    do_clear();
    chk(latches == 4'b1000, "event 4 still latched");
    do_strobe();
    chk(active_idx == 3 && table_addr == 15'o27, "event 4, address 27");
    // a new edge on the served input during clear keeps it latched
    event_in <= 4'b1000; clear <= 1; @(posedge clk); clear <= 0; event_in <= 0; #1;
    chk(latches == 4'b1000, "new request during clear kept");
    do_strobe(); do_clear();
    chk(latches == 0 && !pending, "all served");
    pulse(4'b0100);
    do_strobe();
    chk(active_idx == 2 && table_addr == 15'o26, "event 3, address 26");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
