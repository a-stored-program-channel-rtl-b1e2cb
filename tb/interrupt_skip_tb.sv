// interrupt_skip_tb: checks the Q flag capture, each skip test, the PI enable
// and the API line against expected values worked out here.
module interrupt_skip_tb;
  int checks = 0, failures = 0;
  logic clk = 1'b0, rst = 1'b1;
  logic iot_cyc_done = 0, q_cycle = 0, lam_pi = 0, chan_irq = 0;
  logic tst_q = 0, tst_lam = 0, tst_chan = 0, pi_en_set = 0, pi_en_clr = 0;
  logic skip, pi_req, api_req, q_flag;

  always #5 clk = ~clk;

  interrupt_skip dut (.clk, .rst, .iot_cyc_done, .q_cycle, .lam_pi, .chan_irq, .tst_q, .tst_lam,
    .tst_chan, .pi_en_set, .pi_en_clr, .skip, .pi_req, .api_req, .q_flag);

  task automatic chk(input logic c, input string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", msg); end
  endtask

  task automatic pulse_done(input logic qv);
    q_cycle <= qv; iot_cyc_done <= 1'b1;
    @(posedge clk);
    iot_cyc_done <= 1'b0; q_cycle <= ~qv;
    @(posedge clk);
  endtask

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst <= 1'b0;
    @(posedge clk);
    pulse_done(1'b1);
    chk(q_flag, "Q flag set by a cycle with Q");
    tst_q = 1; #1; chk(skip, "skip on Q"); tst_q = 0; #1;
    chk(!skip, "no skip without a test");
    pulse_done(1'b0);
    chk(!q_flag, "Q flag follows next cycle");
    tst_q = 1; #1; chk(!skip, "no skip on Q=0"); tst_q = 0;
    q_cycle <= 1'b1; @(posedge clk); @(posedge clk);
    chk(!q_flag, "Q held between cycles");
    lam_pi = 1; #1;
    chk(!pi_req, "PI disabled after reset");
    tst_lam = 1; #1; chk(skip, "skip on LAM"); tst_lam = 0;
    pi_en_set <= 1; @(posedge clk); pi_en_set <= 0; @(posedge clk);
    chk(pi_req, "PI request when enabled");
    pi_en_clr <= 1; @(posedge clk); pi_en_clr <= 0; @(posedge clk);
    chk(!pi_req, "PI disabled again");
    lam_pi = 0;
    tst_chan = 1; #1; chk(!skip, "no channel skip without irq");
    chan_irq = 1; #1; chk(skip && api_req, "channel skip and API");
    tst_chan = 0; chan_irq = 0; #1; chk(!api_req, "API follows the channel flag");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
