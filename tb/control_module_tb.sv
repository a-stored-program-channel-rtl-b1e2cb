// control_module_tb: CAMAC-side reads and writes of the word count, enable,
// current address and option registers, the event active register, word
// count overflow, the exit-time disable and interrupt, the F8 test and the
// F10 clear, all compared with values worked out here.
module control_module_tb;
  import spcc_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 1'b0, rst = 1'b1;
  logic sel = 0, s1_edge = 0, s2_edge = 0, exit = 0, exit_sub = 0, ev_load = 0, qskip_set = 0;
  logic [4:0] f = '0;
  logic [3:0] a = '0;
  logic [23:0] w = '0, r;
  logic q, null_msb;
  logic [1:0] inc = '0, ev_idx = '0, ovf, irq;
  logic [3:0] enables [2];
  logic [14:0] ca [2];
  logic [11:0] wc [2];
  logic [17:0] event_active;
  logic [23:0] got;
  logic        gotq;

  always #5 clk = ~clk;

  control_module dut (.clk, .rst, .sel, .f, .a, .w, .s1_edge, .s2_edge, .r, .q, .inc, .exit,
    .exit_sub, .ev_load, .ev_idx, .qskip_set, .enables, .ca, .wc, .ovf, .irq, .event_active, .null_msb);

  task automatic chk(input logic c, input string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", msg); end
  endtask

  // a dataway cycle to the module
  task automatic cyc(input logic [4:0] fv, input logic [3:0] av, input logic [23:0] wv);
    sel <= 1; f <= fv; a <= av; w <= wv;
    @(posedge clk); #1;
    got = r; gotq = q;
    s1_edge <= 1; @(posedge clk); s1_edge <= 0;
    @(posedge clk);
    s2_edge <= 1; @(posedge clk); s2_edge <= 0;
    sel <= 0; @(posedge clk); #1;
  endtask

  task automatic pulse_inc(input int s, input int n);
    for (int i = 0; i < n; i++) begin inc <= 2'(1 << s); @(posedge clk); end
    inc <= '0; @(posedge clk); #1;
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(posedge clk); rst <= 0; @(posedge clk); #1;
    cyc(5'd16, 4'd0, 24'o0_5_7775);   // enables 0101, WC = -3
    cyc(5'd16, 4'd1, 24'o01000);
    cyc(5'd16, 4'd2, 24'o0_2_0000);   // enables 0010, WC = 0
    cyc(5'd16, 4'd3, 24'o02000);
    chk(enables[0] == 4'b0101 && wc[0] == 12'o7775 && ca[0] == 15'o1000, "subchannel 0 written");
    chk(enables[1] == 4'b0010 && wc[1] == 0 && ca[1] == 15'o2000, "subchannel 1 written");
    cyc(5'd0, 4'd0, 0); chk(got == 24'o0_5_7775 && gotq, "read WC0 with enables");
    cyc(5'd0, 4'd3, 0); chk(got == 24'o02000 && gotq, "read CA1");
    cyc(5'd0, 4'd9, 0); chk(!gotq, "no Q for unused sub-address");
    cyc(5'd16, 4'd5, 24'd1); chk(null_msb, "option bit set");
    cyc(5'd0, 4'd5, 0); chk(got == 24'd1, "option read back");
    pulse_inc(0, 2);
    chk(wc[0] == 12'o7777 && ca[0] == 15'o1002 && ovf == 0, "two increments, no overflow");
    pulse_inc(0, 1);
    chk(wc[0] == 0 && ca[0] == 15'o1003 && ovf == 2'b01, "overflow on passing zero");
    pulse_inc(1, 4);
    chk(wc[1] == 4 && ca[1] == 15'o2004 && ovf == 2'b01, "subchannel 1 independent");
    chk(irq == 0, "no interrupt before the program ends");
    // event active register
    ev_idx <= 2; ev_load <= 1; @(posedge clk); ev_load <= 0; @(posedge clk); #1;
    chk(event_active == 18'o400003, $sformatf("event active %o", event_active));
    cyc(5'd0, 4'd4, 0); chk(got == 24'o400003 && gotq, "event active read on dataway");
    qskip_set <= 1; @(posedge clk); qskip_set <= 0; @(posedge clk); #1;
    chk(event_active == 18'o400013, "Q-skip bit");
    // exit of subchannel 1 (no overflow): nothing happens
    exit_sub <= 1; exit <= 1; @(posedge clk); exit <= 0; @(posedge clk); #1;
    chk(enables[1] == 4'b0010 && irq == 0 && event_active == 0, "exit without overflow");
    // exit of subchannel 0 (overflow)
    exit_sub <= 0; exit <= 1; @(posedge clk); exit <= 0; @(posedge clk); #1;
    chk(enables[0] == 0 && irq == 2'b01, "exit with overflow disables and interrupts");
    cyc(5'd8, 4'd0, 0); chk(gotq, "F8 test sees interrupt");
    cyc(5'd8, 4'd1, 0); chk(!gotq, "F8 test on subchannel 1");
    cyc(5'd10, 4'd0, 0); chk(irq == 0 && ovf == 0 && gotq, "F10 clears flags");
    cyc(5'd8, 4'd0, 0); chk(!gotq, "F8 after clear");
    // a write cycle to a different module leaves registers alone
    sel <= 0; f <= 5'd16; a <= 0; w <= 24'o7777; s1_edge <= 1; @(posedge clk); s1_edge <= 0; @(posedge clk); #1;
    chk(wc[0] == 0 && enables[0] == 0, "unselected write ignored");
    chk(r == 0, "no read lines when not addressed");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
