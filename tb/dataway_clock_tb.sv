// dataway_clock_tb: runs dataway cycles and checks the cycle length, the
// clock positions of S1 and S2, the done pulse, that a start during a cycle
// is ignored, and that Q is taken only while S1 is high.
module dataway_clock_tb;
  int checks = 0, failures = 0;
  logic clk = 1'b0, rst = 1'b1, start = 1'b0, q_in = 1'b0;
  logic busy, b, s1, s2, s1_edge, s2_edge, done, q;
  int   t, b_cnt, s1_first, s1_cnt, s2_first, s2_cnt, done_at, e1, e2;

  always #5 clk = ~clk;

  dataway_clock #(.CYCLE_LEN(10), .S1_START(2), .S1_LEN(2), .S2_START(6), .S2_LEN(2)) dut (
    .clk, .rst, .start, .q_in, .busy, .b, .s1, .s2, .s1_edge, .s2_edge, .done, .q
  );

  task automatic chk(input logic c, input string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", msg); end
  endtask

  // one cycle; qmode 0: Q only inside S1, 1: Q only outside S1
  task automatic run_cycle(input int qmode);
    start <= 1'b1;
    @(posedge clk);
    start <= 1'b0;
    t = 0; b_cnt = 0; s1_first = -1; s1_cnt = 0; s2_first = -1; s2_cnt = 0; done_at = -1; e1 = 0; e2 = 0;
    for (int k = 0; k < 20; k++) begin
      #1;
      q_in = (qmode == 0) ? s1 : (b && !s1);
      if (k == 4) start = 1'b1;   // a start inside the cycle must be ignored
      if (b) b_cnt++;
      if (s1) begin if (s1_first < 0) s1_first = t; s1_cnt++; end
      if (s2) begin if (s2_first < 0) s2_first = t; s2_cnt++; end
      if (s1_edge) e1++;
      if (s2_edge) e2++;
      if (done) done_at = t;
      @(posedge clk);
      if (k == 4) start = 1'b0;
      t++;
    end
    q_in = 1'b0;
    chk(b_cnt == 10, $sformatf("busy length %0d", b_cnt));
    chk(s1_first == 2 && s1_cnt == 2, $sformatf("S1 at %0d for %0d", s1_first, s1_cnt));
    chk(s2_first == 6 && s2_cnt == 2, $sformatf("S2 at %0d for %0d", s2_first, s2_cnt));
    chk(done_at == 9, $sformatf("done at %0d", done_at));
    chk(e1 == 1 && e2 == 1, "one edge pulse per strobe");
    chk(q == (qmode == 0), $sformatf("Q sampled in S1, got %0d", q));
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    @(posedge clk);
    chk(!b && !s1 && !s2, "idle after reset");
    run_cycle(0);
    run_cycle(1);
    run_cycle(0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
