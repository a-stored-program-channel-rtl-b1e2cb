// channel_control_tb: runs two channel programs through the sequencer with
// the program counter, address multiplexer and dataway clock, a memory model
// behind the data channel port and three module models on the dataway. The
// event monitor and control module are played by this testbench.
// Event 2 enters a program (table word = address) that does a 24-bit read,
// an F(12) jump, an 18-bit write, an F(6) direct memory increment, a Q skip,
// a 24-bit write and an exiting read. Event 3 has a single command in its table word. The
// checks compare memory, module registers, subchannel addresses, the number
// of dataway cycles, bursts and skips with values worked out here.
module channel_control_tb;
  import spcc_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 1'b0, rst = 1'b1;

  logic       ev_pending = 0, ev_valid = 0, ev_strobe, ev_clear;
  logic [1:0] ev_idx = 0;
  logic [3:0] enables [2];
  logic       null_msb = 0;
  logic [1:0] inc;
  logic       exit_pulse, sub, ev_load, qskip_set;
  logic       pc_load_page, pc_load_word, pc_inc;
  logic [14:0] pc_d, pc, dch_addr, ca [2];
  amux_sel_e  amux_sel;
  logic       dch_req, dch_burst, dch_ack;
  mem_op_e    dch_op;
  logic [17:0] dch_wdata, dch_rdata;
  logic       dw_req, dw_grant = 0, cyc_req, cyc_done, cyc_q, busy;
  cmd_t       dw_cmd, cmd;
  logic [23:0] dw_w, dw_r;
  logic       clk_busy, b, s1, s2, s1e, s2e;
  logic [23:0] r1, r2, r3, d1, d2, d3;
  logic       q1, q2, q3, l1, l2, l3;
  logic       m1_load = 0, m2_load = 0, m3_load = 0;
  logic [23:0] m_data = 0;
  logic       q_resp3 = 0;
  int n_cycles = 0, n_skip = 0, n_exit = 0;

  always #5 clk = ~clk;

  channel_control dut (
    .clk, .rst, .ev_pending, .ev_valid, .ev_idx, .ev_strobe, .ev_clear,
    .enables, .null_msb, .inc, .exit_pulse, .sub, .ev_load, .qskip_set,
    .pc_load_page, .pc_load_word, .pc_inc, .pc_d, .amux_sel,
    .dch_req, .dch_op, .dch_burst, .dch_wdata, .dch_rdata, .dch_ack,
    .dw_req, .dw_grant, .dw_cmd, .dw_w, .dw_r, .dw_ctrl_sel(1'b0),
    .cyc_req, .cyc_done, .cyc_q, .busy, .cmd
  );
  program_counter u_pc (.clk, .rst, .load_page(pc_load_page), .load_word(pc_load_word),
    .inc(pc_inc), .d(pc_d), .pc);
  address_mux u_am (.sel(amux_sel), .pc, .ca0(ca[0]), .ca1(ca[1]), .dw_r, .evt_addr(EVENT_TABLE_BASE + 15'(ev_idx)),
    .addr(dch_addr));
  dataway_clock u_clk (.clk, .rst, .start(cyc_req && dw_grant && !clk_busy), .q_in(q1 | q2 | q3),
    .busy(clk_busy), .b, .s1, .s2, .s1_edge(s1e), .s2_edge(s2e), .done(cyc_done), .q(cyc_q));
  pdp15_memory_model #(.DEPTH(4096), .LAT(3)) mem (.clk, .req(dch_req), .op(dch_op), .burst(dch_burst),
    .addr(dch_addr), .wdata(dch_wdata), .rdata(dch_rdata), .ack(dch_ack));
  camac_module_model m1 (.clk, .n(dw_cmd.n == 1), .f(dw_cmd.f), .s1, .s2, .w(dw_w), .q_resp(1'b1),
    .load(m1_load), .load_data(m_data), .set_lam(1'b0), .r(r1), .q(q1), .lam(l1), .data(d1));
  camac_module_model m2 (.clk, .n(dw_cmd.n == 2), .f(dw_cmd.f), .s1, .s2, .w(dw_w), .q_resp(1'b1),
    .load(m2_load), .load_data(m_data), .set_lam(1'b0), .r(r2), .q(q2), .lam(l2), .data(d2));
  camac_module_model m3 (.clk, .n(dw_cmd.n == 3), .f(dw_cmd.f), .s1, .s2, .w(dw_w), .q_resp(q_resp3),
    .load(m3_load), .load_data(m_data), .set_lam(1'b0), .r(r3), .q(q3), .lam(l3), .data(d3));
  assign dw_r = r1 | r2 | r3;

  // control module stand-in: current address registers
  always @(posedge clk) begin
    if (rst) begin ca[0] <= 15'o1000; ca[1] <= 15'o2000; end
    else begin
      if (inc[0]) ca[0] <= ca[0] + 1'b1;
      if (inc[1]) ca[1] <= ca[1] + 1'b1;
    end
    if (cyc_done) n_cycles++;
    if (qskip_set) n_skip++;
    if (exit_pulse) n_exit++;
    dw_grant <= dw_req && (dw_grant || $urandom % 3 == 0);   // grant after a random wait
  end

  task automatic chk(input logic c, input string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", msg); end
  endtask

  function automatic logic [17:0] mk(input logic q, input logic [4:0] f, input logic [3:0] a,
                                     input logic h, input logic e, input logic [4:0] n);
    cmd_t x;
    x = '0; x.q = q; x.f = f; x.a = a; x.h = h; x.e = e; x.n = n;
    return 18'(x);
  endfunction

  task automatic run_event(input int idx);
    int k;
    ev_idx <= 2'(idx); ev_pending <= 1;
    @(posedge clk);
    while (!ev_strobe) @(posedge clk);
    ev_pending <= 0; ev_valid <= 1;
    k = 0;
    while (!ev_clear && k < 2000) begin @(posedge clk); k++; end
    ev_valid <= 0;
    chk(k < 2000, "program reached exit");
    @(posedge clk); @(posedge clk);
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    enables[0] = 4'b0010; enables[1] = 4'b0100;
    // event table: event 2 -> program at 0100; event 3 -> a single command
    mem.mem[15'o25] = 18'o000100;
    mem.mem[15'o26] = mk(1, 5'd0, 4'd0, 0, 1, 5'd2);
    mem.mem[15'o100] = mk(1, 5'd0,  4'd0, 1, 0, 5'd1);   // 24-bit read of module 1
    mem.mem[15'o101] = mk(0, 5'd12, 4'd0, 0, 0, 5'd0) | 18'o0200; // jump to 0200
    mem.mem[15'o102] = mk(1, 5'd16, 4'd0, 0, 1, 5'd2);   // must not run
    mem.mem[15'o200] = mk(1, 5'd16, 4'd0, 0, 0, 5'd2);   // 18-bit write to module 2
    mem.mem[15'o201] = mk(0, 5'd6,  4'd0, 0, 0, 5'd3);   // Q expected 0; increment at module 3's datum, then clear it
    mem.mem[15'o202] = mk(1, 5'd9,  4'd0, 0, 0, 5'd3);   // Q expected 1, module 3 answers 0: skip
    mem.mem[15'o203] = mk(1, 5'd16, 4'd1, 0, 1, 5'd1);   // skipped
    mem.mem[15'o204] = mk(1, 5'd16, 4'd0, 1, 0, 5'd2);   // 24-bit write to module 2
    mem.mem[15'o205] = mk(1, 5'd0,  4'd0, 0, 1, 5'd2);   // read module 2 and exit
    mem.mem[15'o1002] = 18'o612345;                      // data for the write
    mem.mem[15'o3000] = 18'o000041;                      // histogram word
    mem.mem[15'o1003] = 18'o000055;                      // high data of the 24-bit write
    mem.mem[15'o1004] = 18'o654321;                      // low data of the 24-bit write
    repeat (2) @(posedge clk);
    rst <= 0;
    m_data = 24'hABCDEF; m1_load = 1; @(posedge clk); m1_load = 0;
    m_data = 24'o3000;   m3_load = 1; @(posedge clk); m3_load = 0;
    @(posedge clk);

    run_event(1);
    chk(mem.mem[15'o1000] == {11'b0, 1'b1, 6'h2A}, $sformatf("high word %o", mem.mem[15'o1000]));
    chk(mem.mem[15'o1001] == 18'(24'hABCDEF), $sformatf("low word %o", mem.mem[15'o1001]));
    chk(m2.n_write == 2, "module 2 written twice");
    chk(mem.mem[15'o3000] == 18'o000042, "direct memory increment");
    chk(m3.n_clear == 1, "F(6) reached the dataway as F(2)");
    chk(d3 == 0, "module 3 cleared");
    chk(m1.n_write == 0, "jumped-over and skipped commands did not run");
    chk(d2 == {6'o55, 18'o654321}, $sformatf("24-bit write %o", d2));
    chk(mem.mem[15'o1005] == 18'o654321, "exiting read stored");
    chk(ca[0] == 15'o1006 && ca[1] == 15'o2000, $sformatf("subchannel 0 advanced 6, ca0=%o", ca[0]));
    chk(n_cycles == 6, $sformatf("six dataway cycles, got %0d", n_cycles));
    chk(n_skip == 1, "one Q skip");
    chk(mem.n_burst == 2, "burst on the 24-bit transfers only");
    chk(pc == 15'o206, $sformatf("PC after skip and exit %o", pc));
    chk(n_exit == 1 && !busy, "exit once and idle");

    null_msb = 1;
    run_event(2);
    chk(mem.mem[15'o2000] == 18'o254321, $sformatf("table command read with MSB nulled %o", mem.mem[15'o2000]));
    chk(ca[1] == 15'o2001 && ca[0] == 15'o1006, "subchannel 1 used for event 3");
    chk(n_cycles == 7, "one cycle for the table command");
    chk(pc == 15'o206, "table command leaves PC");
    chk(n_exit == 2, "second exit");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
