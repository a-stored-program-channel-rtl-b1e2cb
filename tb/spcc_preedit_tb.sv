// spcc_preedit_tb: the coincidence pre-editing application. Two ADCs
// (crate 0 stations 1 and 2) run in coincidence; a coincidence unit (station
// 6) raises a flag when both fired. The ADC 1 LAM starts event 1, whose
// channel program is
//   0100  Q=1 F(8)  N6        test the coincidence flag; a single skips 0101
//   0101      F(12) -> 0110   coincidence: jump to the recording branch
//   0102  Q=1 F(6)  N1  E     single: add one to the histogram word whose
//                             address is ADC 1's datum, clear ADC 1, exit
//   0110  Q=1 F(0)  A4 N23    tag word (event active register)
//   0111  Q=1 F(2)  N1        read and clear ADC 1 into the buffer
//   0112  Q=1 F(2)  N2        read and clear ADC 2 into the buffer
//   0113  Q=1 F(10) N6  E     clear the coincidence flag, exit
// Random singles and coincidences are generated; the histogram (64 bins at
// 10000 octal) and the buffer (at 1000 octal) are compared with what the
// testbench computes, and the clocks per event of each kind are printed.
module spcc_preedit_tb;
  import spcc_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 1'b0, rst = 1'b1;

  logic [5:0]  iot_dev = '0;
  logic [2:0]  iot_iop = '0;
  logic [17:0] io_wdata = '0, io_rdata;
  logic        skip, pi_req, api_req;
  logic        dch_req, dch_burst, dch_ack;
  mem_op_e     dch_op;
  logic [14:0] dch_addr;
  logic [17:0] dch_wdata, dch_rdata;
  logic [1:0][23:0] dw_n;
  logic [4:0]  dw_f;
  logic [3:0]  dw_a;
  logic [23:0] dw_w;
  logic [1:0]  dw_b, dw_s1, dw_s2;
  logic [1:0][23:0] dw_r;
  logic [1:0]  dw_q;
  logic [47:0] lam;
  logic        chan_busy, iot_q, chan_wants_dw, iot_wants_dw;
  cmd_t        chan_cmd;
  logic [17:0] event_active;
  logic [3:0]  ev_latches, ev_register;
  logic [1:0]  sub_ovf, sub_irq;
  logic [1:0][11:0] sub_wc;
  dw_owner_e   dw_owner;

  always #5 clk = ~clk;

  spcc_top dut (
    .clk, .rst, .iot_dev, .iot_iop, .io_wdata, .io_rdata, .skip, .pi_req, .api_req,
    .dch_req, .dch_op, .dch_burst, .dch_addr, .dch_wdata, .dch_rdata, .dch_ack,
    .dw_n, .dw_f, .dw_a, .dw_w, .dw_b, .dw_s1, .dw_s2, .dw_r, .dw_q, .lam, .ext_event(4'b0),
    .chan_busy, .chan_cmd, .event_active, .ev_latches, .ev_register, .sub_ovf, .sub_irq,
    .sub_wc, .iot_q, .dw_owner, .chan_wants_dw, .iot_wants_dw
  );

  pdp15_memory_model #(.DEPTH(32768), .LAT(3)) mem (.clk, .req(dch_req), .op(dch_op),
    .burst(dch_burst), .addr(dch_addr), .wdata(dch_wdata), .rdata(dch_rdata), .ack(dch_ack));

  // index 0: ADC 1 (station 1), 1: ADC 2 (station 2), 2: coincidence unit (station 6)
  localparam int MS [3] = '{1, 2, 6};
  logic [2:0]  m_load = '0, m_lam_set = '0, m_q, m_lam;
  logic [23:0] m_data_in = '0;
  logic [23:0] m_r [3];
  logic [23:0] m_d [3];

  for (genvar i = 0; i < 3; i++) begin : g_mod
    camac_module_model m (.clk, .n(dw_n[0][MS[i]-1]), .f(dw_f), .s1(dw_s1[0]), .s2(dw_s2[0]),
      .w(dw_w), .q_resp(1'b1), .load(m_load[i]), .load_data(m_data_in), .set_lam(m_lam_set[i]),
      .r(m_r[i]), .q(m_q[i]), .lam(m_lam[i]), .data(m_d[i]));
  end

  always_comb begin
    dw_r = '0; dw_q = '0; lam = '0;
    for (int i = 0; i < 3; i++) begin
      dw_r[0] |= m_r[i];
      dw_q[0] |= m_q[i];
      lam[MS[i] - 1] = m_lam[i];
    end
  end

  task automatic chk(input logic c, input string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", msg); end
  endtask

  function automatic logic [17:0] mk(input logic q, input logic [4:0] f, input logic [3:0] a,
      input logic e, input logic [4:0] n);
    cmd_t x;
    x = '0; x.q = q; x.f = f; x.a = a; x.e = e; x.n = n;
    return 18'(x);
  endfunction

  task automatic iot(input logic [5:0] dev, input logic [2:0] iop, input logic [17:0] d);
    @(negedge clk);
    iot_dev = dev; iot_iop = iop; io_wdata = d;
    @(posedge clk);
    @(negedge clk);
    iot_iop = '0;
  endtask

  task automatic iot_write(input logic [17:0] c, input logic [17:0] lo);
    int k = 0;
    iot(6'o40, 3'b100, c);
    iot(6'o41, 3'b100, '0);
    iot(6'o42, 3'b100, lo);
    while (iot_wants_dw && k < 1000) begin @(posedge clk); k++; end
  endtask

  task automatic set_module(input int i, input logic [23:0] v);
    @(negedge clk); m_data_in = v; m_load[i] = 1'b1;
    @(negedge clk); m_load[i] = 1'b0;
  endtask

  localparam int NEVENTS = 200;
  localparam logic [14:0] HIST = 15'o10000;
  int hist [64];
  int n_single = 0, n_coinc = 0, t_single = 0, t_coinc = 0;
  logic [14:0] bp;
  int cyc_cnt = 0;
  always @(posedge clk) cyc_cnt++;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t0, ch1, ch2, k;
    logic coinc;
    mem.mem[15'o24]  = 18'o000100;
    mem.mem[15'o100] = mk(1, 5'd8,  4'd0, 0, 5'd6);
    mem.mem[15'o101] = mk(0, 5'd12, 4'd0, 0, 5'd0) | 18'o0110;
    mem.mem[15'o102] = mk(1, 5'd6,  4'd0, 1, 5'd1);
    mem.mem[15'o110] = mk(1, 5'd0,  4'd4, 0, 5'd23);
    mem.mem[15'o111] = mk(1, 5'd2,  4'd0, 0, 5'd1);
    mem.mem[15'o112] = mk(1, 5'd2,  4'd0, 0, 5'd2);
    mem.mem[15'o113] = mk(1, 5'd10, 4'd0, 1, 5'd6);
    for (int i = 0; i < 64; i++) hist[i] = 0;
    repeat (4) @(posedge clk);
    rst <= 0;
    iot_write(mk(0, 5'd16, 4'd0, 0, 5'd23), 18'o0_1_6000);   // event 1 on subchannel 0, WC = -1024
    iot_write(mk(0, 5'd16, 4'd1, 0, 5'd23), 18'o1000);
    bp = 15'o1000;
    for (int e = 0; e < NEVENTS; e++) begin
      ch1   = $urandom % 64;
      ch2   = $urandom % 64;
      coinc = ($urandom % 3) == 0;
      set_module(0, 24'(HIST) + 24'(ch1));
      if (coinc) begin
        set_module(1, 24'(ch2));
        @(negedge clk); m_lam_set[2] = 1; @(negedge clk); m_lam_set[2] = 0;
      end
      t0 = cyc_cnt;
      @(negedge clk); m_lam_set[0] = 1; @(negedge clk); m_lam_set[0] = 0;
      k = 0;
      while (!chan_busy && k < 100) begin @(posedge clk); k++; end
      while (chan_busy && k < 5000) begin @(posedge clk); k++; end
      if (coinc) begin
        n_coinc++; t_coinc += cyc_cnt - t0;
        chk(mem.mem[bp] == 18'o400001, "tag word");
        chk(mem.mem[bp + 1] == 18'(HIST) + 18'(ch1), "ADC 1 recorded");
        chk(mem.mem[bp + 2] == 18'(ch2), "ADC 2 recorded");
        chk(!m_lam[2] && m_d[1] == 0, "coincidence flag and ADC 2 cleared");
        bp += 3;
      end else begin
        n_single++; t_single += cyc_cnt - t0;
        hist[ch1]++;
        chk(mem.mem[bp] == 0, "single records nothing");
      end
      chk(m_d[0] == 0 && !m_lam[0], "ADC 1 cleared");
    end
    for (int i = 0; i < 64; i++)
      chk(int'(mem.mem[HIST + 15'(i)]) == hist[i], $sformatf("histogram bin %0d", i));
    chk(sub_wc[0] == 12'(12'o6000 + 3 * n_coinc), "word count advanced by the recorded words only");
    chk(n_single > 0 && n_coinc > 0, "both kinds of event occurred");
    $display("singles=%0d (%0d clocks each), coincidences=%0d (%0d clocks each)",
      n_single, t_single / (n_single > 0 ? n_single : 1), n_coinc, t_coinc / (n_coinc > 0 ? n_coinc : 1));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
