// spcc_synctx_tb: synchronous data transmission with control bytes, run by a
// channel program. A serial receiver (crate 0 station 1) holds the last byte
// received and raises its LAM, which starts event 1. Start (STX, 002) and stop
// (ETX, 003) control bytes travel with the data; only the data bytes between a
// start and the next stop are to be recorded. The channel cannot compare data,
// so the receiver answers Q to tests: F(8) A(0) Q = "byte is a control byte",
// F(8) A(1) Q = "byte is a start byte". The recording state is kept in a
// flag register (station 2): F(8) tests it, F(24) clears it and F(26) sets it.
// Both modules are modelled here in a few lines each, since the receiver and
// its Q answers are this testbench's own. The channel program is
//   0100  Q=1 F(8)  A0 N1       control byte? data skips 0101
//   0101      F(12) -> 0110     control: jump
//   0102  Q=1 F(8)  A0 N2       recording? if not, skip 0103
//   0103  Q=1 F(2)  A0 N1  E    record the byte (read and clear), exit
//   0104  Q=1 F(10) A0 N1  E    discard the byte (clear LAM), exit
//   0110  Q=1 F(8)  A1 N1       start byte? a stop skips 0111
//   0111      F(12) -> 0114
//   0112  Q=1 F(24) A0 N2       stop recording
//   0113  Q=1 F(10) A0 N1  E    clear the receiver LAM, exit
//   0114  Q=1 F(26) A0 N2       start recording
//   0115      F(12) -> 0113
// Random frames, with noise bytes between them, are sent one byte at a time.
// The buffer at 2000 octal must hold exactly the framed data bytes, the word
// count must have advanced by their number, and every LAM must be cleared.
// The clocks each kind of byte takes are printed.
module spcc_synctx_tb;
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

  localparam logic [7:0] STX = 8'o002, ETX = 8'o003;

  // receiver (N1) and recording flag (N2), acting at the rising edge of S2
  logic [7:0] rx_byte = '0;
  logic       rx_lam = 1'b0, rec_flag = 1'b0, s2_d = 1'b0;
  logic       rx_load = 1'b0;
  logic [7:0] rx_in = '0;
  int         n_f24 = 0, n_f26 = 0;
  wire        rx_sel  = dw_n[0][0];
  wire        flg_sel = dw_n[0][1];
  wire        is_ctl  = (rx_byte == STX) || (rx_byte == ETX);

  always_comb begin
    dw_r = '0; dw_q = '0; lam = '0;
    lam[0] = rx_lam;
    if (rx_sel) begin
      if (dw_f == 5'd0 || dw_f == 5'd2) begin dw_r[0] = 24'(rx_byte); dw_q[0] = 1'b1; end
      if (dw_f == 5'd8)  dw_q[0] = (dw_a == 4'd0) ? is_ctl : (rx_byte == STX);
      if (dw_f == 5'd10) dw_q[0] = 1'b1;
    end
    if (flg_sel) begin
      if (dw_f == 5'd8) dw_q[0] = rec_flag;
      if (dw_f == 5'd24 || dw_f == 5'd26) dw_q[0] = 1'b1;
    end
  end

  always @(posedge clk) begin
    s2_d <= dw_s2[0];
    if (rx_load) begin rx_byte <= rx_in; rx_lam <= 1'b1; end
    if (dw_s2[0] && !s2_d) begin
      if (rx_sel && (dw_f == 5'd2 || dw_f == 5'd10)) begin
        rx_lam <= 1'b0;
        if (dw_f == 5'd2) rx_byte <= '0;
      end
      if (flg_sel && dw_f == 5'd24) begin rec_flag <= 1'b0; n_f24 <= n_f24 + 1; end
      if (flg_sel && dw_f == 5'd26) begin rec_flag <= 1'b1; n_f26 <= n_f26 + 1; end
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

  function automatic logic [17:0] jmp(input logic [11:0] to);
    return mk(0, 5'd12, 4'd0, 0, 5'd0) | 18'(to);
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

  localparam int NFRAMES = 30;
  localparam logic [14:0] BUF = 15'o2000;
  logic [7:0] expect_q [$];
  int n_data_rec = 0, n_data_skip = 0, n_ctl = 0;
  int t_rec = 0, t_skip = 0, t_ctl = 0;
  int cyc_cnt = 0;
  always @(posedge clk) cyc_cnt++;

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic send(input logic [7:0] b, input logic recording);
    int t0, k;
    t0 = cyc_cnt;
    @(negedge clk); rx_in = b; rx_load = 1'b1;
    @(negedge clk); rx_load = 1'b0;
    k = 0;
    while (!chan_busy && k < 100) begin @(posedge clk); k++; end
    while (chan_busy && k < 5000) begin @(posedge clk); k++; end
    @(negedge clk);
    chk(!rx_lam, $sformatf("receiver LAM cleared after byte %o", b));
    if (b == STX || b == ETX) begin
      n_ctl++; t_ctl += cyc_cnt - t0;
      chk(rec_flag == (b == STX), "recording flag follows the control byte");
    end else if (recording) begin
      n_data_rec++; t_rec += cyc_cnt - t0;
      expect_q.push_back(b);
    end else begin
      n_data_skip++; t_skip += cyc_cnt - t0;
    end
  endtask

  function automatic logic [7:0] data_byte();
    logic [7:0] b;
    do b = 8'($urandom); while (b == STX || b == ETX);
    return b;
  endfunction

  initial begin
    int len;
    mem.mem[15'o24]  = 18'o000100;
    mem.mem[15'o100] = mk(1, 5'd8,  4'd0, 0, 5'd1);
    mem.mem[15'o101] = jmp(12'o0110);
    mem.mem[15'o102] = mk(1, 5'd8,  4'd0, 0, 5'd2);
    mem.mem[15'o103] = mk(1, 5'd2,  4'd0, 1, 5'd1);
    mem.mem[15'o104] = mk(1, 5'd10, 4'd0, 1, 5'd1);
    mem.mem[15'o110] = mk(1, 5'd8,  4'd1, 0, 5'd1);
    mem.mem[15'o111] = jmp(12'o0114);
    mem.mem[15'o112] = mk(1, 5'd24, 4'd0, 0, 5'd2);
    mem.mem[15'o113] = mk(1, 5'd10, 4'd0, 1, 5'd1);
    mem.mem[15'o114] = mk(1, 5'd26, 4'd0, 0, 5'd2);
    mem.mem[15'o115] = jmp(12'o0113);
    repeat (4) @(posedge clk);
    rst <= 0;
    iot_write(mk(0, 5'd16, 4'd0, 0, 5'd23), 18'o0_1_6000);   // event 1 on subchannel 0, WC = -1024
    iot_write(mk(0, 5'd16, 4'd1, 0, 5'd23), 18'(BUF));
    for (int fr = 0; fr < NFRAMES; fr++) begin
      len = $urandom % 4;
      for (int i = 0; i < len; i++) send(data_byte(), 1'b0);   // idle-line noise
      send(STX, 1'b0);
      len = 1 + $urandom % 8;
      for (int i = 0; i < len; i++) send(data_byte(), 1'b1);
      send(ETX, 1'b1);
    end
    send(data_byte(), 1'b0);
    chk(mem.mem[BUF + 15'(expect_q.size())] == 0, "nothing recorded past the last frame");
    for (int i = 0; i < expect_q.size(); i++)
      chk(mem.mem[BUF + 15'(i)] == 18'(expect_q[i]), $sformatf("buffer word %0d", i));
    chk(sub_wc[0] == 12'(12'o6000 + expect_q.size()), "word count advanced by the recorded bytes");
    chk(n_f26 == NFRAMES && n_f24 == NFRAMES, "one start and one stop per frame");
    chk(n_data_skip > 0 && n_data_rec > 0, "bytes both inside and outside frames");
    chk(!sub_ovf[0] && !api_req, "no overflow");
    $display("recorded=%0d (%0d clocks each), discarded=%0d (%0d clocks each), control=%0d (%0d clocks each)",
      n_data_rec, t_rec / (n_data_rec > 0 ? n_data_rec : 1),
      n_data_skip, t_skip / (n_data_skip > 0 ? n_data_skip : 1),
      n_ctl, t_ctl / (n_ctl > 0 ? n_ctl : 1));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
