// spcc_top_tb: end-to-end test of the controller at its default parameters.
// A PDP-15 stand-in issues IOT sequences and answers the data channel with a
// memory model; six module models sit in the two crates (stations 1-5 of
// crate 0, station 1 of crate 1). The CPU sets up the control module over the
// IOT path, then events start channel programs held in memory:
//   event 2: F(4) histogram increment, F(12) jump, Q skip, tag read, exit
//   event 1: tag read, 24-bit read of module 1, LAM clear, exit
//   event 3: a single command in the event table word (18-bit write)
// Along the way it runs two events at once (priority), overflows a word count
// (interrupt at program end, subchannel disabled, event held until the CPU
// re-enables it), nulls R18 on module reads, collides IOT and channel use of
// the dataway, reads and writes crate 1, and raises a patched PI LAM.
// Memory contents, module registers, IOT read data and the interrupt and skip
// lines are compared with values worked out here; each mechanism is counted
// and one that never happened is a failure.
module spcc_top_tb;
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
  logic [3:0]  ext_event = '0;
  logic        chan_busy, iot_q;
  cmd_t        chan_cmd;
  logic [17:0] event_active;
  logic [3:0]  ev_latches, ev_register;
  logic [1:0]  sub_ovf, sub_irq;
  logic [1:0][11:0] sub_wc;
  dw_owner_e   dw_owner;
  logic        chan_wants_dw, iot_wants_dw;

  always #5 clk = ~clk;

  spcc_top dut (
    .clk, .rst, .iot_dev, .iot_iop, .io_wdata, .io_rdata, .skip, .pi_req, .api_req,
    .dch_req, .dch_op, .dch_burst, .dch_addr, .dch_wdata, .dch_rdata, .dch_ack,
    .dw_n, .dw_f, .dw_a, .dw_w, .dw_b, .dw_s1, .dw_s2, .dw_r, .dw_q, .lam, .ext_event,
    .chan_busy, .chan_cmd, .event_active, .ev_latches, .ev_register, .sub_ovf, .sub_irq,
    .sub_wc, .iot_q, .dw_owner, .chan_wants_dw, .iot_wants_dw
  );

  pdp15_memory_model #(.DEPTH(32768), .LAT(3)) mem (.clk, .req(dch_req), .op(dch_op),
    .burst(dch_burst), .addr(dch_addr), .wdata(dch_wdata), .rdata(dch_rdata), .ack(dch_ack));

  // modules: index 0-4 = crate 0 stations 1-5, index 5 = crate 1 station 1
  localparam int NM = 6;
  localparam int MC [NM] = '{0, 0, 0, 0, 0, 1};
  localparam int MS [NM] = '{1, 2, 3, 4, 5, 1};
  logic [NM-1:0] q_resp = 6'b110111;    // module 4 (crate 0 station 4) answers Q = 0
  logic [NM-1:0] m_load = '0, m_lam_set = '0, m_q, m_lam;
  logic [23:0]   m_data_in = '0;
  logic [23:0]   m_r [NM];
  logic [23:0]   m_d [NM];

  for (genvar i = 0; i < NM; i++) begin : g_mod
    camac_module_model m (.clk, .n(dw_n[MC[i]][MS[i]-1]), .f(dw_f), .s1(dw_s1[MC[i]]),
      .s2(dw_s2[MC[i]]), .w(dw_w), .q_resp(q_resp[i]), .load(m_load[i]), .load_data(m_data_in),
      .set_lam(m_lam_set[i]), .r(m_r[i]), .q(m_q[i]), .lam(m_lam[i]), .data(m_d[i]));
  end

  always_comb begin
    dw_r = '0; dw_q = '0; lam = '0;
    for (int i = 0; i < NM; i++) begin
      dw_r[MC[i]] |= m_r[i];
      dw_q[MC[i]] |= m_q[i];
      lam[MC[i]*24 + MS[i] - 1] = m_lam[i];
    end
  end

  // ---------------- mechanism counters ----------------
  int n_iot_write = 0, n_iot_read = 0, n_iot_dataless = 0, n_crate1 = 0;
  int n_prog_entry = 0, n_table_cmd = 0, n_jump = 0, n_incr = 0, n_qskip = 0, n_burst_x = 0;
  int n_ovf_irq = 0, n_priority = 0, n_chan_wait = 0, n_iot_wait = 0, n_pi = 0, n_null = 0;
  int n_held = 0, n_dw_cycles = 0, n_skip_seen = 0;
  logic api_d = 0, pi_d = 0;

  // counted from the ports only
  logic [14:0] req_addr;
  logic        req_seen = 0, ea3_d = 0;
  logic [1:0]  b_d = '0;
  logic [3:0]  ereg_d = '0;
  always @(posedge clk) if (!rst) begin
    if (dch_req && !req_seen) begin req_addr <= dch_addr; req_seen <= 1; end
    if (dch_ack) begin
      req_seen <= 0;
      if (dch_op == MEM_RD && req_addr >= 15'o24 && req_addr <= 15'o27) begin
        if (dch_rdata[17]) n_table_cmd++; else n_prog_entry++;
      end else if (dch_op == MEM_RD && dch_rdata[16:12] == 5'd12 && req_addr >= 15'o100
                   && req_addr < 15'o1000) n_jump++;
      if (dch_op == MEM_INC) n_incr++;
      if (dch_burst) n_burst_x++;
    end
    ea3_d <= event_active[3];
    if (event_active[3] && !ea3_d) n_qskip++;
    if (api_req && !api_d) n_ovf_irq++;
    if (pi_req && !pi_d) n_pi++;
    api_d <= api_req; pi_d <= pi_req;
    ereg_d <= ev_register;
    if ($countones(ev_register) > 1 && $countones(ereg_d) <= 1) n_priority++;
    if (chan_wants_dw && dw_owner == OWN_IOT) n_chan_wait++;
    if (iot_wants_dw && dw_owner == OWN_CHAN) n_iot_wait++;
    b_d <= dw_b;
    if (dw_b != 0 && b_d == 0) n_dw_cycles++;
    if (dw_b[1] && !b_d[1]) n_crate1++;
  end

  task automatic chk(input logic c, input string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL %s (t=%0t)", msg, $time); end
  endtask

  function automatic logic [17:0] mk(input logic q, input logic [4:0] f, input logic [3:0] a,
      input logic h, input logic e, input logic c, input logic [4:0] n);
    cmd_t x;
    x = '0; x.q = q; x.f = f; x.a = a; x.h = h; x.e = e; x.c = c; x.n = n;
    return 18'(x);
  endfunction

  // ---------------- CPU side ----------------
  logic [17:0] got;
  logic        got_skip;

  task automatic iot(input logic [5:0] dev, input logic [2:0] iop, input logic [17:0] d);
    @(negedge clk);
    iot_dev = dev; iot_iop = iop; io_wdata = d;
    #1;
    got = io_rdata; got_skip = skip;
    @(posedge clk);
    @(negedge clk);
    iot_iop = '0;
  endtask

  task automatic wait_iot_owner();
    int k = 0;
    while (dw_owner != OWN_IOT && k < 1000) begin @(posedge clk); k++; end
  endtask

  task automatic wait_iot_done();
    int k = 0;
    while (iot_wants_dw && k < 1000) begin @(posedge clk); k++; end
    chk(!iot_wants_dw, "IOT cycle finished");
  endtask

  task automatic iot_write(input logic [17:0] c, input logic [5:0] hi, input logic [17:0] lo);
    iot(6'o40, 3'b100, c);
    iot(6'o41, 3'b100, {12'b0, hi});
    iot(6'o42, 3'b100, lo);
    wait_iot_done();
    n_iot_write++;
  endtask

  task automatic iot_read24(input logic [17:0] c, output logic [23:0] v);
    logic [5:0] hi;
    iot(6'o40, 3'b100, c);
    wait_iot_owner();
    iot(6'o41, 3'b010, '0);
    hi = got[5:0];
    iot(6'o42, 3'b010, '0);
    v = {hi, got};
    wait_iot_done();
    n_iot_read++;
  endtask

  task automatic iot_dataless(input logic [17:0] c);
    iot(6'o40, 3'b100, c);
    wait_iot_done();
    n_iot_dataless++;
  endtask

  task automatic wait_idle(input int min_wait);
    int k = 0, quiet = 0;
    repeat (min_wait) @(posedge clk);
    while (quiet < 10 && k < 20000) begin
      @(posedge clk); k++;
      quiet = chan_busy ? 0 : quiet + 1;
    end
    chk(!chan_busy, "channel went idle");
  endtask

  task automatic set_module(input int i, input logic [23:0] v);
    @(negedge clk); m_data_in = v; m_load[i] = 1'b1;
    @(negedge clk); m_load[i] = 1'b0;
  endtask

  task automatic pulse_ext(input logic [3:0] e);
    @(negedge clk); ext_event = e;
    @(negedge clk); ext_event = '0;
  endtask

  localparam logic [4:0] CM = 5'd23;   // control module station
  logic [23:0] v;
  int k;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // event table and channel programs
    mem.mem[15'o24] = 18'o000100;                                 // event 1
    mem.mem[15'o25] = 18'o000300;                                 // event 2
    mem.mem[15'o26] = mk(1, 5'd16, 4'd0, 0, 1, 0, 5'd5);          // event 3: one command
    mem.mem[15'o100] = mk(1, 5'd0,  4'd4, 0, 0, 0, CM);           // tag
    mem.mem[15'o101] = mk(1, 5'd0,  4'd0, 1, 0, 0, 5'd1);         // 24-bit read
    mem.mem[15'o102] = mk(1, 5'd10, 4'd0, 0, 1, 0, 5'd1);         // clear LAM, exit
    mem.mem[15'o300] = mk(1, 5'd4,  4'd0, 0, 0, 0, 5'd3);         // histogram increment
    mem.mem[15'o301] = mk(0, 5'd12, 4'd0, 0, 0, 0, 5'd0) | 18'o0310; // jump
    mem.mem[15'o302] = mk(1, 5'd16, 4'd0, 0, 1, 0, 5'd2);         // jumped over
    mem.mem[15'o310] = mk(1, 5'd9,  4'd0, 0, 0, 0, 5'd4);         // Q=0 answer: skip
    mem.mem[15'o311] = mk(1, 5'd16, 4'd0, 0, 1, 0, 5'd2);         // skipped
    mem.mem[15'o312] = mk(1, 5'd0,  4'd4, 0, 1, 0, CM);           // tag, exit
    mem.mem[15'o2000] = 18'o123456;                               // output buffer
    mem.mem[15'o5000] = 18'o7;                                    // histogram bin
    repeat (4) @(posedge clk);
    rst <= 0;
    set_module(2, 24'o5000);

    // CPU sets up the control module over the IOT path
    iot_write(mk(0, 5'd16, 4'd0, 0, 0, 0, CM), 6'o0, 18'o0_3_7772);  // events 1,2; WC = -6
    iot_write(mk(0, 5'd16, 4'd1, 0, 0, 0, CM), 6'o0, 18'o1000);
    iot_write(mk(0, 5'd16, 4'd2, 0, 0, 0, CM), 6'o0, 18'o0_4_7634);  // event 3; WC = -100
    iot_write(mk(0, 5'd16, 4'd3, 0, 0, 0, CM), 6'o0, 18'o2000);
    iot_read24(mk(0, 5'd0, 4'd0, 0, 0, 0, CM), v);
    chk(v == 24'o0_3_7772, $sformatf("WC0 read back %o", v));
    iot(6'o40, 3'b001, '0);
    chk(got_skip, "IOT skip on Q");

    // event 2 from the front panel
    pulse_ext(4'b0010);
    wait_idle(5);
    chk(mem.mem[15'o1000] == 18'o400012, $sformatf("event 2 tag with Q-skip bit %o", mem.mem[15'o1000]));
    chk(mem.mem[15'o5000] == 18'o10, "histogram incremented");
    chk(g_mod[1].m.n_write == 0, "jumped-over and skipped commands did not run");
    chk(sub_wc[0] == 12'o7773 && !api_req, "one word counted");

    // event 1 from a LAM: 24-bit read
    set_module(0, 24'h9ABCDE);
    @(negedge clk); m_lam_set[0] = 1; @(negedge clk); m_lam_set[0] = 0;
    wait_idle(5);
    chk(mem.mem[15'o1001] == 18'o400001, "event 1 tag");
    chk(mem.mem[15'o1002] == {11'b0, 1'b1, 6'h26}, $sformatf("high word %o", mem.mem[15'o1002]));
    chk(mem.mem[15'o1003] == 18'(24'h9ABCDE), "low word");
    chk(!m_lam[0], "program cleared the LAM");
    chk(sub_wc[0] == 12'o7776, "four words counted");

    // null R18 on module reads, then events 1 and 3 together
    iot_write(mk(0, 5'd16, 4'd5, 0, 0, 0, CM), 6'o0, 18'o1);
    set_module(0, 24'h03FFFF);
    @(negedge clk); m_lam_set[0] = 1;
    @(negedge clk); m_lam_set[0] = 0; ext_event = 4'b0100;   // both latch on the same clock
    @(negedge clk); ext_event = 4'b0000;
    wait_idle(5);
    chk(mem.mem[15'o1004] == 18'o400001, "tag keeps its MSB");
    chk(mem.mem[15'o1005] == 18'o000100, $sformatf("high word carries R18 %o", mem.mem[15'o1005]));
    chk(mem.mem[15'o1006] == 18'o377777, $sformatf("low word R18 nulled %o", mem.mem[15'o1006]));
    if (mem.mem[15'o1006] == 18'o377777) n_null++;
    chk(g_mod[4].m.data == 24'o123456, "event 3 table command wrote module 5");
    iot_read24(mk(0, 5'd0, 4'd3, 0, 0, 0, CM), v);
    chk(v == 24'o2001, "subchannel 1 advanced");
    chk(api_req && sub_irq == 2'b01, "overflow interrupt at program end");

    // event 2 arrives while its subchannel is disabled: held
    pulse_ext(4'b0010);
    repeat (40) @(posedge clk);
    chk(ev_latches[1] && !chan_busy, "event held while disabled");
    if (ev_latches[1] && !chan_busy) n_held++;
    iot(6'o43, 3'b001, '0);
    chk(got_skip, "IOT skip on channel interrupt");
    iot_read24(mk(0, 5'd0, 4'd0, 0, 0, 0, CM), v);
    chk(v == 24'o0_0_0001, $sformatf("overflowed subchannel disabled, WC0 %o", v));
    iot_dataless(mk(0, 5'd10, 4'd0, 0, 0, 0, CM));
    chk(!api_req, "interrupt cleared");
    iot_write(mk(0, 5'd16, 4'd0, 0, 0, 0, CM), 6'o0, 18'o0_2_7777);  // event 2 only, WC = -1
    wait_idle(5);
    chk(mem.mem[15'o1007] == 18'o400012, "held event served after re-enable");
    chk(mem.mem[15'o5000] == 18'o11, "histogram incremented again");
    chk(api_req, "second overflow");
    iot_dataless(mk(0, 5'd10, 4'd0, 0, 0, 0, CM));
    iot_write(mk(0, 5'd16, 4'd0, 0, 0, 0, CM), 6'o0, 18'o0_3_7000);

    // IOT and channel contend for the dataway
    pulse_ext(4'b0010);
    repeat (3) @(posedge clk);
    iot_write(mk(0, 5'd16, 4'd0, 0, 0, 1, 5'd1), 6'o25, 18'o070707);
    chk(g_mod[5].m.data == {6'o25, 18'o070707}, "crate 1 module written");
    wait_idle(5);
    chk(mem.mem[15'o1010] == 18'o400012, "channel program ran around the IOT transfer");
    set_module(0, 24'h111111);
    @(negedge clk); m_lam_set[0] = 1; @(negedge clk); m_lam_set[0] = 0;
    k = 0;
    while (dw_owner != OWN_CHAN && k < 500) begin @(posedge clk); k++; end
    iot_write(mk(0, 5'd16, 4'd0, 0, 0, 0, 5'd2), 6'o0, 18'o4321);
    chk(g_mod[1].m.data == 24'o4321, "IOT write after waiting for the channel");
    wait_idle(5);
    chk(mem.mem[15'o1013] == 18'(24'h111111), "channel read next to IOT");

    // crate 1 read, dataless Q test
    set_module(5, 24'hFEDCBA);
    iot_read24(mk(0, 5'd0, 4'd0, 0, 0, 1, 5'd1), v);
    chk(v == 24'hFEDCBA, $sformatf("crate 1 read %h", v));
    iot_dataless(mk(0, 5'd9, 4'd0, 0, 0, 0, 5'd4));
    iot(6'o40, 3'b001, '0);
    chk(!got_skip && !iot_q, "no Q from module 4");

    // patched LAM to the program interrupt
    @(negedge clk); m_lam_set[4] = 1; @(negedge clk); m_lam_set[4] = 0;
    repeat (2) @(posedge clk);
    chk(!pi_req, "PI disabled");
    iot(6'o43, 3'b100, '0);
    repeat (2) @(posedge clk);
    chk(pi_req, "PI request from patched LAM");
    iot(6'o41, 3'b001, '0);
    chk(got_skip, "IOT skip on LAM");
    if (got_skip) n_skip_seen++;

    // every mechanism happened
    chk(n_iot_write > 0, "mechanism: IOT write");
    chk(n_iot_read > 0, "mechanism: IOT read");
    chk(n_iot_dataless > 0, "mechanism: IOT dataless");
    chk(n_crate1 > 0, "mechanism: crate 1 cycle");
    chk(n_prog_entry > 0, "mechanism: program entry from event table");
    chk(n_table_cmd > 0, "mechanism: command in event table");
    chk(n_jump > 0, "mechanism: F(12) jump");
    chk(n_incr > 0, "mechanism: direct memory increment");
    chk(n_qskip > 0, "mechanism: Q skip");
    chk(n_burst_x > 0, "mechanism: burst transfer");
    chk(n_ovf_irq > 0, "mechanism: overflow interrupt");
    chk(n_priority > 0, "mechanism: priority between events");
    chk(n_chan_wait > 0, "mechanism: channel waits for IOT");
    chk(n_iot_wait > 0, "mechanism: IOT waits for channel");
    chk(n_pi > 0, "mechanism: program interrupt");
    chk(n_null > 0, "mechanism: R18 nulled");
    chk(n_held > 0, "mechanism: event held while disabled");
    $display("mechanisms: iotw=%0d iotr=%0d iotd=%0d crate1=%0d entry=%0d tblcmd=%0d jump=%0d incr=%0d qskip=%0d burst=%0d irq=%0d prio=%0d chwait=%0d iotwait=%0d pi=%0d null=%0d held=%0d cycles=%0d",
      n_iot_write, n_iot_read, n_iot_dataless, n_crate1, n_prog_entry, n_table_cmd, n_jump, n_incr,
      n_qskip, n_burst_x, n_ovf_irq, n_priority, n_chan_wait, n_iot_wait, n_pi, n_null, n_held, n_dw_cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
