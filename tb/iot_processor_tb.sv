// iot_processor_tb: drives IOT instruction sequences (dataless, 24-bit
// write, 18-bit write, 24-bit read, 18-bit read) and checks the command
// register, the write lines and their F8'.F16 gating, the read gating onto
// the I/O bus, when a dataway cycle is requested, the 'active' window and the
// decoded skip and enable pulses. A small model here plays the dataway clock
// by answering each cycle request with 'cyc_done' a few clocks later.
module iot_processor_tb;
  import spcc_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 1'b0, rst = 1'b1;
  logic [5:0]  iot_dev = '0;
  logic [2:0]  iot_iop = '0;
  logic [17:0] io_wdata = '0, io_rdata, got;
  cmd_t        cmd;
  logic [23:0] w, r = '0;
  logic cyc_req, cyc_done = 1'b0, active;
  logic tst_q, tst_lam, tst_chan, pi_en_set, pi_en_clr;
  int   n_cycles = 0;

  always #5 clk = ~clk;

  iot_processor dut (.clk, .rst, .iot_dev, .iot_iop, .io_wdata, .io_rdata, .cmd, .w, .r,
    .cyc_req, .cyc_done, .active, .tst_q, .tst_lam, .tst_chan, .pi_en_set, .pi_en_clr);

  // dataway clock stand-in: done 4 clocks after a request is seen
  int wait_cnt = -1;
  always @(posedge clk) begin
    cyc_done <= 1'b0;
    if (cyc_req && wait_cnt < 0 && !cyc_done) wait_cnt <= 3;
    else if (wait_cnt == 0) begin cyc_done <= 1'b1; wait_cnt <= -1; n_cycles++; end
    else if (wait_cnt > 0) wait_cnt <= wait_cnt - 1;
  end

  task automatic chk(input logic c, input string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", msg); end
  endtask

  // one IOT; returns the bus value seen during the pulse
  task automatic iot(input logic [5:0] dev, input logic [2:0] iop, input logic [17:0] d);
    iot_dev  <= dev;
    iot_iop  <= iop;
    io_wdata <= d;
    #1;
    @(negedge clk);
    got = io_rdata;
    @(posedge clk);
    iot_iop <= '0;
    @(posedge clk);
  endtask

  function automatic logic [17:0] mk(input logic [4:0] f, input logic [3:0] a, input logic c, input logic [4:0] n);
    cmd_t x;
    x = '0; x.f = f; x.a = a; x.c = c; x.n = n;
    return 18'(x);
  endfunction

  task automatic wait_done();
    int k = 0;
    while (active && k < 50) begin @(posedge clk); k++; end
    chk(!active, "active falls after the cycle");
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    @(posedge clk);
    // dataless: one IOT starts the cycle
    iot(6'o40, 3'b100, mk(5'd9, 4'd3, 1'b1, 5'd7));
    chk(cmd.f == 5'd9 && cmd.a == 4'd3 && cmd.c && cmd.n == 5'd7, "command register loaded");
    chk(active, "active after command load");
    chk(cyc_req || cyc_done || n_cycles == 1, "dataless command requests a cycle at once");
    wait_done();
    chk(n_cycles == 1, "one cycle for dataless");
    // 24-bit write: command, high, low
    iot(6'o40, 3'b100, mk(5'd16, 4'd0, 1'b0, 5'd2));
    chk(!cyc_req, "no cycle before data for a write");
    iot(6'o41, 3'b100, 18'o77_0052);
    chk(!cyc_req && n_cycles == 1, "no cycle after high data");
    iot(6'o42, 3'b100, 18'o123456);
    chk(w == {6'o52, 18'o123456}, $sformatf("write lines %h", w));
    chk(cyc_req || n_cycles == 2, "low data starts the cycle");
    wait_done();
    chk(n_cycles == 2, "one cycle for the write");
    // 18-bit write keeps the previous high register (software sends it when needed)
    iot(6'o40, 3'b100, mk(5'd17, 4'd1, 1'b0, 5'd2));
    iot(6'o42, 3'b100, 18'o000111);
    chk(w == {6'o52, 18'o000111}, "18-bit write drives the buffer");
    wait_done();
    // read: gating, no write lines
    r = 24'hA5_C3F1;
    iot(6'o40, 3'b100, mk(5'd0, 4'd2, 1'b0, 5'd4));
    chk(w == '0, "no write lines for a read (F16 clear)");
    iot(6'o41, 3'b010, '0);
    chk(got == {12'b0, 6'(24'hA5_C3F1 >> 18)}, $sformatf("read high %o", got));
    chk(!cyc_req && n_cycles == 3, "reading high data starts no cycle");
    iot(6'o42, 3'b010, '0);
    chk(got == 18'(24'hA5_C3F1), $sformatf("read low %o", got));
    wait_done();
    chk(n_cycles == 4, "reading low data starts one cycle");
    chk(io_rdata == '0, "bus released outside IOP2");
    // F24 (F8 and F16 set) is dataless: no write lines
    iot(6'o40, 3'b100, mk(5'd24, 4'd0, 1'b0, 5'd4));
    chk(w == '0, "F8 set blocks the write lines");
    wait_done();
    chk(n_cycles == 5, "F24 dataless cycle");
    // decoded tests
    iot_dev <= 6'o40; iot_iop <= 3'b001; #1; @(negedge clk);
    chk(tst_q && !tst_lam && !tst_chan, "IOP1 on command device tests Q");
    iot_dev <= 6'o41; #1; @(negedge clk);
    chk(tst_lam && !tst_q, "IOP1 on high device tests LAM");
    iot_dev <= 6'o43; #1; @(negedge clk);
    chk(tst_chan, "IOP1 on interrupt device tests channel");
    iot_iop <= 3'b010; #1; @(negedge clk);
    chk(pi_en_clr && !pi_en_set, "IOP2 on interrupt device clears PI enable");
    iot_iop <= 3'b100; #1; @(negedge clk);
    chk(pi_en_set && !pi_en_clr, "IOP4 on interrupt device sets PI enable");
    iot_dev <= 6'o17; #1; @(negedge clk);
    chk(!pi_en_set && !tst_q, "other device codes ignored");
    iot_iop <= '0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
