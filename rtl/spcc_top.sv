// spcc_top: two-crate CAMAC controller for the PDP-15 with a programmed-I/O
// (IOT driven) processor and a stored-program channel (SPCC).
//
// Both processors share one dataway driver: the command (F, A, C, N), the
// write lines and the cycle generator (B, S1, S2). A small arbiter gives the
// dataway to the IOT processor from the loading of its command until its
// cycle ends, and to the channel from the start of a command's execute phase
// until its cycle ends; a processor that asks while the other holds the
// dataway waits, and the IOT processor wins a tie. The C bit of the command
// picks the crate: only that crate sees its N lines and strobes, and only its
// read lines and Q are used. The control module is a CAMAC module inside the
// controller at station CTRL_N of crate 0; its read lines and Q are ORed
// with those of the crate, like any module's.
//
// Channel path: LAMs and front-panel inputs -> patch panel -> event monitor
// -> channel control, which reads the event table and its program through
// the data channel port (address from the address multiplexer: program
// counter, current address registers, dataway read lines or event table) and
// runs each command on the dataway. Word-count overflow interrupts arrive at
// the CPU through the API line; LAMs patched to the program interrupt through
// PI; the skip line answers IOT skip tests.
// The blocks and their connections follow the channel processor block
// diagram. The arbiter, the crate gating, the control module's station and
// the port protocols are this design's choices (see each block's header).
//
// Timing: one clock per data channel handshake step, CYCLE_LEN clocks per
// dataway cycle.
module spcc_top
  import spcc_pkg::*;
#(
  parameter int          NCRATE    = 2,
  parameter logic [4:0]  CTRL_N    = 5'd23,
  parameter int          CYCLE_LEN = 10,
  parameter int          S1_START  = 2,
  parameter int          S1_LEN    = 2,
  parameter int          S2_START  = 6,
  parameter int          S2_LEN    = 2,
  parameter int          EVENT_LAM [NEV] = '{0, 1, 2, 3},
  parameter logic [NCRATE*NSTA-1:0] PI_MASK = (NCRATE*NSTA)'(48'h0000_00F0)
) (
  input  logic                         clk,
  input  logic                         rst,
  // PDP-15 I/O bus (IOT)
  input  logic [5:0]                   iot_dev,
  input  logic [2:0]                   iot_iop,
  input  logic [WORD_W-1:0]            io_wdata,
  output logic [WORD_W-1:0]            io_rdata,
  output logic                         skip,
  output logic                         pi_req,
  output logic                         api_req,
  // PDP-15 single-cycle data channel
  output logic                         dch_req,
  output mem_op_e                      dch_op,
  output logic                         dch_burst,
  output logic [ADDR_W-1:0]            dch_addr,
  output logic [WORD_W-1:0]            dch_wdata,
  input  logic [WORD_W-1:0]            dch_rdata,
  input  logic                         dch_ack,
  // CAMAC dataways of the crates
  output logic [NCRATE-1:0][NSTA-1:0]  dw_n,
  output logic [4:0]                   dw_f,
  output logic [3:0]                   dw_a,
  output logic [DW_W-1:0]              dw_w,
  output logic [NCRATE-1:0]            dw_b,
  output logic [NCRATE-1:0]            dw_s1,
  output logic [NCRATE-1:0]            dw_s2,
  input  logic [NCRATE-1:0][DW_W-1:0]  dw_r,
  input  logic [NCRATE-1:0]            dw_q,
  input  logic [NCRATE*NSTA-1:0]       lam,
  // front-panel event inputs
  input  logic [NEV-1:0]               ext_event,
  // status
  output logic                         chan_busy,
  output cmd_t                         chan_cmd,      // channel command register
  output logic [WORD_W-1:0]            event_active,  // event active register
  output logic [NEV-1:0]               ev_latches,
  output logic [NEV-1:0]               ev_register,
  output logic [NSUB-1:0]              sub_ovf,
  output logic [NSUB-1:0]              sub_irq,
  output logic [NSUB-1:0][WC_W-1:0]    sub_wc,
  output logic                         iot_q,         // Q of the last IOT cycle
  output dw_owner_e                    dw_owner,      // who holds the dataway
  output logic                         chan_wants_dw,
  output logic                         iot_wants_dw
);
  // ---------------- dataway arbiter ----------------
  dw_owner_e owner;

  cmd_t            iot_cmd, ch_cmd, dw_cmd;
  logic [DW_W-1:0] iot_w, ch_w, r_bus;
  logic            iot_cyc_req, iot_active, ch_cyc_req, ch_dw_req;
  logic            clk_start, clk_busy, clk_b, clk_s1, clk_s2, s1_edge, s2_edge, cyc_done, cyc_q;
  logic            q_bus;

  always_ff @(posedge clk) begin
    if (rst) owner <= OWN_NONE;
    else unique case (owner)
      OWN_NONE: if (iot_active)     owner <= OWN_IOT;
                else if (ch_dw_req) owner <= OWN_CHAN;
      OWN_IOT:  if (!iot_active)    owner <= OWN_NONE;
      OWN_CHAN: if (!ch_dw_req)     owner <= OWN_NONE;
      default:  owner <= OWN_NONE;
    endcase
  end

  assign dw_owner      = owner;
  assign chan_wants_dw = ch_dw_req;
  assign iot_wants_dw  = iot_active;
  assign dw_cmd    = (owner == OWN_CHAN) ? ch_cmd : iot_cmd;
  assign dw_w      = (owner == OWN_CHAN) ? ch_w   : iot_w;
  assign dw_f      = dw_cmd.f;
  assign dw_a      = dw_cmd.a;
  assign clk_start = !clk_busy && ((owner == OWN_IOT  && iot_cyc_req) ||
                                   (owner == OWN_CHAN && ch_cyc_req));

  dataway_clock #(
    .CYCLE_LEN(CYCLE_LEN), .S1_START(S1_START), .S1_LEN(S1_LEN),
    .S2_START(S2_START), .S2_LEN(S2_LEN)
  ) u_clock (
    .clk, .rst, .start(clk_start), .q_in(q_bus), .busy(clk_busy),
    .b(clk_b), .s1(clk_s1), .s2(clk_s2), .s1_edge, .s2_edge,
    .done(cyc_done), .q(cyc_q)
  );

  // ---------------- crate selection ----------------
  for (genvar k = 0; k < NCRATE; k++) begin : g_crate
    station_decode #(.NSTA(NSTA)) u_ndec (
      .en(int'(dw_cmd.c) == k), .n(dw_cmd.n), .nline(dw_n[k])
    );
    assign dw_b[k]  = clk_b  && int'(dw_cmd.c) == k;
    assign dw_s1[k] = clk_s1 && int'(dw_cmd.c) == k;
    assign dw_s2[k] = clk_s2 && int'(dw_cmd.c) == k;
  end

  // ---------------- control module ----------------
  logic                ctrl_sel, ctrl_q, null_msb;
  logic [DW_W-1:0]     ctrl_r;
  logic [NEV-1:0]      enables [NSUB];
  logic [ADDR_W-1:0]   ca      [NSUB];
  logic [WC_W-1:0]     wc      [NSUB];
  logic [NSUB-1:0]     ovf, irq, cm_inc;
  logic                exit_pulse, exit_sub, ev_load, qskip_set;
  logic [1:0]          ev_idx;

  assign ctrl_sel = (dw_cmd.c == 1'b0) && (dw_cmd.n == CTRL_N);
  assign r_bus    = dw_r[dw_cmd.c] | ctrl_r;
  assign q_bus    = dw_q[dw_cmd.c] | ctrl_q;

  control_module u_ctrl (
    .clk, .rst, .sel(ctrl_sel), .f(dw_cmd.f), .a(dw_cmd.a), .w(dw_w),
    .s1_edge, .s2_edge, .r(ctrl_r), .q(ctrl_q),
    .inc(cm_inc), .exit(exit_pulse), .exit_sub, .ev_load, .ev_idx, .qskip_set,
    .enables, .ca, .wc, .ovf, .irq, .event_active, .null_msb
  );

  // ---------------- IOT driven processor ----------------
  logic tst_q, tst_lam, tst_chan, pi_en_set, pi_en_clr, lam_pi;

  iot_processor u_iot (
    .clk, .rst, .iot_dev, .iot_iop, .io_wdata, .io_rdata,
    .cmd(iot_cmd), .w(iot_w), .r(r_bus), .cyc_req(iot_cyc_req),
    .cyc_done(cyc_done && owner == OWN_IOT), .active(iot_active),
    .tst_q, .tst_lam, .tst_chan, .pi_en_set, .pi_en_clr
  );

  interrupt_skip u_intskp (
    .clk, .rst, .iot_cyc_done(cyc_done && owner == OWN_IOT), .q_cycle(cyc_q),
    .lam_pi, .chan_irq(|irq), .tst_q, .tst_lam, .tst_chan, .pi_en_set, .pi_en_clr,
      .skip, .pi_req, .api_req, .q_flag(iot_q)
  );

  // ---------------- event path ----------------
  logic [NEV-1:0] event_req, en_any;
  logic           ev_pending, ev_valid, ev_strobe, ev_clear;
  logic [ADDR_W-1:0] table_addr;

  lam_patch_panel #(
    .NLAM(NCRATE*NSTA), .EVENT_LAM(EVENT_LAM), .PI_MASK(PI_MASK)
  ) u_patch (
    .lam, .ext_event, .event_req, .lam_pi
  );

  assign en_any = enables[0] | enables[1];
  assign sub_ovf = ovf;
  assign sub_irq = irq;
  assign sub_wc  = {wc[1], wc[0]};

  event_monitor u_evmon (
    .clk, .rst, .event_in(event_req), .enable(en_any), .strobe(ev_strobe),
    .clear(ev_clear), .latches(ev_latches), .event_reg(ev_register), .pending(ev_pending),
    .valid(ev_valid), .active_idx(ev_idx), .table_addr
  );

  // ---------------- channel ----------------
  logic              pc_load_page, pc_load_word, pc_inc;
  logic [ADDR_W-1:0] pc_d, pc;
  amux_sel_e         amux_sel;

  channel_control u_chan (
    .clk, .rst,
    .ev_pending, .ev_valid, .ev_idx, .ev_strobe, .ev_clear,
    .enables, .null_msb, .inc(cm_inc), .exit_pulse, .sub(exit_sub), .ev_load, .qskip_set,
    .pc_load_page, .pc_load_word, .pc_inc, .pc_d,
    .amux_sel,
    .dch_req, .dch_op, .dch_burst, .dch_wdata, .dch_rdata, .dch_ack,
    .dw_req(ch_dw_req), .dw_grant(owner == OWN_CHAN), .dw_cmd(ch_cmd), .dw_w(ch_w),
    .dw_r(r_bus), .dw_ctrl_sel(ctrl_sel), .cyc_req(ch_cyc_req),
    .cyc_done(cyc_done && owner == OWN_CHAN), .cyc_q,
    .busy(chan_busy), .cmd(chan_cmd)
  );

  program_counter u_pc (
    .clk, .rst, .load_page(pc_load_page), .load_word(pc_load_word),
    .inc(pc_inc), .d(pc_d), .pc
  );

  address_mux u_amux (
    .sel(amux_sel), .pc, .ca0(ca[0]), .ca1(ca[1]), .dw_r(r_bus),
    .evt_addr(table_addr), .addr(dch_addr)
  );

  // the crate select must pick a crate that exists
  assert property (@(posedge clk) disable iff (rst) int'(dw_cmd.c) < NCRATE);
endmodule
