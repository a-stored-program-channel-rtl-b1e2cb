// control_module: the channel's control unit, built as a CAMAC module on the
// dataway so that both the IOT processor and channel programs can reach it.
//
// It holds, for each of the two subchannels, a 12-bit word count (WC) with a
// 4-bit event enable register as its upper extension, a 15-bit current
// address (CA), a word-count overflow flag and the channel interrupt flag.
// Setting enable bit i both enables event i+1 and ties it to the subchannel.
// WC and CA of a subchannel advance on 'inc'; WC counts up from the negative
// of the buffer length and sets the overflow flag when it passes from 7777
// to 0000 (octal). At the end of a program ('exit'), if the subchannel's
// overflow flag is set, its enable register is cleared and its interrupt
// flag (the channel LAM) is raised, so the interrupt comes when the program
// ends, not when the count runs out.
// The event active register holds the number of the active event (1-4) in
// bits 2:0, the Q-skip bit in bit 3 (set by any Q skip during the program)
// and a one in bit 17, the most significant bit of an 18-bit word.
//
// Dataway commands (module selected by its N line 'sel'):
//   F0  A0/A2 read  {enables, WC} of subchannel 0/1   A1/A3 read CA 0/1
//       A4 read event active register                 A5 read option register
//   F16 same sub-addresses write (A4 excepted), strobed at S1
//   F8  A0/A1 test channel interrupt of subchannel 0/1 (Q = flag)
//   F10 A0/A1 clear overflow and interrupt flags of subchannel 0/1, at S2
// Q is 1 for every command in this list. Option register bit 0 asks the
// channel to null bit R18 when reading other modules, so event tags stay
// unique.
// The registers, their widths, the enable extension of WC, the exit-time
// interrupt and the event active register contents follow the processor
// description; the sub-addresses, function codes, bit positions of the
// event number and Q-skip bit, and the up-counting WC are this design's.
module control_module
  import spcc_pkg::*;
(
  input  logic                  clk,
  input  logic                  rst,
  // dataway
  input  logic                  sel,
  input  logic [4:0]            f,
  input  logic [3:0]            a,
  input  logic [DW_W-1:0]       w,
  input  logic                  s1_edge,
  input  logic                  s2_edge,
  output logic [DW_W-1:0]       r,
  output logic                  q,
  // channel side
  input  logic [NSUB-1:0]       inc,
  input  logic                  exit,
  input  logic                  exit_sub,
  input  logic                  ev_load,
  input  logic [1:0]            ev_idx,
  input  logic                  qskip_set,
  output logic [NEV-1:0]        enables [NSUB],
  output logic [ADDR_W-1:0]     ca      [NSUB],
  output logic [WC_W-1:0]       wc      [NSUB],
  output logic [NSUB-1:0]       ovf,
  output logic [NSUB-1:0]       irq,
  output logic [WORD_W-1:0]     event_active,
  output logic                  null_msb
);
  logic rd, wr, tst, clr;
  logic [2:0] ev_num;
  logic       qskip;
  logic       ev_on;

  assign rd  = sel && f == 5'd0;
  assign wr  = sel && f == 5'd16;
  assign tst = sel && f == 5'd8  && a <= 4'd1;
  assign clr = sel && f == 5'd10 && a <= 4'd1;

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int s = 0; s < NSUB; s++) begin
        enables[s] <= '0;
        ca[s]      <= '0;
        wc[s]      <= '0;
      end
      ovf      <= '0;
      irq      <= '0;
      ev_num   <= '0;
      qskip    <= 1'b0;
      ev_on    <= 1'b0;
      null_msb <= 1'b0;
    end else begin
      for (int s = 0; s < NSUB; s++) begin
        if (inc[s]) begin
          wc[s] <= wc[s] + 1'b1;
          ca[s] <= ca[s] + 1'b1;
          if (wc[s] == '1) ovf[s] <= 1'b1;
        end
      end
      if (wr && s1_edge) begin
        unique case (a)
          4'd0: {enables[0], wc[0]} <= w[15:0];
          4'd1: ca[0]               <= w[ADDR_W-1:0];
          4'd2: {enables[1], wc[1]} <= w[15:0];
          4'd3: ca[1]               <= w[ADDR_W-1:0];
          4'd5: null_msb            <= w[0];
          default: ;
        endcase
      end
      if (clr && s2_edge) begin
        ovf[a[0]] <= 1'b0;
        irq[a[0]] <= 1'b0;
      end
      if (ev_load) begin
        ev_num <= 3'(ev_idx) + 3'd1;
        ev_on  <= 1'b1;
        qskip  <= 1'b0;
      end
      if (qskip_set) qskip <= 1'b1;
      if (exit) begin
        ev_on <= 1'b0;
        qskip <= 1'b0;
        if (ovf[exit_sub]) begin
          enables[exit_sub] <= '0;
          irq[exit_sub]     <= 1'b1;
        end
      end
    end
  end

  assign event_active = ev_on ? {1'b1, 13'b0, qskip, ev_num} : '0;

  always_comb begin
    r = '0;
    q = 1'b0;
    if (rd) begin
      q = a <= 4'd5;
      unique case (a)
        4'd0: r = DW_W'({enables[0], wc[0]});
        4'd1: r = DW_W'(ca[0]);
        4'd2: r = DW_W'({enables[1], wc[1]});
        4'd3: r = DW_W'(ca[1]);
        4'd4: r = DW_W'(event_active);
        4'd5: r = DW_W'(null_msb);
        default: ;
      endcase
    end
    if (wr)  q = (a <= 4'd5) && (a != 4'd4);
    if (tst) q = irq[a[0]];
    if (clr) q = 1'b1;
  end
endmodule
