// event_monitor: holds event requests until the channel can serve them and
// schedules them by fixed priority.
//
// Request phase: a rising edge on an event input sets its event latch. While
// the channel is free, 'strobe' copies the latches, masked by the event
// enables, into the event register; the highest priority event in the
// register (event 1, index 0, highest) becomes the active event and its event
// table address, 24-27 octal for events 1-4, is offered to the address
// multiplexer. Exit phase: 'clear' empties the whole event register but
// resets only the latch of the event that was served, so other requests
// stay pending. A new edge on the served input in the same clock wins over
// the clear.
// Latches, event register, priority selection, the table addresses and the
// exit-phase clearing follow the processor description; edge triggering and
// the order of priority are this design's choices.
module event_monitor
  import spcc_pkg::*;
(
  input  logic              clk,
  input  logic              rst,
  input  logic [NEV-1:0]    event_in,
  input  logic [NEV-1:0]    enable,      // event enabled on some subchannel
  input  logic              strobe,
  input  logic              clear,
  output logic [NEV-1:0]    latches,
  output logic [NEV-1:0]    event_reg,
  output logic              pending,     // an enabled latch is set
  output logic              valid,       // event register holds an event
  output logic [1:0]        active_idx,
  output logic [ADDR_W-1:0] table_addr
);
  logic [NEV-1:0] in_d, rise;

  assign rise = event_in & ~in_d;

  always_ff @(posedge clk) begin
    if (rst) begin
      in_d      <= '0;
      latches   <= '0;
      event_reg <= '0;
    end else begin
      in_d <= event_in;
      if (strobe) event_reg <= latches & enable;
      if (clear) begin
        event_reg <= '0;
        latches   <= (latches & ~(NEV'(1) << active_idx)) | rise;
      end else begin
        latches   <= latches | rise;
      end
    end
  end

  always_comb begin
    active_idx = '0;
    for (int i = NEV - 1; i >= 0; i--)
      if (event_reg[i]) active_idx = 2'(i);
  end

  assign pending    = |(latches & enable);
  assign valid      = |event_reg;
  assign table_addr = EVENT_TABLE_BASE + ADDR_W'(active_idx);
endmodule
