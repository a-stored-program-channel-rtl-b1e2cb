// dataway_clock: the dataway cycle generator of the controller.
// A 'start' while idle runs one CAMAC cycle: Busy (B) is high for CYCLE_LEN
// clocks, strobe S1 is high for S1_LEN clocks from S1_START and strobe S2 for
// S2_LEN clocks from S2_START (counted from the first Busy clock). The Q line
// is sampled while S1 is high and held in 'q' until the next cycle. 's1_edge'
// and 's2_edge' mark the first clock of each strobe for logic inside the
// controller, and 'done' is high in the last clock of the cycle.
// The default timing (S1 at 0.2-0.4 us, S2 at 0.6-0.8 us, 1 us cycle at a
// 10 MHz clock) is the usual CAMAC dataway timing; the processor text only
// names the B, S1 and S2 signals, so the numbers are this design's choice.
module dataway_clock #(
  parameter int CYCLE_LEN = 10,
  parameter int S1_START  = 2,
  parameter int S1_LEN    = 2,
  parameter int S2_START  = 6,
  parameter int S2_LEN    = 2
) (
  input  logic clk,
  input  logic rst,
  input  logic start,
  input  logic q_in,
  output logic busy,
  output logic b,
  output logic s1,
  output logic s2,
  output logic s1_edge,
  output logic s2_edge,
  output logic done,
  output logic q
);
  logic [7:0] cnt;

  always_ff @(posedge clk) begin
    if (rst) begin
      busy <= 1'b0;
      cnt  <= '0;
      q    <= 1'b0;
    end else if (!busy) begin
      if (start) begin
        busy <= 1'b1;
        cnt  <= '0;
      end
    end else begin
      if (s1) q <= q_in;
      if (done) busy <= 1'b0;
      else      cnt  <= cnt + 8'd1;
    end
  end

  always_comb begin
    b       = busy;
    s1      = busy && (cnt >= 8'(S1_START)) && (cnt < 8'(S1_START + S1_LEN));
    s2      = busy && (cnt >= 8'(S2_START)) && (cnt < 8'(S2_START + S2_LEN));
    s1_edge = busy && (cnt == 8'(S1_START));
    s2_edge = busy && (cnt == 8'(S2_START));
    done    = busy && (cnt == 8'(CYCLE_LEN - 1));
  end

  initial begin
    assert (S1_START + S1_LEN <= S2_START && S2_START + S2_LEN <= CYCLE_LEN)
      else $error("dataway_clock: strobes must fall inside the cycle, S1 before S2");
  end
endmodule
