// interrupt_skip: the interrupt and skip facilities towards the PDP-15.
// The Q response of the last processor-driven dataway cycle is held in a flag
// and answered by the Q skip test. LAMs patched to the program interrupt
// request a PI interrupt when PI is enabled and also answer the LAM skip
// test. The channel interrupt (word-count overflow at the end of a channel
// program) has its own API request line and skip test. 'skip' is the
// combinational answer to the IOP1 test pulse currently on the bus.
// That the channel LAM uses its own API channel while the other LAMs and Q
// share the usual interrupt and skip facilities follows the processor
// description; the PI enable flag and its reset to disabled are this
// design's choices.
module interrupt_skip (
  input  logic clk,
  input  logic rst,
  input  logic iot_cyc_done,   // end of a dataway cycle of the IOT processor
  input  logic q_cycle,        // Q sampled in that cycle
  input  logic lam_pi,         // LAMs patched to the program interrupt
  input  logic chan_irq,       // channel (word count overflow) interrupt
  input  logic tst_q,
  input  logic tst_lam,
  input  logic tst_chan,
  input  logic pi_en_set,
  input  logic pi_en_clr,
  output logic skip,
  output logic pi_req,
  output logic api_req,
  output logic q_flag
);
  logic pi_en;

  always_ff @(posedge clk) begin
    if (rst) begin
      q_flag <= 1'b0;
      pi_en  <= 1'b0;
    end else begin
      if (iot_cyc_done) q_flag <= q_cycle;
      if (pi_en_set)      pi_en <= 1'b1;
      else if (pi_en_clr) pi_en <= 1'b0;
    end
  end

  assign skip    = (tst_q && q_flag) || (tst_lam && lam_pi) || (tst_chan && chan_irq);
  assign pi_req  = pi_en && lam_pi;
  assign api_req = chan_irq;
endmodule
