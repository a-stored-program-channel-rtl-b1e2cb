// program_counter: the 15-bit channel program counter (PDP-15 bits 03-17).
// It is loaded from memory words arriving over the I/O bus in two parts:
// 'load_page' loads bits 03-05 (the 4K page) and 'load_word' bits 06-17. On
// entry to a program both parts are loaded from the event table word; an
// F(12) jump loads only bits 06-17, so jumps stay within the page. 'inc'
// adds one, after each fetch and again for a Q skip; the page bits take the
// carry. Loads win over an increment in the same clock.
// The split load and the increments follow the processor description; the
// carry into the page bits and the reset value of zero are this design's
// choices.
module program_counter
  import spcc_pkg::*;
(
  input  logic              clk,
  input  logic              rst,
  input  logic              load_page,
  input  logic              load_word,
  input  logic              inc,
  input  logic [ADDR_W-1:0] d,
  output logic [ADDR_W-1:0] pc
);
  always_ff @(posedge clk) begin
    if (rst) pc <= '0;
    else if (load_page || load_word) begin
      if (load_page) pc[14:12] <= d[14:12];
      if (load_word) pc[11:0]  <= d[11:0];
    end else if (inc) pc <= pc + 1'b1;
  end
endmodule
