// pdp15_memory_model: behavioural model of PDP-15 core memory behind its
// single-cycle data channel, for simulation only.
// A request (req high, op, addr, wdata) is accepted when the model is idle;
// LAT clocks later the operation is done and 'ack' is high for one clock,
// with read data (or the incremented word's old value for MEM_INC) on
// 'rdata'. MEM_INC adds one to the word in place. Counters record reads,
// writes, increments and burst requests for the testbenches.
module pdp15_memory_model
  import spcc_pkg::*;
#(
  parameter int DEPTH = 32768,
  parameter int LAT   = 3
) (
  input  logic              clk,
  input  logic              req,
  input  mem_op_e           op,
  input  logic              burst,
  input  logic [ADDR_W-1:0] addr,
  input  logic [WORD_W-1:0] wdata,
  output logic [WORD_W-1:0] rdata,
  output logic              ack
);
  logic [WORD_W-1:0] mem [DEPTH];
  logic              busy = 1'b0;
  int                cnt = 0;
  mem_op_e           op_l;
  logic [ADDR_W-1:0] addr_l;
  logic [WORD_W-1:0] wdata_l;
  int n_rd = 0, n_wr = 0, n_inc = 0, n_burst = 0;

  initial begin
    for (int i = 0; i < DEPTH; i++) mem[i] = '0;
    ack   = 1'b0;
    rdata = '0;
  end

  always @(posedge clk) begin
    ack <= 1'b0;
    if (busy) begin
      if (cnt == 0) begin
        busy <= 1'b0;
        ack  <= 1'b1;
        rdata <= mem[int'(addr_l) % DEPTH];
        case (op_l)
          MEM_WR:  begin mem[int'(addr_l) % DEPTH] <= wdata_l; n_wr++; end
          MEM_INC: begin mem[int'(addr_l) % DEPTH] <= mem[int'(addr_l) % DEPTH] + 1'b1; n_inc++; end
          default: n_rd++;
        endcase
      end else cnt <= cnt - 1;
    end else if (req && !ack) begin
      busy    <= 1'b1;
      cnt     <= LAT - 1;
      op_l    <= op;
      addr_l  <= addr;
      wdata_l <= wdata;
      if (burst) n_burst++;
    end
  end
endmodule
