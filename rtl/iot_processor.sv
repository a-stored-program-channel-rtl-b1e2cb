// iot_processor: the programmed-I/O CAMAC processor driven by PDP-15 IOT
// instructions.
//
// A transfer is always the same sequence of IOTs: send the command word
// (F, A, C, N), then send or receive the high-order 6 data bits (only for
// 24-bit words), then send or receive the low-order 18 bits. A dataway cycle
// is requested when the low-order word is transferred, or at once when the
// command loaded is dataless (F8 set). Writes go through a two-part buffer,
// the high (6-bit) and low (18-bit) data registers, which drive the write
// lines only for F8'.F16 commands. Reads have no register: the dataway read
// lines are gated straight onto the I/O bus during the IOP2 pulse, before the
// dataway strobes of the cycle that the low-order read starts.
//
// IOT decoding: four device codes, each with the PDP-15 pulses IOP1 (skip
// test), IOP2 (read into AC) and IOP4 (write from AC):
//   DEV_CMD  IOP4 load command register        IOP1 skip on Q of last cycle
//   DEV_HI   IOP4 load high data register      IOP2 read high dataway (R19-R24)
//            IOP1 skip on patched LAM
//   DEV_LO   IOP4 load low data, start cycle    IOP2 read low dataway (R1-R18), start cycle
//   DEV_INT  IOP1 skip on channel interrupt     IOP2 clear / IOP4 set PI enable
// The command/high/low sequence, the F8 rule and the read gating follow the
// processor description; the device codes and the assignment of the skip
// tests to IOP1 of each device are this design's choices.
//
// 'active' is high from the loading of the command register until its dataway
// cycle has ended; the dataway arbiter gives this processor the dataway for
// that time. 'cyc_req' stays high until 'cyc_done'.
module iot_processor
  import spcc_pkg::*;
#(
  parameter logic [5:0] DEV_CMD = 6'o40,
  parameter logic [5:0] DEV_HI  = 6'o41,
  parameter logic [5:0] DEV_LO  = 6'o42,
  parameter logic [5:0] DEV_INT = 6'o43
) (
  input  logic              clk,
  input  logic              rst,
  // PDP-15 I/O bus
  input  logic [5:0]        iot_dev,
  input  logic [2:0]        iot_iop,     // [0]=IOP1 [1]=IOP2 [2]=IOP4, one-clock pulses
  input  logic [WORD_W-1:0] io_wdata,
  output logic [WORD_W-1:0] io_rdata,
  // dataway side
  output cmd_t              cmd,
  output logic [DW_W-1:0]   w,
  input  logic [DW_W-1:0]   r,
  output logic              cyc_req,
  input  logic              cyc_done,
  output logic              active,
  // decoded tests and controls for the interrupt and skip unit
  output logic              tst_q,
  output logic              tst_lam,
  output logic              tst_chan,
  output logic              pi_en_set,
  output logic              pi_en_clr
);
  logic [5:0]        hi_reg;
  logic [WORD_W-1:0] lo_reg;
  logic ld_cmd, ld_hi, ld_lo, rd_hi, rd_lo;

  always_comb begin
    ld_cmd    = (iot_dev == DEV_CMD) && iot_iop[2];
    tst_q     = (iot_dev == DEV_CMD) && iot_iop[0];
    ld_hi     = (iot_dev == DEV_HI)  && iot_iop[2];
    rd_hi     = (iot_dev == DEV_HI)  && iot_iop[1];
    tst_lam   = (iot_dev == DEV_HI)  && iot_iop[0];
    ld_lo     = (iot_dev == DEV_LO)  && iot_iop[2];
    rd_lo     = (iot_dev == DEV_LO)  && iot_iop[1];
    tst_chan  = (iot_dev == DEV_INT) && iot_iop[0];
    pi_en_clr = (iot_dev == DEV_INT) && iot_iop[1];
    pi_en_set = (iot_dev == DEV_INT) && iot_iop[2];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      cmd     <= '0;
      hi_reg  <= '0;
      lo_reg  <= '0;
      cyc_req <= 1'b0;
      active  <= 1'b0;
    end else begin
      if (ld_cmd) begin
        cmd    <= cmd_t'(io_wdata);
        active <= 1'b1;
        if (f_dataless(io_wdata[16:12])) cyc_req <= 1'b1;
      end
      if (ld_hi) hi_reg <= io_wdata[5:0];
      if (ld_lo) lo_reg <= io_wdata;
      if ((ld_lo || rd_lo) && active) cyc_req <= 1'b1;
      if (cyc_done) begin
        cyc_req <= 1'b0;
        active  <= 1'b0;
      end
    end
  end

  // write lines carry the buffer only for F8'.F16 commands
  assign w = f_write(cmd.f) ? {hi_reg, lo_reg} : '0;

  // read gating
  always_comb begin
    io_rdata = '0;
    if (rd_hi) io_rdata = {12'b0, r[23:18]};
    if (rd_lo) io_rdata = r[17:0];
  end
endmodule
