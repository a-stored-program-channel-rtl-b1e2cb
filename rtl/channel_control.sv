// channel_control: sequencing and command interpretation of the stored
// program CAMAC channel.
//
// The channel runs small programs of CAMAC commands held in PDP-15 memory,
// reading commands and moving data through the single-cycle data channel.
// Phases, one state group each:
//   request  When an enabled event is pending and the channel is free, strobe
//            the event register, note the active event in the control module
//            and read its event table word (addresses 24-27 octal). A word
//            with its most significant bit clear is a program address and is
//            loaded into the program counter (bits 03-05 and 06-17); a word
//            with that bit set is itself a command and goes straight to the
//            execute phase.
//   fetch    Read the command at PC. An F(12) command loads its 12 low bits
//            into PC bits 06-17 (a jump within the page) and the fetch is
//            repeated; any other command is loaded into the command register
//            and PC is incremented.
//   execute  Take the dataway. F8 set: no data. Otherwise, for H set, the high
//            6 bits are moved first, then the low 18 bits: for F16 (write)
//            from memory into the data register, for reads from the dataway
//            read lines into memory; each transfer advances WC and CA of the
//            subchannel the event is enabled on. F(4)/F(6) instead use the
//            low read lines as an address and increment memory there. Then a
//            dataway cycle is run (the dataway sees F(0)/F(2) for the
//            increment codes). A Q response different from the command's Q
//            bit increments PC again, skipping the next command, and sets the
//            Q-skip bit of the event active register. The E bit selects fetch
//            or exit.
//   exit     Clear the event register and the served event latch; the control
//            module disables and interrupts an overflowed subchannel.
// The phases, their order, the command bits and special codes follow the
// processor description. This design's own choices: subchannel 0 serves an
// event enabled on both; a memory word for a read from a module is
// {11 zeros, R18, R24..R19} (high) and R18..R1 (low), R18 of the low word is
// nulled when the option asks for it and the module read is not the control
// module; an 18-bit write leaves W24-W19 zero; the increment codes move no
// data word and leave WC and CA alone; a table-word command leaves PC as it
// was.
//
// Interfaces: the data channel request 'dch_req' is held until the one-clock
// 'dch_ack' (read data valid with it); 'dch_burst' is high on the first of two
// transfers of a 24-bit word. The dataway is requested with 'dw_req' and used
// only after 'dw_grant'; 'cyc_req' is held until the clock's 'cyc_done'.
module channel_control
  import spcc_pkg::*;
(
  input  logic              clk,
  input  logic              rst,
  // event monitor
  input  logic              ev_pending,
  input  logic              ev_valid,
  input  logic [1:0]        ev_idx,
  output logic              ev_strobe,
  output logic              ev_clear,
  // control module
  input  logic [NEV-1:0]    enables [NSUB],
  input  logic              null_msb,
  output logic [NSUB-1:0]   inc,
  output logic              exit_pulse,
  output logic              sub,
  output logic              ev_load,
  output logic              qskip_set,
  // program counter
  output logic              pc_load_page,
  output logic              pc_load_word,
  output logic              pc_inc,
  output logic [ADDR_W-1:0] pc_d,
  // address multiplexer
  output amux_sel_e         amux_sel,
  // data channel
  output logic              dch_req,
  output mem_op_e           dch_op,
  output logic              dch_burst,
  output logic [WORD_W-1:0] dch_wdata,
  input  logic [WORD_W-1:0] dch_rdata,
  input  logic              dch_ack,
  // dataway
  output logic              dw_req,
  input  logic              dw_grant,
  output cmd_t              dw_cmd,
  output logic [DW_W-1:0]   dw_w,
  input  logic [DW_W-1:0]   dw_r,
  input  logic              dw_ctrl_sel,
  output logic              cyc_req,
  input  logic              cyc_done,
  input  logic              cyc_q,
  // status
  output logic              busy,
  output cmd_t              cmd
);
  typedef enum logic [3:0] {
    S_IDLE, S_STROBE, S_TABLE, S_FETCH, S_EXEC, S_XFER_HI, S_XFER_LO,
    S_INCR, S_DW, S_EXIT
  } state_e;

  state_e            state;
  logic [5:0]        hi_reg;
  logic [WORD_W-1:0] lo_reg;
  logic [WORD_W-1:0] rd_lo_word;
  logic              wr_dir;

  assign wr_dir = f_write(cmd.f);
  assign rd_lo_word = {dw_r[17] & ~(null_msb & ~dw_ctrl_sel), dw_r[16:0]};

  always_ff @(posedge clk) begin
    if (rst) begin
      state  <= S_IDLE;
      cmd    <= '0;
      sub    <= 1'b0;
      hi_reg <= '0;
      lo_reg <= '0;
    end else begin
      unique case (state)
        S_IDLE:   if (ev_pending) state <= S_STROBE;
        S_STROBE: begin
          if (ev_valid) begin
            sub   <= !enables[0][ev_idx] && enables[1][ev_idx];
            state <= S_TABLE;
          end else state <= S_IDLE;
        end
        S_TABLE: if (dch_ack) begin
          if (dch_rdata[17]) begin
            cmd   <= cmd_t'(dch_rdata);
            state <= S_EXEC;
          end else state <= S_FETCH;
        end
        S_FETCH: if (dch_ack && !f_jump(dch_rdata[16:12])) begin
          cmd   <= cmd_t'(dch_rdata);
          state <= S_EXEC;
        end
        S_EXEC: if (dw_grant) begin
          hi_reg <= '0;
          if (f_dataless(cmd.f))  state <= S_DW;
          else if (f_incr(cmd.f)) state <= S_INCR;
          else if (cmd.h)         state <= S_XFER_HI;
          else                    state <= S_XFER_LO;
        end
        S_XFER_HI: if (dch_ack) begin
          if (wr_dir) hi_reg <= dch_rdata[5:0];
          state <= S_XFER_LO;
        end
        S_XFER_LO: if (dch_ack) begin
          if (wr_dir) lo_reg <= dch_rdata;
          state <= S_DW;
        end
        S_INCR: if (dch_ack) state <= S_DW;
        S_DW: if (cyc_done) state <= cmd.e ? S_EXIT : S_FETCH;
        S_EXIT: state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  always_comb begin
    ev_strobe    = state == S_IDLE && ev_pending;
    ev_load      = state == S_STROBE && ev_valid;
    ev_clear     = state == S_EXIT;
    exit_pulse   = state == S_EXIT;
    pc_load_page = state == S_TABLE && dch_ack && !dch_rdata[17];
    pc_load_word = pc_load_page ||
                   (state == S_FETCH && dch_ack && f_jump(dch_rdata[16:12]));
    pc_d         = dch_rdata[ADDR_W-1:0];
    qskip_set    = state == S_DW && cyc_done && (cyc_q != cmd.q);
    pc_inc       = (state == S_FETCH && dch_ack && !f_jump(dch_rdata[16:12])) ||
                   qskip_set;
    inc          = '0;
    if ((state == S_XFER_HI || state == S_XFER_LO) && dch_ack) inc[sub] = 1'b1;

    dch_req   = 1'b0;
    dch_op    = MEM_RD;
    dch_wdata = '0;
    amux_sel  = AM_PC;
    unique case (state)
      S_TABLE: begin dch_req = 1'b1; amux_sel = AM_EVT; end
      S_FETCH: begin dch_req = 1'b1; amux_sel = AM_PC;  end
      S_XFER_HI: begin
        dch_req   = 1'b1;
        amux_sel  = sub ? AM_CA1 : AM_CA0;
        dch_op    = wr_dir ? MEM_RD : MEM_WR;
        dch_wdata = {11'b0, dw_r[17], dw_r[23:18]};
      end
      S_XFER_LO: begin
        dch_req   = 1'b1;
        amux_sel  = sub ? AM_CA1 : AM_CA0;
        dch_op    = wr_dir ? MEM_RD : MEM_WR;
        dch_wdata = rd_lo_word;
      end
      S_INCR: begin dch_req = 1'b1; amux_sel = AM_DW; dch_op = MEM_INC; end
      default: ;
    endcase
    dch_burst = state == S_XFER_HI;

    dw_req  = state inside {S_EXEC, S_XFER_HI, S_XFER_LO, S_INCR, S_DW};
    cyc_req = state == S_DW;
    busy    = state != S_IDLE;
  end

  always_comb begin
    dw_cmd   = cmd;
    dw_cmd.f = f_dataway(cmd.f);
    dw_w     = wr_dir ? {hi_reg, lo_reg} : '0;
  end
endmodule
