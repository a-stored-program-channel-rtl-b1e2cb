// spcc_pkg: types and constants shared by the stored-program CAMAC channel
// (SPCC) and its programmed-I/O (IOT driven) neighbour.
//
// The 18-bit command word follows the PDP-15 convention of numbering bits
// 0 (most significant) to 17. Its layout, from bit 0 down, is
//   Q(1) F(5) A(4) H(1) E(1) C(1) N(5)
// so in a packed vector [17:0] Q sits in bit 17 and N in bits 4:0.
//   Q  Q-response expected by the channel; a different Q skips the next command
//   F  CAMAC function code, A sub-address, C crate (two-crate controller), N station
//   H  transfer a full 24-bit word as two 18-bit memory words
//   E  exit after this command
// Special function codes interpreted by the channel: F(12) unconditional jump
// within a 4K page, F(4)/F(6) direct memory increment (the dataway sees F(0)/F(2)).
// The field widths follow the command-word drawing; the constants marked
// "assumed" below are this design's choices.
package spcc_pkg;

  localparam int WORD_W  = 18;  // PDP-15 word
  localparam int ADDR_W  = 15;  // PDP-15 memory address, bits 03-17
  localparam int DW_W    = 24;  // CAMAC read/write bus width
  localparam int NSTA    = 24;  // stations per crate
  localparam int NEV     = 4;   // event inputs / channel programs
  localparam int NSUB    = 2;   // independent subchannels
  localparam int WC_W    = 12;  // word count register width

  // First word of the event table: events 1-4 use addresses 24-27 octal.
  localparam logic [ADDR_W-1:0] EVENT_TABLE_BASE = 15'o24;

  typedef struct packed {
    logic       q;   // bit 0  (PDP numbering)
    logic [4:0] f;   // bits 1-5
    logic [3:0] a;   // bits 6-9
    logic       h;   // bit 10
    logic       e;   // bit 11
    logic       c;   // bit 12
    logic [4:0] n;   // bits 13-17
  } cmd_t;

  // Memory operations the data channel is asked to perform.
  typedef enum logic [1:0] {
    MEM_RD  = 2'd0,  // memory -> device
    MEM_WR  = 2'd1,  // device -> memory
    MEM_INC = 2'd2   // increment memory in place
  } mem_op_e;

  // Address multiplexer sources.
  typedef enum logic [2:0] {
    AM_PC  = 3'd0,
    AM_CA0 = 3'd1,
    AM_CA1 = 3'd2,
    AM_DW  = 3'd3,
    AM_EVT = 3'd4
  } amux_sel_e;

  // Current user of the shared dataway.
  typedef enum logic [1:0] {
    OWN_NONE = 2'd0,
    OWN_IOT  = 2'd1,
    OWN_CHAN = 2'd2
  } dw_owner_e;

  // CAMAC function code classes.
  function automatic logic f_dataless(input logic [4:0] f);
    return f[3];                       // F8 set: no data
  endfunction

  function automatic logic f_write(input logic [4:0] f);
    return f[4] && !f[3];              // F16 set, F8 clear: write to module
  endfunction

  function automatic logic f_jump(input logic [4:0] f);
    return f == 5'd12;
  endfunction

  function automatic logic f_incr(input logic [4:0] f);
    return (f == 5'd4) || (f == 5'd6);
  endfunction

  // Function code put on the dataway: the increment codes lose their F4 bit.
  function automatic logic [4:0] f_dataway(input logic [4:0] f);
    return f_incr(f) ? (f & 5'b11011) : f;
  endfunction

endpackage
