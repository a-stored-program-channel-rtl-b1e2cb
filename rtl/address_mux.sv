// address_mux: chooses the memory address of each data channel cycle.
// Sources: the program counter (command fetch), the current address register
// of subchannel 0 or 1 (data transfers), the low 15 dataway read lines (direct
// memory increment, where a module's datum is the address to increment) and
// the event monitor (event table read). Combinational.
// The five sources follow the processor description; the select encoding is
// this design's.
module address_mux
  import spcc_pkg::*;
(
  input  amux_sel_e         sel,
  input  logic [ADDR_W-1:0] pc,
  input  logic [ADDR_W-1:0] ca0,
  input  logic [ADDR_W-1:0] ca1,
  input  logic [DW_W-1:0]   dw_r,
  input  logic [ADDR_W-1:0] evt_addr,
  output logic [ADDR_W-1:0] addr
);
  always_comb begin
    unique case (sel)
      AM_PC:   addr = pc;
      AM_CA0:  addr = ca0;
      AM_CA1:  addr = ca1;
      AM_DW:   addr = dw_r[ADDR_W-1:0];
      AM_EVT:  addr = evt_addr;
      default: addr = '0;
    endcase
  end
endmodule
