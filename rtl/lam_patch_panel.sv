// lam_patch_panel: routes the Look-At-Me lines of the two crates.
// Each of the NEV event inputs of the channel is the OR of its front-panel
// (coaxial) input and the one LAM patched to it; every LAM whose bit is set
// in PI_MASK goes to the program interrupt instead. The patching is set by
// parameters, as the panel is wired, not programmed: EVENT_LAM[i] is the LAM
// number (crate*24 + station-1) patched to event i, or -1 for none.
// The panel and its two destinations follow the processor description; one
// LAM per event and the numbering are this design's choices.
// Combinational.
module lam_patch_panel
  import spcc_pkg::*;
#(
  parameter int          NLAM = 2 * NSTA,
  parameter int          EVENT_LAM [NEV] = '{0, 1, 2, 3},
  parameter logic [NLAM-1:0] PI_MASK = NLAM'(48'h0000_00F0)
) (
  input  logic [NLAM-1:0] lam,
  input  logic [NEV-1:0]  ext_event,
  output logic [NEV-1:0]  event_req,
  output logic            lam_pi
);
  always_comb begin
    for (int i = 0; i < NEV; i++) begin
      event_req[i] = ext_event[i];
      if (EVENT_LAM[i] >= 0 && EVENT_LAM[i] < NLAM)
        event_req[i] = event_req[i] | lam[EVENT_LAM[i]];
    end
    lam_pi = 1'b0;
    for (int j = 0; j < NLAM; j++)
      lam_pi = lam_pi | (lam[j] & PI_MASK[j]);
  end
endmodule
