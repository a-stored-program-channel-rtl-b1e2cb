// station_decode: turns the 5-bit station number N of the command register
// into the individual station (N) lines of the dataway, one per module slot.
// Station n (1..NSTA) drives line n-1; N = 0 and numbers above NSTA select no
// station. Only the decoding itself is given by the processor description;
// leaving the codes 0 and 25-31 unused is this design's choice.
// Purely combinational; 'en' gates all lines (used by the crate select).
module station_decode #(
  parameter int NSTA = 24
) (
  input  logic            en,
  input  logic [4:0]      n,
  output logic [NSTA-1:0] nline
);
  always_comb begin
    nline = '0;
    for (int i = 1; i <= NSTA; i++)
      if (en && n == 5'(i)) nline[i-1] = 1'b1;
  end
endmodule
