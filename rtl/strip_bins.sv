// strip_bins: maps a station's strips onto the trigger's common bin grid.
//
// Strip i goes to bin floor(i * NOUT / NIN); a bin is set when any of its
// strips is.  With this mapping stations of different strip counts share one
// projective grid on which the station coincidence is made.  Combinational.
// The grid is this design's own simplification of the chamber geometry.
module strip_bins #(
  parameter int unsigned NIN  = 96,
  parameter int unsigned NOUT = 48
) (
  input  logic [NIN-1:0]  strips,
  output logic [NOUT-1:0] grid
);
  always_comb begin
    grid = '0;
    for (int i = 0; i < NIN; i++)
      grid[(i * NOUT) / NIN] |= strips[i];
  end
endmodule
