// bi_phi_timing: phi coordinate of BI hits from eta-strip timing.
//
// The BI triplet chambers have only eta strips, read out at both ends (A, B).
// The difference of the two arrival times is proportional to where along the
// strip the muon crossed it, i.e. to its phi position.  For every strip hit
// at both ends in the BC, dt = tA - tB (fine-time units of 25 ns / 256) is
// clamped to [-DT_RANGE, DT_RANGE-1] and mapped linearly onto NPHI phi bins:
//     bin = ((dt + DT_RANGE) * NPHI) / (2 * DT_RANGE)
// and that bin is set in phi_bins.  A strip is an eta hit when either end
// fired.  Combinational; one instance serves one layer.
// Deriving phi from the eta timing follows the system description; the
// linear map, DT_RANGE (the time difference at a chamber edge) and the
// requirement of both ends in the same BC are this design's choices.
module bi_phi_timing #(
  parameter int unsigned NSTRIP   = 48,
  parameter int unsigned NPHI     = 48,
  parameter int unsigned DT_RANGE = 64
) (
  input  logic [NSTRIP-1:0]      hit_a,
  input  logic [NSTRIP-1:0]      hit_b,
  input  logic [NSTRIP-1:0][7:0] time_a,
  input  logic [NSTRIP-1:0][7:0] time_b,
  output logic [NSTRIP-1:0]      eta_hits,
  output logic [NPHI-1:0]        phi_bins
);
  assign eta_hits = hit_a | hit_b;

  always_comb begin
    phi_bins = '0;
    for (int s = 0; s < NSTRIP; s++) begin
      int dt, bin;
      dt = int'(time_a[s]) - int'(time_b[s]);
      if (dt < -int'(DT_RANGE)) dt = -int'(DT_RANGE);
      if (dt > int'(DT_RANGE) - 1) dt = int'(DT_RANGE) - 1;
      bin = ((dt + int'(DT_RANGE)) * int'(NPHI)) / (2 * int'(DT_RANGE));
      if (hit_a[s] && hit_b[s]) phi_bins[bin] = 1'b1;
    end
  end
endmodule
