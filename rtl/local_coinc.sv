// local_coinc: local coincidence between the gas-gap layers of one chamber.
//
// For every strip position the block counts how many of the NL layers have a
// hit and flags the strip when at least MIN layers do: 1 of 2 for the BM/BO
// doublets, 2 of 3 for the BI triplets.  Strips are compared position by
// position (strip i of every layer); no neighbour tolerance.  Purely
// combinational.  The majorities follow the system description; comparing
// only equal strip indices is this design's choice.
module local_coinc #(
  parameter int unsigned NL  = 2,
  parameter int unsigned N   = 96,
  parameter int unsigned MIN = 1
) (
  input  logic [NL-1:0][N-1:0] layers,
  output logic [N-1:0]         hits
);
  always_comb begin
    for (int i = 0; i < N; i++) begin
      int unsigned cnt;
      cnt = 0;
      for (int l = 0; l < NL; l++) cnt += int'(layers[l][i]);
      hits[i] = (cnt >= MIN);
    end
  end
endmodule
