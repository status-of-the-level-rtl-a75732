// slr_pipe: pipeline registers on a Super Logic Region (SLR) crossing.
//
// Signals that leave one die of the multi-die FPGA for another go through
// STAGES flip-flop stages, one per SLR boundary crossed, so the long
// inter-die route is never in a path together with logic.  STAGES = 0 is a
// plain wire.  Latency is STAGES cycles.  The rule of one register per
// crossing follows the system description; the registers have no reset
// (the data carry their own valid bits, which are reset upstream).
module slr_pipe #(
  parameter int unsigned WIDTH  = 28,
  parameter int unsigned STAGES = 1
) (
  input  logic             clk,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);
  if (STAGES == 0) begin : g_wire
    assign q = d;
  end else begin : g_regs
    logic [WIDTH-1:0] r [STAGES];
    always_ff @(posedge clk) begin
      r[0] <= d;
      for (int i = 1; i < STAGES; i++) r[i] <= r[i-1];
    end
    assign q = r[STAGES-1];
  end
endmodule
