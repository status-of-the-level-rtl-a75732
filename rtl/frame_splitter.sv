// frame_splitter: cuts the lpGBT uplink user frame into DCT frames.
//
// After the lpGBT-FPGA uplink decoder, each DCT link delivers one 224-bit user
// frame per bunch crossing (8.96 Gb/s user bandwidth at 40 MHz).  The DCT packs
// eight 28-bit frames into it; this block shifts them out one per 320 MHz
// clock, the frame in bits [27:0] first, so one frame leaves per cycle and a
// whole user frame in eight cycles.  in_valid loads the frame (one cycle per
// BC); out_frame follows one cycle later.  If a new frame is loaded before the
// previous one is out, the rest of the previous one is dropped.  The bit order
// inside the user frame is this design's choice; the frame widths follow the
// system description.
module frame_splitter
  import sl_pkg::*;
#(
  parameter int unsigned IN_W  = UPLINK_USER_W,
  parameter int unsigned OUT_W = DCT_FRAME_W
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             in_valid,
  input  logic [IN_W-1:0]  in_data,
  output logic             out_valid,
  output logic [OUT_W-1:0] out_frame
);
  localparam int unsigned N = IN_W / OUT_W;

  logic [IN_W-1:0]        sreg;
  logic [$clog2(N+1)-1:0] left;

  assign out_valid = (left != '0);
  assign out_frame = out_valid ? sreg[OUT_W-1:0] : '0;

  always_ff @(posedge clk) begin
    if (rst) begin
      sreg <= '0;
      left <= '0;
    end else if (in_valid) begin
      sreg <= in_data;
      left <= ($clog2(N+1))'(N);
    end else if (out_valid) begin
      sreg <= sreg >> OUT_W;
      left <= left - 1'b1;
    end
  end
endmodule
