// gradient_store: frame memory holding the gradient magnitude and angle of
// every pixel of one octave, so that descriptor generation can revisit the
// 16x16 window around each keypoint after detection.
//
// One write port (from the streaming gradient unit) and one read port with a
// registered output. Word = {magnitude, angle}. Addresses are y * W + x.
// Timing: read data appears the cycle after rd_en.
// The document keeps its frame data in external memory and leaves its
// layout open; this single-array form is this design's choice.
module gradient_store
  import dso_pkg::*;
#(
  parameter int W = 960,
  parameter int H = 540
) (
  input  logic                          clk,
  input  logic                          wr_en,
  input  logic [$clog2(W*H)-1:0]        wr_addr,
  input  logic [MAG_W+ANG_W-1:0]        wr_data,
  input  logic                          rd_en,
  input  logic [$clog2(W*H)-1:0]        rd_addr,
  output logic [MAG_W+ANG_W-1:0]        rd_data
);
  logic [MAG_W+ANG_W-1:0] mem [W*H];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= wr_data;
    if (rd_en) rd_data <= mem[rd_addr];
  end
endmodule
