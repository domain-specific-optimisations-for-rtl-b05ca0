// extrema_detector: keypoint test on a 3x3x3 DoG neighbourhood.
//
// The centre of the middle window is an extremum when it is greater than or
// equal to (or smaller than or equal to) all 26 neighbours: the other 8
// pixels of its own scale and the 9 pixels of the scales below and above.
// Ties are allowed as in common software SIFT; with integer DoG values and
// small kernels, strict comparison would reject almost every candidate.
// A flat neighbourhood is both, but fails the contrast test. A candidate is kept
// when it also has enough contrast, |D| > CONTRAST_TH, and does not lie on an
// edge. The edge test uses the 2x2 Hessian of the middle window,
//   Dxx = D(x+1)+D(x-1)-2D, Dyy likewise, 4*Dxy = D(+,+)-D(+,-)-D(-,+)+D(-,-),
// and keeps the point when det > 0 and tr^2 * r < (r+1)^2 * det, r = EDGE_R
// (scaled by 16 to stay in integers).
//
// Interface: three 3x3 windows of signed DoG values, [row][col]; outputs are
// combinational (the user registers them).
// The 26-neighbour comparison and the removal of low-contrast and edge points
// follow the document; the two thresholds and the Hessian form of the edge
// test are this design's choices.
module extrema_detector
  import dso_pkg::*;
#(
  parameter int CONTRAST_TH = 3,
  parameter int EDGE_R      = 10
) (
  input  logic [2:0][2:0][DOG_W-1:0] below,
  input  logic [2:0][2:0][DOG_W-1:0] centre,
  input  logic [2:0][2:0][DOG_W-1:0] above,
  output logic                       is_max,
  output logic                       is_min,
  output logic                       keep
);
  logic signed [DOG_W-1:0] v;
  logic signed [DOG_W+2:0] dxx, dyy, dxy4, tr;
  localparam int PW = 40;
  logic signed [PW-1:0] det16, lhs, rhs;

  function automatic logic signed [DOG_W-1:0] at(logic [2:0][2:0][DOG_W-1:0] w, int r, int c);
    return $signed(w[r][c]);
  endfunction

  always_comb begin
    v      = $signed(centre[1][1]);
    is_max = 1'b1;
    is_min = 1'b1;
    for (int r = 0; r < 3; r++) begin
      for (int c = 0; c < 3; c++) begin
        if (at(below, r, c) > v) is_max = 1'b0;
        if (at(above, r, c) > v) is_max = 1'b0;
        if (at(below, r, c) < v) is_min = 1'b0;
        if (at(above, r, c) < v) is_min = 1'b0;
        if (at(centre, r, c) > v) is_max = 1'b0;
        if (at(centre, r, c) < v) is_min = 1'b0;
      end
    end
    dxx  = (DOG_W+3)'(at(centre, 1, 2)) + (DOG_W+3)'(at(centre, 1, 0)) - ((DOG_W+3)'(v) <<< 1);
    dyy  = (DOG_W+3)'(at(centre, 2, 1)) + (DOG_W+3)'(at(centre, 0, 1)) - ((DOG_W+3)'(v) <<< 1);
    dxy4 = (DOG_W+3)'(at(centre, 2, 2)) - (DOG_W+3)'(at(centre, 0, 2))
         - (DOG_W+3)'(at(centre, 2, 0)) + (DOG_W+3)'(at(centre, 0, 0));
    tr    = dxx + dyy;
    det16 = 16 * PW'(dxx) * PW'(dyy) - PW'(dxy4) * PW'(dxy4);
    lhs   = PW'(tr) * PW'(tr) * PW'(16 * EDGE_R);
    rhs   = det16 * PW'((EDGE_R + 1) * (EDGE_R + 1));
    keep  = (is_max || is_min)
         && ((v > 0 ? v : -v) > (DOG_W)'(CONTRAST_TH))
         && (det16 > 0) && (lhs < rhs);
  end
endmodule
