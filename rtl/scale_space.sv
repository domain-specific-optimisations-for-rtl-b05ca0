// scale_space: one octave of the Gaussian pyramid and its difference of
// Gaussians (DoG).
//
// One line buffer presents a KxK window of the octave image; SCALES integer
// Gaussian convolutions run on that same window in parallel, one per scale,
// and SCALES-1 subtractors form DoG_s = L_{s+1} - L_s. Each convolution uses
// the separable 2-D weights g_s[i]*g_s[j] from dso_pkg::gauss_tap (sum 65536);
// the product sum is rounded and shifted right by 16, giving 8-bit L values,
// and DoG values are 9-bit signed.
//
// Interface: raster pixel stream in, stream out framed like the line buffer's
// (image cropped by K/2 at every border). gauss[s] and dog[s] belong to the
// same pixel.
// Timing: outputs three cycles after the pixel that completes the window
// (line buffer, convolution register, DoG register); one pixel per cycle.
// The parallel blur of all scales from one line buffer and the DoG definition
// follow the document; the sigma schedule and tap quantisation are this
// design's choices (see dso_pkg). Tables exist for K = 3, 5 and SCALES = 4, 5.
module scale_space
  import dso_pkg::*;
#(
  parameter int K      = 3,
  parameter int SCALES = 4,
  parameter int W      = 1920
) (
  input  logic                                 clk,
  input  logic                                 rst_n,
  input  logic                                 in_valid,
  input  logic                                 in_sof,
  input  logic                                 in_sol,
  input  logic [PIX_W-1:0]                     in_pix,
  output logic                                 out_valid,
  output logic                                 out_sof,
  output logic                                 out_sol,
  output logic [SCALES-1:0][PIX_W-1:0]         gauss,
  output logic [SCALES-2:0][DOG_W-1:0]         dog
);
  localparam int SUM_W = PIX_W + 17;

  logic                          w_valid, w_sof, w_sol;
  logic [K-1:0][K-1:0][PIX_W-1:0] win;

  line_buffer #(.K(K), .W(W), .DW(PIX_W)) u_lb (
    .clk, .rst_n, .in_valid, .in_sof, .in_sol, .in_pix,
    .win_valid(w_valid), .win_sof(w_sof), .win_sol(w_sol), .win(win)
  );

  // stage 1: parallel Gaussian convolutions
  logic [SCALES-1:0][PIX_W-1:0] g_q;
  logic                         v1, sof1, sol1;
  logic [SCALES-1:0][PIX_W-1:0] g_c;

  always_comb begin
    for (int s = 0; s < SCALES; s++) begin
      logic [SUM_W-1:0] acc;
      acc = SUM_W'(32768);   // rounding
      for (int r = 0; r < K; r++)
        for (int c = 0; c < K; c++)
          acc += SUM_W'(win[r][c]) * SUM_W'(gauss_tap(K, SCALES, s, r) * gauss_tap(K, SCALES, s, c));
      g_c[s] = acc[16 +: PIX_W];
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      v1 <= 1'b0; sof1 <= 1'b0; sol1 <= 1'b0; g_q <= '0;
    end else begin
      v1 <= w_valid; sof1 <= w_sof; sol1 <= w_sol;
      if (w_valid) g_q <= g_c;
    end
  end

  // stage 2: differences of adjacent scales
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0; out_sof <= 1'b0; out_sol <= 1'b0;
      gauss <= '0; dog <= '0;
    end else begin
      out_valid <= v1; out_sof <= sof1; out_sol <= sol1;
      if (v1) begin
        gauss <= g_q;
        for (int s = 0; s < SCALES - 1; s++)
          dog[s] <= DOG_W'({1'b0, g_q[s+1]}) - DOG_W'({1'b0, g_q[s]});
      end
    end
  end
endmodule
