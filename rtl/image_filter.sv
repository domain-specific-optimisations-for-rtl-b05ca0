// image_filter: streaming KxK box, Gaussian or Sobel filter.
//
// Optionally the input is first halved by the 2x bilinear downsampler
// (DOWNSAMPLE = 1). A line buffer then presents a KxK window per pixel and
// three integer convolutions run on it in parallel:
//   box      sum of the window, times round(65536/K^2), rounded >> 16;
//   Gaussian binomial taps C(K-1,r)*C(K-1,c) (K = 3: 1 2 1 / 2 4 2 / 1 2 1),
//            rounded >> 2(K-1);
//   Sobel    Gx = sum s(r) d(c) p, Gy = sum d(r) s(c) p with smoothing
//            s(i) = C(K-1,i) and derivative d(i) = C(K-2,i) - C(K-2,i-1)
//            (K = 3: s = 1 2 1, d = 1 0 -1); a vectoring CORDIC returns
//            sqrt(Gx^2 + Gy^2), saturated to 255, and atan2(Gy, Gx).
// mode is sampled with the first pixel of a frame and travels with the
// data, so a frame is filtered in one mode throughout.
//
// Interface: raster stream in (valid/sof/sol), stream out cropped by K/2 at
// every border; out_ang is the Sobel gradient angle (256 units per turn).
// Timing: one pixel per cycle; output ITER + 4 cycles after the pixel that
// completes the window.
// The three filters, the Sobel magnitude and angle, integer arithmetic and
// the 3x3 default size follow the document; the normalisations and the
// extension of Gaussian and Sobel taps to other K are this design's choices
// (Gaussian taps are exact up to K = 15).
module image_filter
  import dso_pkg::*;
#(
  parameter int W          = 3840,
  parameter int K          = 3,
  parameter int DOWNSAMPLE = 0,
  parameter int ITER       = 12
) (
  input  logic               clk,
  input  logic               rst_n,
  input  filt_mode_t         mode,
  input  logic               in_valid,
  input  logic               in_sof,
  input  logic               in_sol,
  input  logic [PIX_W-1:0]   in_pix,
  output logic               out_valid,
  output logic               out_sof,
  output logic               out_sol,
  output logic [PIX_W-1:0]   out_pix,
  output logic [ANG_W-1:0]   out_ang
);
  localparam int WI   = W >> DOWNSAMPLE;
  localparam int GW   = 2 * K + 8;                 // signed Sobel sum
  localparam int LAT  = ITER + 2;
  localparam longint RECIP = (65536 + (K * K) / 2) / (K * K);

  // ---------------- optional downsampling ----------------
  logic               f_valid, f_sof, f_sol;
  logic [PIX_W-1:0]   f_pix;
  if (DOWNSAMPLE != 0) begin : g_ds
    downsample2x #(.W(W), .DW(PIX_W)) u_ds (
      .clk, .rst_n, .in_valid, .in_sof, .in_sol, .in_pix,
      .out_valid(f_valid), .out_sof(f_sof), .out_sol(f_sol), .out_pix(f_pix)
    );
  end else begin : g_nods
    assign f_valid = in_valid;
    assign f_sof   = in_sof;
    assign f_sol   = in_sol;
    assign f_pix   = in_pix;
  end

  filt_mode_t mode_q;
  always_ff @(posedge clk) begin
    if (!rst_n) mode_q <= FILT_BOX;
    else if (in_valid && in_sof) mode_q <= mode;
  end
  filt_mode_t mode_in;
  assign mode_in = (in_valid && in_sof) ? mode : mode_q;

  // ---------------- window ----------------
  logic                           w_valid, w_sof, w_sol;
  logic [K-1:0][K-1:0][PIX_W-1:0] win;
  filt_mode_t                     w_mode;

  line_buffer #(.K(K), .W(WI), .DW(PIX_W)) u_lb (
    .clk, .rst_n, .in_valid(f_valid), .in_sof(f_sof), .in_sol(f_sol), .in_pix(f_pix),
    .win_valid(w_valid), .win_sof(w_sof), .win_sol(w_sol), .win(win)
  );
  always_ff @(posedge clk) begin
    if (!rst_n) w_mode <= FILT_BOX;
    else w_mode <= mode_in;
  end

  // ---------------- stage 1: convolutions ----------------
  logic [63:0]           box_c, gau_c;
  logic signed [GW-1:0]  gx_c, gy_c;
  always_comb begin
    box_c = '0;
    gau_c = '0;
    gx_c  = '0;
    gy_c  = '0;
    for (int r = 0; r < K; r++) begin
      for (int c = 0; c < K; c++) begin
        box_c += 64'(win[r][c]);
        gau_c += 64'(win[r][c]) * 64'(binom(K - 1, r) * binom(K - 1, c));
        gx_c  += GW'(signed'({1'b0, win[r][c]})) *
                 GW'(binom(K - 1, r) * (binom(K - 2, c) - binom(K - 2, c - 1)));
        gy_c  += GW'(signed'({1'b0, win[r][c]})) *
                 GW'((binom(K - 2, r) - binom(K - 2, r - 1)) * binom(K - 1, c));
      end
    end
  end

  logic                  v1, sof1, sol1;
  filt_mode_t            mode1;
  logic [PIX_W-1:0]      smooth1;
  logic signed [GW-1:0]  gx1, gy1;
  logic [63:0]           box_n, gau_n;
  always_comb begin
    box_n = (box_c * 64'(RECIP) + 64'd32768) >> 16;
    gau_n = (gau_c + (64'd1 << (2 * (K - 1) - 1))) >> (2 * (K - 1));
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      v1 <= 1'b0; sof1 <= 1'b0; sol1 <= 1'b0; mode1 <= FILT_BOX;
      smooth1 <= '0; gx1 <= '0; gy1 <= '0;
    end else begin
      v1 <= w_valid; sof1 <= w_sof; sol1 <= w_sol; mode1 <= w_mode;
      smooth1 <= (w_mode == FILT_GAUSS) ? PIX_W'(gau_n) : PIX_W'(box_n);
      gx1 <= gx_c;
      gy1 <= gy_c;
    end
  end

  // ---------------- stage 2: Sobel magnitude / angle ----------------
  logic              c_valid;
  logic [GW:0]       c_mag;
  logic [ANG_W-1:0]  c_ang;
  cordic_vector #(.IW(GW), .ITER(ITER)) u_cordic (
    .clk, .rst_n, .in_valid(v1), .in_x(gx1), .in_y(gy1),
    .out_valid(c_valid), .out_mag(c_mag), .out_ang(c_ang)
  );

  // delay the smoothing results and framing by the CORDIC latency
  logic [LAT-1:0][PIX_W-1:0] sm_pipe;
  logic [LAT-1:0][1:0]       md_pipe;
  logic [LAT-1:0]            sof_pipe, sol_pipe;
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      sm_pipe <= '0; md_pipe <= '0; sof_pipe <= '0; sol_pipe <= '0;
    end else begin
      sm_pipe  <= {sm_pipe[LAT-2:0], smooth1};
      md_pipe  <= {md_pipe[LAT-2:0], mode1};
      sof_pipe <= {sof_pipe[LAT-2:0], sof1};
      sol_pipe <= {sol_pipe[LAT-2:0], sol1};
    end
  end

  assign out_valid = c_valid;
  assign out_sof   = sof_pipe[LAT-1];
  assign out_sol   = sol_pipe[LAT-1];
  assign out_ang   = c_ang;
  always_comb begin
    if (md_pipe[LAT-1] == FILT_SOBEL)
      out_pix = (c_mag > (GW+1)'(255)) ? 8'd255 : PIX_W'(c_mag);
    else
      out_pix = sm_pipe[LAT-1];
  end
endmodule
