// gradient_unit: per-pixel gradient magnitude and orientation of a Gaussian
// image.
//
// A 3x3 line buffer gives the neighbours of each pixel; the central
// differences Lx = L(x+1,y) - L(x-1,y) and Ly = L(x,y+1) - L(x,y-1) are
// registered and passed to a vectoring CORDIC, which returns
// m = sqrt(Lx^2 + Ly^2) and theta = atan2(Ly, Lx). y grows downwards (raster
// order), so theta is measured from +x towards the next row.
//
// Interface: raster stream of 8-bit pixels in; stream of (magnitude 9 bits,
// angle 8 bits, 256 units per turn) out, cropped by one pixel at every
// border and framed with sof/sol.
// Timing: one pixel per cycle; output ITER + 4 cycles after the pixel that
// completes the 3x3 neighbourhood.
// The central differences and the CORDIC evaluation follow the document; the
// word widths are this design's.
module gradient_unit
  import dso_pkg::*;
#(
  parameter int W    = 1920,
  parameter int ITER = 12
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               in_valid,
  input  logic               in_sof,
  input  logic               in_sol,
  input  logic [PIX_W-1:0]   in_pix,
  output logic               out_valid,
  output logic               out_sof,
  output logic               out_sol,
  output logic [MAG_W-1:0]   out_mag,
  output logic [ANG_W-1:0]   out_ang
);
  localparam int DW  = PIX_W + 1;  // signed difference
  localparam int LAT = ITER + 2;   // CORDIC latency

  logic                             w_valid, w_sof, w_sol;
  logic [2:0][2:0][PIX_W-1:0]       win;
  logic                             d_valid, d_sof, d_sol;
  logic signed [DW-1:0]             lx, ly;
  logic [LAT-1:0]                   sof_pipe, sol_pipe;
  logic [DW:0]                      mag;

  line_buffer #(.K(3), .W(W), .DW(PIX_W)) u_lb (
    .clk, .rst_n, .in_valid, .in_sof, .in_sol, .in_pix,
    .win_valid(w_valid), .win_sof(w_sof), .win_sol(w_sol), .win(win)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      d_valid <= 1'b0; d_sof <= 1'b0; d_sol <= 1'b0; lx <= '0; ly <= '0;
    end else begin
      d_valid <= w_valid; d_sof <= w_sof; d_sol <= w_sol;
      lx <= $signed({1'b0, win[1][2]}) - $signed({1'b0, win[1][0]});
      ly <= $signed({1'b0, win[2][1]}) - $signed({1'b0, win[0][1]});
    end
  end

  cordic_vector #(.IW(DW), .ITER(ITER)) u_cordic (
    .clk, .rst_n, .in_valid(d_valid), .in_x(lx), .in_y(ly),
    .out_valid(out_valid), .out_mag(mag), .out_ang(out_ang)
  );
  assign out_mag = mag[MAG_W-1:0];   // |(Lx,Ly)| <= 361 fits in 9 bits

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      sof_pipe <= '0; sol_pipe <= '0;
    end else begin
      sof_pipe <= {sof_pipe[LAT-2:0], d_sof};
      sol_pipe <= {sol_pipe[LAT-2:0], d_sol};
    end
  end
  assign out_sof = sof_pipe[LAT-1];
  assign out_sol = sol_pipe[LAT-1];
endmodule
