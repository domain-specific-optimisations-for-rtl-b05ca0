// cordic_vector: pipelined CORDIC in vectoring mode.
//
// Rotates the input vector (x, y) onto the positive x axis by ITER
// shift-and-add micro-rotations, accumulating the rotation angle. A vector
// in the left half-plane is first turned by half a turn. The final x is the
// magnitude times the CORDIC gain (about 1.6468); it is corrected by
// multiplying with round(65536 * prod cos(atan 2^-i)) and shifting by 16.
// The datapath carries FB = 4 fractional bits to limit truncation error.
//
// Interface: signed IW-bit x and y in; out_mag (IW+1 bits, unsigned) and
// out_ang (8 bits, 256 units per turn, counter-clockwise from +x, rounded
// from a 16-bit internal angle).
// Timing: fully pipelined, one vector per cycle, latency ITER + 2 cycles.
// The document computes gradient magnitude and orientation with a vectoring
// CORDIC; the pipeline depth, word widths and angle unit are this design's.
module cordic_vector
  import dso_pkg::*;
#(
  parameter int IW   = 12,
  parameter int ITER = 12
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic signed [IW-1:0] in_x,
  input  logic signed [IW-1:0] in_y,
  output logic                 out_valid,
  output logic [IW:0]          out_mag,
  output logic [ANG_W-1:0]     out_ang
);
  localparam int FB = 4;           // fractional bits kept inside
  localparam int XW = IW + 3 + FB; // headroom for the gain
  localparam longint GAIN_INV = 39797;

  logic signed [XW-1:0] xs [ITER+1];
  logic signed [XW-1:0] ys [ITER+1];
  logic        [15:0]   zs [ITER+1];
  logic                 vs [ITER+1];

  // stage 0: move the vector into the right half-plane
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      vs[0] <= 1'b0; xs[0] <= '0; ys[0] <= '0; zs[0] <= '0;
    end else begin
      vs[0] <= in_valid;
      if (in_x < 0) begin
        xs[0] <= -(XW'(in_x) <<< FB);
        ys[0] <= -(XW'(in_y) <<< FB);
        zs[0] <= 16'h8000;
      end else begin
        xs[0] <= XW'(in_x) <<< FB;
        ys[0] <= XW'(in_y) <<< FB;
        zs[0] <= 16'h0000;
      end
    end
  end

  for (genvar i = 0; i < ITER; i++) begin : g_stage
    always_ff @(posedge clk) begin
      if (!rst_n) begin
        vs[i+1] <= 1'b0; xs[i+1] <= '0; ys[i+1] <= '0; zs[i+1] <= '0;
      end else begin
        vs[i+1] <= vs[i];
        if (ys[i] >= 0) begin
          xs[i+1] <= xs[i] + (ys[i] >>> i);
          ys[i+1] <= ys[i] - (xs[i] >>> i);
          zs[i+1] <= zs[i] + 16'(cordic_atan(i));
        end else begin
          xs[i+1] <= xs[i] - (ys[i] >>> i);
          ys[i+1] <= ys[i] + (xs[i] >>> i);
          zs[i+1] <= zs[i] - 16'(cordic_atan(i));
        end
      end
    end
  end

  // output: gain correction and angle rounding
  logic [XW+16:0] prod;
  assign prod = (XW+17)'(xs[ITER]) * (XW+17)'(GAIN_INV) + ((XW+17)'(1) << (15 + FB));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0; out_mag <= '0; out_ang <= '0;
    end else begin
      out_valid <= vs[ITER];
      out_mag   <= prod[16 + FB +: IW+1];
      out_ang   <= ANG_W'((zs[ITER] + 16'h0080) >> 8);
    end
  end
endmodule
