// downsample2x: halves an image in both directions by bilinear interpolation.
//
// At a factor of exactly two, bilinear interpolation samples midway between
// four input pixels, so each output pixel is the rounded mean of one 2x2
// block: (a + b + c + d + 2) >> 2. On even rows the module stores the sum of
// each horizontal pixel pair in a half-width row memory; on odd rows it adds
// the stored sum to the current pair and emits the result. An odd last row or
// column is dropped.
//
// Interface: raster stream in (valid/sof/sol/pix), stream out with the same
// framing, one output per four inputs, no back-pressure.
// Timing: an output appears one cycle after the pixel that completes its block.
// The document asks for downsampling by bilinear interpolation and for halving
// the image between octaves; the pair-sum arrangement is this design's own.
module downsample2x #(
  parameter int W  = 1920,
  parameter int DW = 8
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  input  logic          in_sof,
  input  logic          in_sol,
  input  logic [DW-1:0] in_pix,
  output logic          out_valid,
  output logic          out_sof,
  output logic          out_sol,
  output logic [DW-1:0] out_pix
);
  localparam int CW = $clog2(W + 1);
  localparam int HW = (W + 1) / 2;

  logic [DW:0]   pair_sum [HW];
  logic [CW-1:0] col_q, row_q, col_c, row_c;
  logic [DW-1:0] prev_q;
  logic [DW:0]   pair_c;
  logic [DW+1:0] quad_c;

  always_comb begin
    col_c  = in_sof || in_sol ? '0 : col_q + 1'b1;
    row_c  = in_sof ? '0 : (in_sol ? row_q + 1'b1 : row_q);
    pair_c = {1'b0, prev_q} + {1'b0, in_pix};
    quad_c = {1'b0, pair_c} + {1'b0, pair_sum[col_c[CW-1:1]]} + (DW+2)'(2);
  end

  always_ff @(posedge clk) begin
    if (in_valid && col_c[0] && !row_c[0]) pair_sum[col_c[CW-1:1]] <= pair_c;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      col_q     <= '0;
      row_q     <= '0;
      prev_q    <= '0;
      out_valid <= 1'b0;
      out_sof   <= 1'b0;
      out_sol   <= 1'b0;
      out_pix   <= '0;
    end else begin
      out_valid <= 1'b0;
      out_sof   <= 1'b0;
      out_sol   <= 1'b0;
      if (in_valid) begin
        col_q  <= col_c;
        row_q  <= row_c;
        prev_q <= in_pix;
        if (col_c[0] && row_c[0]) begin
          out_valid <= 1'b1;
          out_pix   <= quad_c[DW+1:2];
          out_sol   <= (col_c == CW'(1));
          out_sof   <= (col_c == CW'(1)) && (row_c == CW'(1));
        end
      end
    end
  end
endmodule
