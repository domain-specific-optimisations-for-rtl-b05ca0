// line_buffer: K-1 row memories plus a KxK register window.
//
// Pixels arrive in raster order, one per valid cycle, framed by sof (first
// pixel of the frame) and sol (first pixel of each row). The module keeps the
// previous K-1 rows in row memories addressed by the column counter and shifts
// a column of K pixels (K-1 from the memories, one from the input) into a KxK
// window register. A window is flagged valid only when it lies completely
// inside the image, so a stage built on it produces an image cropped by K/2
// pixels at every border; win_sof/win_sol frame that cropped output stream.
//
// Interface: win[r][c] with r = 0 the oldest (top) row and c = 0 the oldest
// (left) column; the window centre is win[K/2][K/2].
// Timing: the window appears one cycle after the pixel that completes it.
// The document places such a line buffer at the input of the scale-space
// stage; the framing flags and the cropping are this design's choices.
module line_buffer #(
  parameter int K  = 3,
  parameter int W  = 1920,
  parameter int DW = 8
) (
  input  logic                              clk,
  input  logic                              rst_n,
  input  logic                              in_valid,
  input  logic                              in_sof,
  input  logic                              in_sol,
  input  logic [DW-1:0]                     in_pix,
  output logic                              win_valid,
  output logic                              win_sof,
  output logic                              win_sol,
  output logic [K-1:0][K-1:0][DW-1:0]       win
);
  localparam int CW = $clog2(W + 1);

  logic [K-2:0][DW-1:0] row_rd;   // row_rd[r]: pixel of this column, r+1 rows up
  logic [CW-1:0] col_q, row_q;
  logic [CW-1:0] col_c, row_c;
  logic [K-1:0][DW-1:0] column;   // column[r], r = 0 oldest row

  always_comb begin
    col_c = in_sof || in_sol ? '0 : col_q + 1'b1;
    row_c = in_sof ? '0 : (in_sol ? row_q + 1'b1 : row_q);
    // rows[0] holds the row just above the incoming one, rows[K-2] the oldest
    for (int r = 0; r < K - 1; r++) column[r] = row_rd[K-2-r];
    column[K-1] = in_pix;
  end

  // one memory per stored row; row r receives what row r-1 held
  for (genvar r = 0; r < K - 1; r++) begin : g_row
    logic [DW-1:0] mem [W];
    assign row_rd[r] = mem[col_c];
    always_ff @(posedge clk) begin
      if (in_valid) mem[col_c] <= (r == 0) ? in_pix : row_rd[r == 0 ? 0 : r - 1];
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      col_q     <= '0;
      row_q     <= '0;
      win_valid <= 1'b0;
      win_sof   <= 1'b0;
      win_sol   <= 1'b0;
      win       <= '0;
    end else begin
      win_valid <= 1'b0;
      win_sof   <= 1'b0;
      win_sol   <= 1'b0;
      if (in_valid) begin
        col_q <= col_c;
        row_q <= row_c;
        for (int r = 0; r < K; r++) begin
          for (int c = 0; c < K - 1; c++) win[r][c] <= win[r][c+1];
          win[r][K-1] <= column[r];
        end
        win_valid <= (int'(col_c) >= K - 1) && (int'(row_c) >= K - 1);
        win_sol   <= (int'(col_c) == K - 1) && (int'(row_c) >= K - 1);
        win_sof   <= (int'(col_c) == K - 1) && (int'(row_c) == K - 1);
      end
    end
  end
endmodule
