// tb_line_buffer: drives two random 9x6 frames through a 3x3 line buffer and
// compares every window, its framing flags and the window count with the
// image held in the testbench. A watchdog ends the run after 5000 cycles.
module tb_line_buffer;
  localparam int K = 3, W = 9, H = 6, DW = 8;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_sof = 0, in_sol = 0;
  logic [DW-1:0] in_pix = 0;
  logic win_valid, win_sof, win_sol;
  logic [K-1:0][K-1:0][DW-1:0] win;
  int checks = 0, failures = 0;
  logic [DW-1:0] img [H][W];
  int ox, oy, nwin;

  line_buffer #(.K(K), .W(W), .DW(DW)) dut (.*);
  always #5 clk = ~clk;

  // checker: windows arrive in raster order of their centres
  always @(posedge clk) if (rst_n && win_valid) begin
    if (win_sof) begin ox = 0; oy = 0; end
    else if (win_sol) begin ox = 0; oy++; end
    else ox++;
    for (int r = 0; r < K; r++)
      for (int c = 0; c < K; c++) begin
        checks++;
        if (win[r][c] !== img[oy + r][ox + c]) begin
          failures++;
          $display("FAIL win (%0d,%0d)[%0d][%0d]=%0d exp %0d", ox, oy, r, c, win[r][c], img[oy+r][ox+c]);
        end
      end
    checks++;
    if (win_sol != (ox == 0)) failures++;
    nwin++;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int f = 0; f < 2; f++) begin
      for (int y = 0; y < H; y++) for (int x = 0; x < W; x++) img[y][x] = DW'($urandom);
      nwin = 0;
      for (int y = 0; y < H; y++)
        for (int x = 0; x < W; x++) begin
          @(negedge clk);
          in_valid = 1; in_sof = (x == 0 && y == 0); in_sol = (x == 0); in_pix = img[y][x];
          @(negedge clk);
          in_valid = ($urandom % 3 == 0) ? 0 : 0;   // one idle cycle between pixels
          in_sof = 0; in_sol = 0;
        end
      @(negedge clk); @(negedge clk);
      checks++;
      if (nwin != (W - K + 1) * (H - K + 1)) begin
        failures++; $display("FAIL count %0d", nwin);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
