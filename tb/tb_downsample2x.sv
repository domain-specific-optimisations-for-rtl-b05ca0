// tb_downsample2x: random 10x7 frames (odd height, so one row is dropped),
// pixels sent back to back and with gaps; every output is compared with the
// rounded mean of its 2x2 block, plus framing flags and output count.
module tb_downsample2x;
  localparam int W = 10, H = 7, DW = 8;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_sof = 0, in_sol = 0;
  logic [DW-1:0] in_pix = 0;
  logic out_valid, out_sof, out_sol;
  logic [DW-1:0] out_pix;
  int checks = 0, failures = 0;
  logic [DW-1:0] img [H][W];
  int ox, oy, nout;

  downsample2x #(.W(W), .DW(DW)) dut (.*);
  always #5 clk = ~clk;

  always @(posedge clk) if (rst_n && out_valid) begin
    int e;
    if (out_sof) begin ox = 0; oy = 0; end
    else if (out_sol) begin ox = 0; oy++; end
    else ox++;
    e = (img[2*oy][2*ox] + img[2*oy][2*ox+1] + img[2*oy+1][2*ox] + img[2*oy+1][2*ox+1] + 2) / 4;
    checks++;
    if (out_pix !== DW'(e)) begin
      failures++; $display("FAIL (%0d,%0d) got %0d exp %0d", ox, oy, out_pix, e);
    end
    nout++;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int f = 0; f < 3; f++) begin
      for (int y = 0; y < H; y++) for (int x = 0; x < W; x++) img[y][x] = DW'($urandom);
      nout = 0;
      for (int y = 0; y < H; y++)
        for (int x = 0; x < W; x++) begin
          @(negedge clk);
          in_valid = 1; in_sof = (x == 0 && y == 0); in_sol = (x == 0); in_pix = img[y][x];
          if (f == 1) begin @(negedge clk); in_valid = 0; in_sof = 0; in_sol = 0; end
        end
      @(negedge clk); in_valid = 0; in_sof = 0; in_sol = 0;
      @(negedge clk);
      checks++;
      if (nout != (W / 2) * (H / 2)) begin failures++; $display("FAIL count %0d", nout); end
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
