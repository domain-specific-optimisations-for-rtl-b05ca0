// tb_image_filter: three random frames per instance, one in each mode
// (box, Gaussian, Sobel), through a 3x3 filter and through a 5x5 filter
// with 2x input downsampling. The testbench filters its own copy of the
// image (box mean, binomial Gaussian 1-2-1 / 1-4-6-4-1, Sobel magnitude and
// angle with real arithmetic) and checks every output pixel, the output
// count, the latency of the 3x3 instance and that every mode was run.
module tb_image_filter;
  import dso_pkg::*;
  localparam int W = 16, H = 10;
  logic clk = 0, rst_n = 0;
  filt_mode_t mode = FILT_BOX;
  logic in_valid = 0, in_sof = 0, in_sol = 0;
  logic [7:0] in_pix = 0;
  logic v3, sof3, sol3, v5, sof5, sol5;
  logic [7:0] p3, a3, p5, a5;
  int checks = 0, failures = 0;
  int n_mode [3];

  image_filter #(.W(W), .K(3)) dut3 (.clk, .rst_n, .mode, .in_valid, .in_sof, .in_sol, .in_pix,
    .out_valid(v3), .out_sof(sof3), .out_sol(sol3), .out_pix(p3), .out_ang(a3));
  image_filter #(.W(W), .K(5), .DOWNSAMPLE(1)) dut5 (.clk, .rst_n, .mode, .in_valid, .in_sof, .in_sol, .in_pix,
    .out_valid(v5), .out_sof(sof5), .out_sol(sol5), .out_pix(p5), .out_ang(a5));
  always #5 clk = ~clk;

  int img [H][W];
  int dsi [H/2][W/2];
  filt_mode_t fmode;

  function automatic void expect_px(int k, bit ds, int cx, int cy, output int ep, output int ea, output bit ang_ok);
    int s3 [3] = '{1, 2, 1};
    int s5 [5] = '{1, 4, 6, 4, 1};
    int d3 [3] = '{1, 0, -1};
    int d5 [5] = '{1, 2, 0, -2, -1};
    int r = k / 2, sum = 0, gsum = 0, gx = 0, gy = 0;
    real m, a;
    for (int i = 0; i < k; i++)
      for (int j = 0; j < k; j++) begin
        int p, si, sj, di, dj;
        p  = ds ? dsi[cy - r + i][cx - r + j] : img[cy - r + i][cx - r + j];
        si = (k == 3) ? s3[i] : s5[i];  sj = (k == 3) ? s3[j] : s5[j];
        di = (k == 3) ? d3[i] : d5[i];  dj = (k == 3) ? d3[j] : d5[j];
        sum += p; gsum += p * si * sj; gx += p * si * dj; gy += p * di * sj;
      end
    ang_ok = 0; ea = 0;
    case (fmode)
      FILT_BOX:   ep = int'($floor(real'(sum) / (k * k) + 0.5));
      FILT_GAUSS: ep = (gsum + (1 << (2 * (k - 1) - 1))) >> (2 * (k - 1));
      default: begin
        m = $sqrt(real'(gx * gx + gy * gy));
        ep = (m > 255.0) ? 255 : int'(m);
        a = $atan2(real'(gy), real'(gx)) / (2.0 * 3.14159265358979) * 256.0;
        if (a < 0) a += 256.0;
        ea = int'(a) % 256;
        ang_ok = (m > 8);
      end
    endcase
  endfunction

  int ox3, oy3, n3, ox5, oy5, n5, t_in_last, t_out_last, cyc;
  always @(posedge clk) begin
    cyc++;
    if (rst_n) begin
      if (v3) begin
        int ep, ea; bit ak;
        if (sof3) begin ox3 = 0; oy3 = 0; end else if (sol3) begin ox3 = 0; oy3++; end else ox3++;
        expect_px(3, 0, ox3 + 1, oy3 + 1, ep, ea, ak);
        checks++;
        if (p3 > ep + 1 || p3 + 1 < ep || (fmode != FILT_SOBEL && p3 != ep)) begin
          failures++; $display("FAIL K3 mode %0d (%0d,%0d) %0d exp %0d", fmode, ox3, oy3, p3, ep);
        end
        if (ak) begin
          int da;
          da = (int'(a3) - ea + 256) % 256;
          checks++;
          if (!(da <= 1 || da >= 255)) begin failures++; $display("FAIL K3 ang %0d exp %0d", a3, ea); end
        end
        n3++;
        t_out_last = cyc;
      end
      if (v5) begin
        int ep, ea; bit ak;
        if (sof5) begin ox5 = 0; oy5 = 0; end else if (sol5) begin ox5 = 0; oy5++; end else ox5++;
        expect_px(5, 1, ox5 + 2, oy5 + 2, ep, ea, ak);
        checks++;
        if (p5 > ep + 1 || p5 + 1 < ep) begin
          failures++; $display("FAIL K5 mode %0d (%0d,%0d) %0d exp %0d", fmode, ox5, oy5, p5, ep);
        end
        n5++;
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int f = 0; f < 3; f++) begin
      fmode = filt_mode_t'(f);
      for (int y = 0; y < H; y++) for (int x = 0; x < W; x++) img[y][x] = $urandom_range(0, 255);
      for (int y = 0; y < H / 2; y++)
        for (int x = 0; x < W / 2; x++)
          dsi[y][x] = (img[2*y][2*x] + img[2*y][2*x+1] + img[2*y+1][2*x] + img[2*y+1][2*x+1] + 2) / 4;
      n3 = 0; n5 = 0;
      for (int y = 0; y < H; y++)
        for (int x = 0; x < W; x++) begin
          @(negedge clk);
          in_valid = 1; in_sof = (x == 0 && y == 0); in_sol = (x == 0); in_pix = 8'(img[y][x]);
          mode = (x == 0 && y == 0) ? fmode : filt_mode_t'($urandom_range(0, 2));  // ignored mid-frame
          if (x == W - 1 && y == H - 1) t_in_last = cyc + 1;
        end
      @(negedge clk); in_valid = 0; in_sof = 0; in_sol = 0;
      repeat (30) @(negedge clk);
      checks += 3;
      if (n3 != (W - 2) * (H - 2)) begin failures++; $display("FAIL n3 %0d", n3); end
      if (n5 != (W / 2 - 4) * (H / 2 - 4)) begin failures++; $display("FAIL n5 %0d", n5); end
      // last output: window register, convolution register, CORDIC (ITER + 2)
      if (t_out_last - t_in_last != 12 + 4) begin failures++; $display("FAIL latency %0d", t_out_last - t_in_last); end
      n_mode[f] += n3;
    end
    checks++;
    if (n_mode[0] == 0 || n_mode[1] == 0 || n_mode[2] == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
