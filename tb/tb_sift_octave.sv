// tb_sift_octave: one 64x56 octave with bright and dark spots on a noisy
// background. The testbench recomputes the whole octave itself (Gaussian
// taps from sigma = 2^(s/3), blur, DoG, 26-neighbour extrema, contrast and
// Hessian edge tests, border rule) and compares the keypoint list popped from
// the FIFO with it, element by element. It then reads back gradient-store
// words and compares them with real sqrt/atan2 of the blurred image.
module tb_sift_octave;
  import dso_pkg::*;
  localparam int W = 64, H = 56, S = 4, TH = 3, R = 10;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_sof = 0, in_sol = 0;
  logic [7:0] in_pix = 0;
  logic kp_pop = 0, kp_empty, kp_overflow;
  keypoint_t kp_head;
  logic [31:0] kp_total;
  logic g_rd_en = 0;
  logic [$clog2(W*H)-1:0] g_rd_addr = 0;
  logic [16:0] g_rd_data;
  int checks = 0, failures = 0;

  sift_octave #(.W(W), .H(H), .K(3), .SCALES(S), .OCT_ID(1), .KP_DEPTH(64),
                .CONTRAST_TH(TH), .EDGE_R(R)) dut (.*);
  always #5 clk = ~clk;

  int img [H][W];
  int L [S][H][W];
  int taps [S][3];
  int ekx [$], eky [$];

  task automatic reference();
    for (int s = 0; s < S; s++) begin
      real sg, w[3], t;
      int sum;
      sg = 2.0 ** (s / 3.0); t = 0;
      for (int i = 0; i < 3; i++) begin w[i] = $exp(-((i - 1) ** 2) / (2.0 * sg * sg)); t += w[i]; end
      sum = 0;
      for (int i = 0; i < 3; i++) begin taps[s][i] = int'(w[i] / t * 256.0); sum += taps[s][i]; end
      taps[s][1] += 256 - sum;
    end
    for (int s = 0; s < S; s++)
      for (int y = 1; y < H - 1; y++)
        for (int x = 1; x < W - 1; x++) begin
          int acc;
          acc = 32768;
          for (int i = 0; i < 3; i++)
            for (int j = 0; j < 3; j++) acc += img[y-1+i][x-1+j] * taps[s][i] * taps[s][j];
          L[s][y][x] = acc >> 16;
        end
    for (int y = 10; y <= H - 10; y++)
      for (int x = 10; x <= W - 10; x++) begin
        int v, dxx, dyy, dxy4, tr, det16;
        bit mx, mn;
        v = L[2][y][x] - L[1][y][x];
        mx = 1; mn = 1;
        for (int l = 0; l < 3; l++)
          for (int i = -1; i <= 1; i++)
            for (int j = -1; j <= 1; j++) begin
              int d;
              d = L[l+1][y+i][x+j] - L[l][y+i][x+j];
              if (!(l == 1 && i == 0 && j == 0)) begin
                if (d > v) mx = 0;
                if (d < v) mn = 0;
              end
            end
        dxx  = (L[2][y][x+1]-L[1][y][x+1]) + (L[2][y][x-1]-L[1][y][x-1]) - 2*v;
        dyy  = (L[2][y+1][x]-L[1][y+1][x]) + (L[2][y-1][x]-L[1][y-1][x]) - 2*v;
        dxy4 = (L[2][y+1][x+1]-L[1][y+1][x+1]) - (L[2][y-1][x+1]-L[1][y-1][x+1])
             - (L[2][y+1][x-1]-L[1][y+1][x-1]) + (L[2][y-1][x-1]-L[1][y-1][x-1]);
        tr = dxx + dyy;
        det16 = 16 * dxx * dyy - dxy4 * dxy4;
        if ((mx || mn) && (v > TH || -v > TH) && det16 > 0 &&
            longint'(tr) * tr * 16 * R < longint'(det16) * (R + 1) * (R + 1)) begin
          ekx.push_back(x); eky.push_back(y);
        end
      end
  endtask

  initial begin
    for (int y = 0; y < H; y++) for (int x = 0; x < W; x++) img[y][x] = $urandom_range(0, 255);
    for (int b = 0; b < 12; b++) begin
      int cx, cy, amp;
      cx = $urandom_range(6, W - 7); cy = $urandom_range(6, H - 7);
      amp = (b % 2) ? 150 : -55;
      for (int i = -2; i <= 2; i++)
        for (int j = -2; j <= 2; j++) begin
          int v;
          v = img[cy+i][cx+j] + amp * (i == 0 && j == 0 ? 4 : (i*i + j*j <= 2 ? 2 : 0)) / 4;
          img[cy+i][cx+j] = v < 0 ? 0 : (v > 255 ? 255 : v);
        end
    end
    reference();
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) begin
        @(negedge clk);
        in_valid = 1; in_sof = (x == 0 && y == 0); in_sol = (x == 0); in_pix = 8'(img[y][x]);
      end
    @(negedge clk); in_valid = 0; in_sof = 0; in_sol = 0;
    repeat (40) @(negedge clk);
    // keypoints
    checks++;
    if (int'(kp_total) != ekx.size()) begin
      failures++; $display("FAIL keypoint count %0d exp %0d", kp_total, ekx.size());
    end
    for (int k = 0; k < ekx.size(); k++) begin
      checks++;
      if (kp_empty || int'(kp_head.x) != ekx[k] || int'(kp_head.y) != eky[k] ||
          kp_head.octave != 2'd1 || kp_head.layer != 2'd1) begin
        failures++; $display("FAIL kp %0d (%0d,%0d) exp (%0d,%0d)", k, kp_head.x, kp_head.y, ekx[k], eky[k]);
      end
      kp_pop = !kp_empty;
      @(negedge clk); kp_pop = 0;
    end
    checks++;
    if (!kp_empty || kp_overflow) failures++;
    checks++;
    if (ekx.size() == 0) begin failures++; $display("FAIL no keypoints in the test image"); end
    // gradients
    for (int y = 2; y < H - 2; y += 3)
      for (int x = 2; x < W - 2; x++) begin
        int lx, ly, ea, da;
        real m, a;
        g_rd_en = 1; g_rd_addr = ($clog2(W*H))'(y * W + x);
        @(negedge clk); g_rd_en = 0;
        lx = L[1][y][x+1] - L[1][y][x-1];
        ly = L[1][y+1][x] - L[1][y-1][x];
        m = $sqrt(real'(lx * lx + ly * ly));
        a = $atan2(real'(ly), real'(lx)) / (2.0 * 3.14159265358979) * 256.0;
        if (a < 0) a += 256.0;
        ea = int'(a) % 256;
        da = (int'(g_rd_data[7:0]) - ea + 256) % 256;
        checks++;
        if (real'(g_rd_data[16:8]) > m * 1.005 + 1 || real'(g_rd_data[16:8]) < m * 0.995 - 1 ||
            (m > 8 && !(da <= 1 || da >= 255))) begin
          failures++; $display("FAIL grad (%0d,%0d) %0d/%0d exp %f/%0d", x, y, g_rd_data[16:8], g_rd_data[7:0], m, ea);
        end
      end
    $display("keypoints %0d", ekx.size());
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
