// tb_sift_top: end-to-end run of the SIFT extractor on two random frames at
// a reduced size (IMG_W x IMG_H with the default 2 octaves, 4 scales, 3x3
// kernels and input downsampling). The testbench builds its own model of
// the octave images (2x2 means), the Gaussian/DoG images, the extremum,
// contrast, edge and border tests, and checks that exactly the expected
// keypoints come out with a descriptor each, in octave then raster order,
// that every descriptor has 128 elements whose norm is close to 255, that
// input is held off (in_ready low) during the descriptor phase, and that
// frame_done pulses once per frame. It counts each mechanism: keypoints of
// each octave, descriptors, stalls and frames.
module tb_sift_top;
  import dso_pkg::*;
  localparam int IW = 256, IH = 192, S = 4, TH = 3, R = 10;
  localparam int MAXW = IW / 2, MAXH = IH / 2;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_ready, in_sof = 0, in_sol = 0;
  logic [7:0] in_pix = 0;
  logic desc_valid, desc_last, frame_done, kp_overflow;
  keypoint_t desc_kp;
  logic [6:0] desc_idx;
  logic [7:0] desc_val;
  logic [31:0] kp_count;
  int checks = 0, failures = 0;

  sift_top #(.IMG_W(IW), .IMG_H(IH), .KP_DEPTH(256)) dut (.*);
  always #5 clk = ~clk;

  int fimg [2][IH][IW];
  int oimg [2][MAXH][MAXW];
  int taps [S][3];
  keypoint_t expk [2][256];
  int nexp [2];
  int fcur;

  task automatic ref_octave(int o, int w, int h);
    int L [S][MAXH][MAXW];
    for (int s = 0; s < S; s++)
      for (int y = 1; y < h - 1; y++)
        for (int x = 1; x < w - 1; x++) begin
          int acc;
          acc = 32768;
          for (int i = 0; i < 3; i++)
            for (int j = 0; j < 3; j++) acc += oimg[o][y-1+i][x-1+j] * taps[s][i] * taps[s][j];
          L[s][y][x] = acc >> 16;
        end
    for (int y = 10; y <= h - 10; y++)
      for (int x = 10; x <= w - 10; x++) begin
        int v, dxx, dyy, dxy4, tr, det16;
        bit mx, mn;
        keypoint_t k;
        v = L[2][y][x] - L[1][y][x];
        mx = 1; mn = 1;
        for (int l = 0; l < 3; l++)
          for (int i = -1; i <= 1; i++)
            for (int j = -1; j <= 1; j++) begin
              int d;
              d = L[l+1][y+i][x+j] - L[l][y+i][x+j];
              if (d > v) mx = 0;
              if (d < v) mn = 0;
            end
        dxx  = (L[2][y][x+1]-L[1][y][x+1]) + (L[2][y][x-1]-L[1][y][x-1]) - 2*v;
        dyy  = (L[2][y+1][x]-L[1][y+1][x]) + (L[2][y-1][x]-L[1][y-1][x]) - 2*v;
        dxy4 = (L[2][y+1][x+1]-L[1][y+1][x+1]) - (L[2][y-1][x+1]-L[1][y-1][x+1])
             - (L[2][y+1][x-1]-L[1][y+1][x-1]) + (L[2][y-1][x-1]-L[1][y-1][x-1]);
        tr = dxx + dyy;
        det16 = 16 * dxx * dyy - dxy4 * dxy4;
        if ((mx || mn) && (v > TH || -v > TH) && det16 > 0 &&
            longint'(tr) * tr * 16 * R < longint'(det16) * (R + 1) * (R + 1)) begin
          k.octave = 2'(o); k.layer = 2'd1; k.x = 12'(x); k.y = 12'(y);
          expk[fcur][nexp[fcur]] = k; nexp[fcur]++;
        end
      end
  endtask

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
    for (int y = 0; y < IH / 2; y++)
      for (int x = 0; x < IW / 2; x++)
        oimg[0][y][x] = (fimg[fcur][2*y][2*x] + fimg[fcur][2*y][2*x+1] + fimg[fcur][2*y+1][2*x] + fimg[fcur][2*y+1][2*x+1] + 2) / 4;
    for (int y = 0; y < IH / 4; y++)
      for (int x = 0; x < IW / 4; x++)
        oimg[1][y][x] = (oimg[0][2*y][2*x] + oimg[0][2*y][2*x+1] + oimg[0][2*y+1][2*x] + oimg[0][2*y+1][2*x+1] + 2) / 4;
    nexp[fcur] = 0;
    ref_octave(0, IW / 2, IH / 2);
    ref_octave(1, IW / 4, IH / 4);
  endtask

  // descriptor checker
  int nd [2], ne [2], n_oct [2], n_frames = 0, n_stall = 0, n_desc = 0;
  longint ssq;
  always @(posedge clk) if (rst_n) begin
    if (in_valid && !in_ready) n_stall++;
    if (frame_done) n_frames++;
    if (desc_valid) begin
      if (desc_idx == 0) begin
        ssq = 0;
        checks++;
        if (nd[n_frames] >= nexp[n_frames] || desc_kp !== expk[n_frames][nd[n_frames]]) begin
          failures++; $display("FAIL keypoint %0d: (%0d,%0d,o%0d)", nd[n_frames], desc_kp.x, desc_kp.y, desc_kp.octave);
        end
      end
      ssq += longint'(desc_val) * desc_val;
      ne[n_frames]++;
      if (desc_last) begin
        checks++;
        if (ssq != 0 && (ssq > 65025 || ssq < 65025 * 8 / 10)) begin
          failures++; $display("FAIL norm^2 %0d", ssq);
        end
        n_oct[desc_kp.octave]++;
        n_desc++;
        nd[n_frames]++;
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    // both frames are prepared up front; the first pixel of frame 1 is offered
    // right after the last pixel of frame 0, so it waits through the
    // descriptor phase of frame 0 (in_ready low)
    for (int f = 0; f < 2; f++) begin
      for (int y = 0; y < IH; y++)
        for (int x = 0; x < IW; x++)
          fimg[f][y][x] = (f == 0 || (x % 4 == 0 && y % 4 == 0)) ? $urandom_range(0, 255)
                        : (x % 4 != 0) ? fimg[f][y][x-1] : fimg[f][y-1][x];
      // frame 0: pixel noise; frame 1: noise in 4x4 blocks, which gives the
      // second octave full-contrast texture
      fcur = f;
      reference();
      nd[f] = 0; ne[f] = 0;
    end
    for (int f = 0; f < 2; f++)
      for (int y = 0; y < IH; y++)
        for (int x = 0; x < IW; x++) begin
          @(negedge clk);
          in_valid = 1; in_sof = (x == 0 && y == 0); in_sol = (x == 0); in_pix = 8'(fimg[f][y][x]);
          while (!in_ready) @(negedge clk);
        end
    @(negedge clk);
    in_sof = 0; in_sol = 0; in_pix = 0;
    in_valid = 0;
    while (n_frames < 2) @(negedge clk);
    for (int f = 0; f < 2; f++) begin
      checks += 2;
      if (nd[f] != nexp[f]) begin failures++; $display("FAIL descriptors %0d exp %0d", nd[f], nexp[f]); end
      if (ne[f] != 128 * nd[f]) failures++;
      $display("frame %0d: %0d keypoints", f, nexp[f]);
    end
    checks++;
    if (int'(kp_count) != nexp[0] + nexp[1]) begin failures++; $display("FAIL kp_count %0d", kp_count); end
    // mechanisms
    checks += 6;
    if (n_stall == 0) begin failures++; $display("FAIL input never held off"); end
    if (n_oct[0] == 0) begin failures++; $display("FAIL no octave-0 keypoint"); end
    if (n_oct[1] == 0) begin failures++; $display("FAIL no octave-1 keypoint"); end
    if (n_desc == 0) failures++;
    if (n_frames != 2) failures++;
    if (kp_overflow) failures++;
    $display("mechanisms: octave0 kps=%0d octave1 kps=%0d descriptors=%0d frames=%0d stall cycles=%0d",
             n_oct[0], n_oct[1], n_desc, n_frames, n_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
