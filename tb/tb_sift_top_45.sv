// tb_sift_top_45: the tb_sift_top check for the larger octave/scale
// configuration (4 octaves, 5 scales, so extrema are sought in DoG layers 1
// and 2 and the lower layer is reported when both qualify). Two random
// 1024x768 frames (noise in 8x8 and 16x16 blocks) are run; the model
// downsamples through all four octaves, and every keypoint, descriptor count, norm, stall and frame_done is checked
// as in tb_sift_top. Keypoints in every octave are counted and required.
module tb_sift_top_45;
  import dso_pkg::*;
  localparam int IW = 1024, IH = 768, NO = 4, S = 5, TH = 3, R = 10;
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

  sift_top #(.IMG_W(IW), .IMG_H(IH), .OCTAVES(NO), .SCALES(S), .KP_DEPTH(512)) dut (.*);
  always #5 clk = ~clk;

  int fimg [2][IH][IW];
  int B [2] = '{8, 16};
  int oimg [NO][MAXH][MAXW];
  int taps [S][3];
  keypoint_t expk [2][1024];
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
        for (int c = 1; c <= S - 3; c++) begin
          v = L[c+1][y][x] - L[c][y][x];
          mx = 1; mn = 1;
          for (int l = c - 1; l <= c + 1; l++)
            for (int i = -1; i <= 1; i++)
              for (int j = -1; j <= 1; j++) begin
                int d;
                d = L[l+1][y+i][x+j] - L[l][y+i][x+j];
                if (d > v) mx = 0;
                if (d < v) mn = 0;
              end
          dxx  = (L[c+1][y][x+1]-L[c][y][x+1]) + (L[c+1][y][x-1]-L[c][y][x-1]) - 2*v;
          dyy  = (L[c+1][y+1][x]-L[c][y+1][x]) + (L[c+1][y-1][x]-L[c][y-1][x]) - 2*v;
          dxy4 = (L[c+1][y+1][x+1]-L[c][y+1][x+1]) - (L[c+1][y-1][x+1]-L[c][y-1][x+1])
               - (L[c+1][y+1][x-1]-L[c][y+1][x-1]) + (L[c+1][y-1][x-1]-L[c][y-1][x-1]);
          tr = dxx + dyy;
          det16 = 16 * dxx * dyy - dxy4 * dxy4;
          if ((mx || mn) && (v > TH || -v > TH) && det16 > 0 &&
              longint'(tr) * tr * 16 * R < longint'(det16) * (R + 1) * (R + 1)) begin
            k.octave = 2'(o); k.layer = 2'(c); k.x = 12'(x); k.y = 12'(y);
            expk[fcur][nexp[fcur]] = k; nexp[fcur]++;
            break;
          end
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
    for (int o = 1; o < NO; o++)
      for (int y = 0; y < (IH >> (o + 1)); y++)
        for (int x = 0; x < (IW >> (o + 1)); x++)
          oimg[o][y][x] = (oimg[o-1][2*y][2*x] + oimg[o-1][2*y][2*x+1] + oimg[o-1][2*y+1][2*x] + oimg[o-1][2*y+1][2*x+1] + 2) / 4;
    nexp[fcur] = 0;
    for (int o = 0; o < NO; o++) ref_octave(o, IW >> (o + 1), IH >> (o + 1));
  endtask

  // descriptor checker
  int nd [2], ne [2], n_oct [NO], n_frames = 0, n_stall = 0, n_desc = 0;
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
          fimg[f][y][x] = (x % B[f] == 0 && y % B[f] == 0) ? $urandom_range(0, 255)
                        : (x % B[f] != 0) ? fimg[f][y][x-1] : fimg[f][y-1][x];
      // noise in BxB blocks: 8x8 in frame 0 and 16x16 in frame 1 give the
      // third and fourth octave full-contrast texture
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
    for (int o = 1; o < NO; o++) if (n_oct[o] == 0) begin failures++; $display("FAIL no octave-%0d keypoint", o); end
    if (n_desc == 0) failures++;
    if (n_frames != 2) failures++;
    if (kp_overflow) failures++;
    $display("mechanisms: octave kps=%0d/%0d/%0d/%0d descriptors=%0d frames=%0d stall cycles=%0d",
             n_oct[0], n_oct[1], n_oct[2], n_oct[3], n_desc, n_frames, n_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (8000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
