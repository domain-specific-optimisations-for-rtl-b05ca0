// tb_orientation_histogram: several keypoint windows of 256 random samples
// (with a planted dominant direction) are accumulated; the testbench builds
// the same 36-bin Gaussian-weighted histogram from its own window weights
// round(255*exp(-(i-7.5)^2/128)), and checks peak bin, peak value, dominant
// angle and that done comes BINS + 1 cycles after find.
module tb_orientation_histogram;
  localparam int BINS = 36;
  logic clk = 0, rst_n = 0;
  logic clear = 0, s_valid = 0, find = 0;
  logic [3:0] s_dx = 0, s_dy = 0;
  logic [8:0] s_mag = 0;
  logic [7:0] s_ang = 0;
  logic done;
  logic [5:0] peak_bin;
  logic [16:0] peak_val;
  logic [7:0] dom_ang;
  int checks = 0, failures = 0;

  orientation_histogram #(.BINS(BINS)) dut (.*);
  always #5 clk = ~clk;

  int wt [16];
  initial for (int i = 0; i < 16; i++) wt[i] = int'(255.0 * $exp(-((i - 7.5) ** 2) / 128.0));

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < 6; k++) begin
      int h [BINS];
      int pb, pv, lat;
      int dir;
      dir = $urandom_range(0, 255);
      for (int b = 0; b < BINS; b++) h[b] = 0;
      @(negedge clk); clear = 1;
      @(negedge clk); clear = 0;
      for (int i = 0; i < 256; i++) begin
        int a, m;
        a = ($urandom_range(0, 2) == 0) ? dir : $urandom_range(0, 255);
        m = $urandom_range(0, 511);
        s_valid = 1; s_dx = 4'(i % 16); s_dy = 4'(i / 16); s_mag = 9'(m); s_ang = 8'(a);
        h[(a * BINS) / 256] += (wt[i % 16] * wt[i / 16] * m) >> 16;
        @(negedge clk);
      end
      s_valid = 0;
      pb = 0; pv = h[0];
      for (int b = 1; b < BINS; b++) if (h[b] > pv) begin pv = h[b]; pb = b; end
      find = 1;
      @(negedge clk); find = 0;
      lat = 1;
      while (!done && lat < 200) begin @(negedge clk); lat++; end
      checks += 4;
      if (int'(peak_bin) != pb) begin failures++; $display("FAIL bin %0d exp %0d", peak_bin, pb); end
      if (int'(peak_val) != pv) begin failures++; $display("FAIL val %0d exp %0d", peak_val, pv); end
      if (int'(dom_ang) != int'((pb + 0.5) * 256.0 / BINS - 0.5)) begin
        failures++; $display("FAIL dom %0d exp %f", dom_ang, (pb + 0.5) * 256.0 / BINS);
      end
      // lat also counts the edge that takes find
      if (lat - 1 != BINS + 1) begin failures++; $display("FAIL latency %0d", lat); end
    end
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
