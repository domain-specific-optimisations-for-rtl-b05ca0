// tb_gradient_unit: random 11x7 frames; for every output the testbench
// computes the central differences of its own copy of the image and checks
// magnitude (within 0.5% + 1) and angle (within 1 unit) against real
// sqrt/atan2, plus the output count per frame.
module tb_gradient_unit;
  localparam int W = 11, H = 7;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_sof = 0, in_sol = 0;
  logic [7:0] in_pix = 0;
  logic out_valid, out_sof, out_sol;
  logic [8:0] out_mag;
  logic [7:0] out_ang;
  int checks = 0, failures = 0;
  int img [H][W];
  int ox, oy, nout;

  gradient_unit #(.W(W)) dut (.*);
  always #5 clk = ~clk;

  always @(posedge clk) if (rst_n && out_valid) begin
    int lx, ly, ea, da;
    real m, a;
    if (out_sof) begin ox = 0; oy = 0; end else if (out_sol) begin ox = 0; oy++; end else ox++;
    lx = img[oy + 1][ox + 2] - img[oy + 1][ox];
    ly = img[oy + 2][ox + 1] - img[oy][ox + 1];
    m = $sqrt(real'(lx * lx + ly * ly));
    a = $atan2(real'(ly), real'(lx)) / (2.0 * 3.14159265358979) * 256.0;
    if (a < 0) a += 256.0;
    ea = int'(a) % 256;
    da = (int'(out_ang) - ea + 256) % 256;
    checks += 2;
    if (real'(out_mag) > m * 1.005 + 1 || real'(out_mag) < m * 0.995 - 1) begin
      failures++; $display("FAIL mag (%0d,%0d) %0d exp %f", ox, oy, out_mag, m);
    end
    if (m > 8 && !(da <= 1 || da >= 255)) begin
      failures++; $display("FAIL ang (%0d,%0d) %0d exp %0d", ox, oy, out_ang, ea);
    end
    nout++;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int f = 0; f < 3; f++) begin
      for (int y = 0; y < H; y++) for (int x = 0; x < W; x++) img[y][x] = $urandom_range(0, 255);
      if (f == 2) for (int y = 0; y < H; y++) for (int x = 0; x < W; x++) img[y][x] = (x < 5) ? 0 : 255;
      nout = 0;
      for (int y = 0; y < H; y++)
        for (int x = 0; x < W; x++) begin
          @(negedge clk);
          in_valid = 1; in_sof = (x == 0 && y == 0); in_sol = (x == 0); in_pix = 8'(img[y][x]);
        end
      @(negedge clk); in_valid = 0; in_sof = 0; in_sol = 0;
      repeat (20) @(negedge clk);
      checks++;
      if (nout != (W - 2) * (H - 2)) begin failures++; $display("FAIL count %0d", nout); end
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
