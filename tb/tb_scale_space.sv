// tb_scale_space: random frames through the scale-space stage (K = 3 and
// K = 5 instances, 4 scales). The testbench derives the integer Gaussian
// taps itself from sigma_s = 2^(s/3) with real arithmetic, convolves the
// frame, and checks every Gaussian and DoG output and the output count.
module tb_scale_space;
  localparam int W = 12, H = 8, S = 4;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_sof = 0, in_sol = 0;
  logic [7:0] in_pix = 0;
  int checks = 0, failures = 0;
  logic [7:0] img [H][W];

  logic v3, sof3, sol3, v5, sof5, sol5;
  logic [S-1:0][7:0] g3, g5;
  logic [S-2:0][8:0] d3, d5;

  scale_space #(.K(3), .SCALES(S), .W(W)) dut3 (.clk, .rst_n, .in_valid, .in_sof, .in_sol, .in_pix,
    .out_valid(v3), .out_sof(sof3), .out_sol(sol3), .gauss(g3), .dog(d3));
  scale_space #(.K(5), .SCALES(S), .W(W)) dut5 (.clk, .rst_n, .in_valid, .in_sof, .in_sol, .in_pix,
    .out_valid(v5), .out_sof(sof5), .out_sol(sol5), .gauss(g5), .dog(d5));
  always #5 clk = ~clk;

  int taps [2][S][5];
  function automatic void make_taps();
    for (int ki = 0; ki < 2; ki++) begin
      int k = ki ? 5 : 3;
      for (int s = 0; s < S; s++) begin
        real sg, w[5], t;
        int sum;
        sg = 2.0 ** (s / 3.0);
        t = 0;
        for (int i = 0; i < k; i++) begin w[i] = $exp(-((i - k/2) ** 2) / (2.0 * sg * sg)); t += w[i]; end
        sum = 0;
        for (int i = 0; i < k; i++) begin taps[ki][s][i] = int'(w[i] / t * 256.0); sum += taps[ki][s][i]; end
        taps[ki][s][k/2] += 256 - sum;
      end
    end
  endfunction

  function automatic int blur(int ki, int s, int cx, int cy);
    int k = ki ? 5 : 3, r = k / 2, acc = 32768;
    for (int i = 0; i < k; i++)
      for (int j = 0; j < k; j++)
        acc += img[cy - r + i][cx - r + j] * taps[ki][s][i] * taps[ki][s][j];
    return acc >> 16;
  endfunction

  int ox3, oy3, n3, ox5, oy5, n5;
  always @(posedge clk) if (rst_n) begin
    if (v3) begin
      if (sof3) begin ox3 = 0; oy3 = 0; end else if (sol3) begin ox3 = 0; oy3++; end else ox3++;
      n3++;
      for (int s = 0; s < S; s++) begin
        checks++;
        if (g3[s] !== 8'(blur(0, s, ox3 + 1, oy3 + 1))) begin
          failures++; $display("FAIL K3 g%0d (%0d,%0d) %0d exp %0d", s, ox3, oy3, g3[s], blur(0, s, ox3+1, oy3+1));
        end
      end
      for (int s = 0; s < S - 1; s++) begin
        checks++;
        if ($signed(d3[s]) !== 9'(blur(0, s + 1, ox3 + 1, oy3 + 1) - blur(0, s, ox3 + 1, oy3 + 1))) failures++;
      end
    end
    if (v5) begin
      if (sof5) begin ox5 = 0; oy5 = 0; end else if (sol5) begin ox5 = 0; oy5++; end else ox5++;
      n5++;
      for (int s = 0; s < S; s++) begin
        checks++;
        if (g5[s] !== 8'(blur(1, s, ox5 + 2, oy5 + 2))) begin
          failures++; $display("FAIL K5 g%0d (%0d,%0d)", s, ox5, oy5);
        end
      end
      for (int s = 0; s < S - 1; s++) begin
        checks++;
        if ($signed(d5[s]) !== 9'(blur(1, s + 1, ox5 + 2, oy5 + 2) - blur(1, s, ox5 + 2, oy5 + 2))) failures++;
      end
    end
  end

  initial begin
    make_taps();
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int f = 0; f < 2; f++) begin
      for (int y = 0; y < H; y++) for (int x = 0; x < W; x++) img[y][x] = 8'($urandom);
      n3 = 0; n5 = 0;
      for (int y = 0; y < H; y++)
        for (int x = 0; x < W; x++) begin
          @(negedge clk);
          in_valid = 1; in_sof = (x == 0 && y == 0); in_sol = (x == 0); in_pix = img[y][x];
        end
      @(negedge clk); in_valid = 0; in_sof = 0; in_sol = 0;
      repeat (5) @(negedge clk);
      checks += 2;
      if (n3 != (W - 2) * (H - 2)) begin failures++; $display("FAIL n3 %0d", n3); end
      if (n5 != (W - 4) * (H - 4)) begin failures++; $display("FAIL n5 %0d", n5); end
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
