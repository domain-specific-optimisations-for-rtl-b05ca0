// tb_extrema_detector: random 3x3x3 DoG neighbourhoods, many of them forced
// to have an extreme centre, checked against a reference model that uses
// real arithmetic for the Hessian edge test. Counts how many maxima, minima,
// kept points and edge/contrast rejections were exercised.
module tb_extrema_detector;
  localparam int TH = 3, R = 10;
  logic [2:0][2:0][8:0] below, centre, above;
  logic is_max, is_min, keep;
  int checks = 0, failures = 0;
  int n_max = 0, n_min = 0, n_keep = 0, n_rej = 0;
  logic clk = 0;

  extrema_detector #(.CONTRAST_TH(TH), .EDGE_R(R)) dut (.*);
  always #5 clk = ~clk;

  function automatic int at(logic [2:0][2:0][8:0] w, int r, int c);
    return int'($signed(w[r][c]));
  endfunction

  task automatic check_one();
    int v = at(centre, 1, 1);
    bit emax = 1, emin = 1, ekeep;
    real dxx, dyy, dxy, tr, det;
    for (int r = 0; r < 3; r++)
      for (int c = 0; c < 3; c++) begin
        if (at(below, r, c) > v || at(above, r, c) > v || at(centre, r, c) > v) emax = 0;
        if (at(below, r, c) < v || at(above, r, c) < v || at(centre, r, c) < v) emin = 0;
      end
    dxx = at(centre, 1, 2) + at(centre, 1, 0) - 2 * v;
    dyy = at(centre, 2, 1) + at(centre, 0, 1) - 2 * v;
    dxy = (at(centre, 2, 2) - at(centre, 0, 2) - at(centre, 2, 0) + at(centre, 0, 0)) / 4.0;
    tr  = dxx + dyy;
    det = dxx * dyy - dxy * dxy;
    ekeep = (emax || emin) && (v > TH || -v > TH) && det > 0 && (tr * tr * R < (R + 1) * (R + 1) * det);
    #1;
    checks += 3;
    if (is_max !== emax) failures++;
    if (is_min !== emin) failures++;
    if (keep !== ekeep) begin failures++; $display("FAIL keep v=%0d got %0d exp %0d", v, keep, ekeep); end
    n_max += emax; n_min += emin; n_keep += ekeep; n_rej += (emax || emin) && !ekeep;
  endtask

  initial begin
    for (int t = 0; t < 4000; t++) begin
      int span;
      span = (t % 4 == 0) ? 200 : 12;
      for (int r = 0; r < 3; r++)
        for (int c = 0; c < 3; c++) begin
          below[r][c]  = 9'($urandom_range(0, 2 * span) - span);
          centre[r][c] = 9'($urandom_range(0, 2 * span) - span);
          above[r][c]  = 9'($urandom_range(0, 2 * span) - span);
        end
      if (t % 3 == 1) centre[1][1] = 9'(span + 1 + $urandom_range(0, 40));
      if (t % 3 == 2) centre[1][1] = 9'(-span - 1 - $urandom_range(0, 40));
      if (t % 7 == 0) begin   // ridge: an edge-like neighbourhood
        for (int r = 0; r < 3; r++) centre[r][1] = 9'(span + 20 - (r == 1 ? 0 : 1));
        centre[1][1] = 9'(span + 25);
      end
      check_one();
    end
    checks++;
    if (n_max == 0 || n_min == 0 || n_keep == 0 || n_rej == 0) begin
      failures++; $display("FAIL coverage max=%0d min=%0d keep=%0d rej=%0d", n_max, n_min, n_keep, n_rej);
    end
    $display("coverage max=%0d min=%0d keep=%0d rejected=%0d", n_max, n_min, n_keep, n_rej);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
