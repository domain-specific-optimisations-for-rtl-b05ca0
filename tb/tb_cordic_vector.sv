// tb_cordic_vector: streams random vectors (one per cycle) plus the four
// axes and the diagonals through the CORDIC and compares magnitude (within
// 0.5% + 2) and angle (within 1 unit of 1/256 turn) with real-valued
// sqrt/atan2, and the latency with ITER + 2 cycles.
module tb_cordic_vector;
  localparam int IW = 12, ITER = 12, N = 600;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0;
  logic signed [IW-1:0] in_x = 0, in_y = 0;
  logic out_valid;
  logic [IW:0] out_mag;
  logic [7:0] out_ang;
  int checks = 0, failures = 0;
  int xs [N], ys [N];
  int nin = 0, nout = 0, t_in0 = -1, t_out0 = -1, cyc = 0;

  cordic_vector #(.IW(IW), .ITER(ITER)) dut (.*);
  always #5 clk = ~clk;

  // cyc counts edges; the input is taken at the edge where in_valid is seen,
  // the result is seen ITER + 2 edges later
  always @(posedge clk) begin
    cyc++;
    if (rst_n && in_valid && t_in0 < 0) t_in0 = cyc;
  end
  always @(posedge clk) if (rst_n && out_valid) begin
    real m, a;
    int ea, da;
    if (t_out0 < 0) t_out0 = cyc;
    m  = $sqrt(real'(xs[nout]) ** 2 + real'(ys[nout]) ** 2);
    a  = $atan2(real'(ys[nout]), real'(xs[nout])) / (2.0 * 3.14159265358979) * 256.0;
    if (a < 0) a += 256.0;
    ea = int'(a) % 256;
    da = (int'(out_ang) - ea + 256) % 256;
    checks += 2;
    if (real'(out_mag) > m * 1.005 + 2 || real'(out_mag) < m * 0.995 - 2) begin
      failures++; $display("FAIL mag (%0d,%0d) got %0d exp %f", xs[nout], ys[nout], out_mag, m);
    end
    if (m > 8 && !(da <= 1 || da >= 255)) begin
      failures++; $display("FAIL ang (%0d,%0d) got %0d exp %0d", xs[nout], ys[nout], out_ang, ea);
    end
    nout++;
  end

  initial begin
    for (int i = 0; i < N; i++) begin
      xs[i] = $urandom_range(0, 4000) - 2000;
      ys[i] = $urandom_range(0, 4000) - 2000;
    end
    xs[0] = 1000; ys[0] = 0;   xs[1] = 0; ys[1] = 1000;
    xs[2] = -1000; ys[2] = 0;  xs[3] = 0; ys[3] = -1000;
    xs[4] = 700; ys[4] = 700;  xs[5] = -700; ys[5] = -700;
    xs[6] = -2000; ys[6] = 5;  xs[7] = -2000; ys[7] = -5;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < N; i++) begin
      @(negedge clk);
      in_valid = 1; in_x = IW'(xs[i]); in_y = IW'(ys[i]);
    end
    @(negedge clk); in_valid = 0;
    repeat (ITER + 6) @(negedge clk);
    checks += 2;
    if (nout != N) begin failures++; $display("FAIL count %0d", nout); end
    if (t_out0 - t_in0 != ITER + 2) begin failures++; $display("FAIL latency %0d", t_out0 - t_in0); end
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
