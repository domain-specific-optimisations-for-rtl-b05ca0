// tb_descriptor_generator: random 16x16 windows with a random dominant
// angle. The testbench forms its own 4x4x8 histogram (Gaussian window
// weights computed with $exp, angles relative to the dominant one),
// normalises it with floor(255*h/floor(sqrt(sum h^2))) and compares all 128
// elements, their order and the last flag; one all-zero window checks the
// zero-vector case, and the busy time is checked against 148 + 24*128.
module tb_descriptor_generator;
  logic clk = 0, rst_n = 0;
  logic clear = 0, s_valid = 0, finish = 0;
  logic [3:0] s_dx = 0, s_dy = 0;
  logic [8:0] s_mag = 0;
  logic [7:0] s_ang = 0, dom_ang = 0;
  logic busy, d_valid, d_last;
  logic [6:0] d_idx;
  logic [7:0] d_val;
  int checks = 0, failures = 0;

  descriptor_generator dut (.*);
  always #5 clk = ~clk;

  int wt [16];
  initial for (int i = 0; i < 16; i++) wt[i] = int'(255.0 * $exp(-((i - 7.5) ** 2) / 128.0));

  int exp_d [128];
  int nout;
  always @(posedge clk) if (rst_n && d_valid) begin
    checks += 3;
    if (int'(d_idx) != nout) failures++;
    if (int'(d_val) != exp_d[nout]) begin
      failures++; $display("FAIL d[%0d]=%0d exp %0d", nout, d_val, exp_d[nout]);
    end
    if (d_last != (nout == 127)) failures++;
    nout++;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < 4; k++) begin
      longint h [128];
      longint ss;
      int nrm, cyc;
      for (int i = 0; i < 128; i++) h[i] = 0;
      dom_ang = 8'($urandom);
      @(negedge clk); clear = 1;
      @(negedge clk); clear = 0;
      for (int i = 0; i < 256; i++) begin
        int dx, dy, m, a, rel;
        dx = i % 16; dy = i / 16;
        m = (k == 3) ? 0 : $urandom_range(0, 511);
        a = $urandom_range(0, 255);
        rel = (a - int'(dom_ang) + 256) % 256;
        s_valid = 1; s_dx = 4'(dx); s_dy = 4'(dy); s_mag = 9'(m); s_ang = 8'(a);
        h[((dy / 4) * 4 + dx / 4) * 8 + rel / 32] += (wt[dx] * wt[dy] * m) >> 16;
        @(negedge clk);
      end
      s_valid = 0;
      ss = 0;
      for (int i = 0; i < 128; i++) ss += h[i] * h[i];
      nrm = int'($floor($sqrt(real'(ss))));
      while (longint'(nrm) * nrm > ss) nrm--;
      while (longint'(nrm + 1) * (nrm + 1) <= ss) nrm++;
      for (int i = 0; i < 128; i++) exp_d[i] = (nrm == 0) ? 0 : int'((h[i] * 255) / nrm);
      nout = 0;
      finish = 1;
      @(negedge clk); finish = 0;
      cyc = 1;
      while (busy && cyc < 10000) begin @(negedge clk); cyc++; end
      @(negedge clk);
      checks += 2;
      if (nout != 128) begin failures++; $display("FAIL count %0d", nout); end
      if (cyc - 1 != 148 + 24 * 128) begin failures++; $display("FAIL busy cycles %0d", cyc - 1); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
