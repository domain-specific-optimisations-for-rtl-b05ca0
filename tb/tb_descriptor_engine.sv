// tb_descriptor_engine: two octaves (32x32 and 16x16 gradient images held in
// the testbench, read with one cycle latency) and a few keypoints per octave
// in testbench queues. The testbench computes the dominant orientation and
// the normalised descriptor of each keypoint itself and checks every
// element, the keypoint tag, the octave order, the pops and the done pulse.
module tb_descriptor_engine;
  import dso_pkg::*;
  localparam int W0 = 32, H0 = 32, OCT = 2;
  logic clk = 0, rst_n = 0, start = 0;
  logic busy, done;
  keypoint_t [OCT-1:0] kp_head;
  logic [OCT-1:0] kp_empty, kp_pop, g_rd_en;
  logic [$clog2(W0*H0)-1:0] g_rd_addr;
  logic [OCT-1:0][16:0] g_rd_data;
  logic desc_valid, desc_last;
  keypoint_t desc_kp;
  logic [6:0] desc_idx;
  logic [7:0] desc_val;
  int checks = 0, failures = 0;

  descriptor_engine #(.W0(W0), .H0(H0), .OCTAVES(OCT)) dut (.*);
  always #5 clk = ~clk;

  int mag [OCT][W0*H0];
  int ang [OCT][W0*H0];
  keypoint_t q [OCT][$];
  keypoint_t order [$];
  int wt [16];

  for (genvar o = 0; o < OCT; o++) begin : g_m
    assign kp_empty[o] = (q[o].size() == 0);
    assign kp_head[o]  = (q[o].size() == 0) ? '0 : q[o][0];
    always @(posedge clk) begin
      if (g_rd_en[o]) g_rd_data[o] <= {9'(mag[o][g_rd_addr]), 8'(ang[o][g_rd_addr])};
      if (kp_pop[o]) void'(q[o].pop_front());
    end
  end

  // reference descriptor of keypoint k
  function automatic void ref_desc(keypoint_t k, output int d [128]);
    int o = int'(k.octave), wo = W0 >> o;
    int h [36], pb, pv, dom;
    longint hd [128], ss;
    int nrm;
    for (int b = 0; b < 36; b++) h[b] = 0;
    for (int i = 0; i < 128; i++) hd[i] = 0;
    for (int i = 0; i < 256; i++) begin
      int a, m;
      a = (int'(k.y) - 8 + i / 16) * wo + int'(k.x) - 8 + i % 16;
      m = mag[o][a];
      h[(ang[o][a] * 36) / 256] += (wt[i % 16] * wt[i / 16] * m) >> 16;
    end
    pb = 0; pv = h[0];
    for (int b = 1; b < 36; b++) if (h[b] > pv) begin pv = h[b]; pb = b; end
    dom = ((2 * pb + 1) * 128) / 36;
    for (int i = 0; i < 256; i++) begin
      int a, rel;
      a = (int'(k.y) - 8 + i / 16) * wo + int'(k.x) - 8 + i % 16;
      rel = (ang[o][a] - dom + 256) % 256;
      hd[((i / 64) * 4 + (i % 16) / 4) * 8 + rel / 32] += (wt[i % 16] * wt[i / 16] * mag[o][a]) >> 16;
    end
    ss = 0;
    for (int i = 0; i < 128; i++) ss += hd[i] * hd[i];
    nrm = int'($sqrt(real'(ss)));
    while (longint'(nrm) * nrm > ss) nrm--;
    while (longint'(nrm + 1) * (nrm + 1) <= ss) nrm++;
    for (int i = 0; i < 128; i++) d[i] = (nrm == 0) ? 0 : int'(hd[i] * 255 / nrm);
  endfunction

  int nd = 0, ne = 0, ndone = 0;
  int expd [128];
  always @(posedge clk) if (rst_n) begin
    if (done) ndone++;
    if (desc_valid) begin
      if (desc_idx == 0) begin
        checks++;
        if (desc_kp !== order[nd]) begin failures++; $display("FAIL kp tag %0d", nd); end
        ref_desc(order[nd], expd);
      end
      checks++;
      if (int'(desc_val) != expd[desc_idx]) begin
        failures++; $display("FAIL kp %0d d[%0d]=%0d exp %0d", nd, desc_idx, desc_val, expd[desc_idx]);
      end
      ne++;
      if (desc_last) nd++;
    end
  end

  initial begin
    for (int i = 0; i < 16; i++) wt[i] = int'(255.0 * $exp(-((i - 7.5) ** 2) / 128.0));
    for (int o = 0; o < OCT; o++)
      for (int a = 0; a < W0 * H0; a++) begin
        mag[o][a] = $urandom_range(0, 360);
        ang[o][a] = $urandom_range(0, 255);
      end
    for (int o = 0; o < OCT; o++)
      for (int n = 0; n < 3 - o; n++) begin
        keypoint_t k;
        k.octave = 2'(o); k.layer = 2'd1;
        k.x = 12'($urandom_range(10, (W0 >> o) - 10));
        k.y = 12'($urandom_range(10, (H0 >> o) - 10));
        q[o].push_back(k);
        order.push_back(k);
      end
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    wait (ndone > 0);
    repeat (3) @(negedge clk);
    checks += 4;
    if (nd != order.size()) begin failures++; $display("FAIL descriptors %0d", nd); end
    if (ne != 128 * order.size()) failures++;
    if (!kp_empty[0] || !kp_empty[1]) failures++;
    if (busy) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
