// tb_sync_fifo: random pushes and pops on an 8-deep FIFO against a queue
// model: head data, empty, full, count, and the sticky overflow flag after
// pushes into a full FIFO (which must be dropped).
module tb_sync_fifo;
  localparam int DEPTH = 8, DW = 16;
  logic clk = 0, rst_n = 0;
  logic push = 0, pop = 0;
  logic [DW-1:0] din = 0, dout;
  logic empty, full, overflow;
  logic [$clog2(DEPTH):0] count;
  int checks = 0, failures = 0, n_full = 0, n_ovf = 0;
  logic [DW-1:0] q [$];
  bit ovf_exp = 0;

  sync_fifo #(.DEPTH(DEPTH), .DW(DW)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      checks += 4;
      if (empty !== (q.size() == 0)) failures++;
      if (full !== (q.size() == DEPTH)) failures++;
      if (int'(count) != q.size()) failures++;
      if (overflow !== ovf_exp) failures++;
      if (q.size() > 0) begin
        checks++;
        if (dout !== q[0]) begin failures++; $display("FAIL head %0h exp %0h", dout, q[0]); end
      end
      n_full += full;
      // bias towards filling in the first half, draining in the second
      push = ($urandom_range(0, 99) < (t < 1500 ? 70 : 30));
      pop  = ($urandom_range(0, 99) < (t < 1500 ? 30 : 70)) && q.size() > 0;
      din  = DW'($urandom);
      @(posedge clk);
      #1;
      if (push) begin
        if (q.size() < DEPTH) q.push_back(din);
        else begin ovf_exp = 1; n_ovf++; end
      end
      if (pop) void'(q.pop_front());
    end
    checks++;
    if (n_full == 0 || n_ovf == 0) begin failures++; $display("FAIL coverage full=%0d ovf=%0d", n_full, n_ovf); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
