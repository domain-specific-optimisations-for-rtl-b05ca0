// sync_fifo: single-clock show-ahead FIFO, used to hold detected keypoints
// between detection and descriptor generation.
//
// A circular buffer of DEPTH words with read and write pointers one bit wider
// than the address. dout always shows the oldest word while the FIFO is not
// empty; pop removes it. A push while full is dropped and sets the sticky
// overflow flag (cleared by reset). A push and a pop in the same cycle are
// both performed.
//
// Timing: a pushed word is visible at dout the cycle after the push.
// The document does not describe this buffer; depth and overflow policy are
// this design's choices.
module sync_fifo #(
  parameter int DEPTH = 16384,
  parameter int DW    = 32
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     push,
  input  logic [DW-1:0]            din,
  input  logic                     pop,
  output logic [DW-1:0]            dout,
  output logic                     empty,
  output logic                     full,
  output logic [$clog2(DEPTH):0]   count,
  output logic                     overflow
);
  localparam int AW = $clog2(DEPTH);

  logic [DW-1:0] mem [DEPTH];
  logic [AW:0]   wptr, rptr;
  logic          do_push, do_pop;

  assign count   = wptr - rptr;
  assign empty   = (count == 0);
  assign full    = (count == (AW+1)'(DEPTH));
  assign do_push = push && !full;
  assign do_pop  = pop && !empty;
  assign dout    = mem[rptr[AW-1:0]];

  always_ff @(posedge clk) begin
    if (do_push) mem[wptr[AW-1:0]] <= din;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wptr <= '0; rptr <= '0; overflow <= 1'b0;
    end else begin
      if (do_push) wptr <= wptr + 1'b1;
      if (do_pop)  rptr <= rptr + 1'b1;
      if (push && full) overflow <= 1'b1;
    end
  end

  property p_no_pop_empty;
    @(posedge clk) disable iff (!rst_n) pop |-> !empty;
  endproperty
  a_no_pop_empty: assert property (p_no_pop_empty) else $error("sync_fifo: pop while empty");
endmodule
