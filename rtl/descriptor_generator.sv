// descriptor_generator: 128-element SIFT descriptor of one keypoint window.
//
// The 16x16 gradient window is divided into sixteen 4x4 blocks; each block
// has an 8-bin orientation histogram, giving NBLK*NBIN = 128 values. A sample
// (dx, dy, magnitude, angle) goes to block (dy/4)*4 + dx/4 and to bin
// ((angle - dom_ang) mod 256) >> 5, so that orientations are measured
// relative to the keypoint's dominant orientation; its magnitude is weighted
// by the same Gaussian window as the orientation histogram.
// On finish the vector is normalised to unit length and scaled to 8 bits:
//   d[i] = floor(255 * h[i] / floor(sqrt(sum h^2)))
// using a sum-of-squares pass, a bit-serial square root and one bit-serial
// division per element. A zero vector gives zeros.
//
// Interface: clear, one sample per cycle on s_valid, dom_ang held for the
// whole pass, finish; out d_valid/d_idx/d_val/d_last, one element per
// division, idx 0..127 in block-major, bin-minor order.
// Timing: after finish, 128 + 20 cycles, then 24 cycles per element;
// busy is high from finish until the last element.
// The window, the 4x4 blocks, the 8 bins and the normalisation follow the
// document; rotating angles instead of the sampling grid, the weighting and
// the 8-bit scaling are this design's choices.
module descriptor_generator
  import dso_pkg::*;
#(
  parameter int NBLK = 16,
  parameter int NBIN = 8
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               clear,
  input  logic               s_valid,
  input  logic [3:0]         s_dx,
  input  logic [3:0]         s_dy,
  input  logic [MAG_W-1:0]   s_mag,
  input  logic [ANG_W-1:0]   s_ang,
  input  logic [ANG_W-1:0]   dom_ang,
  input  logic               finish,
  output logic               busy,
  output logic               d_valid,
  output logic [6:0]         d_idx,
  output logic [7:0]         d_val,
  output logic               d_last
);
  localparam int N  = NBLK * NBIN;
  localparam int HW = 14;             // 16 samples x 511 max per bin
  localparam int SW = 2 * HW + 7;     // sum of N squares
  localparam int RW = SW / 2 + 1;     // root width
  localparam int NW = HW + 8;         // 255 * h

  typedef enum logic [2:0] {S_IDLE, S_SUMSQ, S_SQRT, S_DIV, S_EMIT} state_t;
  state_t state;

  logic [HW-1:0] hist [N];
  logic [15:0]   wgt;
  logic [24:0]   wmag;
  logic [ANG_W-1:0] rel;
  logic [6:0]    idx_c;

  always_comb begin
    wgt   = 16'(win_weight(int'(s_dx)) * win_weight(int'(s_dy)));
    wmag  = 25'(wgt) * 25'(s_mag);
    rel   = s_ang - dom_ang;
    idx_c = 7'(({s_dy[3:2], s_dx[3:2]} * NBIN) + int'(rel[7:5]));
  end

  always_ff @(posedge clk) begin
    if (!rst_n || clear) begin
      for (int i = 0; i < N; i++) hist[i] <= '0;
    end else if (s_valid && state == S_IDLE) begin
      hist[idx_c] <= hist[idx_c] + HW'(wmag[24:16]);
    end
  end

  logic [SW-1:0] sumsq, op;
  logic [SW-1:0] res, one;
  logic [RW-1:0] norm;
  logic [7:0]    i_q;          // element counter
  logic [4:0]    bit_q;        // division bit counter
  logic [NW-1:0] num;
  logic [RW:0]   rem;
  logic [7:0]    quo;
  logic [RW:0]   rem_sh;

  assign busy   = (state != S_IDLE);
  assign rem_sh = {rem[RW-1:0], num[NW-1]};

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state <= S_IDLE; sumsq <= '0; op <= '0; res <= '0; one <= '0; norm <= '0;
      i_q <= '0; bit_q <= '0; num <= '0; rem <= '0; quo <= '0;
      d_valid <= 1'b0; d_idx <= '0; d_val <= '0; d_last <= 1'b0;
    end else begin
      d_valid <= 1'b0;
      d_last  <= 1'b0;
      unique case (state)
        S_IDLE: if (finish) begin
          state <= S_SUMSQ; sumsq <= '0; i_q <= '0;
        end
        S_SUMSQ: begin
          sumsq <= sumsq + SW'(hist[i_q[6:0]]) * SW'(hist[i_q[6:0]]);
          if (i_q == 8'(N - 1)) begin
            state <= S_SQRT; i_q <= '0;
          end else i_q <= i_q + 1'b1;
          op  <= '0;
          res <= '0;
          one <= SW'(1) << (2 * ((SW - 1) / 2));
        end
        S_SQRT: begin
          if (i_q == 0) begin
            op  <= sumsq;
            i_q <= 8'd1;
          end else if (one == 0) begin
            norm  <= RW'(res);
            state <= S_DIV;
            i_q   <= '0;
            bit_q <= '0;
          end else begin
            if (op >= res + one) begin
              op  <= op - (res + one);
              res <= (res >> 1) + one;
            end else begin
              res <= res >> 1;
            end
            one <= one >> 2;
          end
        end
        S_DIV: begin
          // restoring division of 255*h by norm, MSB first
          if (bit_q == 0) begin
            num   <= NW'(hist[i_q[6:0]]) * NW'(255);
            rem   <= '0;
            quo   <= '0;
            bit_q <= 5'd1;
          end else begin
            num <= num << 1;
            if (norm != 0 && rem_sh >= {1'b0, norm}) begin
              rem <= rem_sh - {1'b0, norm};
              quo <= {quo[6:0], 1'b1};
            end else begin
              rem <= rem_sh;
              quo <= {quo[6:0], 1'b0};
            end
            if (bit_q == 5'(NW)) state <= S_EMIT;
            else bit_q <= bit_q + 1'b1;
          end
        end
        S_EMIT: begin
          d_valid <= 1'b1;
          d_idx   <= i_q[6:0];
          d_val   <= quo;
          d_last  <= (i_q == 8'(N - 1));
          bit_q   <= '0;
          if (i_q == 8'(N - 1)) state <= S_IDLE;
          else begin
            i_q   <= i_q + 1'b1;
            state <= S_DIV;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
