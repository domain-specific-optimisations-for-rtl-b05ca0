// orientation_histogram: dominant gradient orientation of a keypoint window.
//
// For each gradient sample of the 16x16 window around a keypoint, the
// magnitude is weighted by a Gaussian window w[dx]*w[dy] (dso_pkg::win_weight,
// sigma = 8 samples, 255 = 1.0 per axis) and added to one of BINS orientation
// bins, bin = (angle * BINS) >> 8. After the last sample, a pulse on find
// starts a sequential scan for the largest bin (first one wins ties); done
// then pulses with the peak bin and the angle of that bin's centre,
// ((2*bin + 1) * 128) / BINS, in the same 1/256-turn unit.
//
// Interface: clear (zero all bins), one sample per cycle on s_valid, find,
// done/peak_bin/peak_val/dom_ang.
// Timing: one sample per cycle; done follows find after BINS + 1 cycles.
// The 36 bins and the Gaussian weighting follow the document; the window,
// the weight width and the single-peak rule are this design's choices.
module orientation_histogram
  import dso_pkg::*;
#(
  parameter int BINS = 36
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               clear,
  input  logic               s_valid,
  input  logic [3:0]         s_dx,
  input  logic [3:0]         s_dy,
  input  logic [MAG_W-1:0]   s_mag,
  input  logic [ANG_W-1:0]   s_ang,
  input  logic               find,
  output logic               done,
  output logic [5:0]         peak_bin,
  output logic [16:0]        peak_val,
  output logic [ANG_W-1:0]   dom_ang
);
  localparam int HW = 17;   // 256 samples x 511 max

  logic [HW-1:0] hist [BINS];
  logic [15:0]   wgt;
  logic [24:0]   wmag;
  logic [5:0]    bin_c;
  logic          scanning;
  logic [5:0]    scan_idx;

  always_comb begin
    wgt   = 16'(win_weight(int'(s_dx)) * win_weight(int'(s_dy)));
    wmag  = 25'(wgt) * 25'(s_mag);
    bin_c = 6'((int'(s_ang) * BINS) >> 8);
  end

  always_ff @(posedge clk) begin
    if (!rst_n || clear) begin
      for (int b = 0; b < BINS; b++) hist[b] <= '0;
    end else if (s_valid) begin
      hist[bin_c] <= hist[bin_c] + HW'(wmag[24:16]);
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      scanning <= 1'b0; scan_idx <= '0; done <= 1'b0;
      peak_bin <= '0; peak_val <= '0; dom_ang <= '0;
    end else begin
      done <= 1'b0;
      if (find && !scanning) begin
        scanning <= 1'b1;
        scan_idx <= '0;
        peak_bin <= '0;
        peak_val <= '0;
      end else if (scanning) begin
        if (int'(scan_idx) == BINS) begin
          scanning <= 1'b0;
          done     <= 1'b1;
          dom_ang  <= ANG_W'(((2 * int'(peak_bin) + 1) * 128) / BINS);
        end else begin
          if (hist[scan_idx] > peak_val || scan_idx == 0) begin
            peak_val <= hist[scan_idx];
            peak_bin <= scan_idx;
          end
          scan_idx <= scan_idx + 1'b1;
        end
      end
    end
  end
endmodule
