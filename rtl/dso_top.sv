// dso_top: the two streaming image-processing accelerators side by side.
//
//  - sift_top: SIFT keypoint detection and 128-element descriptors on
//    1920x1080 8-bit frames, configured with the three domain-specific
//    optimisations (2x input downsampling, integer arithmetic, 3x3 kernels)
//    and 2 octaves of 4 scales.
//  - image_filter: box / Gaussian / Sobel filter on 3840x2160 8-bit frames
//    with 3x3 kernels and integer arithmetic.
// The two share only clock and reset; each has its own ports, prefixed
// sift_ and filt_. Timing is that of the two blocks.
module dso_top
  import dso_pkg::*;
#(
  parameter int SIFT_W = 1920,
  parameter int SIFT_H = 1080,
  parameter int FILT_W = 3840
) (
  input  logic               clk,
  input  logic               rst_n,
  // SIFT
  input  logic               sift_in_valid,
  output logic               sift_in_ready,
  input  logic               sift_in_sof,
  input  logic               sift_in_sol,
  input  logic [PIX_W-1:0]   sift_in_pix,
  output logic               sift_desc_valid,
  output keypoint_t          sift_desc_kp,
  output logic [6:0]         sift_desc_idx,
  output logic [7:0]         sift_desc_val,
  output logic               sift_desc_last,
  output logic               sift_frame_done,
  output logic [31:0]        sift_kp_count,
  output logic               sift_kp_overflow,
  // filters
  input  filt_mode_t         filt_mode,
  input  logic               filt_in_valid,
  input  logic               filt_in_sof,
  input  logic               filt_in_sol,
  input  logic [PIX_W-1:0]   filt_in_pix,
  output logic               filt_out_valid,
  output logic               filt_out_sof,
  output logic               filt_out_sol,
  output logic [PIX_W-1:0]   filt_out_pix,
  output logic [ANG_W-1:0]   filt_out_ang
);
  sift_top #(.IMG_W(SIFT_W), .IMG_H(SIFT_H)) u_sift (
    .clk, .rst_n,
    .in_valid(sift_in_valid), .in_ready(sift_in_ready), .in_sof(sift_in_sof),
    .in_sol(sift_in_sol), .in_pix(sift_in_pix),
    .desc_valid(sift_desc_valid), .desc_kp(sift_desc_kp), .desc_idx(sift_desc_idx),
    .desc_val(sift_desc_val), .desc_last(sift_desc_last), .frame_done(sift_frame_done),
    .kp_count(sift_kp_count), .kp_overflow(sift_kp_overflow)
  );

  image_filter #(.W(FILT_W)) u_filt (
    .clk, .rst_n, .mode(filt_mode),
    .in_valid(filt_in_valid), .in_sof(filt_in_sof), .in_sol(filt_in_sol), .in_pix(filt_in_pix),
    .out_valid(filt_out_valid), .out_sof(filt_out_sof), .out_sol(filt_out_sol),
    .out_pix(filt_out_pix), .out_ang(filt_out_ang)
  );
endmodule
