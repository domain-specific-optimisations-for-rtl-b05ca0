// sift_top: SIFT feature extractor for 8-bit grayscale frames.
//
// The frame is processed in two phases.
//  1. Streaming (in_ready high): each pixel accepted on in_valid/in_ready
//     goes, when DOWNSAMPLE = 1, through a 2x bilinear downsampler first.
//     The resulting image is octave 0; each further octave receives a 2x
//     downsampled copy of the previous octave's input. Every octave
//     (sift_octave) builds its Gaussian and DoG images, detects keypoints
//     into its own FIFO and stores per-pixel gradient magnitude and angle.
//  2. Descriptors (in_ready low): once the last pixel has been accepted and
//     the pipelines have drained (DRAIN cycles), descriptor_engine computes
//     the dominant orientation and the 128-element descriptor of every
//     keypoint and streams them out. frame_done pulses at the end, and the
//     next frame may begin.
//
// Interface: pixel stream with sof/sol framing and valid/ready; descriptor
// element stream (desc_valid, keypoint, index, value, last), no back-pressure.
// kp_count is the number of keypoints accepted into the FIFOs this frame.
// Timing: one pixel per cycle in phase 1; ~4k cycles per keypoint in phase 2.
// Octave and scale counts, 3x3 kernels, input downsampling and integer
// arithmetic follow the configuration the document reports as fastest
// (2 octaves, 4 scales, downsampling + integer + 3x3). The two-phase frame
// schedule and the frame-sized gradient stores are this design's choices.
module sift_top
  import dso_pkg::*;
#(
  parameter int IMG_W       = 1920,
  parameter int IMG_H       = 1080,
  parameter int OCTAVES     = 2,
  parameter int SCALES      = 4,
  parameter int KSIZE       = 3,
  parameter int DOWNSAMPLE  = 1,
  parameter int KP_DEPTH    = 16384,
  parameter int CONTRAST_TH = 3,
  parameter int EDGE_R      = 10,
  parameter int DRAIN       = 64
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               in_valid,
  output logic               in_ready,
  input  logic               in_sof,
  input  logic               in_sol,
  input  logic [PIX_W-1:0]   in_pix,
  output logic               desc_valid,
  output keypoint_t          desc_kp,
  output logic [6:0]         desc_idx,
  output logic [7:0]         desc_val,
  output logic               desc_last,
  output logic               frame_done,
  output logic [31:0]        kp_count,
  output logic               kp_overflow
);
  localparam int W0 = IMG_W >> DOWNSAMPLE;
  localparam int H0 = IMG_H >> DOWNSAMPLE;
  localparam int AW = $clog2(W0 * H0);

  typedef enum logic [1:0] {P_STREAM, P_DRAIN, P_DESC} phase_t;
  phase_t phase;

  logic acc;
  assign in_ready = (phase == P_STREAM);
  assign acc      = in_valid && in_ready;

  // ---------------- octave input streams ----------------
  logic [OCTAVES-1:0]            o_valid, o_sof, o_sol;
  logic [OCTAVES-1:0][PIX_W-1:0] o_pix;

  if (DOWNSAMPLE != 0) begin : g_ds_in
    downsample2x #(.W(IMG_W), .DW(PIX_W)) u_ds (
      .clk, .rst_n, .in_valid(acc), .in_sof, .in_sol, .in_pix,
      .out_valid(o_valid[0]), .out_sof(o_sof[0]), .out_sol(o_sol[0]), .out_pix(o_pix[0])
    );
  end else begin : g_no_ds
    assign o_valid[0] = acc;
    assign o_sof[0]   = in_sof;
    assign o_sol[0]   = in_sol;
    assign o_pix[0]   = in_pix;
  end

  for (genvar o = 1; o < OCTAVES; o++) begin : g_oct_ds
    downsample2x #(.W(W0 >> (o - 1)), .DW(PIX_W)) u_ds (
      .clk, .rst_n, .in_valid(o_valid[o-1]), .in_sof(o_sof[o-1]), .in_sol(o_sol[o-1]),
      .in_pix(o_pix[o-1]),
      .out_valid(o_valid[o]), .out_sof(o_sof[o]), .out_sol(o_sol[o]), .out_pix(o_pix[o])
    );
  end

  // ---------------- octaves ----------------
  keypoint_t [OCTAVES-1:0]               kp_head;
  logic      [OCTAVES-1:0]               kp_empty, kp_pop, kp_ovf;
  logic      [OCTAVES-1:0][31:0]         kp_tot;
  logic      [OCTAVES-1:0]               g_rd_en;
  logic      [AW-1:0]                    g_rd_addr;
  logic      [OCTAVES-1:0][MAG_W+ANG_W-1:0] g_rd_data;

  for (genvar o = 0; o < OCTAVES; o++) begin : g_oct
    localparam int WO  = W0 >> o;
    localparam int HO  = H0 >> o;
    localparam int AWO = $clog2(WO * HO);
    sift_octave #(
      .W(WO), .H(HO), .K(KSIZE), .SCALES(SCALES), .OCT_ID(o), .KP_DEPTH(KP_DEPTH),
      .CONTRAST_TH(CONTRAST_TH), .EDGE_R(EDGE_R)
    ) u_oct (
      .clk, .rst_n,
      .in_valid(o_valid[o]), .in_sof(o_sof[o]), .in_sol(o_sol[o]), .in_pix(o_pix[o]),
      .kp_pop(kp_pop[o]), .kp_head(kp_head[o]), .kp_empty(kp_empty[o]),
      .kp_overflow(kp_ovf[o]), .kp_total(kp_tot[o]),
      .g_rd_en(g_rd_en[o]), .g_rd_addr(g_rd_addr[AWO-1:0]), .g_rd_data(g_rd_data[o])
    );
  end

  always_comb begin
    kp_count = '0;
    for (int o = 0; o < OCTAVES; o++) kp_count += kp_tot[o];
    kp_overflow = |kp_ovf;
  end

  // ---------------- descriptor phase ----------------
  logic eng_start, eng_busy, eng_done;

  descriptor_engine #(.W0(W0), .H0(H0), .OCTAVES(OCTAVES)) u_eng (
    .clk, .rst_n, .start(eng_start), .busy(eng_busy), .done(eng_done),
    .kp_head, .kp_empty, .kp_pop, .g_rd_en, .g_rd_addr, .g_rd_data,
    .desc_valid, .desc_kp, .desc_idx, .desc_val, .desc_last
  );

  // ---------------- phase control ----------------
  localparam int PCW = $clog2(IMG_W * IMG_H + 1);
  logic [PCW-1:0] pix_cnt;
  logic [15:0]    drain_cnt;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      phase <= P_STREAM; pix_cnt <= '0; drain_cnt <= '0; eng_start <= 1'b0; frame_done <= 1'b0;
    end else begin
      eng_start  <= 1'b0;
      frame_done <= 1'b0;
      unique case (phase)
        P_STREAM: if (acc) begin
          if (pix_cnt == PCW'(IMG_W * IMG_H - 1)) begin
            pix_cnt   <= '0;
            drain_cnt <= '0;
            phase     <= P_DRAIN;
          end else pix_cnt <= pix_cnt + 1'b1;
        end
        P_DRAIN: begin
          drain_cnt <= drain_cnt + 1'b1;
          if (drain_cnt == 16'(DRAIN)) begin
            eng_start <= 1'b1;
            phase     <= P_DESC;
          end
        end
        P_DESC: if (eng_done) begin
          frame_done <= 1'b1;
          phase      <= P_STREAM;
        end
        default: phase <= P_STREAM;
      endcase
    end
  end
endmodule
