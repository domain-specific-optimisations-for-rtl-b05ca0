// sift_octave: the streaming part of SIFT for one octave.
//
// Pixels of the octave image stream through
//  - scale_space: SCALES Gaussian images in parallel and their DoG images;
//  - a 3x3 line buffer over all DoG images together, feeding one
//    extrema_detector per inner DoG layer (layers 1 .. SCALES-3); when a pixel
//    is a keypoint in more than one layer the lowest layer is reported;
//  - gradient_unit on Gaussian image 1, whose magnitude/angle stream is
//    written into this octave's gradient_store.
// Keypoints whose 16x16 descriptor window would reach outside the region of
// valid gradients are discarded; the others are pushed into a keypoint FIFO
// with octave-local coordinates.
//
// Interface: raster stream in (no back-pressure, one pixel per cycle at
// most); keypoint FIFO pop side; gradient store read port; counters.
// Timing: a keypoint is pushed 6 cycles after the pixel that completes its
// 3x3x3 neighbourhood; gradients are written ITER + 4 cycles after the pixel
// completing their 3x3 neighbourhood.
// The stage order follows the document's scale-space and descriptor
// description; choosing scale 1 for the gradients and the border rule are
// this design's choices.
module sift_octave
  import dso_pkg::*;
#(
  parameter int W           = 1920,
  parameter int H           = 1080,
  parameter int K           = 3,
  parameter int SCALES      = 4,
  parameter int OCT_ID      = 0,
  parameter int KP_DEPTH    = 16384,
  parameter int CONTRAST_TH = 3,
  parameter int EDGE_R      = 10
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        in_valid,
  input  logic                        in_sof,
  input  logic                        in_sol,
  input  logic [PIX_W-1:0]            in_pix,
  // keypoint FIFO
  input  logic                        kp_pop,
  output keypoint_t                   kp_head,
  output logic                        kp_empty,
  output logic                        kp_overflow,
  output logic [31:0]                 kp_total,
  // gradient store read port
  input  logic                        g_rd_en,
  input  logic [$clog2(W*H)-1:0]      g_rd_addr,
  output logic [MAG_W+ANG_W-1:0]      g_rd_data
);
  localparam int ND   = SCALES - 1;        // DoG images
  localparam int OFF  = K / 2 + 1;         // crop of DoG-window and gradient streams
  localparam int X_LO = 8 + OFF;
  localparam int X_HI = W - 8 - OFF;
  localparam int Y_LO = 8 + OFF;
  localparam int Y_HI = H - 8 - OFF;
  localparam int AW   = $clog2(W * H);

  // ---------------- scale space ----------------
  logic                          ss_valid, ss_sof, ss_sol;
  logic [SCALES-1:0][PIX_W-1:0]  gauss;
  logic [ND-1:0][DOG_W-1:0]      dog;

  scale_space #(.K(K), .SCALES(SCALES), .W(W)) u_ss (
    .clk, .rst_n, .in_valid, .in_sof, .in_sol, .in_pix,
    .out_valid(ss_valid), .out_sof(ss_sof), .out_sol(ss_sol), .gauss(gauss), .dog(dog)
  );

  // ---------------- extrema detection ----------------
  logic                                dw_valid, dw_sof, dw_sol;
  logic [2:0][2:0][ND*DOG_W-1:0]       dwin;

  line_buffer #(.K(3), .W(W), .DW(ND * DOG_W)) u_dlb (
    .clk, .rst_n, .in_valid(ss_valid), .in_sof(ss_sof), .in_sol(ss_sol), .in_pix(dog),
    .win_valid(dw_valid), .win_sof(dw_sof), .win_sol(dw_sol), .win(dwin)
  );

  logic [ND-1:0][2:0][2:0][DOG_W-1:0] lwin;   // per-layer windows
  always_comb begin
    for (int l = 0; l < ND; l++)
      for (int r = 0; r < 3; r++)
        for (int c = 0; c < 3; c++)
          lwin[l][r][c] = dwin[r][c][l*DOG_W +: DOG_W];
  end

  logic [SCALES-4:0] keep_l;
  for (genvar l = 1; l <= SCALES - 3; l++) begin : g_ext
    logic mx, mn;
    extrema_detector #(.CONTRAST_TH(CONTRAST_TH), .EDGE_R(EDGE_R)) u_ext (
      .below(lwin[l-1]), .centre(lwin[l]), .above(lwin[l+1]),
      .is_max(mx), .is_min(mn), .keep(keep_l[l-1])
    );
  end

  logic [COORD_W-1:0] ex_x, ex_y;    // window-stream coordinates
  logic [COORD_W-1:0] ex_xc, ex_yc;
  always_comb begin
    ex_xc = dw_sof || dw_sol ? '0 : ex_x + 1'b1;
    ex_yc = dw_sof ? '0 : (dw_sol ? ex_y + 1'b1 : ex_y);
  end

  logic      kp_push;
  keypoint_t kp_new;
  logic [1:0] layer_c;
  always_comb begin
    layer_c = '0;
    for (int l = SCALES - 4; l >= 0; l--) if (keep_l[l]) layer_c = 2'(l + 1);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      ex_x <= '0; ex_y <= '0; kp_push <= 1'b0; kp_new <= '0; kp_total <= '0;
    end else begin
      kp_push <= 1'b0;
      if (dw_valid) begin
        ex_x <= ex_xc;
        ex_y <= ex_yc;
        if (|keep_l
            && int'(ex_xc) + OFF >= X_LO && int'(ex_xc) + OFF <= X_HI
            && int'(ex_yc) + OFF >= Y_LO && int'(ex_yc) + OFF <= Y_HI) begin
          kp_push       <= 1'b1;
          kp_new.octave <= 2'(OCT_ID);
          kp_new.layer  <= layer_c;
          kp_new.x      <= ex_xc + COORD_W'(OFF);
          kp_new.y      <= ex_yc + COORD_W'(OFF);
          kp_total      <= kp_total + 1;
        end
      end
    end
  end

  logic [$clog2(KP_DEPTH):0] kp_count;
  logic                      kp_full;
  sync_fifo #(.DEPTH(KP_DEPTH), .DW($bits(keypoint_t))) u_kpf (
    .clk, .rst_n, .push(kp_push), .din(kp_new), .pop(kp_pop), .dout(kp_head),
    .empty(kp_empty), .full(kp_full), .count(kp_count), .overflow(kp_overflow)
  );

  // ---------------- gradients ----------------
  logic               gr_valid, gr_sof, gr_sol;
  logic [MAG_W-1:0]   gr_mag;
  logic [ANG_W-1:0]   gr_ang;

  gradient_unit #(.W(W)) u_grad (
    .clk, .rst_n, .in_valid(ss_valid), .in_sof(ss_sof), .in_sol(ss_sol), .in_pix(gauss[1]),
    .out_valid(gr_valid), .out_sof(gr_sof), .out_sol(gr_sol), .out_mag(gr_mag), .out_ang(gr_ang)
  );

  logic [COORD_W-1:0] gx, gy, gxc, gyc;
  always_comb begin
    gxc = gr_sof || gr_sol ? '0 : gx + 1'b1;
    gyc = gr_sof ? '0 : (gr_sol ? gy + 1'b1 : gy);
  end
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      gx <= '0; gy <= '0;
    end else if (gr_valid) begin
      gx <= gxc; gy <= gyc;
    end
  end

  logic [AW-1:0] g_wr_addr;
  assign g_wr_addr = AW'((int'(gyc) + OFF) * W + int'(gxc) + OFF);

  gradient_store #(.W(W), .H(H)) u_gs (
    .clk, .wr_en(gr_valid), .wr_addr(g_wr_addr), .wr_data({gr_mag, gr_ang}),
    .rd_en(g_rd_en), .rd_addr(g_rd_addr), .rd_data(g_rd_data)
  );
endmodule
