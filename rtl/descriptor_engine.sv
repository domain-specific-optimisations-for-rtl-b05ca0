// descriptor_engine: per-keypoint orientation assignment and descriptor
// generation after a frame has been streamed.
//
// On start the engine drains the keypoint FIFOs octave by octave. For each
// keypoint it reads the 16x16 gradient window (samples at x-8..x+7,
// y-8..y+7, one per cycle, raster order) from that octave's gradient store
// twice: the first pass feeds orientation_histogram, which yields the
// dominant orientation; the second pass feeds descriptor_generator with
// angles taken relative to it. The 128 normalised elements are forwarded
// with the keypoint they belong to. done pulses when every FIFO is empty
// and the last descriptor has been sent.
//
// Interface: per-octave FIFO head/empty/pop and gradient-store read ports
// (read data one cycle after the address); descriptor element stream out.
// Timing: about 2 x 257 read cycles + 40 cycles peak search + ~3.2k cycles
// normalisation per keypoint.
// The two-step flow (36-bin orientation, then 4x4x8 descriptor) follows the
// document; the sequential schedule is this design's choice.
module descriptor_engine
  import dso_pkg::*;
#(
  parameter int W0      = 960,
  parameter int H0      = 540,
  parameter int OCTAVES = 2
) (
  input  logic                               clk,
  input  logic                               rst_n,
  input  logic                               start,
  output logic                               busy,
  output logic                               done,
  // keypoint FIFOs
  input  keypoint_t [OCTAVES-1:0]            kp_head,
  input  logic      [OCTAVES-1:0]            kp_empty,
  output logic      [OCTAVES-1:0]            kp_pop,
  // gradient stores
  output logic      [OCTAVES-1:0]            g_rd_en,
  output logic      [$clog2(W0*H0)-1:0]      g_rd_addr,
  input  logic      [OCTAVES-1:0][MAG_W+ANG_W-1:0] g_rd_data,
  // descriptor stream
  output logic                               desc_valid,
  output keypoint_t                          desc_kp,
  output logic [6:0]                         desc_idx,
  output logic [7:0]                         desc_val,
  output logic                               desc_last
);
  localparam int AW = $clog2(W0 * H0);

  typedef enum logic [2:0] {E_IDLE, E_SEL, E_CLR, E_ORI, E_FIND, E_DSC, E_NORM} estate_t;
  estate_t state;

  logic [$clog2(OCTAVES+1)-1:0] oct;
  keypoint_t   kp;
  logic [8:0]  cnt;           // sample counter, 256 = last issued
  logic        rd_v;          // read data valid next cycle
  logic [3:0]  rd_dx, rd_dy;
  logic [MAG_W+ANG_W-1:0] rd_word;
  logic [ANG_W-1:0] dom_ang_q;

  // orientation histogram / descriptor generator
  logic oh_clear, oh_find, oh_done;
  logic [5:0] oh_bin;
  logic [16:0] oh_val;
  logic [ANG_W-1:0] oh_ang;
  logic dg_finish, dg_busy, dg_valid, dg_last;
  logic [6:0] dg_idx;
  logic [7:0] dg_val;
  logic smp_ori, smp_dsc;

  assign rd_word = g_rd_data[oct];
  assign smp_ori = rd_v && (state == E_ORI);
  assign smp_dsc = rd_v && (state == E_DSC);

  orientation_histogram u_oh (
    .clk, .rst_n, .clear(oh_clear), .s_valid(smp_ori), .s_dx(rd_dx), .s_dy(rd_dy),
    .s_mag(rd_word[ANG_W +: MAG_W]), .s_ang(rd_word[ANG_W-1:0]),
    .find(oh_find), .done(oh_done), .peak_bin(oh_bin), .peak_val(oh_val), .dom_ang(oh_ang)
  );

  descriptor_generator u_dg (
    .clk, .rst_n, .clear(oh_clear), .s_valid(smp_dsc), .s_dx(rd_dx), .s_dy(rd_dy),
    .s_mag(rd_word[ANG_W +: MAG_W]), .s_ang(rd_word[ANG_W-1:0]), .dom_ang(dom_ang_q),
    .finish(dg_finish), .busy(dg_busy), .d_valid(dg_valid), .d_idx(dg_idx), .d_val(dg_val),
    .d_last(dg_last)
  );

  // window sample address for the current counter value
  logic [3:0] dx_c, dy_c;
  int         wo;
  assign dx_c = cnt[3:0];
  assign dy_c = cnt[7:4];
  always_comb begin
    wo = W0 >> oct;
    g_rd_addr = AW'((int'(kp.y) - 8 + int'(dy_c)) * wo + int'(kp.x) - 8 + int'(dx_c));
    g_rd_en   = '0;
    if ((state == E_ORI || state == E_DSC) && !cnt[8]) g_rd_en[oct] = 1'b1;
  end

  assign busy = (state != E_IDLE);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state <= E_IDLE; oct <= '0; kp <= '0; cnt <= '0; rd_v <= 1'b0; rd_dx <= '0; rd_dy <= '0;
      dom_ang_q <= '0; oh_clear <= 1'b0; oh_find <= 1'b0; dg_finish <= 1'b0; kp_pop <= '0;
      done <= 1'b0;
    end else begin
      oh_clear  <= 1'b0;
      oh_find   <= 1'b0;
      dg_finish <= 1'b0;
      kp_pop    <= '0;
      done      <= 1'b0;
      rd_v      <= 1'b0;
      unique case (state)
        E_IDLE: if (start) begin
          state <= E_SEL; oct <= '0;
        end
        E_SEL: begin
          if (int'(oct) == OCTAVES) begin
            state <= E_IDLE;
            done  <= 1'b1;
          end else if (kp_empty[oct]) begin
            oct <= oct + 1'b1;
          end else begin
            kp          <= kp_head[oct];
            kp_pop[oct] <= 1'b1;
            oh_clear    <= 1'b1;
            state       <= E_CLR;
          end
        end
        E_CLR: begin
          cnt   <= '0;
          state <= E_ORI;
        end
        E_ORI, E_DSC: begin
          if (!cnt[8]) begin
            rd_v  <= 1'b1;
            rd_dx <= dx_c;
            rd_dy <= dy_c;
            cnt   <= cnt + 1'b1;
          end else if (!rd_v) begin
            if (state == E_ORI) begin
              oh_find <= 1'b1;
              state   <= E_FIND;
            end else begin
              dg_finish <= 1'b1;
              state     <= E_NORM;
            end
          end
        end
        E_FIND: if (oh_done) begin
          dom_ang_q <= oh_ang;
          cnt       <= '0;
          state     <= E_DSC;
        end
        E_NORM: if (dg_valid && dg_last) state <= E_SEL;
        default: state <= E_IDLE;
      endcase
    end
  end

  assign desc_valid = dg_valid;
  assign desc_kp    = kp;
  assign desc_idx   = dg_idx;
  assign desc_val   = dg_val;
  assign desc_last  = dg_last;
endmodule
