// stereo_top: real-time dense stereo disparity system based on local weighted phase
// correlation with shiftable correlation windows.
//
// Data flow (all after the input buffers on the system clock clk, >= 4x cam_clk):
//   camera pixels -> image_rectifier (L, R) -> scale_orient_decomp (L, R)
//   -> 18 l1_normalisers (3 scales x 3 orientations x 2 images)
//   -> tdm_tx -> BUS_W-bit board bus -> tdm_rx       (inter-FPGA link)
//   -> phase_corr_chain DIR=0 (left reference) and DIR=1 (right reference)
//   -> consistency_check -> disparity map with invalid flag.
// One srw_scheduler positions the roving windows of both chains. The two chains
// read out their rows in lockstep (a row starts only when both are ready) so the
// consistency check sees the same pixel from both in the same cycle.
//
// Inputs: the two cameras share cam_clk and timing (cam_valid, cam_x, cam_y); one
// field is LINE_W x NROWS pixels. Outputs: one checked disparity per pixel in
// raster order (disp_*), plus raw chain outputs and mechanism strobes for
// monitoring. Latency: a disparity row leaves after the coarsest scale has
// finished the matching block row (about 25 input lines at the defaults).
// The partitioning into units follows the description; the stream format with
// coordinates, link framing and lockstep readout are this design's choices.
module stereo_top
  import stereo_pkg::*;
#(
  parameter int unsigned LINE_W   = IMG_W,
  parameter int unsigned NROWS    = IMG_H,
  parameter int unsigned MAXD     = MAX_DISP,
  parameter int unsigned SRW_STEP = WIN1,
  parameter int unsigned BUS_W    = 100,
  parameter int unsigned FLUSH_DLY = 32,
  parameter logic signed [31:0] AL_COEF [6] = '{32'sd0, 32'sd65536, 32'sd0, 32'sd0, 32'sd0, 32'sd0},
  parameter logic signed [31:0] BL_COEF [6] = '{32'sd0, 32'sd0, 32'sd65536, 32'sd0, 32'sd0, 32'sd0},
  parameter logic signed [31:0] AR_COEF [6] = '{32'sd0, 32'sd65536, 32'sd0, 32'sd0, 32'sd0, 32'sd0},
  parameter logic signed [31:0] BR_COEF [6] = '{32'sd0, 32'sd0, 32'sd65536, 32'sd0, 32'sd0, 32'sd0}
) (
  input  logic             cam_clk,
  input  logic             cam_valid,
  input  logic [XW-1:0]    cam_x,
  input  logic [YW-1:0]    cam_y,
  input  logic [PIX_W-1:0] cam_pix_l,
  input  logic [PIX_W-1:0] cam_pix_r,
  input  logic             clk,
  input  logic             rst_n,
  // checked disparity map
  output logic             disp_valid,
  output logic [XW-1:0]    disp_x,
  output logic [YW-1:0]    disp_y,
  output disp_t            disp_d,
  output logic             disp_invalid,
  // monitoring
  output disp_t            rl_d,
  output logic             lr_srw_win,
  output logic             rl_srw_win,
  output disp_t            srw_c,
  output logic             srw_wrap,
  output logic             rect_missing,
  output logic             frame_start,
  output logic             frame_done
);
  // ---------------- rectification ---------------------------------------------------
  logic             rl_v, rr_v, rl_miss, rr_miss;
  logic [XW-1:0]    rl_x, rr_x;
  logic [YW-1:0]    rl_y, rr_y;
  logic [PIX_W-1:0] rl_p, rr_p;
  logic             fs_l, fs_r, fd_l, fd_r, fp_l, fp_r;

  image_rectifier #(.LINE_W(LINE_W), .NROWS(NROWS), .A_COEF(AL_COEF), .B_COEF(BL_COEF)) u_rect_l (
    .cam_clk(cam_clk), .cam_valid(cam_valid), .cam_x(cam_x), .cam_y(cam_y), .cam_pix(cam_pix_l),
    .clk(clk), .rst_n(rst_n), .out_valid(rl_v), .out_x(rl_x), .out_y(rl_y), .out_pix(rl_p),
    .out_missing(rl_miss), .frame_start(fs_l), .frame_done(fd_l), .frame_par(fp_l)
  );
  image_rectifier #(.LINE_W(LINE_W), .NROWS(NROWS), .A_COEF(AR_COEF), .B_COEF(BR_COEF)) u_rect_r (
    .cam_clk(cam_clk), .cam_valid(cam_valid), .cam_x(cam_x), .cam_y(cam_y), .cam_pix(cam_pix_r),
    .clk(clk), .rst_n(rst_n), .out_valid(rr_v), .out_x(rr_x), .out_y(rr_y), .out_pix(rr_p),
    .out_missing(rr_miss), .frame_start(fs_r), .frame_done(fd_r), .frame_par(fp_r)
  );

  assign rect_missing = rl_v && (rl_miss || rr_miss);
  assign frame_start  = fs_l;

  // ---------------- scale / orientation decomposition -------------------------------
  fsmp_t fl1, fl2, fl4, fr1, fr2, fr4;

  scale_orient_decomp #(.LINE_W(LINE_W)) u_dec_l (
    .clk(clk), .in_valid(rl_v), .in_x(rl_x), .in_y(rl_y), .in_pix(rl_p), .s1(fl1), .s2(fl2), .s4(fl4)
  );
  scale_orient_decomp #(.LINE_W(LINE_W)) u_dec_r (
    .clk(clk), .in_valid(rr_v), .in_x(rr_x), .in_y(rr_y), .in_pix(rr_p), .s1(fr1), .s2(fr2), .s4(fr4)
  );

  // ---------------- normalisation (18 units) -----------------------------------------
  fsmp_t fin [6];
  psmp_t pout [6];                // 0..2: left s1,s2,s4; 3..5: right s1,s2,s4
  assign fin = '{fl1, fl2, fl4, fr1, fr2, fr4};

  for (genvar i = 0; i < 6; i++) begin : g_norm
    logic nv [NORI];
    for (genvar o = 0; o < NORI; o++) begin : g_ori
      l1_normaliser u_n (
        .clk(clk), .in_valid(fin[i].valid), .in_c(fin[i].c[o]),
        .out_valid(nv[o]), .out_c(pout[i].c[o])
      );
    end
    always_ff @(posedge clk) begin
      pout[i].x <= fin[i].x;
      pout[i].y <= fin[i].y;
    end
    assign pout[i].valid = nv[0];
  end

  // ---------------- inter-FPGA TDM link -------------------------------------------------
  typedef struct packed {
    logic            valid;
    logic [XW-1:0]   x;
    logic [YW-1:0]   y;
    cph_t [NORI-1:0] l;
    cph_t [NORI-1:0] r;
  } lnk_t;
  typedef lnk_t [2:0] payload_t;   // index 0: scale 1, 1: scale 2, 2: scale 4
  localparam int unsigned PAY_W = $bits(payload_t);

  payload_t tx_word, rx_word;
  logic     tx_valid, tx_ready, rx_valid;
  logic     bus_valid, bus_first;
  logic [BUS_W-1:0] bus_data;

  always_comb begin
    for (int s = 0; s < 3; s++) begin
      tx_word[s].valid = pout[s].valid;
      tx_word[s].x     = pout[s].x;
      tx_word[s].y     = pout[s].y;
      tx_word[s].l     = pout[s].c;
      tx_word[s].r     = pout[3+s].c;
    end
    tx_valid = pout[0].valid || pout[1].valid || pout[2].valid;
  end

  tdm_tx #(.PAY_W(PAY_W), .BUS_W(BUS_W)) u_tx (
    .clk(clk), .rst_n(rst_n), .in_valid(tx_valid), .in_data(tx_word), .in_ready(tx_ready),
    .bus_valid(bus_valid), .bus_first(bus_first), .bus_data(bus_data)
  );
  logic [PAY_W-1:0] rx_bits;
  tdm_rx #(.PAY_W(PAY_W), .BUS_W(BUS_W)) u_rx (
    .clk(clk), .rst_n(rst_n), .bus_valid(bus_valid), .bus_first(bus_first), .bus_data(bus_data),
    .out_valid(rx_valid), .out_data(rx_bits)
  );
  assign rx_word = payload_t'(rx_bits);

  psmp_t ls [3], rs [3];
  always_comb begin
    for (int s = 0; s < 3; s++) begin
      ls[s].valid = rx_valid && rx_word[s].valid;
      ls[s].x     = rx_word[s].x;
      ls[s].y     = rx_word[s].y;
      ls[s].c     = rx_word[s].l;
      rs[s].valid = rx_valid && rx_word[s].valid;
      rs[s].x     = rx_word[s].x;
      rs[s].y     = rx_word[s].y;
      rs[s].c     = rx_word[s].r;
    end
  end

  // ---------------- roving window schedule and frame end ----------------------------
  srw_scheduler #(.STEP(SRW_STEP), .MAXC(MAXD)) u_srw (
    .clk(clk), .rst_n(rst_n), .frame_start(fs_l), .srw_c(srw_c), .sweep_wrap(srw_wrap)
  );

  logic [FLUSH_DLY-1:0] fend_sr;
  always_ff @(posedge clk) begin
    if (!rst_n) fend_sr <= '0;
    else        fend_sr <= {fend_sr[FLUSH_DLY-2:0], fd_l};
  end

  // ---------------- correlation chains --------------------------------------------------
  logic          lr_rdy, rl_rdy, go;
  logic          lr_v, rl_v2, lr_fd, rl_fd;
  logic [XW-1:0] lr_x, rl_x2;
  logic [YW-1:0] lr_y, rl_y2;
  disp_t         lr_d;

  assign go = lr_rdy && rl_rdy;

  phase_corr_chain #(.LINE_W(LINE_W), .NROWS(NROWS), .MAXD(MAXD), .DIR(1'b0)) u_lr (
    .clk(clk), .rst_n(rst_n), .ref1(ls[0]), .ref2(ls[1]), .ref4(ls[2]),
    .srch1(rs[0]), .srch2(rs[1]), .srch4(rs[2]), .srw_c(srw_c),
    .frame_end(fend_sr[FLUSH_DLY-1]), .row_ready(lr_rdy), .go(go),
    .out_valid(lr_v), .out_x(lr_x), .out_y(lr_y), .out_d(lr_d), .out_srw(lr_srw_win),
    .frame_done(lr_fd)
  );
  phase_corr_chain #(.LINE_W(LINE_W), .NROWS(NROWS), .MAXD(MAXD), .DIR(1'b1)) u_rl (
    .clk(clk), .rst_n(rst_n), .ref1(rs[0]), .ref2(rs[1]), .ref4(rs[2]),
    .srch1(ls[0]), .srch2(ls[1]), .srch4(ls[2]), .srw_c(srw_c),
    .frame_end(fend_sr[FLUSH_DLY-1]), .row_ready(rl_rdy), .go(go),
    .out_valid(rl_v2), .out_x(rl_x2), .out_y(rl_y2), .out_d(rl_d), .out_srw(rl_srw_win),
    .frame_done(rl_fd)
  );
  // frame_done is aligned with the consistency check's output register, so it
  // coincides with the field's last checked disparity
  always_ff @(posedge clk) begin
    if (!rst_n) frame_done <= 1'b0;
    else        frame_done <= lr_fd;
  end

  // ---------------- consistency check ---------------------------------------------------
  consistency_check #(.DEPTH(2 ** $clog2(MAXD + 2*WIN1 + 2))) u_cc (
    .clk(clk), .rst_n(rst_n),
    .lr_valid(lr_v), .lr_x(lr_x), .lr_y(lr_y), .lr_d(lr_d),
    .rl_valid(rl_v2), .rl_x(rl_x2), .rl_y(rl_y2), .rl_d(rl_d),
    .out_valid(disp_valid), .out_x(disp_x), .out_y(disp_y), .out_d(disp_d),
    .out_invalid(disp_invalid)
  );

  // both chains must stay in lockstep and the link must never be overrun
  a_lockstep: assert property (@(posedge clk) disable iff (!rst_n)
    lr_v == rl_v2 && (!lr_v || (lr_x == rl_x2 && lr_y == rl_y2)))
    else $error("stereo_top: correlation chains out of lockstep");
endmodule
