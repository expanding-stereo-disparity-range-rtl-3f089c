// phase_corr_chain: phase correlation, interpolation/peak detection and temporal
// seeding for one correlation direction (DIR=0 left-to-right with the left image as
// reference, DIR=1 right-to-left).
// For every scale s (1, 2, 4) a shift_corr_unit correlates the normalised phase
// streams. Its PTW centre is the disparity this pixel had in the previous frame,
// read from the double-buffered disparity_store at the full-resolution position
// (x*s, y*s) and divided by s; before the first frame has completed it is 0. The SRW
// centre (full-resolution units, from srw_scheduler) is divided by s as well.
// interp_peak combines the scales and finds the peak; its result is both the output
// and the seed written back for the next frame. Bank selection flips when a frame
// has been read out.
// Structure from the description (Figure 3.11 windows per scale, temporal loop);
// the bank handling and the seeding path are own choices.
module phase_corr_chain
  import stereo_pkg::*;
#(
  parameter int unsigned LINE_W = IMG_W,
  parameter int unsigned NROWS  = IMG_H,
  parameter int unsigned MAXD   = MAX_DISP,
  parameter bit          DIR    = 1'b0
) (
  input  logic          clk,
  input  logic          rst_n,
  input  psmp_t         ref1, ref2, ref4,
  input  psmp_t         srch1, srch2, srch4,
  input  disp_t         srw_c,
  input  logic          frame_end,
  output logic          row_ready,
  input  logic          go,
  output logic          out_valid,
  output logic [XW-1:0] out_x,
  output logic [YW-1:0] out_y,
  output disp_t         out_d,
  output logic          out_srw,
  output logic          frame_done
);
  // ---------------- previous-frame disparities ------------------------------------
  logic          wbank, have_prev;
  logic [XW-1:0] rx [3];
  logic [YW-1:0] ry [3];
  disp_t         prev [3];

  always_comb begin
    rx[0] = ref1.x;                 ry[0] = ref1.y;
    rx[1] = XW'({ref2.x, 1'b0});    ry[1] = YW'({ref2.y, 1'b0});
    rx[2] = XW'({ref4.x, 2'b00});   ry[2] = YW'({ref4.y, 2'b00});
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wbank     <= 1'b0;
      have_prev <= 1'b0;
    end else if (frame_done) begin
      wbank     <= ~wbank;
      have_prev <= 1'b1;
    end
  end

  disparity_store #(.LINE_W(LINE_W), .NROWS(NROWS)) u_store (
    .clk(clk), .we(out_valid), .wbank(wbank), .wx(out_x), .wy(out_y), .wd(out_d),
    .rbank(~wbank), .rx(rx), .ry(ry), .rd(prev)
  );

  disp_t pc1, pc2, pc4;
  assign pc1 = have_prev ? prev[0]        : '0;
  assign pc2 = have_prev ? prev[1] >> 1   : '0;
  assign pc4 = have_prev ? prev[2] >> 2   : '0;

  // ---------------- correlation at three scales -------------------------------------
  logic             v1, v2, v4;
  logic [XW-1:0]    x1, x2, x4;
  logic [YW-1:0]    y1, y2, y4;
  disp_t            p1, p2, p4, s1, s2, s4;
  vote_t [WIN1-1:0] vp1, vs1;
  vote_t [WIN2-1:0] vp2, vs2;
  vote_t [WIN4-1:0] vp4, vs4;

  shift_corr_unit #(.NWIN(WIN1), .LINE_W(LINE_W), .MAXD_S(MAXD), .DIR(DIR)) u_c1 (
    .clk(clk), .rst_n(rst_n), .ref_s(ref1), .srch_s(srch1), .ptw_c(pc1), .srw_c(srw_c),
    .out_valid(v1), .out_x(x1), .out_y(y1), .out_pc(p1), .out_sc(s1), .out_vp(vp1), .out_vs(vs1)
  );
  shift_corr_unit #(.NWIN(WIN2), .LINE_W(LINE_W/2), .MAXD_S(MAXD/2), .DIR(DIR)) u_c2 (
    .clk(clk), .rst_n(rst_n), .ref_s(ref2), .srch_s(srch2), .ptw_c(pc2), .srw_c(srw_c >> 1),
    .out_valid(v2), .out_x(x2), .out_y(y2), .out_pc(p2), .out_sc(s2), .out_vp(vp2), .out_vs(vs2)
  );
  shift_corr_unit #(.NWIN(WIN4), .LINE_W(LINE_W/4), .MAXD_S(MAXD/4), .DIR(DIR)) u_c4 (
    .clk(clk), .rst_n(rst_n), .ref_s(ref4), .srch_s(srch4), .ptw_c(pc4), .srw_c(srw_c >> 2),
    .out_valid(v4), .out_x(x4), .out_y(y4), .out_pc(p4), .out_sc(s4), .out_vp(vp4), .out_vs(vs4)
  );

  // ---------------- interpolation and peak detection --------------------------------
  score_t score_unused;
  interp_peak #(.LINE_W(LINE_W), .NROWS(NROWS)) u_peak (
    .clk(clk), .rst_n(rst_n),
    .c1_valid(v1), .c1_x(x1), .c1_y(y1), .c1_pc(p1), .c1_sc(s1), .c1_vp(vp1), .c1_vs(vs1),
    .c2_valid(v2), .c2_x(x2), .c2_y(y2), .c2_pc(p2), .c2_sc(s2), .c2_vp(vp2), .c2_vs(vs2),
    .c4_valid(v4), .c4_x(x4), .c4_y(y4), .c4_pc(p4), .c4_sc(s4), .c4_vp(vp4), .c4_vs(vs4),
    .frame_end(frame_end), .row_ready(row_ready), .go(go),
    .out_valid(out_valid), .out_x(out_x), .out_y(out_y), .out_d(out_d),
    .out_score(score_unused), .out_srw(out_srw), .frame_done(frame_done)
  );
endmodule
