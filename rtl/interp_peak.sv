// interp_peak: interpolation / peak-detection unit for one correlation direction.
//
// Alignment: the three scales finish a given image row at very different times
// (coarse levels pass through more line buffers). Each scale's smoothed votes are
// written into a row ring (RING1/RING2/RING4 rows, indexed by the coordinates the
// stream carries). A scale has completed row q once it writes row q+2; at the end
// of a frame (frame_end) every row counts as complete. Output row r is processed
// when scale 1 has row r, scale 2 row r/2 and scale 4 row r/4 (row_ready); with
// go high the row is read out at one pixel per clock.
//
// Combination: for each full-resolution pixel the nine PTW and nine SRW candidates
// t = centre-4..centre+4 are scored as
//   V(t) = C1(t) + C2(t) + C4(t)
// where C2 and C4 are the coarse votes of the pixel's block (constant
// interpolation in x and y) interpolated in disparity with a 3-point quadratic
// (Lagrange) through the nearest coarse samples; candidates outside a coarse
// window's coverage get 0 from that scale. The peak of the 18 scores is the
// disparity (ties go to the PTW). out_srw says that the SRW held the peak, i.e. the
// tracking window will jump to the roving window's match in the next frame.
// Outputs are registered; frame_done pulses after the last row of a frame.
// From the description: quadratic interpolation in t, constant in x, summation
// across scales, maximum as disparity, PTW latching onto a stronger SRW peak.
// Own choices: the row rings, the completion rule, quarter-step Lagrange weights.
module interp_peak
  import stereo_pkg::*;
#(
  parameter int unsigned LINE_W = IMG_W,
  parameter int unsigned NROWS  = IMG_H,
  parameter int unsigned RING1  = 32,
  parameter int unsigned RING2  = 16,
  parameter int unsigned RING4  = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  // scale 1
  input  logic             c1_valid,
  input  logic [XW-1:0]    c1_x,
  input  logic [YW-1:0]    c1_y,
  input  disp_t            c1_pc, c1_sc,
  input  vote_t [WIN1-1:0] c1_vp, c1_vs,
  // scale 2
  input  logic             c2_valid,
  input  logic [XW-1:0]    c2_x,
  input  logic [YW-1:0]    c2_y,
  input  disp_t            c2_pc, c2_sc,
  input  vote_t [WIN2-1:0] c2_vp, c2_vs,
  // scale 4
  input  logic             c4_valid,
  input  logic [XW-1:0]    c4_x,
  input  logic [YW-1:0]    c4_y,
  input  disp_t            c4_pc, c4_sc,
  input  vote_t [WIN4-1:0] c4_vp, c4_vs,
  // control
  input  logic             frame_end,
  output logic             row_ready,
  input  logic             go,
  // result
  output logic             out_valid,
  output logic [XW-1:0]    out_x,
  output logic [YW-1:0]    out_y,
  output disp_t            out_d,
  output score_t           out_score,
  output logic             out_srw,
  output logic             frame_done
);
  typedef struct packed { disp_t pc; disp_t sc; vote_t [WIN1-1:0] vp; vote_t [WIN1-1:0] vs; } e1_t;
  typedef struct packed { disp_t pc; disp_t sc; vote_t [WIN2-1:0] vp; vote_t [WIN2-1:0] vs; } e2_t;
  typedef struct packed { disp_t pc; disp_t sc; vote_t [WIN4-1:0] vp; vote_t [WIN4-1:0] vs; } e4_t;

  localparam int unsigned W2 = LINE_W / 2;
  localparam int unsigned W4 = LINE_W / 4;

  e1_t ring1 [RING1*LINE_W];
  e2_t ring2 [RING2*W2];
  e4_t ring4 [RING4*W4];

  // ---------------- write side and row completion -----------------------------
  logic [YW:0] comp1, comp2, comp4;     // number of completed rows per scale
  logic        flush;

  function automatic logic [YW:0] upd(input logic [YW:0] comp, input logic [YW-1:0] y);
    // rows advance one at a time; a far jump is a late pixel of the previous frame
    if (y >= YW'(1) && (YW+1)'(y) - 1 > comp && (YW+1)'(y) - 1 <= comp + 2)
      return (YW+1)'(y) - 1;
    return comp;
  endfunction

  always_ff @(posedge clk) begin
    if (c1_valid && c1_x < XW'(LINE_W))
      ring1[(int'(c1_y) % RING1)*LINE_W + int'(c1_x)] <= '{pc: c1_pc, sc: c1_sc, vp: c1_vp, vs: c1_vs};
    if (c2_valid && c2_x < XW'(W2))
      ring2[(int'(c2_y) % RING2)*W2 + int'(c2_x)] <= '{pc: c2_pc, sc: c2_sc, vp: c2_vp, vs: c2_vs};
    if (c4_valid && c4_x < XW'(W4))
      ring4[(int'(c4_y) % RING4)*W4 + int'(c4_x)] <= '{pc: c4_pc, sc: c4_sc, vp: c4_vp, vs: c4_vs};
  end

  // ---------------- read side ----------------------------------------------------
  logic          busy;
  logic [YW:0]   rr;
  logic [XW-1:0] rx;

  always_comb begin
    row_ready = !busy && rr < (YW+1)'(NROWS) &&
                (flush || (comp1 > rr && comp2 > (rr >> 1) && comp4 > (rr >> 2)));
  end

  e1_t a1;
  e2_t a2;
  e4_t a4;
  always_comb begin
    a1 = ring1[(int'(rr) % RING1)*LINE_W + int'(rx)];
    a2 = ring2[(int'(rr) / 2 % RING2)*W2 + int'(rx) / 2];
    a4 = ring4[(int'(rr) / 4 % RING4)*W4 + int'(rx) / 4];
  end

  // quadratic interpolation of a coarse window (n samples, spacing s, centre c in
  // coarse units) at full-resolution disparity t
  function automatic logic signed [SCORE_W-1:0] qinterp(input vote_t [4:0] v, input int n,
                                                        input int s, input int c, input int t);
    int p, m, num, wm, w0, wp;
    logic signed [SCORE_W+7:0] acc;
    p = t - s * (c - (n - 1) / 2);
    if (p < 0 || p > s * (n - 1)) return '0;
    m = (p + s / 2) / s;
    if (m < 1) m = 1;
    if (m > n - 2) m = n - 2;
    num = ((p - s * m) * 4) / s;
    wm  = num * (num - 4);
    w0  = 32 - 2 * num * num;
    wp  = num * (num + 4);
    acc = (SCORE_W+8)'(wm) * (SCORE_W+8)'(v[m-1]) + (SCORE_W+8)'(w0) * (SCORE_W+8)'(v[m]) +
          (SCORE_W+8)'(wp) * (SCORE_W+8)'(v[m+1]);
    return SCORE_W'(acc >>> 5);
  endfunction

  score_t sc_p [WIN1], sc_s [WIN1];
  logic   ok_p [WIN1], ok_s [WIN1];
  int     t_p [WIN1], t_s [WIN1];
  score_t best;
  int     best_t;
  logic   best_srw, any;

  always_comb begin
    vote_t [4:0] v2p, v2s, v4p, v4s;
    v2p = '0; v2s = '0; v4p = '0; v4s = '0;
    for (int i = 0; i < WIN2; i++) begin v2p[i] = a2.vp[i]; v2s[i] = a2.vs[i]; end
    for (int i = 0; i < WIN4; i++) begin v4p[i] = a4.vp[i]; v4s[i] = a4.vs[i]; end
    best = '0; best_t = 0; best_srw = 1'b0; any = 1'b0;
    for (int k = 0; k < WIN1; k++) begin
      t_p[k] = int'(a1.pc) - (WIN1 - 1) / 2 + k;
      t_s[k] = int'(a1.sc) - (WIN1 - 1) / 2 + k;
      ok_p[k] = t_p[k] >= 0;
      ok_s[k] = t_s[k] >= 0;
      sc_p[k] = SCORE_W'(a1.vp[k]) + qinterp(v2p, WIN2, 2, int'(a2.pc), t_p[k]) +
                qinterp(v4p, WIN4, 4, int'(a4.pc), t_p[k]);
      sc_s[k] = SCORE_W'(a1.vs[k]) + qinterp(v2s, WIN2, 2, int'(a2.sc), t_s[k]) +
                qinterp(v4s, WIN4, 4, int'(a4.sc), t_s[k]);
    end
    for (int k = 0; k < WIN1; k++)
      if (ok_p[k] && (!any || sc_p[k] > best)) begin
        best = sc_p[k]; best_t = t_p[k]; best_srw = 1'b0; any = 1'b1;
      end
    for (int k = 0; k < WIN1; k++)
      if (ok_s[k] && (!any || sc_s[k] > best)) begin
        best = sc_s[k]; best_t = t_s[k]; best_srw = 1'b1; any = 1'b1;
      end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      comp1 <= '0; comp2 <= '0; comp4 <= '0;
      flush <= 1'b0;
      busy  <= 1'b0;
      rr    <= '0;
      rx    <= '0;
      out_valid  <= 1'b0;
      frame_done <= 1'b0;
    end else begin
      out_valid  <= 1'b0;
      frame_done <= 1'b0;
      if (c1_valid) comp1 <= upd(comp1, c1_y);
      if (c2_valid) comp2 <= upd(comp2, c2_y);
      if (c4_valid) comp4 <= upd(comp4, c4_y);
      if (frame_end) flush <= 1'b1;

      if (!busy) begin
        if (row_ready && go) begin
          busy <= 1'b1;
          rx   <= '0;
        end
      end else begin
        out_valid <= 1'b1;
        out_x     <= rx;
        out_y     <= rr[YW-1:0];
        out_d     <= DW'(best_t);
        out_score <= best;
        out_srw   <= best_srw;
        if (rx == XW'(LINE_W - 1)) begin
          busy <= 1'b0;
          if (rr == (YW+1)'(NROWS - 1)) begin
            rr    <= '0;
            flush <= 1'b0;
            comp1 <= '0; comp2 <= '0; comp4 <= '0;
            frame_done <= 1'b1;
          end else begin
            rr <= rr + 1'b1;
          end
        end else begin
          rx <= rx + 1'b1;
        end
      end
    end
  end
endmodule
