// shift_corr_unit: shiftable-window phase correlation at one scale, for one
// correlation direction. It is the core of the design: instead of a fixed chain of
// one voting unit per disparity, two windows of NWIN voting units each are placed
// anywhere in the search range, pixel by pixel:
//   * the primary tracking window (PTW) is centred on ptw_c, the disparity found for
//     this pixel in the previous frame (scaled to this level);
//   * the secondary roving window (SRW) is centred on srw_c, a position that moves
//     through the whole range from frame to frame.
// The search stream (right image for DIR=0 / left-to-right, left image for DIR=1 /
// right-to-left) is written into a partial line buffer holding the latest DEPTH
// pixels, with NWIN copies and two read ports per copy (PTW and SRW). For candidate
// disparity t the search pixel is x-t (DIR=0) or x+t (DIR=1). In DIR=1 the reference
// pixel is delayed by DLY = MAXD_S+NWIN stream steps so that x+t has arrived. Each
// buffer entry carries its (x, y): a slot whose pixel lies outside the row or the
// range is masked (vote 0). The votes of the three orientations are summed and
// smoothed by the 1x5 Gaussian window.
// Pipeline: write (stage 0) -> address (1) -> buffer read / voting (2) ->
// window (3); an output pixel appears 4 cycles after the input step that completes
// its window (2 steps later in the row, DLY steps more for DIR=1).
// Output: per pixel the window centres (scale units) and NWIN PTW and NWIN SRW
// smoothed votes; slot k stands for disparity centre-(NWIN-1)/2+k.
// From the description: two shiftable windows, fixed voting-unit count per scale
// (9/5/3), partial line buffers with one copy per voting unit and dual read ports,
// 128-pixel range, 1x5 window. Own choices: step-indexed buffer with (x,y) tags,
// the DIR=1 delay scheme, pipeline depth, clamping of centres to MAXD_S.
module shift_corr_unit
  import stereo_pkg::*;
#(
  parameter int unsigned NWIN   = WIN1,
  parameter int unsigned LINE_W = IMG_W,
  parameter int unsigned MAXD_S = MAX_DISP,   // largest window centre at this scale
  parameter bit          DIR    = 1'b0
) (
  input  logic             clk,
  input  logic             rst_n,
  input  psmp_t            ref_s,             // reference stream
  input  psmp_t            srch_s,            // search stream (same timing)
  input  disp_t            ptw_c,             // PTW centre for ref_s pixel
  input  disp_t            srw_c,             // SRW centre (this frame)
  output logic             out_valid,
  output logic [XW-1:0]    out_x,
  output logic [YW-1:0]    out_y,
  output disp_t            out_pc,
  output disp_t            out_sc,
  output vote_t [NWIN-1:0] out_vp,
  output vote_t [NWIN-1:0] out_vs
);
  localparam int unsigned HALF  = (NWIN - 1) / 2;
  localparam int unsigned DLY   = DIR ? MAXD_S + NWIN : 0;
  localparam int unsigned DEPTH = 2 ** $clog2(2*MAXD_S + 2*NWIN + 4);
  localparam int unsigned SB    = $clog2(DEPTH);

  typedef struct packed {
    logic [YW-1:0]    y;
    logic [XW-1:0]    x;
    cph_t [NORI-1:0]  c;
  } sent_t;                                   // search buffer entry

  typedef struct packed {
    logic [YW-1:0]    y;
    logic [XW-1:0]    x;
    cph_t [NORI-1:0]  c;
    disp_t            pc;
    disp_t            sc;
  } rent_t;                                   // delayed reference entry

  localparam int unsigned EW = $bits(sent_t);

  // ---------------- stage 0: write ---------------------------------------------
  logic [SB-1:0]  wstep;
  logic [SB:0]    primed;
  logic           s0_go;
  logic [SB-1:0]  s0_step;
  rent_t          rmem [DEPTH];
  sent_t          wentry;
  disp_t          pc_cl, sc_cl;

  always_comb begin
    pc_cl = (32'(ptw_c) > MAXD_S) ? DW'(MAXD_S) : ptw_c;
    sc_cl = (32'(srw_c) > MAXD_S) ? DW'(MAXD_S) : srw_c;
    wentry.y = srch_s.y;
    wentry.x = srch_s.x;
    wentry.c = srch_s.c;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wstep  <= '0;
      primed <= '0;
      s0_go  <= 1'b0;
    end else begin
      s0_go <= 1'b0;
      if (ref_s.valid) begin
        rmem[wstep] <= '{y: ref_s.y, x: ref_s.x, c: ref_s.c, pc: pc_cl, sc: sc_cl};
        wstep   <= wstep + 1'b1;
        s0_step <= wstep;
        if (int'(primed) < int'(DLY)) primed <= primed + 1'b1;
        else                   s0_go  <= 1'b1;
      end
    end
  end

  // ---------------- stage 1: reference and read addresses ------------------------
  rent_t          r1;
  logic [SB-1:0]  rstep;
  logic [SB-1:0]  ra_p [NWIN], ra_s [NWIN];
  logic [XW+1:0]  ex_p [NWIN], ex_s [NWIN];     // expected x, signed range check
  logic           ok_p [NWIN], ok_s [NWIN];

  always_comb begin
    rstep = s0_step - SB'(DLY);
    r1    = rmem[rstep];
    for (int k = 0; k < NWIN; k++) begin
      int tp, ts, xp, xs;
      tp = int'(r1.pc) - int'(HALF) + k;
      ts = int'(r1.sc) - int'(HALF) + k;
      xp = DIR ? int'(r1.x) + tp : int'(r1.x) - tp;
      xs = DIR ? int'(r1.x) + ts : int'(r1.x) - ts;
      ra_p[k] = DIR ? rstep + SB'(tp) : rstep - SB'(tp);
      ra_s[k] = DIR ? rstep + SB'(ts) : rstep - SB'(ts);
      ok_p[k] = (tp >= 0) && (xp >= 0) && (xp < int'(LINE_W));
      ok_s[k] = (ts >= 0) && (xs >= 0) && (xs < int'(LINE_W));
      ex_p[k] = (XW+2)'(xp);
      ex_s[k] = (XW+2)'(xs);
    end
  end

  logic [EW-1:0] rd_p [NWIN], rd_s [NWIN];
  logic [EW-1:0] wdata;
  assign wdata = EW'(wentry);

  partial_line_buffer #(.NCOPY(NWIN), .DEPTH(DEPTH), .EW(EW)) u_plb (
    .clk(clk), .we(ref_s.valid), .waddr(wstep), .wdata(wdata),
    .raddr_p(ra_p), .raddr_s(ra_s), .rdata_p(rd_p), .rdata_s(rd_s)
  );

  logic           s1_go;
  rent_t          s1_r;
  logic [XW+1:0]  s1_ex_p [NWIN], s1_ex_s [NWIN];
  logic           s1_ok_p [NWIN], s1_ok_s [NWIN];

  always_ff @(posedge clk) begin
    if (!rst_n) s1_go <= 1'b0;
    else        s1_go <= s0_go;
    if (s0_go) begin
      s1_r    <= r1;
      s1_ex_p <= ex_p;
      s1_ex_s <= ex_s;
      s1_ok_p <= ok_p;
      s1_ok_s <= ok_s;
    end
  end

  // ---------------- stage 2: voting -------------------------------------------------
  vote_t [NWIN-1:0] v_p, v_s;
  logic             en_p [NWIN], en_s [NWIN];
  sent_t            e_p [NWIN], e_s [NWIN];

  for (genvar k = 0; k < NWIN; k++) begin : g_vote
    assign e_p[k]  = sent_t'(rd_p[k]);
    assign e_s[k]  = sent_t'(rd_s[k]);
    assign en_p[k] = s1_ok_p[k] && e_p[k].y == s1_r.y && {2'b00, e_p[k].x} == s1_ex_p[k];
    assign en_s[k] = s1_ok_s[k] && e_s[k].y == s1_r.y && {2'b00, e_s[k].x} == s1_ex_s[k];
    voting_unit u_vp (.en(en_p[k]), .ref_c(s1_r.c), .srch_c(e_p[k].c), .vote(v_p[k]));
    voting_unit u_vs (.en(en_s[k]), .ref_c(s1_r.c), .srch_c(e_s[k].c), .vote(v_s[k]));
  end

  logic             s2_go;
  rent_t            s2_r;
  vote_t [NWIN-1:0] s2_vp, s2_vs;

  always_ff @(posedge clk) begin
    if (!rst_n) s2_go <= 1'b0;
    else        s2_go <= s1_go;
    if (s1_go) begin
      s2_r  <= s1_r;
      s2_vp <= v_p;
      s2_vs <= v_s;
    end
  end

  // ---------------- stage 3: Gaussian window ---------------------------------------
  gauss_window5 #(.NWIN(NWIN)) u_win (
    .clk(clk), .rst_n(rst_n), .in_valid(s2_go), .in_x(s2_r.x), .in_y(s2_r.y),
    .in_pc(s2_r.pc), .in_sc(s2_r.sc), .in_vp(s2_vp), .in_vs(s2_vs),
    .out_valid(out_valid), .out_x(out_x), .out_y(out_y), .out_pc(out_pc),
    .out_sc(out_sc), .out_vp(out_vp), .out_vs(out_vs)
  );
endmodule
