// tb_interp_peak: drives the three scale inputs of the combiner directly with a
// 32x16 field. Full-resolution votes are random; each coarse window holds samples
// of a quadratic f(t) = 32*(A - B*(t - t0)^2) in full-resolution disparity t, so a
// 3-point quadratic interpolation must reproduce f exactly between the samples.
// The bench's model scores every PTW and SRW candidate t as v1(t) + f2(t) + f4(t)
// (a coarse term only where t lies inside that window's sample span), takes the
// maximum with ties going to the PTW (some pixels get identical windows to test
// this), and compares disparity, score and the SRW flag. It also checks that rows
// are released by the completion rule before the end of the field and the rest by
// the field-end flush, raster order at one pixel per clock, and frame_done.
module tb_interp_peak;
  import stereo_pkg::*;
  localparam int W = 32, H = 16;
  logic clk = 0, rst_n = 0, fend = 0, rdy, ov, osrw, fdn;
  logic c1v = 0, c2v = 0, c4v = 0;
  logic [XW-1:0] c1x, c2x, c4x, ox;
  logic [YW-1:0] c1y, c2y, c4y, oy;
  disp_t c1pc, c1sc, c2pc, c2sc, c4pc, c4sc, od;
  vote_t [WIN1-1:0] c1vp, c1vs;
  vote_t [WIN2-1:0] c2vp, c2vs;
  vote_t [WIN4-1:0] c4vp, c4vs;
  score_t osc;
  int checks = 0, failures = 0;

  interp_peak #(.LINE_W(W), .NROWS(H)) dut (.clk(clk), .rst_n(rst_n),
    .c1_valid(c1v), .c1_x(c1x), .c1_y(c1y), .c1_pc(c1pc), .c1_sc(c1sc), .c1_vp(c1vp), .c1_vs(c1vs),
    .c2_valid(c2v), .c2_x(c2x), .c2_y(c2y), .c2_pc(c2pc), .c2_sc(c2sc), .c2_vp(c2vp), .c2_vs(c2vs),
    .c4_valid(c4v), .c4_x(c4x), .c4_y(c4y), .c4_pc(c4pc), .c4_sc(c4sc), .c4_vp(c4vp), .c4_vs(c4vs),
    .frame_end(fend), .row_ready(rdy), .go(rdy), .out_valid(ov), .out_x(ox), .out_y(oy), .out_d(od),
    .out_score(osc), .out_srw(osrw), .frame_done(fdn));
  always #5 clk = ~clk;

  // stimulus tables: [window 0 = PTW, 1 = SRW]
  int pc1 [H][W], sc1 [H][W], v1 [H][W][2][WIN1];
  typedef struct { int c, a, b, t0; } quad_t;
  quad_t q2 [H/2][W/2][2], q4 [H/4][W/4][2];

  function automatic int fq(input quad_t q, input int t);
    return 32 * (q.a - q.b * (t - q.t0) * (t - q.t0));
  endfunction

  // coarse contribution at t for a window of n samples, spacing s
  function automatic int coarse(input quad_t q, input int n, input int s, input int t);
    int lo, hi;
    lo = s * (q.c - (n - 1) / 2);
    hi = lo + s * (n - 1);
    return (t < lo || t > hi) ? 0 : fq(q, t);
  endfunction

  function automatic quad_t rq(input int cmax, input int s);
    quad_t q;
    q.c = $urandom_range(2, cmax); q.a = $urandom_range(0, 3000); q.b = $urandom_range(0, 12);
    q.t0 = s * q.c + $urandom_range(0, 8) - 4;  // keeps every sample inside the vote width
    return q;
  endfunction

  initial begin
    #2000000; failures++;
    $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  int nout = 0, early = 0, ex = 0, ey = 0, last_t = 0, cyc = 0, nfd = 0, n_srw = 0, n_tie = 0;
  bit flushed = 0;
  always @(posedge clk) cyc <= cyc + 1;

  always @(posedge clk) if (rst_n) begin
    if (fdn) nfd++;
    if (ov) begin
      int x, y, best, bt, bw;
      x = ox; y = oy;
      nout++;
      if (!flushed) early++;
      checks++;
      if (x != ex || y != ey) begin failures++; $display("order: (%0d,%0d) expected (%0d,%0d)", x, y, ex, ey); end
      if (x != 0) begin checks++; if (cyc - last_t != 1) begin failures++; $display("gap of %0d cycles in a row", cyc - last_t); end end
      last_t = cyc;
      ex = (x + 1) % W; if (x == W - 1) ey = y + 1;
      // model
      best = 0; bt = 0; bw = 0;
      begin
        bit any;
        any = 0;
        for (int w = 0; w < 2; w++)
          for (int k = 0; k < WIN1; k++) begin
            int t, s;
            t = ((w == 0) ? pc1[y][x] : sc1[y][x]) - (WIN1 - 1) / 2 + k;
            if (t >= 0) begin
              s = v1[y][x][w][k] + coarse(q2[y/2][x/2][w], WIN2, 2, t) + coarse(q4[y/4][x/4][w], WIN4, 4, t);
              if (!any || s > best) begin best = s; bt = t; bw = w; any = 1; end
            end
          end
      end
      checks += 3;
      if (int'(od) != bt) begin failures++; $display("(%0d,%0d) d=%0d expected %0d", x, y, od, bt); end
      if (int'(osc) != best) begin failures++; $display("(%0d,%0d) score=%0d expected %0d", x, y, osc, best); end
      if (osrw != bw[0]) begin failures++; $display("(%0d,%0d) srw=%0d expected %0d", x, y, osrw, bw); end
      if (osrw) n_srw++;
    end
  end

  initial begin
    for (int y = 0; y < H; y++) for (int x = 0; x < W; x++) begin
      pc1[y][x] = $urandom_range(0, 40); sc1[y][x] = $urandom_range(0, 40);
      for (int w = 0; w < 2; w++) for (int k = 0; k < WIN1; k++) v1[y][x][w][k] = $urandom_range(0, 200000) - 100000;
    end
    for (int y = 0; y < H / 2; y++) for (int x = 0; x < W / 2; x++) for (int w = 0; w < 2; w++) q2[y][x][w] = rq(20, 2);
    for (int y = 0; y < H / 4; y++) for (int x = 0; x < W / 4; x++) for (int w = 0; w < 2; w++) q4[y][x][w] = rq(10, 4);
    // ties: on some pixels both windows are identical, the PTW must win
    for (int y = 0; y < H; y += 3) for (int x = 1; x < W; x += 5) begin
      sc1[y][x] = pc1[y][x];
      for (int k = 0; k < WIN1; k++) v1[y][x][1][k] = v1[y][x][0][k];
      q2[y/2][x/2][1] = q2[y/2][x/2][0]; q4[y/4][x/4][1] = q4[y/4][x/4][0];
      n_tie++;
    end
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) begin
        @(negedge clk);
        c1v = 1; c1x = XW'(x); c1y = YW'(y); c1pc = DW'(pc1[y][x]); c1sc = DW'(sc1[y][x]);
        for (int k = 0; k < WIN1; k++) begin c1vp[k] = VOTE_W'(v1[y][x][0][k]); c1vs[k] = VOTE_W'(v1[y][x][1][k]); end
        c2v = (x % 2 == 0) && (y % 2 == 0);
        c2x = XW'(x / 2); c2y = YW'(y / 2);
        c2pc = DW'(q2[y/2][x/2][0].c); c2sc = DW'(q2[y/2][x/2][1].c);
        for (int i = 0; i < WIN2; i++) begin
          c2vp[i] = VOTE_W'(fq(q2[y/2][x/2][0], 2 * (q2[y/2][x/2][0].c - 2 + i)));
          c2vs[i] = VOTE_W'(fq(q2[y/2][x/2][1], 2 * (q2[y/2][x/2][1].c - 2 + i)));
        end
        c4v = (x % 4 == 0) && (y % 4 == 0);
        c4x = XW'(x / 4); c4y = YW'(y / 4);
        c4pc = DW'(q4[y/4][x/4][0].c); c4sc = DW'(q4[y/4][x/4][1].c);
        for (int i = 0; i < WIN4; i++) begin
          c4vp[i] = VOTE_W'(fq(q4[y/4][x/4][0], 4 * (q4[y/4][x/4][0].c - 1 + i)));
          c4vs[i] = VOTE_W'(fq(q4[y/4][x/4][1], 4 * (q4[y/4][x/4][1].c - 1 + i)));
        end
        @(negedge clk);
        c1v = 0; c2v = 0; c4v = 0;
        repeat (2) @(negedge clk);
      end
    repeat (100) @(negedge clk);
    flushed = 1;
    fend = 1; @(negedge clk); fend = 0;
    repeat (2000) @(negedge clk);
    checks += 4;
    if (nout != W * H) begin failures++; $display("%0d outputs", nout); end
    if (nfd != 1) begin failures++; $display("frame_done %0d", nfd); end
    if (early == 0 || early == W * H) begin failures++; $display("rows released before the flush: %0d pixels", early); end
    if (n_srw == 0) begin failures++; $display("SRW never won"); end
    $display("outputs %0d (before flush %0d), SRW wins %0d, tie pixels %0d", nout, early, n_srw, n_tie);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
