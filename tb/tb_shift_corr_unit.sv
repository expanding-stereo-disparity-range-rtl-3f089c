// tb_shift_corr_unit: checks one scale of shiftable-window correlation in both
// directions against a direct model. Each pixel of a 64-pixel row carries random
// unit phases; the search image is the reference displaced by D. For every output
// pixel the model computes, for each PTW and SRW slot k (disparity c-(NWIN-1)/2+k),
// the vote sum_o Re(ref*conj(srch)) with srch at x-t (DIR=0) or x+t (DIR=1),
// zero where that pixel lies outside the row, then the (1,4,6,4,1)/16 window over
// the neighbouring pixels of the same row. The PTW and SRW centres change from row
// to row. Also checks the output order, pixel count and the latency
// (4 cycles after the input step that completes the window; DLY steps more for
// DIR=1), and that the peak slot sits on D when a window covers it.
module tb_shift_corr_unit;
  import stereo_pkg::*;
  localparam int W = 64, H = 4, N = 9, MS = 32, D = 10;
  localparam int HN = (N - 1) / 2;
  logic clk = 0, rst_n = 0;
  psmp_t rf, sr;
  disp_t pc, sc;
  logic ov [2];
  logic [XW-1:0] ox [2];
  logic [YW-1:0] oy [2];
  disp_t opc [2], osc [2];
  vote_t [N-1:0] ovp [2], ovs [2];
  int checks = 0, failures = 0;
  cph_t P [H][W + D][NORI];
  int ptwc [2][H][W];
  int srwc [H];

  for (genvar g = 0; g < 2; g++) begin : g_dir
    shift_corr_unit #(.NWIN(N), .LINE_W(W), .MAXD_S(MS), .DIR(g)) dut (.clk(clk), .rst_n(rst_n),
      .ref_s(g == 0 ? rf : sr), .srch_s(g == 0 ? sr : rf), .ptw_c(pc), .srw_c(sc),
      .out_valid(ov[g]), .out_x(ox[g]), .out_y(oy[g]), .out_pc(opc[g]), .out_sc(osc[g]),
      .out_vp(ovp[g]), .out_vs(ovs[g]));
  end
  always #5 clk = ~clk;

  initial begin
    #10000000; failures++;
    $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // image 0 (left) L(x) = P(x), image 1 (right) R(x) = P(x+D): L(x) matches R(x-D)
  function automatic cph_t img(input int which, input int y, input int x, input int o);
    return which == 0 ? P[y][x][o] : P[y][x + D][o];
  endfunction

  function automatic int vote1(input int g, input int y, input int x, input int t);
    int xs, v;
    xs = (g == 0) ? x - t : x + t;
    if (xs < 0 || xs >= W) return 0;
    v = 0;
    for (int o = 0; o < NORI; o++) begin
      cph_t a, b;
      a = img(g == 0 ? 0 : 1, y, x, o);
      b = img(g == 0 ? 1 : 0, y, xs, o);
      v += int'(a.re) * int'(b.re) + int'(a.im) * int'(b.im);
    end
    return v;
  endfunction

  localparam int G [5] = '{1, 4, 6, 4, 1};
  function automatic int smooth(input int g, input int y, input int x, input int t);
    int acc;
    acc = 0;
    for (int j = -2; j <= 2; j++)
      if (x + j >= 0 && x + j < W) acc += G[j + 2] * vote1(g, y, x + j, t);
    return acc >>> 4;
  endfunction

  int cnt [2], ex [2], ey [2], peak_ok [2], peak_n [2];
  longint t_in [H][W];
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  always @(posedge clk) if (rst_n) begin
    for (int g = 0; g < 2; g++) if (ov[g]) begin
      int x, y, best, bk;
      x = ox[g]; y = oy[g];
      cnt[g]++;
      checks++;
      if (x != ex[g] || y != ey[g]) begin failures++; $display("dir %0d: order (%0d,%0d) expected (%0d,%0d)", g, x, y, ex[g], ey[g]); end
      ex[g] = (x + 1) % W; if (x == W - 1) ey[g] = y + 1;
      checks += 2;
      if (int'(opc[g]) != ptwc[g][y][x] || int'(osc[g]) != srwc[y]) begin failures++; $display("dir %0d: centres wrong at (%0d,%0d)", g, x, y); end
      for (int k = 0; k < N; k++) begin
        int tp, ts, ep, es;
        tp = ptwc[g][y][x] - HN + k; ts = srwc[y] - HN + k;
        ep = (tp < 0) ? 0 : smooth(g, y, x, tp);
        es = (ts < 0) ? 0 : smooth(g, y, x, ts);
        checks += 2;
        if (int'(ovp[g][k]) != ep) begin failures++; if (failures < 20) $display("dir %0d (%0d,%0d) PTW slot %0d (t=%0d): %0d expected %0d", g, x, y, k, tp, ovp[g][k], ep); end
        if (int'(ovs[g][k]) != es) begin failures++; if (failures < 20) $display("dir %0d (%0d,%0d) SRW slot %0d (t=%0d): %0d expected %0d", g, x, y, k, ts, ovs[g][k], es); end
      end
      // the peak of the PTW lands on D (PTW always covers D in this bench)
      best = -(1 << 30); bk = 0;
      for (int k = 0; k < N; k++) if (int'(ovp[g][k]) > best) begin best = ovp[g][k]; bk = k; end
      if ((g == 0 && x >= D + 2) || (g == 1 && x < W - D - 2)) begin
        peak_n[g]++;
        if (ptwc[g][y][x] - HN + bk == D) peak_ok[g]++;
      end
      // latency: the window of pixel x completes with step x+2 (x+2+DLY for DIR=1)
      begin
        int s;
        s = x + 2 + ((g == 1) ? MS + N : 0);
        if (s < W) begin
          checks++;
          if (longint'(cyc) - t_in[y][s] != 4) begin failures++; if (failures < 20) $display("dir %0d (%0d,%0d): latency %0d", g, x, y, longint'(cyc) - t_in[y][s]); end
        end
      end
    end
  end

  initial begin
    rf = '0; sr = '0; pc = '0; sc = '0;
    for (int y = 0; y < H; y++) for (int x = 0; x < W + D; x++) for (int o = 0; o < NORI; o++) begin
      real th;
      th = real'($urandom_range(0, 3599)) * 3.14159265 / 1800.0;
      P[y][x][o] = '{re: 8'($rtoi(100.0 * $cos(th))), im: 8'($rtoi(100.0 * $sin(th)))};
    end
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int y = 0; y < H; y++) begin
      srwc[y] = (y * 9) % 36;
      for (int x = 0; x < W; x++) begin
        int c;
        @(negedge clk);
        // the PTW centre is constant along a row (a smooth previous-frame map), so
        // neighbouring pixels' slots stand for the same disparities
        c = D - 4 + 2 * y;
        ptwc[0][y][x] = c;
        ptwc[1][y][x] = c;
        pc = DW'(c); sc = DW'(srwc[y]);
        rf.valid = 1; rf.x = XW'(x); rf.y = YW'(y);
        sr.valid = 1; sr.x = XW'(x); sr.y = YW'(y);
        for (int o = 0; o < NORI; o++) begin rf.c[o] = img(0, y, x, o); sr.c[o] = img(1, y, x, o); end
        @(posedge clk);
        t_in[y][x] = cyc;
        @(negedge clk);
        rf.valid = 0; sr.valid = 0;
        repeat (2) @(negedge clk);
      end
    end
    repeat (2000) @(negedge clk);
    for (int g = 0; g < 2; g++) begin
      $display("dir %0d: %0d outputs, PTW peak on D at %0d of %0d pixels", g, cnt[g], peak_ok[g], peak_n[g]);
      checks++;
      if (peak_ok[g] * 10 < peak_n[g] * 9) begin failures++; $display("dir %0d: peak not on D", g); end
    end
    // the last two pixels of the final row (and for DIR=1 also the DLY pixels
    // before them) wait for steps of a following row, which this bench never sends
    checks += 2;
    if (cnt[0] != W * H - 2) begin failures++; $display("dir 0 output count %0d", cnt[0]); end
    if (cnt[1] != W * H - 2 - (MS + N)) begin failures++; $display("dir 1 output count %0d", cnt[1]); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
