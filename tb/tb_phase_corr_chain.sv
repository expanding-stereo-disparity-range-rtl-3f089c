// tb_phase_corr_chain: drives both correlation directions with synthetic phase
// streams. At every scale s (1, 2, 4) each pixel gets random unit phases for the
// three orientations; the second image is the first displaced by D/s (D = 28), so
// only the true disparity gives coherent votes. The streams carry a pixel every
// 4 cycles, all three scales together, like the decomposition output.
// Schedule (SRW centre set by the bench):
//   field 0: SRW at 0, tracking at 0 -> D not reachable;
//   field 1: SRW at 27 -> the roving window must win and report D;
//   field 2: SRW at 0 -> the tracking window (centred on last field's D) reports D.
// Checks per field and direction: one output per pixel in raster order, one clock
// per output pixel within a row, one frame_done, accuracy in the interior and
// which window won.
module tb_phase_corr_chain;
  import stereo_pkg::*;
  localparam int W = 128, H = 16, D = 28, MAXD = 32;
  logic clk = 0, rst_n = 0, fend = 0;
  psmp_t l1, l2, l4, r1, r2, r4;
  disp_t srw;
  logic rdy0, rdy1, v0, v1, s0, s1, fd0, fd1;
  logic [XW-1:0] x0, x1;
  logic [YW-1:0] y0, y1;
  disp_t d0, d1;
  int checks = 0, failures = 0;

  phase_corr_chain #(.LINE_W(W), .NROWS(H), .MAXD(MAXD), .DIR(1'b0)) dut0 (.clk(clk), .rst_n(rst_n),
    .ref1(l1), .ref2(l2), .ref4(l4), .srch1(r1), .srch2(r2), .srch4(r4), .srw_c(srw), .frame_end(fend),
    .row_ready(rdy0), .go(rdy0), .out_valid(v0), .out_x(x0), .out_y(y0), .out_d(d0), .out_srw(s0), .frame_done(fd0));
  phase_corr_chain #(.LINE_W(W), .NROWS(H), .MAXD(MAXD), .DIR(1'b1)) dut1 (.clk(clk), .rst_n(rst_n),
    .ref1(r1), .ref2(r2), .ref4(r4), .srch1(l1), .srch2(l2), .srch4(l4), .srw_c(srw), .frame_end(fend),
    .row_ready(rdy1), .go(rdy1), .out_valid(v1), .out_x(x1), .out_y(y1), .out_d(d1), .out_srw(s1), .frame_done(fd1));
  always #5 clk = ~clk;

  cph_t ph [3][H][W + D + 4][NORI];     // base phase field per scale (index: scale 0/1/2)

  initial begin
    #30000000; failures++;
    $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // per-direction monitors
  typedef struct { int n, good, inter, srw_wins, fd, ex, ey, last_t, gap_err; } mon_t;
  mon_t m [2][3];
  int field = 0, cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic mon(input int k, input logic v, input logic [XW-1:0] x, input logic [YW-1:0] y,
                     input disp_t d, input logic s, input logic fd);
    if (v) begin
      m[k][field].n++;
      if (int'(x) != m[k][field].ex || int'(y) != m[k][field].ey) m[k][field].gap_err++;
      if (x != 0 && cyc - m[k][field].last_t != 1) m[k][field].gap_err++;
      m[k][field].last_t = cyc;
      m[k][field].ex = (int'(x) + 1) % W;
      if (int'(x) == W - 1) m[k][field].ey = int'(y) + 1;
      if (int'(x) >= D + 8 && int'(x) < W - D - 8 && int'(y) >= 1 && int'(y) < H - 2) begin
        m[k][field].inter++;
        if (int'(d) >= D - 1 && int'(d) <= D + 1) m[k][field].good++;
        if (s) m[k][field].srw_wins++;
      end
    end
    if (fd) m[k][field].fd++;
  endtask

  always @(posedge clk) if (rst_n && field < 3) begin
    mon(0, v0, x0, y0, d0, s0, fd0);
    mon(1, v1, x1, y1, d1, s1, fd1);
  end

  function automatic cph_t uph();
    real th;
    th = real'($urandom_range(0, 3599)) * 3.14159265 / 1800.0;
    return '{re: 8'($rtoi(100.0 * $cos(th))), im: 8'($rtoi(100.0 * $sin(th)))};
  endfunction

  function automatic psmp_t smp(input bit v, input int x, input int y, input int sc, input int off);
    psmp_t p;
    p.valid = v; p.x = XW'(x); p.y = YW'(y);
    for (int o = 0; o < NORI; o++) p.c[o] = v ? ph[sc][y][x + off][o] : '0;
    return p;
  endfunction

  initial begin
    l1 = '0; l2 = '0; l4 = '0; r1 = '0; r2 = '0; r4 = '0; srw = '0;
    for (int s = 0; s < 3; s++) for (int y = 0; y < H; y++) for (int x = 0; x < W + D + 4; x++)
      for (int o = 0; o < NORI; o++) ph[s][y][x][o] = uph();
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int f = 0; f < 3; f++) begin
      srw = (f == 1) ? DW'(27) : DW'(0);
      for (int y = 0; y < H; y++)
        for (int x = 0; x < W; x++) begin
          bit v2, v4;
          @(negedge clk);
          v2 = (x % 2 == 0) && (y % 2 == 0);
          v4 = (x % 4 == 0) && (y % 4 == 0);
          // left L_s(x) = P_s(x), right R_s(x) = P_s(x + D/s): L(x) matches R(x - D)
          l1 = smp(1, x, y, 0, 0);              r1 = smp(1, x, y, 0, D);
          l2 = smp(v2, x / 2, y / 2, 1, 0);     r2 = smp(v2, x / 2, y / 2, 1, D / 2);
          l4 = smp(v4, x / 4, y / 4, 2, 0);     r4 = smp(v4, x / 4, y / 4, 2, D / 4);
          @(negedge clk);
          l1.valid = 0; l2.valid = 0; l4.valid = 0; r1.valid = 0; r2.valid = 0; r4.valid = 0;
          repeat (2) @(negedge clk);
        end
      repeat (200) @(negedge clk);
      fend = 1; @(negedge clk); fend = 0;
      wait (fd0 && fd1 || (m[0][f].fd > 0 && m[1][f].fd > 0));
      repeat (20) @(negedge clk);
      field++;
      repeat (200) @(negedge clk);
    end
    for (int k = 0; k < 2; k++)
      for (int f = 0; f < 3; f++) begin
        $display("dir %0d field %0d: %0d outputs, %0d of %0d interior at D, %0d SRW wins, %0d order/rate errors",
                 k, f, m[k][f].n, m[k][f].good, m[k][f].inter, m[k][f].srw_wins, m[k][f].gap_err);
        checks += 3;
        if (m[k][f].n != W * H) begin failures++; $display("  wrong output count"); end
        if (m[k][f].fd != 1) begin failures++; $display("  frame_done count %0d", m[k][f].fd); end
        if (m[k][f].gap_err != 0) begin failures++; $display("  order or rate errors"); end
        checks++;
        case (f)
          0: if (m[k][f].good * 10 > m[k][f].inter) begin failures++; $display("  D found without a window on it"); end
          1: if (m[k][f].good * 10 < m[k][f].inter * 9 || m[k][f].srw_wins * 10 < m[k][f].inter * 9) begin
               failures++; $display("  roving window did not capture D"); end
          default: if (m[k][f].good * 10 < m[k][f].inter * 9 || m[k][f].srw_wins * 10 > m[k][f].inter) begin
               failures++; $display("  tracking window did not keep D"); end
        endcase
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
