// tb_stereo_top: end-to-end run of the whole system on a reduced 64x32 field
// (MAXD 32, so the roving window visits 9, 18, 27, 0). The left camera sees a
// random texture; the right camera sees the same texture displaced by D=20 pixels
// shifted by one pixel less, and its rectifier warp adds that pixel back (x + 1.0), so the
// rectified pair has a true disparity of 20 everywhere.
// Expected behaviour over 7 fields:
//   - the tracking window starts at 0 and cannot see 20; the roving window at 18
//     finds it (an SRW win), after which the tracking window follows it;
//   - in the last fields most interior pixels report 20 +- 1 and pass the check;
//   - pixels near the left border (no match in the other image) are flagged;
//   - the rectifier reports missing pixels at the right/bottom border;
//   - every word crosses the inter-board link in exactly 4 bus beats;
//   - every field yields one disparity per pixel and one frame_done, and the
//     fields leave at the camera field rate (real-time operation).
// Each mechanism is counted and a count of zero is a failure.
module tb_stereo_top;
  import stereo_pkg::*;
  localparam int W = 64, H = 32, D = 20, NF = 7, MAXD = 32;
  localparam logic signed [31:0] AR [6] = '{32'sd65536, 32'sd65536, 32'sd0, 32'sd0, 32'sd0, 32'sd0};
  localparam logic signed [31:0] BR [6] = '{32'sd0, 32'sd0, 32'sd65536, 32'sd0, 32'sd0, 32'sd0};
  localparam logic signed [31:0] AL [6] = '{32'sd0, 32'sd65536, 32'sd0, 32'sd0, 32'sd0, 32'sd0};

  logic cam_clk = 0, clk = 0, rst_n = 0, cam_valid = 0;
  logic [XW-1:0] cam_x, dx;
  logic [YW-1:0] cam_y, dy;
  logic [7:0] pl, pr;
  logic dv, dinv, lsw, rsw, wrap, miss, fs, fd;
  disp_t dd, rld, sc;

  stereo_top #(.LINE_W(W), .NROWS(H), .MAXD(MAXD), .AL_COEF(AL), .AR_COEF(AR), .BR_COEF(BR)) dut (
    .cam_clk(cam_clk), .cam_valid(cam_valid), .cam_x(cam_x), .cam_y(cam_y), .cam_pix_l(pl), .cam_pix_r(pr),
    .clk(clk), .rst_n(rst_n), .disp_valid(dv), .disp_x(dx), .disp_y(dy), .disp_d(dd), .disp_invalid(dinv),
    .rl_d(rld), .lr_srw_win(lsw), .rl_srw_win(rsw), .srw_c(sc), .srw_wrap(wrap), .rect_missing(miss),
    .frame_start(fs), .frame_done(fd));

  always #20 cam_clk = ~cam_clk;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int tex [H][W + D + 8];
  int n_disp [NF + 2], n_good [NF + 2], n_int [NF + 2];
  int n_srw = 0, n_rsrw = 0, n_wrap = 0, n_inv = 0, n_ok = 0, n_miss = 0, n_fd = 0, n_fs = 0;
  int n_beat = 0, n_first = 0, n_word = 0, n_border_inv = 0, n_border = 0;
  int fno = 0, n_ptw = 0;
  longint t_fd = 0;
  localparam longint FIELD_NS = longint'(H + 30) * (W + 8) * 40;

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // texture: random values on a 2-pixel grid, lightly mixed, so that all three
  // scales see structure
  initial begin
    int raw [H][W + D + 8];
    for (int y = 0; y < H; y++) for (int x = 0; x < W + D + 8; x++) raw[y][x] = $urandom_range(0, 255);
    for (int y = 0; y < H; y++) for (int x = 0; x < W + D + 8; x++)
      tex[y][x] = (raw[y][x] + raw[y][x / 2 * 2] + raw[y / 2 * 2][x]) / 3;
  end

  initial begin
    repeat (3) @(posedge cam_clk);
    for (int f = 0; f < NF; f++) begin
      for (int y = 0; y < H; y++) begin
        for (int x = 0; x < W; x++) begin
          @(negedge cam_clk);
          cam_valid = 1; cam_x = XW'(x); cam_y = YW'(y);
          pl = 8'(tex[y][x + 4]);                 // left image L(x) = T(x + 4)
          pr = 8'(tex[y][x - 1 + D + 4]);         // right camera: rectified R(x) = T(x + D + 4)
        end
        @(negedge cam_clk); cam_valid = 0;
        repeat (7) @(negedge cam_clk);
      end
      repeat (30 * (W + 8)) @(negedge cam_clk);
    end
    repeat (2000) @(negedge cam_clk);
    finish_checks();
  end

  initial begin
    repeat (4) @(posedge clk);
    rst_n = 1;
  end

  always @(posedge clk) if (rst_n) begin
    if (dut.bus_valid) n_beat++;
    if (dut.bus_valid && dut.bus_first) n_first++;
    if (dut.tx_valid) n_word++;
    if (lsw && dv) n_srw++;
    if (rsw) n_rsrw++;
    if (wrap) n_wrap++;
    if (miss) n_miss++;
    if (fs) n_fs++;
    if (dv) begin
      int e;
      n_disp[fno]++;
      if (dinv) n_inv++; else n_ok++;
      if (int'(dx) >= D + 8 && int'(dx) < W - 8 && int'(dy) >= 4 && int'(dy) < H - 6) begin
        n_int[fno]++;
        e = int'(dd) - D;
        if (!dinv && e >= -1 && e <= 1) n_good[fno]++;
      end
      if (int'(dx) < D - 4 && int'(dy) >= 4 && int'(dy) < H - 6) begin
        n_border++;
        if (dinv) n_border_inv++;
      end
    end
    if (fd) begin
      // real-time check: once running, fields leave at the camera field rate
      if (n_fd > 1) begin
        checks++;
        if ($time - t_fd > FIELD_NS + 100 || FIELD_NS - ($time - t_fd) > 100) begin
          failures++; $display("field %0d done %0t after the previous one, field period %0d", n_fd, $time - t_fd, FIELD_NS);
        end
      end
      t_fd = $time;
      n_fd++; fno++;
    end
    if (dv && !lsw) n_ptw++;
  end

  task automatic expect_nz(input string what, input int n);
    checks++;
    if (n == 0) begin failures++; $display("mechanism never seen: %s", what); end
    else $display("%-34s %0d", what, n);
  endtask

  task automatic finish_checks();
    expect_nz("SRW wins (L-R)", n_srw);
    expect_nz("SRW wins (R-L)", n_rsrw);
    expect_nz("PTW wins (L-R)", n_ptw);
    expect_nz("SRW sweep wraps", n_wrap);
    expect_nz("consistency rejections", n_inv);
    expect_nz("consistent disparities", n_ok);
    expect_nz("rectifier missing pixels", n_miss);
    expect_nz("link beats", n_beat);
    expect_nz("frame starts", n_fs);
    expect_nz("frames done", n_fd);
    checks++;
    if (n_beat != 4 * n_word || n_first != n_word) begin failures++; $display("link: %0d words, %0d beats, %0d first beats", n_word, n_beat, n_first); end
    checks++;
    if (n_fd != NF || n_fs != NF) begin failures++; $display("frames: %0d starts, %0d done", n_fs, n_fd); end
    for (int f = 0; f < NF; f++) begin
      checks++;
      if (n_disp[f] != W * H) begin failures++; $display("field %0d: %0d disparities, expected %0d", f, n_disp[f], W * H); end
      $display("field %0d: %0d of %0d interior pixels at %0d+-1", f, n_good[f], n_int[f], D);
    end
    // tracking has locked by the last two fields
    for (int f = NF - 2; f < NF; f++) begin
      checks++;
      if (n_good[f] * 10 < n_int[f] * 8) begin failures++; $display("field %0d: accuracy too low", f); end
    end
    // the first field cannot find D (tracking centre 0, roving centre 0)
    checks++;
    if (n_good[0] * 10 > n_int[0] * 3) begin failures++; $display("field 0 unexpectedly accurate"); end
    checks++;
    if (n_border_inv * 2 < n_border) begin failures++; $display("left border: %0d of %0d flagged", n_border_inv, n_border); end
    $display("left border flagged: %0d of %0d", n_border_inv, n_border);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask
endmodule
