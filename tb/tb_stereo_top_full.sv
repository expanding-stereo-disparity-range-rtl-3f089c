// tb_stereo_top_full: one 640x240 field through the system at its default
// parameters (maximum disparity 128, roving step 9, 100-bit link). The rectified
// pair has a true disparity of 9 everywhere (the right camera is displaced and
// the right warp is the identity). In the first field the tracking window is
// centred on 0 and the roving window on 9, so the roving window must supply the
// correct disparity. Checks: one disparity per pixel, one frame_done, SRW wins,
// most interior pixels at 9 +- 1 and consistent, rejections at the left border,
// link framing (4 beats per word) and rectifier missing pixels at the border.
module tb_stereo_top_full;
  import stereo_pkg::*;
  localparam int W = IMG_W, H = IMG_H, D = 9;

  logic cam_clk = 0, clk = 0, rst_n = 0, cam_valid = 0;
  logic [XW-1:0] cam_x, dx;
  logic [YW-1:0] cam_y, dy;
  logic [7:0] pl, pr;
  logic dv, dinv, lsw, rsw, wrap, miss, fs, fd;
  disp_t dd, rld, sc;

  stereo_top dut (
    .cam_clk(cam_clk), .cam_valid(cam_valid), .cam_x(cam_x), .cam_y(cam_y), .cam_pix_l(pl), .cam_pix_r(pr),
    .clk(clk), .rst_n(rst_n), .disp_valid(dv), .disp_x(dx), .disp_y(dy), .disp_d(dd), .disp_invalid(dinv),
    .rl_d(rld), .lr_srw_win(lsw), .rl_srw_win(rsw), .srw_c(sc), .srw_wrap(wrap), .rect_missing(miss),
    .frame_start(fs), .frame_done(fd));

  always #20 cam_clk = ~cam_clk;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic [7:0] tex [H][W + D + 8];
  int n_disp = 0, n_good = 0, n_int = 0, n_srw = 0, n_inv = 0, n_miss = 0, n_fd = 0;
  int n_beat = 0, n_word = 0, n_border = 0, n_border_inv = 0;

  initial begin
    #60000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int y = 0; y < H; y++) for (int x = 0; x < W + D + 8; x += 2) begin
      tex[y][x] = 8'($urandom); tex[y][x + 1] = 8'((int'(tex[y][x]) + $urandom_range(0, 255)) / 2);
    end
    repeat (3) @(posedge cam_clk);
    for (int y = 0; y < H; y++) begin
      for (int x = 0; x < W; x++) begin
        @(negedge cam_clk);
        cam_valid = 1; cam_x = XW'(x); cam_y = YW'(y);
        pl = tex[y][x];
        pr = tex[y][x + D];
      end
      @(negedge cam_clk); cam_valid = 0;
      repeat (15) @(negedge cam_clk);
    end
  end

  initial begin
    repeat (4) @(posedge clk);
    rst_n = 1;
  end

  always @(posedge clk) if (rst_n) begin
    if (dut.bus_valid) n_beat++;
    if (dut.tx_valid) n_word++;
    if (miss) n_miss++;
    if (dv) begin
      n_disp++;
      if (lsw) n_srw++;
      if (dinv) n_inv++;
      if (int'(dx) >= 40 && int'(dx) < W - 40 && int'(dy) >= 8 && int'(dy) < H - 8) begin
        n_int++;
        if (!dinv && int'(dd) >= D - 1 && int'(dd) <= D + 1) n_good++;
      end
      if (int'(dx) < D - 3 && int'(dy) >= 8 && int'(dy) < H - 8) begin
        n_border++;
        if (dinv) n_border_inv++;
      end
    end
    if (fd) begin
      n_fd++;
      finish_checks();
    end
  end

  task automatic expect_nz(input string what, input int n);
    checks++;
    if (n == 0) begin failures++; $display("mechanism never seen: %s", what); end
    else $display("%-30s %0d", what, n);
  endtask

  task automatic finish_checks();
    expect_nz("SRW wins", n_srw);
    expect_nz("consistency rejections", n_inv);
    expect_nz("rectifier missing pixels", n_miss);
    expect_nz("link beats", n_beat);
    checks++;
    if (n_disp != W * H) begin failures++; $display("%0d disparities, expected %0d", n_disp, W * H); end
    checks++;
    if (n_beat != 4 * n_word) begin failures++; $display("link: %0d words %0d beats", n_word, n_beat); end
    checks++;
    if (n_good * 10 < n_int * 8) begin failures++; $display("accuracy too low"); end
    checks++;
    if (n_border_inv * 5 < n_border) begin failures++; $display("left border rejections too few"); end
    $display("interior pixels at %0d+-1: %0d of %0d; left border flagged %0d of %0d", D, n_good, n_int, n_border_inv, n_border);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask
endmodule
