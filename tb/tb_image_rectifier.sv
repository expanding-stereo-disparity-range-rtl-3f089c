// tb_image_rectifier: a 32x24 camera field arrives on a slow clock (period 40)
// while the unit runs on a 4x faster system clock. The warp shifts the image by
// +1.5 pixels in x and +0.25 lines in y, so every output pixel blends four source
// pixels with weights (1/2, 1/2) x (3/4, 1/4). Checks every output value against a
// direct model, the missing-pixel flag at the right/bottom border, the output order,
// exactly 4 system cycles between pixels of a row, frame_start/frame_done, and two
// consecutive fields (the second with different content).
module tb_image_rectifier;
  import stereo_pkg::*;
  localparam int W = 32, H = 24;
  localparam logic signed [31:0] AC [6] = '{32'sd98304, 32'sd65536, 32'sd0, 32'sd0, 32'sd0, 32'sd0};
  localparam logic signed [31:0] BC [6] = '{32'sd16384, 32'sd0, 32'sd65536, 32'sd0, 32'sd0, 32'sd0};

  logic cam_clk = 0, clk = 0, rst_n = 0;
  logic cam_valid = 0;
  logic [XW-1:0] cam_x, ox;
  logic [YW-1:0] cam_y, oy;
  logic [7:0] cam_pix, op;
  logic ov, om, fs, fd, fp;
  int img [2][H][W];
  int checks = 0, failures = 0;
  int n_out = 0, n_miss = 0, n_fs = 0, n_fd = 0, frame_no = 0;
  int last_t = -1, cyc = 0, ex = 0, ey = 0;

  image_rectifier #(.LINE_W(W), .NROWS(H), .A_COEF(AC), .B_COEF(BC)) dut (
    .cam_clk(cam_clk), .cam_valid(cam_valid), .cam_x(cam_x), .cam_y(cam_y), .cam_pix(cam_pix),
    .clk(clk), .rst_n(rst_n), .out_valid(ov), .out_x(ox), .out_y(oy), .out_pix(op), .out_missing(om),
    .frame_start(fs), .frame_done(fd), .frame_par(fp));

  always #20 cam_clk = ~cam_clk;
  always #5 clk = ~clk;

  initial begin
    #2000000; failures++;
    $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // camera: two fields, 8 blank pixels per line, 20 blank lines after each field
  initial begin
    for (int f = 0; f < 2; f++) for (int y = 0; y < H; y++) for (int x = 0; x < W; x++)
      img[f][y][x] = $urandom_range(0, 255);
    repeat (3) @(posedge cam_clk);
    for (int f = 0; f < 2; f++) begin
      for (int y = 0; y < H; y++) begin
        for (int x = 0; x < W; x++) begin
          @(negedge cam_clk);
          cam_valid = 1; cam_x = XW'(x); cam_y = YW'(y); cam_pix = 8'(img[f][y][x]);
        end
        @(negedge cam_clk); cam_valid = 0;
        repeat (7) @(negedge cam_clk);
      end
      repeat (20 * (W + 8)) @(negedge cam_clk);
    end
  end

  initial begin
    repeat (4) @(posedge clk);
    rst_n = 1;
  end

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n && fs) n_fs++;
    if (rst_n && fd) begin n_fd++; frame_no++; ex = 0; ey = 0; end
    if (rst_n && ov) begin
      bit emiss;
      int e;
      n_out++;
      checks++;
      if (int'(ox) != ex || int'(oy) != ey) begin failures++; $display("order: got (%0d,%0d) expected (%0d,%0d)", ox, oy, ex, ey); end
      if (ex > 0) begin
        checks++;
        if (cyc - last_t != 4) begin failures++; $display("row %0d: %0d cycles between pixels", ey, cyc - last_t); end
      end
      last_t = cyc;
      emiss = (ex + 2 >= W) || (ey + 1 >= H);
      checks++;
      if (om !== emiss) begin failures++; $display("(%0d,%0d) missing=%0d expected %0d", ex, ey, om, emiss); end
      if (!emiss && frame_no < 2) begin
        int a, b, c, d;
        a = img[frame_no][ey][ex+1];   b = img[frame_no][ey][ex+2];
        c = img[frame_no][ey+1][ex+1]; d = img[frame_no][ey+1][ex+2];
        e = ((a * 32 + b * 32) * 48 + (c * 32 + d * 32) * 16 + 2048) >> 12;
        checks++;
        if (int'(op) != e) begin failures++; $display("(%0d,%0d) pix %0d expected %0d", ex, ey, op, e); end
      end else if (emiss) begin
        n_miss++;
        checks++;
        if (op != 0) begin failures++; $display("missing pixel not zero"); end
      end
      ex++;
      if (ex == W) begin ex = 0; ey++; end
    end
  end

  initial begin
    wait (frame_no == 2);
    repeat (10) @(posedge clk);
    checks += 4;
    if (n_out != 2 * W * H) begin failures++; $display("outputs %0d", n_out); end
    if (n_fs != 2) begin failures++; $display("frame_start count %0d", n_fs); end
    if (n_fd != 2) begin failures++; $display("frame_done count %0d", n_fd); end
    if (n_miss != 2 * (2 * H + W - 2)) begin failures++; $display("missing %0d", n_miss); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
