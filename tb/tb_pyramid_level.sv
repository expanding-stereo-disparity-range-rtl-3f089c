// tb_pyramid_level: streams a random 40x20 image (with idle gaps) through one
// pyramid stage and compares every produced sample with a direct 5x5 binomial
// filter (zero outside the top/left edge, rounding /256) evaluated at the even
// centre. Checks the 1-cycle latency, the halved coordinates and the count of
// produced samples.
module tb_pyramid_level;
  import stereo_pkg::*;
  localparam int W = 40, H = 20;
  logic clk = 0, iv = 0, ov;
  logic [XW-1:0] ix, ox;
  logic [YW-1:0] iy, oy;
  logic [7:0] ip, op;
  int img [H][W];
  int checks = 0, failures = 0, outs = 0;
  localparam int B [5] = '{1, 4, 6, 4, 1};

  pyramid_level #(.LINE_W(W)) dut (.clk(clk), .in_valid(iv), .in_x(ix), .in_y(iy), .in_pix(ip),
    .out_valid(ov), .out_x(ox), .out_y(oy), .out_pix(op));
  always #5 clk = ~clk;

  function automatic int px(int x, int y);
    return (x < 0 || y < 0) ? 0 : img[y][x];
  endfunction

  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int y = 0; y < H; y++) for (int x = 0; x < W; x++) img[y][x] = $urandom_range(0, 255);
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) begin
        int cx, cy;
        bit exp_v;
        @(negedge clk);
        iv = 1; ix = XW'(x); iy = YW'(y); ip = 8'(img[y][x]);
        @(posedge clk); #1;
        iv = 0;
        cx = x - 2; cy = y - 2;
        exp_v = cx >= 0 && cy >= 0 && cx % 2 == 0 && cy % 2 == 0;
        checks++;
        if (ov !== exp_v) begin failures++; $display("(%0d,%0d) out_valid=%0d", x, y, ov); end
        if (ov && exp_v) begin
          int s;
          s = 0;
          for (int j = 0; j < 5; j++) for (int i = 0; i < 5; i++) s += B[j] * B[i] * px(cx + i - 2, cy + j - 2);
          s = (s + 128) >> 8;
          outs++;
          checks++;
          if (int'(op) != s || int'(ox) != cx / 2 || int'(oy) != cy / 2) begin
            failures++; $display("centre (%0d,%0d): got %0d at (%0d,%0d), expected %0d", cx, cy, op, ox, oy, s);
          end
        end
        if ((x + y) % 5 == 0) begin
          @(posedge clk); #1;
          checks++;
          if (ov) begin failures++; $display("output during idle cycle"); end
        end
      end
    checks++;
    if (outs != ((W - 2 + 1) / 2) * ((H - 2 + 1) / 2)) begin failures++; $display("outputs %0d", outs); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
