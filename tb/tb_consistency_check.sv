// tb_consistency_check: drives matched L-R and R-L disparity rows in lockstep (as
// in the full system). The R-L map is random and smooth; each L-R disparity is
// the R-L value at x-d plus an error of -4..4, so some pixels pass and some fail
// the threshold of 2. Expected flags come from a direct model; the output follows
// the input by one cycle.
module tb_consistency_check;
  import stereo_pkg::*;
  localparam int W = 300, H = 6;
  logic clk = 0, rst_n = 0, lv = 0, rv = 0;
  logic [XW-1:0] lx, rx_, ox;
  logic [YW-1:0] ly, ry_, oy;
  disp_t ld, rd_, od;
  logic ov, oi;
  int checks = 0, failures = 0, n_inv = 0, n_ok = 0;
  int rl [W];
  int exp_inv, exp_x;
  logic exp_pend = 0;

  consistency_check dut (.clk(clk), .rst_n(rst_n), .lr_valid(lv), .lr_x(lx), .lr_y(ly), .lr_d(ld),
    .rl_valid(rv), .rl_x(rx_), .rl_y(ry_), .rl_d(rd_), .out_valid(ov), .out_x(ox), .out_y(oy), .out_d(od),
    .out_invalid(oi));
  always #5 clk = ~clk;

  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int y = 0; y < H; y++) begin
      int base;
      base = $urandom_range(5, 60);
      for (int x = 0; x < W; x++) rl[x] = base + (x / 37) % 4;
      for (int x = 0; x < W; x++) begin
        int d, xr, e;
        @(negedge clk);
        // R-L sample for this x
        rv = 1; rx_ = XW'(x); ry_ = YW'(y); rd_ = DW'(rl[x]);
        // L-R sample for this x
        e = $urandom_range(0, 8) - 4;
        d = (x >= 70) ? rl[x - rl[x]] + e : $urandom_range(0, 100);
        if (d < 0) d = 0;
        lv = (x % 7) != 3; lx = XW'(x); ly = YW'(y); ld = DW'(d);
        xr = x - d;
        exp_inv = !(xr >= 0 && xr <= x && ((d - rl[xr]) <= 2 && (rl[xr] - d) <= 2));
        exp_x = x;
        @(posedge clk); #1;
        checks++;
        if (ov !== lv) begin failures++; $display("valid mismatch at x=%0d", x); end
        else if (ov) begin
          checks++;
          if (oi !== exp_inv[0] || int'(ox) != x || int'(oy) != y || int'(od) != d) begin
            failures++; $display("y=%0d x=%0d d=%0d: invalid=%0d expected %0d", y, x, d, oi, exp_inv);
          end
          if (oi) n_inv++; else n_ok++;
        end
      end
      @(negedge clk); lv = 0; rv = 0;
    end
    checks++;
    if (n_inv == 0 || n_ok == 0) begin failures++; $display("only one outcome seen: ok=%0d invalid=%0d", n_ok, n_inv); end
    $display("consistent %0d, rejected %0d", n_ok, n_inv);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
