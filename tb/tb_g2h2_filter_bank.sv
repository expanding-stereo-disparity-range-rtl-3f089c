// tb_g2h2_filter_bank: streams a 24x16 image through the filter bank and compares
// each output with a direct model: 2-D evaluation of the seven separable basis
// filters around the centre (x-3, y-3), zero outside the top/left edge, the same
// intermediate scaling, then the steering sums for -45, 0 and +45 degrees. Frame 1
// is random texture, frame 2 a ramp with a vertical edge (checks orientation
// selectivity: on a vertical edge the 0-degree response dominates the diagonals).
// Also checks the 1-cycle latency and the number of produced samples.
module tb_g2h2_filter_bank;
  import stereo_pkg::*;
  localparam int W = 24, H = 16;
  logic clk = 0, iv = 0, ov;
  logic [XW-1:0] ix, ox;
  logic [YW-1:0] iy, oy;
  logic [7:0] ip;
  cfilt_t oc [NORI];
  int img [H][W];
  int checks = 0, failures = 0, outs = 0;
  int edge_hits = 0;

  g2h2_filter_bank #(.LINE_W(W)) dut (.clk(clk), .in_valid(iv), .in_x(ix), .in_y(iy), .in_pix(ip),
    .out_valid(ov), .out_x(ox), .out_y(oy), .out_c(oc));
  always #5 clk = ~clk;

  function automatic int px(int x, int y);
    return (x < 0 || y < 0) ? 0 : img[y][x];
  endfunction

  function automatic int sat(longint v);
    return (v > 32767) ? 32767 : (v < -32768) ? -32768 : int'(v);
  endfunction

  // expected complex response at centre (cx, cy), orientation o
  task automatic model(input int cx, input int cy, output int re [NORI], output int im [NORI]);
    longint hb [7];
    for (int b = 0; b < 7; b++) begin
      hb[b] = 0;
      for (int i = 0; i < 7; i++) begin
        longint v;
        v = 0;
        for (int j = 0; j < 7; j++) v += longint'(kern(BASIS_VK[b], j)) * px(cx - 3 + i, cy - 3 + j);
        v = v >>> 6;
        if (cx - 3 + i < 0) v = 0;
        hb[b] += longint'(kern(BASIS_HK[b], i)) * v;
      end
    end
    for (int o = 0; o < NORI; o++) begin
      longint g, h;
      g = 0; h = 0;
      for (int b = 0; b < 3; b++) g += longint'(STEER_G[o][b]) * (hb[b] >>> 10);
      for (int b = 0; b < 4; b++) h += longint'(STEER_H[o][b]) * (hb[3+b] >>> 10);
      re[o] = sat(g >>> 10); im[o] = sat(h >>> 10);
    end
  endtask

  initial begin
    #2000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int f = 0; f < 2; f++) begin
      for (int y = 0; y < H; y++) for (int x = 0; x < W; x++)
        img[y][x] = (f == 0) ? $urandom_range(0, 255) : ((x < 12) ? 40 : 200);
      for (int y = 0; y < H; y++)
        for (int x = 0; x < W; x++) begin
          bit ev;
          @(negedge clk);
          iv = 1; ix = XW'(x); iy = YW'(y); ip = 8'(img[y][x]);
          @(posedge clk); #1;
          iv = 0;
          ev = x >= 3 && y >= 3;
          checks++;
          if (ov !== ev) begin failures++; $display("(%0d,%0d): out_valid=%0d", x, y, ov); end
          if (ov && ev) begin
            int re [NORI], im [NORI];
            model(x - 3, y - 3, re, im);
            outs++;
            checks++;
            if (int'(ox) != x - 3 || int'(oy) != y - 3) begin failures++; $display("coordinates wrong"); end
            for (int o = 0; o < NORI; o++) begin
              checks++;
              if (int'(oc[o].re) != re[o] || int'(oc[o].im) != im[o]) begin
                failures++;
                $display("f%0d (%0d,%0d) o=%0d: (%0d,%0d) expected (%0d,%0d)", f, x-3, y-3, o, oc[o].re, oc[o].im, re[o], im[o]);
              end
            end
            // vertical edge at x=11.5, away from the top/left border: energy check
            if (f == 1 && x - 3 >= 10 && x - 3 <= 13 && y - 3 >= 4) begin
              longint e [NORI];
              for (int o = 0; o < NORI; o++) e[o] = longint'(oc[o].re) * oc[o].re + longint'(oc[o].im) * oc[o].im;
              checks++;
              edge_hits++;
              if (!(e[1] > e[0] && e[1] > e[2])) begin failures++; $display("edge (%0d,%0d): energies %0d %0d %0d", x-3, y-3, e[0], e[1], e[2]); end
            end
          end
          if ((x * 7 + y) % 6 == 0) begin
            @(posedge clk); #1;
            checks++;
            if (ov) begin failures++; $display("output during idle cycle"); end
          end
        end
    end
    checks++;
    if (outs != 2 * (W - 3) * (H - 3) || edge_hits == 0) begin failures++; $display("outputs %0d edge %0d", outs, edge_hits); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
