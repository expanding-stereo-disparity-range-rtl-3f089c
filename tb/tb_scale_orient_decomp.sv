// tb_scale_orient_decomp: streams a 64x24 random image at one pixel per 4 cycles.
// Each of the three scale outputs must appear exactly 3 cycles after the input
// pixel that completes it, carry the coordinates of its own scale (scale 2 and 4
// are at half and quarter resolution), and equal a stand-alone reference chain of
// pyramid stages and filter banks run on the same input. Also counts samples per
// scale.
module tb_scale_orient_decomp;
  import stereo_pkg::*;
  localparam int W = 64, H = 24;
  // a pyramid stage produces floor((N-3)/2)+1 samples per line (no right/bottom border)
  localparam int W2 = (W - 3) / 2 + 1, H2 = (H - 3) / 2 + 1, W4 = (W2 - 3) / 2 + 1, H4 = (H2 - 3) / 2 + 1;
  logic clk = 0, iv = 0;
  logic [XW-1:0] ix;
  logic [YW-1:0] iy;
  logic [7:0] ip;
  fsmp_t s1, s2, s4;
  int checks = 0, failures = 0, n1 = 0, n2 = 0, n4 = 0;

  scale_orient_decomp #(.LINE_W(W)) dut (.clk(clk), .in_valid(iv), .in_x(ix), .in_y(iy), .in_pix(ip),
    .s1(s1), .s2(s2), .s4(s4));

  // reference chain
  logic r2v, r4v, f1v, f2v, f4v;
  logic [XW-1:0] r2x, r4x, f1x, f2x, f4x;
  logic [YW-1:0] r2y, r4y, f1y, f2y, f4y;
  logic [7:0] r2p, r4p;
  cfilt_t c1 [NORI], c2 [NORI], c4 [NORI];
  pyramid_level #(.LINE_W(W)) r_p2 (.clk(clk), .in_valid(iv), .in_x(ix), .in_y(iy), .in_pix(ip),
    .out_valid(r2v), .out_x(r2x), .out_y(r2y), .out_pix(r2p));
  pyramid_level #(.LINE_W(W/2)) r_p4 (.clk(clk), .in_valid(r2v), .in_x(r2x), .in_y(r2y), .in_pix(r2p),
    .out_valid(r4v), .out_x(r4x), .out_y(r4y), .out_pix(r4p));
  g2h2_filter_bank #(.LINE_W(W)) r_f1 (.clk(clk), .in_valid(iv), .in_x(ix), .in_y(iy), .in_pix(ip),
    .out_valid(f1v), .out_x(f1x), .out_y(f1y), .out_c(c1));
  g2h2_filter_bank #(.LINE_W(W/2)) r_f2 (.clk(clk), .in_valid(r2v), .in_x(r2x), .in_y(r2y), .in_pix(r2p),
    .out_valid(f2v), .out_x(f2x), .out_y(f2y), .out_c(c2));
  g2h2_filter_bank #(.LINE_W(W/4)) r_f4 (.clk(clk), .in_valid(r4v), .in_x(r4x), .in_y(r4y), .in_pix(r4p),
    .out_valid(f4v), .out_x(f4x), .out_y(f4y), .out_c(c4));

  always #5 clk = ~clk;

  initial begin
    #3000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // capture reference results, then compare 3 cycles after the input
  typedef struct { bit v; int x, y; cfilt_t c [NORI]; } ref_t;
  ref_t q1 [$], q2 [$], q4 [$];
  bit started = 0;
  always @(posedge clk) begin
    #1;
    if (iv) started = 1;
    if (!started) ;
    else if (f1v) q1.push_back('{1, int'(f1x), int'(f1y), c1});
    if (started && f2v) q2.push_back('{1, int'(f2x), int'(f2y), c2});
    if (started && f4v) q4.push_back('{1, int'(f4x), int'(f4y), c4});
  end

  task automatic cmp(input string nm, input fsmp_t s, ref ref_t q [$], inout int n);
    checks++;
    if (!s.valid) begin
      if (q.size() != 0) begin failures++; $display("%s: sample missing or late (%0d,%0d) t=%0t", nm, q[0].x, q[0].y, $time); void'(q.pop_front()); end
      return;
    end
    n++;
    if (q.size() == 0) begin failures++; $display("%s: unexpected sample", nm); return; end
    begin
      ref_t r;
      r = q.pop_front();
      if (int'(s.x) != r.x || int'(s.y) != r.y) begin failures++; $display("%s: coords (%0d,%0d) expected (%0d,%0d)", nm, s.x, s.y, r.x, r.y); end
      for (int o = 0; o < NORI; o++) if (s.c[o] != r.c[o]) begin failures++; $display("%s: value mismatch o=%0d", nm, o); end
    end
  endtask

  initial begin
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) begin
        @(negedge clk);
        iv = 1; ix = XW'(x); iy = YW'(y); ip = 8'($urandom);
        @(negedge clk); iv = 0;          // input at cycle t
        @(negedge clk);                  // t+1
        @(negedge clk);                  // t+2
        // t+3: all scales visible now (registered outputs)
        cmp("scale1", s1, q1, n1);
        cmp("scale2", s2, q2, n2);
        cmp("scale4", s4, q4, n4);
      end
    checks++;
    if (n1 != (W - 3) * (H - 3) || n2 != (W2 - 3) * (H2 - 3) || n4 != (W4 - 3) * (H4 - 3)) begin
      failures++; $display("counts %0d %0d %0d", n1, n2, n4);
    end
    $display("samples: %0d %0d %0d", n1, n2, n4);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
