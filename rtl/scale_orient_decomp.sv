// scale_orient_decomp: scale-orientation decomposition of one rectified image.
// Builds a three-level Gaussian pyramid (scales 1, 2 and 4: the input and two
// levels each sub-sampled by two) and filters every level with a G2/H2 filter bank
// at -45, 0 and +45 degrees. Outputs are three filtered streams, one per scale.
// Each stage adds one register, so the scale-1, scale-2 and scale-4 results caused
// by the same input pixel would leave 1, 2 and 3 cycles after it; the two finer
// scales are delayed so that all three leave together, 3 cycles after the input.
// The coarse streams carry their own (sub-sampled) coordinates; at most one pixel
// per scale is produced per input pixel.
// The pyramid/filter structure follows the description; the latency alignment is
// this design's choice (it lets one word per input pixel cross the inter-FPGA link).
module scale_orient_decomp
  import stereo_pkg::*;
#(
  parameter int unsigned LINE_W = IMG_W
) (
  input  logic             clk,
  input  logic             in_valid,
  input  logic [XW-1:0]    in_x,
  input  logic [YW-1:0]    in_y,
  input  logic [PIX_W-1:0] in_pix,
  output fsmp_t            s1,
  output fsmp_t            s2,
  output fsmp_t            s4
);
  // pyramid
  logic             p2_v, p4_v;
  logic [XW-1:0]    p2_x, p4_x;
  logic [YW-1:0]    p2_y, p4_y;
  logic [PIX_W-1:0] p2_p, p4_p;

  pyramid_level #(.LINE_W(LINE_W)) u_pyr2 (
    .clk(clk), .in_valid(in_valid), .in_x(in_x), .in_y(in_y), .in_pix(in_pix),
    .out_valid(p2_v), .out_x(p2_x), .out_y(p2_y), .out_pix(p2_p)
  );
  pyramid_level #(.LINE_W(LINE_W/2)) u_pyr4 (
    .clk(clk), .in_valid(p2_v), .in_x(p2_x), .in_y(p2_y), .in_pix(p2_p),
    .out_valid(p4_v), .out_x(p4_x), .out_y(p4_y), .out_pix(p4_p)
  );

  // filter banks
  fsmp_t  f1, f2, f4;
  cfilt_t c1 [NORI], c2 [NORI], c4 [NORI];

  g2h2_filter_bank #(.LINE_W(LINE_W)) u_fb1 (
    .clk(clk), .in_valid(in_valid), .in_x(in_x), .in_y(in_y), .in_pix(in_pix),
    .out_valid(f1.valid), .out_x(f1.x), .out_y(f1.y), .out_c(c1)
  );
  g2h2_filter_bank #(.LINE_W(LINE_W/2)) u_fb2 (
    .clk(clk), .in_valid(p2_v), .in_x(p2_x), .in_y(p2_y), .in_pix(p2_p),
    .out_valid(f2.valid), .out_x(f2.x), .out_y(f2.y), .out_c(c2)
  );
  g2h2_filter_bank #(.LINE_W(LINE_W/4)) u_fb4 (
    .clk(clk), .in_valid(p4_v), .in_x(p4_x), .in_y(p4_y), .in_pix(p4_p),
    .out_valid(f4.valid), .out_x(f4.x), .out_y(f4.y), .out_c(c4)
  );

  always_comb begin
    for (int o = 0; o < NORI; o++) begin
      f1.c[o] = c1[o];
      f2.c[o] = c2[o];
      f4.c[o] = c4[o];
    end
  end

  // latency alignment
  fsmp_t f1_d1;
  always_ff @(posedge clk) begin
    f1_d1 <= f1;
    s1    <= f1_d1;
    s2    <= f2;
  end
  assign s4 = f4;
endmodule
