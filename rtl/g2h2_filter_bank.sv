// g2h2_filter_bank: quadrature G2/H2 steerable filtering of one pyramid level.
// Seven X-Y separable basis filters (three for G2, four for H2) are applied with the
// vertical pass first, so that a single 6-line Y buffer is shared by all seven
// filters; each basis filter then has its own 6-deep horizontal delay line. All
// 1-D kernels are symmetric or anti-symmetric 7-tap FIRs (fir7_sym, 4 multipliers).
// The basis outputs are steered to -45, 0 and +45 degrees; the G2 response is the
// real part and the H2 response the imaginary part of the complex output, saturated
// to 16 bits. Output pixel (x-3, y-3) is emitted, registered, one cycle after input
// pixel (x, y); taps outside the image are zero, the last three rows/columns are
// not produced.
// From the description: 7 basis filters, shared Y buffer with vertical-first order,
// symmetric FIR structure, 3 orientations, 16-bit output. Own choices: kernel
// values (standard G2/H2 approximation sampled at spacing 0.67, see stereo_pkg),
// intermediate scaling (>>6 after the vertical pass, >>10 after the horizontal).
module g2h2_filter_bank
  import stereo_pkg::*;
#(
  parameter int unsigned LINE_W = IMG_W,
  parameter int unsigned PW     = PIX_W
) (
  input  logic          clk,
  input  logic          in_valid,
  input  logic [XW-1:0] in_x,
  input  logic [YW-1:0] in_y,
  input  logic [PW-1:0] in_pix,
  output logic          out_valid,
  output logic [XW-1:0] out_x,
  output logic [YW-1:0] out_y,
  output cfilt_t        out_c [NORI]
);
  localparam int unsigned VW = 16;     // width after the vertical pass

  // ---- shared Y buffer --------------------------------------------------------
  logic [PW-1:0] lb [6][LINE_W];       // lb[k] holds row y-1-k
  localparam int unsigned AW = $clog2(LINE_W);
  logic [AW-1:0] ia;                   // line-buffer column address
  assign ia = in_x[AW-1:0];
  logic signed [PW:0] col [7];         // rows y-6 .. y

  always_comb begin
    col[6] = (PW+1)'(in_pix);
    for (int k = 0; k < 6; k++)
      col[5-k] = (32'(in_y) >= k + 1) ? (PW+1)'(lb[k][ia]) : '0;
  end

  // ---- vertical pass of each basis filter ----------------------------------------
  logic signed [31:0]   vraw [NBASIS];
  logic signed [VW-1:0] vcol [NBASIS];

  for (genvar b = 0; b < NBASIS; b++) begin : g_vert
    fir7_sym #(.KIDX(BASIS_VK[b]), .IW(PW+1), .OW(32)) u_v (.s(col), .y(vraw[b]));
    assign vcol[b] = VW'(vraw[b] >>> 6);
  end

  // ---- horizontal pass -----------------------------------------------------------
  logic signed [VW-1:0] hsr [NBASIS][6];    // columns x-1 .. x-6
  logic signed [VW-1:0] hs  [NBASIS][7];    // columns x-6 .. x
  logic signed [31:0]   hraw [NBASIS];

  for (genvar b = 0; b < NBASIS; b++) begin : g_horz
    always_comb begin
      hs[b][6] = vcol[b];
      for (int k = 0; k < 6; k++)
        hs[b][5-k] = (32'(in_x) >= k + 1) ? hsr[b][k] : '0;
    end
    fir7_sym #(.KIDX(BASIS_HK[b]), .IW(VW), .OW(32)) u_h (.s(hs[b]), .y(hraw[b]));
  end

  // ---- steering to three orientations ----------------------------------------------
  function automatic filt_t sat16(input logic signed [47:0] v);
    if (v > 48'sd32767)       return 16'sh7fff;
    else if (v < -48'sd32768) return 16'sh8000;
    else                      return v[15:0];
  endfunction

  cfilt_t steer [NORI];
  always_comb begin
    for (int o = 0; o < NORI; o++) begin
      logic signed [47:0] g, h;
      g = '0;
      h = '0;
      for (int b = 0; b < 3; b++) g += 48'(STEER_G[o][b]) * 48'(hraw[b] >>> 10);
      for (int b = 0; b < 4; b++) h += 48'(STEER_H[o][b]) * 48'(hraw[3+b] >>> 10);
      steer[o].re = sat16(g >>> 10);
      steer[o].im = sat16(h >>> 10);
    end
  end

  always_ff @(posedge clk) begin
    out_valid <= 1'b0;
    if (in_valid) begin
      lb[0][ia] <= in_pix;
      for (int k = 1; k < 6; k++) lb[k][ia] <= lb[k-1][ia];
      for (int b = 0; b < NBASIS; b++) begin
        hsr[b][0] <= vcol[b];
        for (int k = 1; k < 6; k++) hsr[b][k] <= hsr[b][k-1];
      end
      if (in_x >= XW'(3) && in_y >= YW'(3)) begin
        out_valid <= 1'b1;
        out_x     <= in_x - XW'(3);
        out_y     <= in_y - YW'(3);
        out_c     <= steer;
      end
    end
  end
endmodule
