// pyramid_level: one level of the Gaussian pyramid. The incoming image stream is
// low-pass filtered with a separable 5x5 binomial kernel ([1 4 6 4 1]/16 vertically,
// then horizontally) and sub-sampled by two in x and y: only outputs at even (x, y)
// are emitted, labelled (x/2, y/2).
// Stream convention (used throughout the pipeline): in_valid marks a pixel with its
// coordinates; pixels of a row arrive in order. The vertical stage reads four line
// memories (rows y-1..y-4) and produces the column centred on row y-2; the
// horizontal stage keeps the last five columns and produces the pixel centred on
// x-2. Taps above row 0 or left of column 0 are zero; the last two rows and columns
// of a level are not produced. Latency: output registered 1 cycle after in_valid.
// The description specifies a three-level pyramid sub-sampled by two; the kernel,
// border handling and widths are own choices.
module pyramid_level
  import stereo_pkg::*;
#(
  parameter int unsigned LINE_W = IMG_W,   // input line length
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
  output logic [PW-1:0] out_pix
);
  logic [PW-1:0] lb [4][LINE_W];     // lb[k] holds row y-1-k
  localparam int unsigned AW = $clog2(LINE_W);
  logic [AW-1:0] ia;                   // line-buffer column address
  assign ia = in_x[AW-1:0];
  logic [PW+3:0] hsr [4];            // vertically filtered columns x-1..x-4
  logic [PW-1:0] tap [5];            // rows y-4..y
  logic [PW+3:0] vcol;
  logic [PW+7:0] hsum;
  logic [PW+3:0] htap [5];           // columns x-4..x
  logic [XW-1:0] cx;
  logic [YW-1:0] cy;

  always_comb begin
    tap[4] = in_pix;
    for (int k = 0; k < 4; k++)
      tap[3-k] = (32'(in_y) >= k + 1) ? lb[k][ia] : '0;
    vcol = (PW+4)'(tap[0]) + 4*(PW+4)'(tap[1]) + 6*(PW+4)'(tap[2]) +
           4*(PW+4)'(tap[3]) + (PW+4)'(tap[4]);
    htap[4] = vcol;
    for (int k = 0; k < 4; k++)
      htap[3-k] = (32'(in_x) >= k + 1) ? hsr[k] : '0;
    hsum = (PW+8)'(htap[0]) + 4*(PW+8)'(htap[1]) + 6*(PW+8)'(htap[2]) +
           4*(PW+8)'(htap[3]) + (PW+8)'(htap[4]);
    cx = in_x - XW'(2);
    cy = in_y - YW'(2);
  end

  always_ff @(posedge clk) begin
    out_valid <= 1'b0;
    if (in_valid) begin
      lb[0][ia] <= in_pix;
      for (int k = 1; k < 4; k++) lb[k][ia] <= lb[k-1][ia];
      hsr[0] <= vcol;
      for (int k = 1; k < 4; k++) hsr[k] <= hsr[k-1];
      if (in_x >= XW'(2) && in_y >= YW'(2) && !cx[0] && !cy[0]) begin
        out_valid <= 1'b1;
        out_x     <= cx >> 1;
        out_y     <= cy >> 1;
        out_pix   <= PW'((hsum + (PW+8)'(128)) >> 8);
      end
    end
  end
endmodule
