// disparity_store: per-pixel disparity of the previous frame, which seeds the
// primary tracking windows. Two banks of LINE_W x NROWS words are used in
// ping-pong: the peak detector writes the current frame into one bank while the
// correlation units read the previous frame from the other, so no estimate is
// overwritten before it has been used. Three asynchronous read ports serve the
// three scales (the coarse scales read the full-resolution pixel at the top-left
// of their block). Write: one word per clock.
// The temporal seeding follows the description; where and how the previous
// disparities are held (double-buffered frame store) is this design's choice.
module disparity_store
  import stereo_pkg::*;
#(
  parameter int unsigned LINE_W = IMG_W,
  parameter int unsigned NROWS  = IMG_H
) (
  input  logic          clk,
  input  logic          we,
  input  logic          wbank,
  input  logic [XW-1:0] wx,
  input  logic [YW-1:0] wy,
  input  disp_t         wd,
  input  logic          rbank,
  input  logic [XW-1:0] rx [3],
  input  logic [YW-1:0] ry [3],
  output disp_t         rd [3]
);
  localparam int unsigned NPIX = LINE_W * NROWS;
  disp_t mem [2*NPIX];

  always_ff @(posedge clk) begin
    if (we && wx < XW'(LINE_W) && wy < YW'(NROWS))
      mem[(wbank ? NPIX : 0) + int'(wy)*LINE_W + int'(wx)] <= wd;
  end

  always_comb begin
    for (int p = 0; p < 3; p++) begin
      if (rx[p] < XW'(LINE_W) && ry[p] < YW'(NROWS))
        rd[p] = mem[(rbank ? NPIX : 0) + int'(ry[p])*LINE_W + int'(rx[p])];
      else
        rd[p] = '0;
    end
  end
endmodule
