// image_buffer: dual-clock scanline buffer in front of the rectifier.
// Holds the last NLINES scanlines of one camera. The camera side writes one pixel
// per wr_clk cycle at (wr_x, wr_y mod NLINES); the system side reads one pixel per
// rd_clk cycle, registered (1-cycle read latency). Using a dual-clock memory to move
// the multi-bit pixel bus between the two clock domains, and the 32-line depth for a
// worst-case 16-line vertical misalignment, follow the design description.
module image_buffer
  import stereo_pkg::*;
#(
  parameter int unsigned LINE_W = IMG_W,
  parameter int unsigned NLINES = 32,
  parameter int unsigned PW     = PIX_W
) (
  input  logic                      wr_clk,
  input  logic                      wr_en,
  input  logic [XW-1:0]             wr_x,
  input  logic [$clog2(NLINES)-1:0] wr_line,
  input  logic [PW-1:0]             wr_data,
  input  logic                      rd_clk,
  input  logic [XW-1:0]             rd_x,
  input  logic [$clog2(NLINES)-1:0] rd_line,
  output logic [PW-1:0]             rd_data
);
  logic [PW-1:0] mem [NLINES*LINE_W];

  always_ff @(posedge wr_clk) begin
    if (wr_en && wr_x < XW'(LINE_W))
      mem[int'(wr_line)*LINE_W + int'(wr_x)] <= wr_data;
  end

  always_ff @(posedge rd_clk) begin
    if (rd_x < XW'(LINE_W))
      rd_data <= mem[int'(rd_line)*LINE_W + int'(rd_x)];
    else
      rd_data <= '0;
  end
endmodule
