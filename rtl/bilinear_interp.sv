// bilinear_interp: intensity of a rectified pixel from its four source neighbours.
// p00 = (xi, yi), p01 = (xi+1, yi), p10 = (xi, yi+1), p11 = (xi+1, yi+1);
// fx, fy are the 6-bit fractional parts of the source coordinate used as weights:
//   out = [ (p00(64-fx) + p01 fx)(64-fy) + (p10(64-fx) + p11 fx) fy + 2048 ] / 4096
// Bilinear weighting by the fractional address bits follows the description; the
// rounding is an own choice. Timing: registered output, latency 1 cycle.
module bilinear_interp
  import stereo_pkg::*;
#(
  parameter int unsigned PW = PIX_W,
  parameter int unsigned FB = 6
) (
  input  logic          clk,
  input  logic          in_valid,
  input  logic [PW-1:0] p00, p01, p10, p11,
  input  logic [FB-1:0] fx, fy,
  output logic          out_valid,
  output logic [PW-1:0] pix
);
  localparam int unsigned ONE = 1 << FB;
  localparam int unsigned SW  = PW + 2*FB + 2;

  logic [SW-1:0] top, bot, sum;

  always_comb begin
    top = SW'(p00) * SW'(ONE - fx) + SW'(p01) * SW'(fx);
    bot = SW'(p10) * SW'(ONE - fx) + SW'(p11) * SW'(fx);
    sum = top * SW'(ONE - fy) + bot * SW'(fy) + SW'(1 << (2*FB-1));
  end

  always_ff @(posedge clk) begin
    out_valid <= in_valid;
    pix       <= PW'(sum >> (2*FB));
  end
endmodule
