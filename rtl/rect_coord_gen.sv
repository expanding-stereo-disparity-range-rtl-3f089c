// rect_coord_gen: address generator of the image rectifier. For an integer output
// coordinate (xo, yo) it evaluates the second-order warp polynomials
//   x = a0 + a1*xo + a2*yo + a3*xo^2 + a4*xo*yo + a5*yo^2
//   y = b0 + b1*xo + b2*yo + b3*xo^2 + b4*xo*yo + b5*yo^2
// which approximate the inverse rectifying homography. Coefficients are signed
// fixed point with 16 fractional bits (the precision chosen in the description);
// results are returned with 6 fractional bits (10 integer bits index a 640-pixel
// line, as described), signed so that out-of-image positions can be detected.
// Timing: one coordinate pair per clock, outputs registered (latency 1).
// The 32-bit coefficient words and truncation toward minus infinity are own choices.
module rect_coord_gen
  import stereo_pkg::*;
#(
  parameter int unsigned CW = 32,      // coefficient width, Q(CW-17).16
  parameter int unsigned OW = 18       // output width, Q(OW-7).6, signed
) (
  input  logic                        clk,
  input  logic                        in_valid,
  input  logic [XW-1:0]               xo,
  input  logic [YW-1:0]               yo,
  input  logic signed [CW-1:0]        a [6],
  input  logic signed [CW-1:0]        b [6],
  output logic                        out_valid,
  output logic signed [OW-1:0]        xs,
  output logic signed [OW-1:0]        ys
);
  localparam int unsigned AW = CW + 2*XW + 4;   // accumulator width

  logic signed [AW-1:0] term [6];
  logic signed [AW-1:0] accx, accy;

  always_comb begin
    // monomials of the output coordinate (all non-negative)
    term[0] = AW'(1);
    term[1] = AW'(xo);
    term[2] = AW'(yo);
    term[3] = AW'(xo) * AW'(xo);
    term[4] = AW'(xo) * AW'(yo);
    term[5] = AW'(yo) * AW'(yo);
    accx = '0;
    accy = '0;
    for (int i = 0; i < 6; i++) begin
      accx += AW'(a[i]) * term[i];
      accy += AW'(b[i]) * term[i];
    end
  end

  always_ff @(posedge clk) begin
    out_valid <= in_valid;
    xs <= OW'(accx >>> 10);     // 16 -> 6 fractional bits
    ys <= OW'(accy >>> 10);
  end
endmodule
