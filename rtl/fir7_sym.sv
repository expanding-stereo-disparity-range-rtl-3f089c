// fir7_sym: 7-tap FIR for symmetric (c1=c7, c2=c6, c3=c5) or anti-symmetric
// (c1=-c7, c2=-c6, c3=-c5, c4=0) coefficient sets. Samples that share a
// coefficient magnitude are pre-added (or pre-subtracted) so only four
// multipliers are needed instead of seven, as the description proposes for the
// G2/H2 basis filters. s[i] is the sample at offset i-3 from the centre.
// Combinational; the caller registers the result. Kernel tables live in stereo_pkg.
module fir7_sym
  import stereo_pkg::*;
#(
  parameter int KIDX = 0,           // kernel index into stereo_pkg::kern()
  parameter int unsigned IW = 16,   // sample width (signed)
  parameter int unsigned OW = 32
) (
  input  logic signed [IW-1:0] s [7],
  output logic signed [OW-1:0] y
);
  localparam bit SYM = kern_sym(KIDX);
  localparam coef_t C0 = kern(KIDX, 0);
  localparam coef_t C1 = kern(KIDX, 1);
  localparam coef_t C2 = kern(KIDX, 2);
  localparam coef_t C3 = kern(KIDX, 3);

  logic signed [IW:0] pa0, pa1, pa2;
  always_comb begin
    if (SYM) begin
      pa0 = (IW+1)'(s[0]) + (IW+1)'(s[6]);
      pa1 = (IW+1)'(s[1]) + (IW+1)'(s[5]);
      pa2 = (IW+1)'(s[2]) + (IW+1)'(s[4]);
    end else begin
      pa0 = (IW+1)'(s[0]) - (IW+1)'(s[6]);
      pa1 = (IW+1)'(s[1]) - (IW+1)'(s[5]);
      pa2 = (IW+1)'(s[2]) - (IW+1)'(s[4]);
    end
    y = OW'(pa0) * OW'(C0) + OW'(pa1) * OW'(C1) + OW'(pa2) * OW'(C2) +
        OW'(s[3]) * OW'(C3);
  end
endmodule
