// l1_normaliser: normalises one complex filter response to unit L1 norm and keeps
// 8 bits per component:  re' = 127*re / (|re|+|im|),  im' = 127*im / (|re|+|im|).
// A zero response gives zero. Normalising once per filter output (instead of
// inside every voting unit), using the L1 rather than the L2 norm, and keeping
// 8 bits follow the description; the scale 127 and truncating division are own
// choices. Timing: registered output, latency 1 cycle.
module l1_normaliser
  import stereo_pkg::*;
(
  input  logic   clk,
  input  logic   in_valid,
  input  cfilt_t in_c,
  output logic   out_valid,
  output cph_t   out_c
);
  logic [FILT_W:0]         n;
  logic [FILT_W:0]         are, aim;
  logic [FILT_W+7:0]       qre, qim;

  always_comb begin
    // magnitudes in FILT_W+1 bits, so that -(-32768) does not overflow
    are = in_c.re[FILT_W-1] ? (FILT_W+1)'(0) - {in_c.re[FILT_W-1], in_c.re} : {1'b0, in_c.re};
    aim = in_c.im[FILT_W-1] ? (FILT_W+1)'(0) - {in_c.im[FILT_W-1], in_c.im} : {1'b0, in_c.im};
    n   = are + aim;
    if (n == '0) begin
      qre = '0;
      qim = '0;
    end else begin
      qre = ((FILT_W+8)'(are) * (FILT_W+8)'(127)) / (FILT_W+8)'(n);
      qim = ((FILT_W+8)'(aim) * (FILT_W+8)'(127)) / (FILT_W+8)'(n);
    end
  end

  always_ff @(posedge clk) begin
    out_valid <= in_valid;
    out_c.re  <= in_c.re[FILT_W-1] ? -PH_W'(qre) : PH_W'(qre);
    out_c.im  <= in_c.im[FILT_W-1] ? -PH_W'(qim) : PH_W'(qim);
  end
endmodule
