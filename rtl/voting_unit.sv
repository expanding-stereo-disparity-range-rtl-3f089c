// voting_unit: one voting-function unit of the phase-correlation unit. For one
// candidate disparity it forms the real part of O_ref * conj(O_search) for each of
// the three orientations and adds them:
//   v = sum_o ( Re(ref_o) Re(srch_o) + Im(ref_o) Im(srch_o) )
// Inputs are L1-normalised 8-bit phases, so no division is needed here; the
// Gaussian window is applied afterwards to the orientation sum, once per slot.
// When en is low (candidate outside the image or the search range) the vote is 0.
// Combinational. The real-part-only product, shared normalisation and summation
// across orientations ahead of the window follow the description.
module voting_unit
  import stereo_pkg::*;
(
  input  logic              en,
  input  cph_t [NORI-1:0]   ref_c,
  input  cph_t [NORI-1:0]   srch_c,
  output vote_t             vote
);
  always_comb begin
    vote = '0;
    if (en)
      for (int o = 0; o < NORI; o++)
        vote += VOTE_W'(ref_c[o].re) * VOTE_W'(srch_c[o].re) +
                VOTE_W'(ref_c[o].im) * VOTE_W'(srch_c[o].im);
  end
endmodule
