// gauss_window5: 1x5 Gaussian smoothing window W(x) of the voting function, applied
// along the scanline to every voting slot of both correlation windows:
//   C(x, k) = sum_{j=-2..2} g_j * v(x+j, k) / 16,   g = [1 4 6 4 1]
// Slot k of a pixel is the k-th candidate of that pixel's own window, so when the
// window centre differs between neighbours the taps mix slightly different
// disparities; with tracking the centres of neighbours normally agree.
// The last five processed pixels are kept; whenever a new one arrives the pixel two
// steps older is emitted (registered), using only taps from its own row. Pixels at
// the end of a row are therefore emitted when the next row starts.
// The 1x5 (1-D) mask follows the description; weights and placement after the
// voting units (window shared by the three orientations) are as described there
// for the shared-window simplification; the weight values are own choices.
module gauss_window5
  import stereo_pkg::*;
#(
  parameter int unsigned NWIN = 9
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   in_valid,
  input  logic [XW-1:0]          in_x,
  input  logic [YW-1:0]          in_y,
  input  disp_t                  in_pc,
  input  disp_t                  in_sc,
  input  vote_t [NWIN-1:0]       in_vp,
  input  vote_t [NWIN-1:0]       in_vs,
  output logic                   out_valid,
  output logic [XW-1:0]          out_x,
  output logic [YW-1:0]          out_y,
  output disp_t                  out_pc,
  output disp_t                  out_sc,
  output vote_t [NWIN-1:0]       out_vp,
  output vote_t [NWIN-1:0]       out_vs
);
  typedef struct packed {
    logic             valid;
    logic [XW-1:0]    x;
    logic [YW-1:0]    y;
    disp_t            pc;
    disp_t            sc;
    vote_t [NWIN-1:0] vp;
    vote_t [NWIN-1:0] vs;
  } ent_t;

  ent_t sr [5];      // sr[0] newest
  ent_t nw;
  ent_t win [5];     // after the shift: win[0] = new, win[2] = centre

  always_comb begin
    nw.valid = 1'b1;
    nw.x = in_x; nw.y = in_y; nw.pc = in_pc; nw.sc = in_sc;
    nw.vp = in_vp; nw.vs = in_vs;
    win[0] = nw;
    for (int j = 1; j < 5; j++) win[j] = sr[j-1];
  end

  function automatic vote_t wsum(input ent_t w [5], input int k, input bit srw);
    logic signed [VOTE_W+3:0] acc;
    acc = '0;
    for (int j = 0; j < 5; j++)
      if (w[j].valid && w[j].y == w[2].y)
        acc += (VOTE_W+4)'(GWIN[j]) * (VOTE_W+4)'(srw ? w[j].vs[k] : w[j].vp[k]);
    return VOTE_W'(acc >>> 4);
  endfunction

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int j = 0; j < 5; j++) sr[j].valid <= 1'b0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= 1'b0;
      if (in_valid) begin
        for (int j = 0; j < 5; j++) sr[j] <= win[j];
        if (win[2].valid) begin
          out_valid <= 1'b1;
          out_x  <= win[2].x;
          out_y  <= win[2].y;
          out_pc <= win[2].pc;
          out_sc <= win[2].sc;
          for (int k = 0; k < NWIN; k++) begin
            out_vp[k] <= wsum(win, k, 1'b0);
            out_vs[k] <= wsum(win, k, 1'b1);
          end
        end
      end
    end
  end
endmodule
