// consistency_check: left-right / right-left consistency check of the disparity
// maps. The right-to-left estimates of the current row are kept in a buffer of
// DEPTH (>= maximum disparity) entries indexed by column. For every left-to-right
// estimate d at column x the right-to-left estimate at column x-d is looked up;
// the estimate is accepted when the two differ by at most THR pixels and flagged
// invalid otherwise (also when x-d falls outside the image or the buffer). The
// accepted value is the left-to-right one. The two input streams must arrive in
// lockstep (same pixel in the same cycle). Output registered, latency 1.
// From the description: buffering one row of right-to-left results sized by the
// maximum disparity, lookup driven by the left-to-right disparity, threshold of
// 2 pixels, 1-bit invalid flag. Own choices: column-indexed ring with (x,y) tags.
module consistency_check
  import stereo_pkg::*;
#(
  parameter int unsigned DEPTH = 256,
  parameter int unsigned THR   = CONS_THR
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          lr_valid,
  input  logic [XW-1:0] lr_x,
  input  logic [YW-1:0] lr_y,
  input  disp_t         lr_d,
  input  logic          rl_valid,
  input  logic [XW-1:0] rl_x,
  input  logic [YW-1:0] rl_y,
  input  disp_t         rl_d,
  output logic          out_valid,
  output logic [XW-1:0] out_x,
  output logic [YW-1:0] out_y,
  output disp_t         out_d,
  output logic          out_invalid
);
  localparam int unsigned AB = $clog2(DEPTH);

  typedef struct packed {
    logic [YW-1:0] y;
    logic [XW-1:0] x;
    disp_t         d;
  } rent_t;

  rent_t buf_q [DEPTH];
  rent_t hit;
  logic  ok;
  int    xr;

  always_comb begin
    xr  = int'(lr_x) - int'(lr_d);
    hit = buf_q[AB'(xr)];
    if (rl_valid && xr == int'(rl_x) && rl_y == lr_y)
      hit = '{y: rl_y, x: rl_x, d: rl_d};          // d = 0: same-cycle bypass
    ok = (xr >= 0) && hit.y == lr_y && int'(hit.x) == xr &&
         ((lr_d >= hit.d) ? (lr_d - hit.d) : (hit.d - lr_d)) <= DW'(THR);
  end

  always_ff @(posedge clk) begin
    if (rl_valid) buf_q[rl_x[AB-1:0]] <= '{y: rl_y, x: rl_x, d: rl_d};
    if (!rst_n) begin
      out_valid <= 1'b0;
    end else begin
      out_valid <= lr_valid;
      if (lr_valid) begin
        out_x       <= lr_x;
        out_y       <= lr_y;
        out_d       <= lr_d;
        out_invalid <= !ok;
      end
    end
  end
endmodule
