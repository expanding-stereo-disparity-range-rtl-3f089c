// srw_scheduler: position of the secondary roving window (SRW) for each frame.
// The SRW is centred at STEP (one window length, 9) in the first frame and moves by
// STEP every frame until the next position would pass MAXC (128, user-settable);
// the following frame it is centred at 0, then the cycle restarts at STEP:
//   9, 18, ..., 126, 0, 9, 18, ...   (15 frames per sweep with the defaults)
// The new position is taken at every frame_start pulse; after reset srw_c = 0 so
// the first frame uses STEP. The schedule follows the description.
module srw_scheduler
  import stereo_pkg::*;
#(
  parameter int unsigned STEP = WIN1,
  parameter int unsigned MAXC = MAX_DISP
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  frame_start,
  output disp_t srw_c,
  output logic  sweep_wrap      // pulses when the window returns to 0
);
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      srw_c      <= '0;
      sweep_wrap <= 1'b0;
    end else begin
      sweep_wrap <= 1'b0;
      if (frame_start) begin
        if (srw_c == '0) begin
          srw_c <= DW'(STEP);
        end else if (32'(srw_c) + STEP > MAXC) begin
          srw_c      <= '0;
          sweep_wrap <= 1'b1;
        end else begin
          srw_c <= srw_c + DW'(STEP);
        end
      end
    end
  end
endmodule
