// image_rectifier: warps one camera's field so that epipolar lines become scanlines.
//
// Camera side (cam_clk): incoming pixels are written, without other buffering, into a
// dual-clock buffer of NLINES scanlines. A toggle at every completed scanline and one
// at every field start cross into the system clock through two-flop synchronisers.
//
// System side (clk, at least 4x cam_clk): a controller counts the source lines that
// have arrived and starts output row yo once source line yo+VLOOK is complete (or the
// whole field is in). For every output pixel (xo, yo) the address generator evaluates
// the warp polynomial; the integer part of the source address selects the four
// neighbours, which are read one per cycle from the buffer, and the 6-bit fractional
// parts weight them in the bilinear interpolator. Four system cycles per output pixel,
// so the unit keeps pace with the camera. Pixels whose neighbourhood lies outside the
// image or outside the buffered band are delivered as 0 with out_missing = 1.
//
// Outputs: out_valid/out_x/out_y/out_pix/out_missing, one pixel per 4 clk cycles,
// rows in raster order; frame_start pulses when a new field begins, frame_done after
// its last output pixel, frame_par is the field counter's parity.
// Follows the description: polynomial warp, 4x clock with four sequential reads,
// 32-line buffer, missing-pixel flag. Own choices: VLOOK=15 (usable band +-15
// lines, leaving one line for the row being written), reset values, the slot schedule.
module image_rectifier
  import stereo_pkg::*;
#(
  parameter int unsigned LINE_W = IMG_W,
  parameter int unsigned NROWS  = IMG_H,
  parameter int unsigned NLINES = 32,
  parameter int unsigned VLOOK  = 15,
  parameter logic signed [31:0] A_COEF [6] = '{32'sd0, 32'sd65536, 32'sd0, 32'sd0, 32'sd0, 32'sd0},
  parameter logic signed [31:0] B_COEF [6] = '{32'sd0, 32'sd0, 32'sd65536, 32'sd0, 32'sd0, 32'sd0}
) (
  // camera clock domain
  input  logic              cam_clk,
  input  logic              cam_valid,
  input  logic [XW-1:0]     cam_x,
  input  logic [YW-1:0]     cam_y,
  input  logic [PIX_W-1:0]  cam_pix,
  // system clock domain
  input  logic              clk,
  input  logic              rst_n,
  output logic              out_valid,
  output logic [XW-1:0]     out_x,
  output logic [YW-1:0]     out_y,
  output logic [PIX_W-1:0]  out_pix,
  output logic              out_missing,
  output logic              frame_start,
  output logic              frame_done,
  output logic              frame_par
);
  localparam int unsigned LB = $clog2(NLINES);
  localparam int unsigned CW = 18;   // coordinate width, 6 fractional bits

  // ---------------- camera side ------------------------------------------------
  logic line_tgl, frame_tgl;

  always_ff @(posedge cam_clk) begin
    if (cam_valid && cam_x == XW'(LINE_W - 1)) line_tgl <= ~line_tgl;
    if (cam_valid && cam_x == '0 && cam_y == '0) frame_tgl <= ~frame_tgl;
  end

  logic [PIX_W-1:0] rd_data;
  logic [XW-1:0]    rd_x;
  logic [LB-1:0]    rd_line;

  image_buffer #(.LINE_W(LINE_W), .NLINES(NLINES), .PW(PIX_W)) u_buf (
    .wr_clk(cam_clk), .wr_en(cam_valid), .wr_x(cam_x), .wr_line(cam_y[LB-1:0]),
    .wr_data(cam_pix), .rd_clk(clk), .rd_x(rd_x), .rd_line(rd_line), .rd_data(rd_data)
  );

  // ---------------- clock-domain crossing of the control toggles ----------------
  logic [1:0] tgl_s;
  logic       line_q, frame_q;

  sync_2ff #(.WIDTH(2)) u_sync (
    .clk(clk), .rst_n(rst_n), .d_async({frame_tgl, line_tgl}), .q_sync(tgl_s)
  );

  logic line_ev, frame_ev;
  assign line_ev  = tgl_s[0] ^ line_q;
  assign frame_ev = tgl_s[1] ^ frame_q;

  // ---------------- controller ---------------------------------------------------
  typedef enum logic [1:0] {S_IDLE, S_WAIT, S_ROW} state_t;
  state_t state;

  logic [YW:0]   lines_avail;
  logic [YW-1:0] yo;
  logic [XW:0]   xo;            // slot index 0..LINE_W (last slot only drains)
  logic [1:0]    ph;

  logic row_ready;
  always_comb begin
    row_ready = (lines_avail >= (YW+1)'(NROWS)) ||
                (32'(lines_avail) >= 32'(yo) + VLOOK + 1);
  end

  // address generator
  logic signed [CW-1:0] xs, ys;
  logic                 cg_valid;

  rect_coord_gen #(.CW(32), .OW(CW)) u_coord (
    .clk(clk), .in_valid(state == S_ROW && ph == 2'd0), .xo(xo[XW-1:0]), .yo(yo),
    .a(A_COEF), .b(B_COEF), .out_valid(cg_valid), .xs(xs), .ys(ys)
  );

  // integer / fractional split and validity of the neighbourhood
  logic signed [CW-7:0] xi, yi;
  logic                 nb_ok;
  always_comb begin
    xi = xs[CW-1:6];
    yi = ys[CW-1:6];
    nb_ok = (xi >= 0) && (yi >= 0) &&
            (32'(xi) + 1 < LINE_W) && (32'(yi) + 1 < NROWS) &&
            (32'(yi) + VLOOK >= 32'(yo)) && (32'(yi) + 1 <= 32'(yo) + VLOOK);
  end

  // per-pixel registers: current pixel (address phase) and previous (data phase)
  logic [XW-1:0] cx0, cx1;
  logic [LB-1:0] cl0, cl1;
  logic [5:0]    fx_c, fy_c, fx_p, fy_p;
  logic          ok_c, ok_p, live_c, live_p;
  logic [XW-1:0] xo_c, xo_p;
  logic [PIX_W-1:0] q00, q01, q10, q11;
  logic          bl_go;

  always_comb begin
    rd_x    = cx0;
    rd_line = cl0;
    unique case (ph)
      2'd1: begin rd_x = xi[XW-1:0]; rd_line = yi[LB-1:0]; end   // p00, straight from the generator
      2'd2: begin rd_x = cx1; rd_line = cl0; end   // p01
      2'd3: begin rd_x = cx0; rd_line = cl1; end   // p10
      default: begin rd_x = cx1; rd_line = cl1; end // p11 (ph 0 of the next slot)
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state       <= S_IDLE;
      lines_avail <= '0;
      yo          <= '0;
      xo          <= '0;
      ph          <= '0;
      line_q      <= 1'b0;
      frame_q     <= 1'b0;
      frame_start <= 1'b0;
      frame_done  <= 1'b0;
      frame_par   <= 1'b0;
      live_c      <= 1'b0;
      live_p      <= 1'b0;
      bl_go       <= 1'b0;
      cx0 <= '0; cx1 <= '0; cl0 <= '0; cl1 <= '0;
    end else begin
      line_q      <= tgl_s[0];
      frame_q     <= tgl_s[1];
      frame_start <= 1'b0;
      frame_done  <= 1'b0;
      bl_go       <= 1'b0;

      if (frame_ev) begin
        lines_avail <= '0;
        frame_start <= 1'b1;
        frame_par   <= ~frame_par;
      end else if (line_ev && lines_avail < (YW+1)'(NROWS)) begin
        lines_avail <= lines_avail + 1'b1;
      end

      unique case (state)
        S_IDLE: if (frame_ev) begin
          state <= S_WAIT;
          yo    <= '0;
        end
        S_WAIT: if (frame_ev) begin
          yo <= '0;
        end else if (row_ready) begin
          state <= S_ROW;
          xo    <= '0;
          ph    <= '0;
        end
        S_ROW: begin
          ph <= ph + 1'b1;
          if (ph == 2'd1) begin
            // coordinates of pixel xo are ready: latch its neighbourhood
            cx0    <= xi[XW-1:0];
            cx1    <= xi[XW-1:0] + 1'b1;
            cl0    <= yi[LB-1:0];
            cl1    <= yi[LB-1:0] + 1'b1;
            fx_c   <= xs[5:0];
            fy_c   <= ys[5:0];
            ok_c   <= nb_ok;
            live_c <= (xo < (XW+1)'(LINE_W)) && cg_valid;
            xo_c   <= xo[XW-1:0];
            // the previous pixel's four samples are now complete
            q11    <= rd_data;
            bl_go  <= live_p;
          end
          if (ph == 2'd2) q00 <= rd_data;
          if (ph == 2'd3) begin
            q01 <= rd_data;
            if (xo == (XW+1)'(LINE_W)) begin
              // drain slot finished: row complete
              xo <= '0;
              if (yo == YW'(NROWS - 1)) begin
                state      <= S_IDLE;
                frame_done <= 1'b1;
              end else begin
                yo    <= yo + 1'b1;
                state <= S_WAIT;
              end
            end else begin
              xo <= xo + 1'b1;
            end
          end
          if (ph == 2'd0) begin
            q10    <= rd_data;
            fx_p   <= fx_c;
            fy_p   <= fy_c;
            ok_p   <= ok_c;
            live_p <= live_c;
            xo_p   <= xo_c;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // ---------------- bilinear interpolation --------------------------------------
  logic             bl_valid;
  logic [PIX_W-1:0] bl_pix;
  logic [XW-1:0]    bl_x;
  logic [YW-1:0]    bl_y;
  logic             bl_ok;

  bilinear_interp #(.PW(PIX_W), .FB(6)) u_bil (
    .clk(clk), .in_valid(bl_go), .p00(q00), .p01(q01), .p10(q10), .p11(q11),
    .fx(fx_p), .fy(fy_p), .out_valid(bl_valid), .pix(bl_pix)
  );

  always_ff @(posedge clk) begin
    if (bl_go) begin
      bl_x  <= xo_p;
      bl_y  <= yo;
      bl_ok <= ok_p;
    end
  end

  assign out_valid   = bl_valid;
  assign out_x       = bl_x;
  assign out_y       = bl_y;
  assign out_pix     = bl_ok ? bl_pix : '0;
  assign out_missing = ~bl_ok;
endmodule
