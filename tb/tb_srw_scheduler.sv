// tb_srw_scheduler: applies 40 frame starts and checks the roving-window sequence
// 9, 18, ..., 126, 0, 9, ... and the wrap strobe; repeats with a 60-pixel limit.
module tb_srw_scheduler;
  import stereo_pkg::*;
  logic clk = 0, rst_n = 0, fs = 0;
  disp_t c1, c2;
  logic w1, w2;
  int checks = 0, failures = 0, wraps = 0;

  srw_scheduler dut1 (.clk(clk), .rst_n(rst_n), .frame_start(fs), .srw_c(c1), .sweep_wrap(w1));
  srw_scheduler #(.STEP(9), .MAXC(60)) dut2 (.clk(clk), .rst_n(rst_n), .frame_start(fs), .srw_c(c2), .sweep_wrap(w2));
  always #5 clk = ~clk;

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int e1, e2;
    e1 = 0; e2 = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    checks++; if (c1 != 0) failures++;
    for (int f = 0; f < 40; f++) begin
      @(negedge clk); fs = 1;
      @(negedge clk); fs = 0;
      e1 = (e1 == 0) ? 9 : ((e1 + 9 > 128) ? 0 : e1 + 9);
      e2 = (e2 == 0) ? 9 : ((e2 + 9 > 60) ? 0 : e2 + 9);
      checks += 2;
      if (int'(c1) != e1) begin failures++; $display("frame %0d: srw %0d expected %0d", f, c1, e1); end
      if (int'(c2) != e2) begin failures++; $display("frame %0d: srw(60) %0d expected %0d", f, c2, e2); end
      repeat (3) @(negedge clk);
    end
    // frame 14 (0-based) is the first return to 0 for MAXC=128
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  always @(posedge clk) if (w1) wraps++;
  final begin end
endmodule
