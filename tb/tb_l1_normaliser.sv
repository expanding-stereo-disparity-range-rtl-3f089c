// tb_l1_normaliser: random complex inputs (including zero and extreme values);
// expected re' = sign(re)*floor(127|re|/(|re|+|im|)), likewise im'. Also checks
// that |re'|+|im'| stays within 125..127 for non-zero inputs.
module tb_l1_normaliser;
  import stereo_pkg::*;
  logic clk = 0, in_valid = 0, out_valid;
  cfilt_t in_c;
  cph_t out_c;
  int checks = 0, failures = 0;

  l1_normaliser dut (.clk(clk), .in_valid(in_valid), .in_c(in_c), .out_valid(out_valid), .out_c(out_c));
  always #5 clk = ~clk;

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int i = 0; i < 500; i++) begin
      int re, im, ar, ai, er, ei;
      @(negedge clk);
      re = $signed(16'($urandom)); im = $signed(16'($urandom));
      if (i % 3 == 1) begin re = re / 256; im = im / 64; end
      if (i == 0) begin re = 0; im = 0; end
      if (i == 1) begin re = -32768; im = 0; end
      if (i == 2) begin re = 32767; im = -32768; end
      in_c.re = 16'(re); in_c.im = 16'(im); in_valid = 1;
      ar = re < 0 ? -re : re; ai = im < 0 ? -im : im;
      if (ar + ai == 0) begin er = 0; ei = 0; end
      else begin
        er = (127 * ar) / (ar + ai); ei = (127 * ai) / (ar + ai);
        if (re < 0) er = -er;
        if (im < 0) ei = -ei;
      end
      @(posedge clk); #1;
      checks++;
      if (!out_valid || int'(out_c.re) != er || int'(out_c.im) != ei) begin
        failures++; $display("in (%0d,%0d) out (%0d,%0d) expected (%0d,%0d)", re, im, out_c.re, out_c.im, er, ei);
      end
      if (ar + ai != 0) begin
        int n;
        n = (out_c.re < 0 ? -int'(out_c.re) : int'(out_c.re)) + (out_c.im < 0 ? -int'(out_c.im) : int'(out_c.im));
        checks++;
        if (n < 125 || n > 127) begin failures++; $display("norm %0d", n); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
