// tb_bilinear_interp: random neighbourhoods and fractions; compares against the
// bilinear formula with rounding, and checks the 1-cycle latency of out_valid.
module tb_bilinear_interp;
  logic clk = 0;
  logic in_valid = 0, out_valid;
  logic [7:0] p00, p01, p10, p11, pix;
  logic [5:0] fx, fy;
  int checks = 0, failures = 0;

  bilinear_interp dut (.clk(clk), .in_valid(in_valid), .p00(p00), .p01(p01), .p10(p10), .p11(p11),
                       .fx(fx), .fy(fy), .out_valid(out_valid), .pix(pix));
  always #5 clk = ~clk;

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    real e; int exp_i;
    for (int i = 0; i < 500; i++) begin
      @(negedge clk);
      p00 = 8'($urandom); p01 = 8'($urandom); p10 = 8'($urandom); p11 = 8'($urandom);
      fx = 6'($urandom); fy = 6'($urandom);
      if (i < 4) begin p00 = 200; p01 = 100; p10 = 50; p11 = 0; fx = 6'(i*16); fy = 6'(63 - i*16); end
      in_valid = 1;
      // exact real-valued bilinear value
      begin
        real r00, r01, r10, r11, rx, ry;
        r00 = real'(p00); r01 = real'(p01); r10 = real'(p10); r11 = real'(p11);
        rx = real'(fx); ry = real'(fy);
        e = (r00*(64.0-rx)*(64.0-ry) + r01*rx*(64.0-ry) + r10*(64.0-rx)*ry + r11*rx*ry) / 4096.0;
      end
      exp_i = int'($floor(e + 0.5));
      @(posedge clk); #1;
      checks++;
      if (!out_valid || int'(pix) != exp_i) begin
        failures++; $display("i=%0d pix=%0d expected %0d", i, pix, exp_i);
      end
      in_valid = 0;
      @(posedge clk); #1;
      checks++; if (out_valid) begin failures++; $display("out_valid stuck"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
