// tb_rect_coord_gen: evaluates the warp polynomial for random coordinates and
// coefficients with 64-bit integer arithmetic and compares the registered result
// (6 fractional bits, truncated); also checks the 1-cycle latency.
module tb_rect_coord_gen;
  logic clk = 0;
  logic in_valid = 0, out_valid;
  logic [9:0] xo; logic [7:0] yo;
  logic signed [31:0] a [6], b [6];
  logic signed [17:0] xs, ys;
  int checks = 0, failures = 0;

  rect_coord_gen dut (.clk(clk), .in_valid(in_valid), .xo(xo), .yo(yo), .a(a), .b(b),
                      .out_valid(out_valid), .xs(xs), .ys(ys));
  always #5 clk = ~clk;

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  function automatic longint poly(input logic signed [31:0] c [6], input longint x, input longint y);
    return c[0] + c[1]*x + c[2]*y + c[3]*x*x + c[4]*x*y + c[5]*y*y;
  endfunction

  initial begin
    longint ex, ey;
    for (int i = 0; i < 400; i++) begin
      @(negedge clk);
      // near-identity warp: offsets up to +-8 px, rotation/scale up to ~2%,
      // quadratic terms up to ~1e-4 (raw values with 16 fractional bits)
      a[0] = $signed($urandom_range(0, 1048576)) - 524288;
      a[1] = 65536 + $signed($urandom_range(0, 2000)) - 1000;
      a[2] = $signed($urandom_range(0, 2000)) - 1000;
      a[3] = $signed($urandom_range(0, 12)) - 6;
      a[4] = $signed($urandom_range(0, 12)) - 6;
      a[5] = $signed($urandom_range(0, 12)) - 6;
      b[0] = $signed($urandom_range(0, 1048576)) - 524288;
      b[1] = $signed($urandom_range(0, 2000)) - 1000;
      b[2] = 65536 + $signed($urandom_range(0, 2000)) - 1000;
      b[3] = $signed($urandom_range(0, 12)) - 6;
      b[4] = $signed($urandom_range(0, 12)) - 6;
      b[5] = $signed($urandom_range(0, 12)) - 6;
      xo = 10'($urandom_range(0, 639));
      yo = 8'($urandom_range(0, 239));
      if (i == 0) begin xo = 639; yo = 239; end
      in_valid = 1;
      ex = poly(a, longint'(xo), longint'(yo)) >>> 10;
      ey = poly(b, longint'(xo), longint'(yo)) >>> 10;
      @(posedge clk); #1;
      checks++;
      if (!out_valid || longint'(xs) != ex || longint'(ys) != ey) begin
        failures++; $display("i=%0d xs=%0d (%0d) ys=%0d (%0d)", i, xs, ex, ys, ey);
      end
      in_valid = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
