// tb_sync_2ff: drives random bits into the synchroniser and checks that each
// appears at the output exactly two clock edges later, and that reset clears it.
module tb_sync_2ff;
  logic       clk = 0, rst_n = 0;
  logic [3:0] d, q;
  logic [3:0] hist [3];
  int checks = 0, failures = 0;

  sync_2ff #(.WIDTH(4)) dut (.clk(clk), .rst_n(rst_n), .d_async(d), .q_sync(q));
  always #5 clk = ~clk;

  initial begin
    #20000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    d = '1;
    repeat (3) @(posedge clk);
    #1;
    checks++; if (q !== 4'h0) begin failures++; $display("reset value wrong %h", q); end
    rst_n = 1;
    hist = '{default: 4'h0};
    for (int i = 0; i < 200; i++) begin
      @(negedge clk);
      d = 4'($urandom);
      @(posedge clk);
      #1;
      hist[2] = hist[1]; hist[1] = hist[0]; hist[0] = d;
      if (i >= 1) begin
        checks++;
        if (q !== hist[1]) begin failures++; $display("cycle %0d: q=%h expected %h", i, q, hist[1]); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
