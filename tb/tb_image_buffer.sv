// tb_image_buffer: writes random pixels on a slow write clock and reads them back
// on an unrelated faster read clock, comparing with a reference copy one read
// cycle after each address (registered read).
module tb_image_buffer;
  localparam int W = 40, N = 8;
  logic wclk = 0, rclk = 0;
  logic we = 0;
  logic [9:0] wx, rx;
  logic [2:0] wl, rl;
  logic [7:0] wd, rd;
  logic [7:0] model [N][W];
  int checks = 0, failures = 0;

  image_buffer #(.LINE_W(W), .NLINES(N)) dut (.wr_clk(wclk), .wr_en(we), .wr_x(wx), .wr_line(wl),
    .wr_data(wd), .rd_clk(rclk), .rd_x(rx), .rd_line(rl), .rd_data(rd));
  always #20 wclk = ~wclk;
  always #4.5 rclk = ~rclk;

  initial begin
    #2000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int l = 0; l < N; l++)
      for (int x = 0; x < W; x++) begin
        @(negedge wclk);
        we = 1; wx = 10'(x); wl = 3'(l); wd = 8'($urandom);
        model[l][x] = wd;
      end
    @(negedge wclk); we = 0;
    for (int i = 0; i < 300; i++) begin
      int l, x;
      l = $urandom_range(0, N-1); x = $urandom_range(0, W-1);
      @(negedge rclk); rx = 10'(x); rl = 3'(l);
      @(posedge rclk); #1;
      checks++;
      if (rd !== model[l][x]) begin failures++; $display("line %0d x %0d: %h expected %h", l, x, rd, model[l][x]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
