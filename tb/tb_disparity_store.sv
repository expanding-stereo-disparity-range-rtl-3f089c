// tb_disparity_store: fills bank 0 with a random map, then writes a second map into
// bank 1 while the three read ports sample random positions of bank 0 (the
// previous frame); then swaps roles. Read ports are combinational.
module tb_disparity_store;
  import stereo_pkg::*;
  localparam int W = 16, H = 8;
  logic clk = 0, we = 0, wbank = 0, rbank = 0;
  logic [XW-1:0] wx, rx [3];
  logic [YW-1:0] wy, ry [3];
  disp_t wd, rd [3];
  disp_t model [2][W*H];
  int checks = 0, failures = 0;

  disparity_store #(.LINE_W(W), .NROWS(H)) dut (.clk(clk), .we(we), .wbank(wbank), .wx(wx), .wy(wy), .wd(wd),
    .rbank(rbank), .rx(rx), .ry(ry), .rd(rd));
  always #5 clk = ~clk;

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic frame(input logic b);
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) begin
        @(negedge clk);
        we = 1; wbank = b; wx = XW'(x); wy = YW'(y); wd = DW'($urandom);
        rbank = !b;
        for (int p = 0; p < 3; p++) begin rx[p] = XW'($urandom_range(0, W-1)); ry[p] = YW'($urandom_range(0, H-1)); end
        #1;
        if (checks > 0 || b) begin
          for (int p = 0; p < 3; p++) begin
            checks++;
            if (rd[p] !== model[!b][ry[p]*W + rx[p]]) begin failures++; $display("port %0d (%0d,%0d) %0d expected %0d", p, rx[p], ry[p], rd[p], model[!b][ry[p]*W+rx[p]]); end
          end
        end
        @(posedge clk);
        model[b][y*W + x] = wd;
      end
  endtask

  initial begin
    frame(0); frame(1); frame(0); frame(1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
