// tb_partial_line_buffer: writes a stream of random entries into the ring and
// reads random recent positions through every copy's PTW and SRW ports; data must
// match the reference copy one cycle after the address.
module tb_partial_line_buffer;
  localparam int NC = 9, D = 64, EW = 66;
  logic clk = 0, we = 0;
  logic [5:0] wa;
  logic [EW-1:0] wd;
  logic [5:0] rap [NC], ras [NC];
  logic [EW-1:0] rdp [NC], rds [NC];
  logic [EW-1:0] model [D];
  int checks = 0, failures = 0;

  partial_line_buffer #(.NCOPY(NC), .DEPTH(D), .EW(EW)) dut (.clk(clk), .we(we), .waddr(wa), .wdata(wd),
    .raddr_p(rap), .raddr_s(ras), .rdata_p(rdp), .rdata_s(rds));
  always #5 clk = ~clk;

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [5:0] ep [NC], es [NC];
    for (int i = 0; i < D; i++) begin
      @(negedge clk); we = 1; wa = 6'(i); wd = {2'(i), $urandom, $urandom}; model[i] = wd;
    end
    for (int i = 0; i < 200; i++) begin
      @(negedge clk);
      we = 1; wa = 6'(i); wd = {2'(i), $urandom, $urandom};
      for (int c = 0; c < NC; c++) begin
        rap[c] = 6'($urandom); ras[c] = 6'($urandom);
        if (rap[c] == wa) rap[c] = rap[c] + 1;
        if (ras[c] == wa) ras[c] = ras[c] + 1;
        ep[c] = rap[c]; es[c] = ras[c];
      end
      @(posedge clk); #1;
      model[wa] = wd;
      for (int c = 0; c < NC; c++) begin
        checks += 2;
        if (rdp[c] !== model[ep[c]]) begin failures++; $display("copy %0d PTW port mismatch", c); end
        if (rds[c] !== model[es[c]]) begin failures++; $display("copy %0d SRW port mismatch", c); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
