// tb_fir7_sym: for every kernel of the G2/H2 table, compares the pre-added
// 4-multiplier FIR with a direct 7-multiplier sum on random signed samples.
module tb_fir7_sym;
  import stereo_pkg::*;
  logic signed [15:0] s [7];
  logic signed [31:0] y [5];
  int checks = 0, failures = 0;

  for (genvar k = 0; k < 5; k++) begin : g_k
    fir7_sym #(.KIDX(k), .IW(16), .OW(32)) dut (.s(s), .y(y[k]));
  end

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int i = 0; i < 300; i++) begin
      for (int j = 0; j < 7; j++) s[j] = 16'($urandom);
      if (i == 0) for (int j = 0; j < 7; j++) s[j] = 16'sh7fff;
      if (i == 1) for (int j = 0; j < 7; j++) s[j] = 16'sh8000;
      #1;
      for (int k = 0; k < 5; k++) begin
        longint e;
        e = 0;
        for (int j = 0; j < 7; j++) e += longint'(s[j]) * longint'(kern(k, j));
        checks++;
        if (longint'(y[k]) != e) begin failures++; $display("k=%0d y=%0d expected %0d", k, y[k], e); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
