// tb_gauss_window5: random vote vectors over several short rows. For each new
// step the block must emit, one cycle later, the entry two steps back with every
// vote replaced by (1,4,6,4,1)/16 of the five surrounding steps of the same row.
// Also checks row edges (other-row taps dropped) and that idle cycles hold state.
module tb_gauss_window5;
  import stereo_pkg::*;
  localparam int N = 3;
  logic clk = 0, rst_n = 0, iv = 0, ov;
  logic [XW-1:0] ix, ox;
  logic [YW-1:0] iy, oy;
  disp_t ipc, isc, opc, osc;
  vote_t [N-1:0] ivp, ivs, ovp, ovs;
  int checks = 0, failures = 0, outs = 0;
  int hx [$], hy [$], hpc [$];
  int hvp [$][N], hvs [$][N];
  localparam int G [5] = '{1, 4, 6, 4, 1};

  gauss_window5 #(.NWIN(N)) dut (.clk(clk), .rst_n(rst_n), .in_valid(iv), .in_x(ix), .in_y(iy), .in_pc(ipc),
    .in_sc(isc), .in_vp(ivp), .in_vs(ivs), .out_valid(ov), .out_x(ox), .out_y(oy), .out_pc(opc), .out_sc(osc),
    .out_vp(ovp), .out_vs(ovs));
  always #5 clk = ~clk;

  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int n;
    n = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int y = 0; y < 5; y++)
      for (int x = 0; x < 12; x++) begin
        int vp [N], vs [N];
        @(negedge clk);
        iv = 1; ix = XW'(x); iy = YW'(y); ipc = DW'(x + 1); isc = DW'(y);
        for (int k = 0; k < N; k++) begin
          vp[k] = $urandom_range(0, 100000) - 50000; vs[k] = $urandom_range(0, 100000) - 50000;
          ivp[k] = VOTE_W'(vp[k]); ivs[k] = VOTE_W'(vs[k]);
        end
        hx.push_back(x); hy.push_back(y); hpc.push_back(x + 1); hvp.push_back(vp); hvs.push_back(vs);
        @(posedge clk); #1;
        iv = 0;
        checks++;
        if (ov !== (n >= 2)) begin failures++; $display("step %0d: out_valid=%0d", n, ov); end
        if (ov && n >= 2) begin
          int c;
          c = n - 2;
          outs++;
          checks++;
          if (int'(ox) != hx[c] || int'(oy) != hy[c] || int'(opc) != hpc[c]) begin failures++; $display("step %0d: centre tag wrong", n); end
          for (int k = 0; k < N; k++) begin
            int ap, as;
            ap = 0; as = 0;
            for (int j = 0; j < 5; j++) begin
              int m;
              m = n - j;
              if (m >= 0 && hy[m] == hy[c]) begin ap += G[j] * hvp[m][k]; as += G[j] * hvs[m][k]; end
            end
            ap = ap >>> 4; as = as >>> 4;
            checks += 2;
            if (int'(ovp[k]) != ap) begin failures++; $display("step %0d k=%0d: PTW vote %0d expected %0d", n, k, ovp[k], ap); end
            if (int'(ovs[k]) != as) begin failures++; $display("step %0d k=%0d: SRW vote %0d expected %0d", n, k, ovs[k], as); end
          end
        end
        // an idle cycle must not produce output
        if (x % 4 == 1) begin
          @(posedge clk); #1;
          checks++;
          if (ov) begin failures++; $display("output without input"); end
        end
        n++;
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
