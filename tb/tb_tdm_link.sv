// tb_tdm_link: sends random 345-bit words through tdm_tx -> 100-bit bus -> tdm_rx
// at the highest allowed rate (one word per 4 cycles) and with gaps; checks every
// word arrives intact and in order, that each takes exactly 4 bus beats, and that
// the receiver resynchronises on the first-beat marker after a corrupted beat count.
module tb_tdm_link;
  localparam int PW = 345, BW = 100;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_ready, bus_valid, bus_first, out_valid;
  logic [PW-1:0] in_data, out_data;
  logic [BW-1:0] bus_data;
  logic [PW-1:0] q [$];
  int checks = 0, failures = 0, beats = 0, words = 0;
  logic inject = 0;

  tdm_tx #(.PAY_W(PW), .BUS_W(BW)) u_tx (.clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_data(in_data),
    .in_ready(in_ready), .bus_valid(bus_valid), .bus_first(bus_first), .bus_data(bus_data));
  tdm_rx #(.PAY_W(PW), .BUS_W(BW)) u_rx (.clk(clk), .rst_n(rst_n), .bus_valid(bus_valid | inject),
    .bus_first(bus_first), .bus_data(bus_data), .out_valid(out_valid), .out_data(out_data));
  always #5 clk = ~clk;

  initial begin
    #200000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  always @(posedge clk) begin
    if (rst_n && bus_valid) beats++;
    if (rst_n && out_valid) begin
      words++;
      checks++;
      if (q.size() == 0) begin failures++; $display("unexpected word"); end
      else begin
        logic [PW-1:0] e;
        e = q.pop_front();
        if (out_data !== e) begin failures++; $display("word %0d corrupted", words); end
      end
    end
  end

  function automatic logic [PW-1:0] rnd();
    logic [PW-1:0] v;
    for (int i = 0; i < PW; i += 32) v[i +: 32] = $urandom;
    return v;
  endfunction

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 60; i++) begin
      @(negedge clk);
      checks++;
      if (!in_ready) begin failures++; $display("not ready"); end
      in_data = rnd(); in_valid = 1; q.push_back(in_data);
      @(negedge clk); in_valid = 0;
      repeat ((i % 2 == 0) ? 2 : 5) @(negedge clk);
    end
    repeat (10) @(negedge clk);
    checks++;
    if (beats != 4 * 60) begin failures++; $display("beats %0d expected %0d", beats, 4*60); end
    // a spurious beat leaves the receiver mid-word; the next first beat must resync
    inject = 1; @(negedge clk); inject = 0;
    @(negedge clk);
    in_data = rnd(); in_valid = 1; q.push_back(in_data);
    @(negedge clk); in_valid = 0;
    repeat (10) @(negedge clk);
    checks++;
    if (q.size() != 0 || words != 61) begin failures++; $display("words %0d left %0d", words, q.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
