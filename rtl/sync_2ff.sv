// sync_2ff: two-flip-flop synchroniser for single-bit control signals that cross
// from the camera clock into the faster system clock. The asynchronous input is
// sampled by a first flop and re-registered by a second one, so the output is
// free of metastability after two destination clocks. Latency: 2 clk cycles.
// The two-stage structure follows the design description; the active-low
// synchronous reset value (0) is this design's choice.
module sync_2ff #(
  parameter int unsigned WIDTH = 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [WIDTH-1:0] d_async,
  output logic [WIDTH-1:0] q_sync
);
  logic [WIDTH-1:0] meta;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      meta   <= '0;
      q_sync <= '0;
    end else begin
      meta   <= d_async;
      q_sync <= meta;
    end
  end
endmodule
