// tdm_tx: sending side of the time-division-multiplexed link between two FPGAs.
// A payload word of PAY_W bits, wider than the BUS_W-bit board bus, is latched when
// in_valid is high and sent as NBEAT = ceil(PAY_W/BUS_W) consecutive beats, least
// significant slice first. bus_first marks the first beat and bus_valid every beat.
// A new word may be accepted every NBEAT cycles (in_ready); the sender must respect
// this, which the assertion checks. Time multiplexing the phase data over a ~100-bit
// bus follows the description; the beat order and framing signals are own choices.
module tdm_tx #(
  parameter int unsigned PAY_W = 288,
  parameter int unsigned BUS_W = 100
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  logic [PAY_W-1:0] in_data,
  output logic             in_ready,
  output logic             bus_valid,
  output logic             bus_first,
  output logic [BUS_W-1:0] bus_data
);
  localparam int unsigned NBEAT = (PAY_W + BUS_W - 1) / BUS_W;
  localparam int unsigned CB    = (NBEAT <= 1) ? 1 : $clog2(NBEAT);

  logic [NBEAT*BUS_W-1:0] shreg;
  logic [CB-1:0]          left;     // beats still to send after the current one
  logic                   busy;

  assign in_ready = !busy || (left == '0);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy      <= 1'b0;
      left      <= '0;
      bus_valid <= 1'b0;
      bus_first <= 1'b0;
    end else begin
      bus_valid <= 1'b0;
      bus_first <= 1'b0;
      if (in_valid && in_ready) begin
        shreg     <= (NBEAT*BUS_W)'(in_data) >> BUS_W;
        bus_data  <= in_data[BUS_W-1:0];
        bus_valid <= 1'b1;
        bus_first <= 1'b1;
        left      <= CB'(NBEAT - 1);
        busy      <= (NBEAT > 1);
      end else if (busy) begin
        bus_data  <= shreg[BUS_W-1:0];
        shreg     <= shreg >> BUS_W;
        bus_valid <= 1'b1;
        left      <= left - 1'b1;
        busy      <= (left > CB'(1));
      end
    end
  end

  // a word offered while the previous one is still being sent would be lost
  a_no_overrun: assert property (@(posedge clk) disable iff (!rst_n) in_valid |-> in_ready)
    else $error("tdm_tx: word offered before the previous one was sent");
endmodule
