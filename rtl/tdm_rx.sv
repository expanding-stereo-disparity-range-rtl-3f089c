// tdm_rx: receiving side of the time-division-multiplexed inter-FPGA link. Beats
// from tdm_tx are shifted into place (first beat = least significant slice); when
// the last of the NBEAT beats has arrived the reassembled word is presented for one
// cycle on out_valid/out_data. A bus_first beat always restarts the word, which
// resynchronises the receiver after a lost beat. Own choices as in tdm_tx.
module tdm_rx #(
  parameter int unsigned PAY_W = 288,
  parameter int unsigned BUS_W = 100
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             bus_valid,
  input  logic             bus_first,
  input  logic [BUS_W-1:0] bus_data,
  output logic             out_valid,
  output logic [PAY_W-1:0] out_data
);
  localparam int unsigned NBEAT = (PAY_W + BUS_W - 1) / BUS_W;
  localparam int unsigned CB    = $clog2(NBEAT + 1);

  logic [NBEAT*BUS_W-1:0] acc, nxt;
  logic [CB-1:0]          cnt;

  always_comb begin
    // each beat enters at the top; after NBEAT beats the first is at the bottom
    nxt = {bus_data, acc[NBEAT*BUS_W-1:BUS_W]};
    if (bus_first) nxt = {bus_data, (NBEAT*BUS_W-BUS_W)'(0)};
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cnt       <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= 1'b0;
      if (bus_valid) begin
        acc <= nxt;
        if (bus_first) cnt <= CB'(1);
        else           cnt <= cnt + 1'b1;
        if ((bus_first ? CB'(1) : cnt + 1'b1) == CB'(NBEAT)) begin
          out_valid <= 1'b1;
          out_data  <= nxt[PAY_W-1:0];
          cnt       <= '0;
        end
      end
    end
  end
endmodule
