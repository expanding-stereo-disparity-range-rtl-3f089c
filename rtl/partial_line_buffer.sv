// partial_line_buffer: buffer of the most recent DEPTH pixels of the search stream
// of the phase-correlation unit. It is built as NCOPY identical copies (one per
// voting-unit slot) so that NCOPY different pixels can be read in the same cycle;
// every copy has two independent read ports, one for the primary tracking window
// (PTW) and one for the secondary roving window (SRW), as with true dual-port block
// RAM. Every copy is written with the same entry. Reads are synchronous: data for
// the addresses presented in cycle t is available in cycle t+1.
// The copies-per-slot organisation and two read ports follow the description;
// DEPTH (a power of two above the search range) is set by the instantiating unit.
module partial_line_buffer #(
  parameter int unsigned NCOPY = 9,
  parameter int unsigned DEPTH = 512,
  parameter int unsigned EW    = 66
) (
  input  logic                     clk,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] waddr,
  input  logic [EW-1:0]            wdata,
  input  logic [$clog2(DEPTH)-1:0] raddr_p [NCOPY],
  input  logic [$clog2(DEPTH)-1:0] raddr_s [NCOPY],
  output logic [EW-1:0]            rdata_p [NCOPY],
  output logic [EW-1:0]            rdata_s [NCOPY]
);
  for (genvar c = 0; c < NCOPY; c++) begin : g_copy
    logic [EW-1:0] mem [DEPTH];
    always_ff @(posedge clk) begin
      if (we) mem[waddr] <= wdata;
      rdata_p[c] <= mem[raddr_p[c]];
      rdata_s[c] <= mem[raddr_s[c]];
    end
  end
endmodule
