// Per-channel receive sample store: DEPTH words of W bits (4096 x 12 bit = 6 kB by
// default), one per ADC sample of a firing. Simple dual-port: the ADC side writes one
// sample per write strobe, the interpolation unit reads with one cycle of latency
// (registered read data, as a synchronous SRAM macro would). Both ports run on one
// clock here; the separate ADC (40 MHz) and SRAM (1 GHz) clocks of the stacked
// system are reduced to a write strobe in a single clock domain.
module channel_sram #(
  parameter int DEPTH = 4096,
  parameter int W     = 12,
  localparam int AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [W-1:0]  wdata,
  input  logic          re,
  input  logic [AW-1:0] raddr,
  output logic [W-1:0]  rdata
);
  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    if (re) rdata <= mem[raddr];
  end
endmodule
