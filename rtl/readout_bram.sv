// readout_bram: the memory shared between the histogram channels and the
// processor side.
//
// It holds H slots of 2^N words of M bits, one slot per channel id, so the
// word of bin b of channel h is at address h*2^N + b. The readout
// controller writes a mini-histogram into its channel's slot; the processor
// side (through the AXI register block, where the window starts at word
// 0x8000) reads it back.
//
// The size H*2^N x M follows the design. One clock for both ports is this
// design's choice (the bus side is assumed to reach this clock through the
// interconnect).
// Interface: a write port (we/waddr/wdata) and a read port (raddr/rdata).
// Timing: the read data is registered, valid one cycle after raddr.
module readout_bram #(
  parameter int unsigned H  = 128,
  parameter int unsigned N  = 8,
  parameter int unsigned M  = 16,
  parameter int unsigned AW = $clog2(H) + N
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [M-1:0]  wdata,
  input  logic [AW-1:0] raddr,
  output logic [M-1:0]  rdata
);

  logic [M-1:0] mem [H * (2**N)];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end

endmodule
