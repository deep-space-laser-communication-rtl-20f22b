// balance_lut: fine delay (1 ps steps) to a pair of delay-chain settings.
//
// One delay chain has 512 settings of about 12 ps each, with steps that are
// uneven by tens of ps. Two chains in series give 512 x 512 sums; for every
// wanted fine delay, calibration picks the pair (setting A, setting B) whose
// measured sum is closest, which gives monotonic 1 ps steps over the 5 ns
// coarse period. This RAM holds that choice: entry f = {set_b, set_a} for a
// fine delay of f ps. DEPTH = 5100 entries, as the document's two-chain
// table. The contents come from calibration software through the write port.
// Timing: synchronous read, rdata is valid the cycle after re. Contents after
// reset are undefined and must be written before use.
`timescale 1ps/1fs
module balance_lut #(
  parameter int unsigned DEPTH = 5100,
  parameter int unsigned SET_W = 9,
  localparam int unsigned AW   = $clog2(DEPTH),
  localparam int unsigned DW   = 2 * SET_W
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [DW-1:0] wdata,
  input  logic          re,
  input  logic [AW-1:0] raddr,
  output logic [DW-1:0] rdata
);
  logic [DW-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we && 32'(waddr) < DEPTH) mem[waddr] <= wdata;
    if (re) rdata <= (32'(raddr) < DEPTH) ? mem[raddr] : '0;
  end
endmodule
