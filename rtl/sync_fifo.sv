// sync_fifo: timestamp FIFO between the time-vector pipeline and the pulse
// generator.
//
// A single-clock FIFO of DEPTH words (DEPTH a power of two) with a
// first-word-fall-through output: out_data shows the oldest word whenever
// out_valid is high, and a cycle with out_valid && out_ready removes it.
// in_ready is low when full. A push and a pop may happen in the same cycle.
// `count` gives the fill level. The document mentions a timestamp FIFO
// feeding the pulse generators; depth and handshake are this design's choice.
`timescale 1ps/1fs
module sync_fifo #(
  parameter int unsigned WIDTH = 59,
  parameter int unsigned DEPTH = 16,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [WIDTH-1:0] in_data,
  input  logic             in_valid,
  output logic             in_ready,
  output logic [WIDTH-1:0] out_data,
  output logic             out_valid,
  input  logic             out_ready,
  output logic [AW:0]      count
);
  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW:0]      wp, rp;

  wire push = in_valid && in_ready;
  wire pop  = out_valid && out_ready;

  assign count     = wp - rp;
  assign in_ready  = (count != (AW+1)'(DEPTH));
  assign out_valid = (count != '0);
  assign out_data  = mem[rp[AW-1:0]];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wp <= '0;
      rp <= '0;
    end else begin
      if (push) wp <= wp + 1'b1;
      if (pop)  rp <= rp + 1'b1;
    end
  end

  always_ff @(posedge clk)
    if (push) mem[wp[AW-1:0]] <= in_data;

  // A power-of-two depth keeps the pointer arithmetic exact.
  initial assert ((1 << AW) == DEPTH) else $error("sync_fifo: DEPTH must be a power of two");
endmodule
