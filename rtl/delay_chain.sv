// delay_chain: behavioural model of one programmable FPGA delay chain.
//
// The real chain is a row of hand-placed logic tiles used as 2:1 multiplexer
// trees: configuration inputs pick one of several routes per stage and the
// control bits steer the pulse through them, so each setting gives a
// different routed delay. Its logic function is the identity; only its delay
// matters, which RTL cannot express, so this file is a simulation model.
// Delay of a pulse edge = STATIC_PS + set * LSB_FS/1000 + nl(set) + drift_ps,
// taken when the edge enters; every edge is delayed (transport delay), so
// several pulses can be inside the chain at once. With the document's
// numbers, a 512-entry chain has about 6 ns of static and 6 ns of variable
// delay in 12 ps steps, and is far from linear (errors of tens of ps).
// nl(set) models that: a fixed pseudo-random error in -NL_PS..+NL_PS per
// setting, nl(s) = NL_PS * (h / 504 - 1) with h = (193 s^2 + 7919 s +
// 104729 SEED) mod 1009; SEED makes two chains differ. It is this uneven
// spacing that lets two chains in series reach every picosecond. The model
// has no jitter.
// drift_ps stands for the environment (temperature, voltage, aging) and is
// set by a testbench.
`timescale 1ps/1fs
module delay_chain #(
  parameter int unsigned SET_W     = 9,
  parameter int unsigned LSB_FS    = 12000,   // step, femtoseconds
  parameter int unsigned STATIC_PS = 6000,
  parameter int unsigned NL_PS     = 48,
  parameter int unsigned SEED      = 1
) (
  input  logic             in,
  input  logic [SET_W-1:0] set,
  output logic             out
);
  real     drift_ps = 0.0;
  realtime d;

  initial out = 1'b0;

  function automatic real nl(int unsigned s);
    int unsigned h;
    h = (s * s * 193 + s * 7919 + SEED * 104729) % 1009;
    return real'(NL_PS) * (real'(h) / 504.0 - 1.0);
  endfunction

  // each edge waits in its own thread, so several can be in flight
  always @(in) begin
    automatic logic    v  = in;
    automatic realtime dd = real'(STATIC_PS) + drift_ps + real'(set) * real'(LSB_FS) / 1000.0 + nl(32'(set));
    d = dd;
    fork
      begin
        #(dd) out = v;
      end
    join_none
  end
endmodule
