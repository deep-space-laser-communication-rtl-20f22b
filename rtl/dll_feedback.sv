// dll_feedback: feedback law that locks the DLL oscillator to the chain delay.
//
// Each measurement window of dll_meter reports counters A (samples) and B
// (ones). More than half ones means the period is longer than the chain
// delay. The law first runs a binary search over MIN_PS..MAX_PS (one step per
// window, 15 windows for 4..24 ns): the period under test is the middle of
// [lo, hi], and hi or lo moves to it. When hi - lo <= 1 ps the loop is locked
// at hi and then tracks: one window with a majority of ones shortens the
// period by 1 ps, otherwise it lengthens it by 1 ps, so the period follows the
// chain delay as the environment drifts. Reaching either end of the range
// while tracking restarts the search. The search keeps the lower bound at or
// above MIN_PS, and every midpoint above half of the chain delay, so it finds
// the fundamental lock (period = delay), not a harmonic.
// period_ps is the oscillator setting and, once locked, the measured chain
// delay in ps, which the environmental compensation uses; `upd` pulses for
// one cycle whenever period_ps changes.
// The document gives the loop structure and the 4-24 ns, 1 ps oscillator;
// the search-then-track law is this design's choice.
`timescale 1ps/1fs
module dll_feedback #(
  parameter int unsigned MIN_PS = 4000,
  parameter int unsigned MAX_PS = 24000,
  parameter int unsigned CW     = 11
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [CW-1:0] cnt_a,
  input  logic [CW-1:0] cnt_b,
  input  logic          done,
  output logic [15:0]   period_ps,
  output logic          locked,
  output logic          upd
);
  logic [15:0] lo, hi;
  logic        ones;

  assign ones = ({1'b0, cnt_b} << 1) > {1'b0, cnt_a};

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      lo        <= 16'(MIN_PS);
      hi        <= 16'(MAX_PS);
      period_ps <= 16'((MIN_PS + MAX_PS) / 2);
      locked    <= 1'b0;
      upd       <= 1'b1;
    end else begin
      upd <= 1'b0;
      if (done) begin
        upd <= 1'b1;
        if (!locked) begin
          if (ones) begin
            hi <= period_ps;
            if (period_ps - lo <= 16'd1) begin
              locked <= 1'b1;               // period stays at the new hi
            end else begin
              period_ps <= 16'((32'(lo) + 32'(period_ps)) / 2);
            end
          end else begin
            lo <= period_ps;
            if (hi - period_ps <= 16'd1) begin
              locked    <= 1'b1;
              period_ps <= hi;
            end else begin
              period_ps <= 16'((32'(period_ps) + 32'(hi)) / 2);
            end
          end
        end else begin
          if (ones) begin
            if (period_ps <= 16'(MIN_PS)) begin
              locked <= 1'b0; lo <= 16'(MIN_PS); hi <= 16'(MAX_PS);
              period_ps <= 16'((MIN_PS + MAX_PS) / 2);
            end else period_ps <= period_ps - 1'b1;
          end else begin
            if (period_ps >= 16'(MAX_PS)) begin
              locked <= 1'b0; lo <= 16'(MIN_PS); hi <= 16'(MAX_PS);
              period_ps <= 16'((MIN_PS + MAX_PS) / 2);
            end else period_ps <= period_ps + 1'b1;
          end
        end
      end
    end
  end
endmodule
