// dll_meter: launcher, arbiter and the two counters of the delay-locked loop.
//
// Runs on the variable-period oscillator clock. The launcher flip-flop
// toggles on every edge and drives a delay chain; the arbiter flip-flop
// samples the chain's output on the next edge. If the chain is faster than
// one period, the arbiter sees the value launched one edge earlier (a "one");
// if slower, it sees an older value (a "zero"). Counter A counts samples,
// counter B counts ones, so B/A rises from 0 to 1 as the period passes the
// chain delay; the 50 % point is the chain delay.
// Because the launcher toggles, a chain longer than 2, 3, ... periods gives
// ones again for some shorter periods: the loop can also lock on harmonics.
// Counting runs over windows of WINDOW samples; the first SETTLE samples of a
// window (just after the period may have changed) are not counted. At the
// end of a window cnt_a/cnt_b hold the result and `done` pulses one cycle.
// Following the document: launcher and arbiter flip-flops, counters A and B,
// the ratio B/A. This design's choice: toggling launch, window, settle count.
`timescale 1ps/1fs
module dll_meter #(
  parameter int unsigned WINDOW = 1024,
  parameter int unsigned SETTLE = 4,
  localparam int unsigned CW    = $clog2(WINDOW + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  output logic          launch,
  input  logic          chain_out,
  output logic [CW-1:0] cnt_a,
  output logic [CW-1:0] cnt_b,
  output logic          done
);
  logic          arb, prev;
  logic [CW-1:0] a, b;
  logic [7:0]    settle;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      launch <= 1'b0;
      arb    <= 1'b0;
      prev   <= 1'b0;
      a      <= '0;
      b      <= '0;
      settle <= 8'(SETTLE);
      cnt_a  <= '0;
      cnt_b  <= '0;
      done   <= 1'b0;
    end else begin
      launch <= ~launch;          // launcher flip-flop
      arb    <= chain_out;        // arbiter flip-flop
      prev   <= launch;           // value the arbiter should have seen
      done   <= 1'b0;
      if (settle != 0) begin
        settle <= settle - 1'b1;
      end else if (32'(a) == WINDOW - 1) begin
        cnt_a  <= a + 1'b1;
        cnt_b  <= b + CW'(arb == prev);
        done   <= 1'b1;
        a      <= '0;
        b      <= '0;
        settle <= 8'(SETTLE);
      end else begin
        a <= a + 1'b1;
        b <= b + CW'(arb == prev);
      end
    end
  end
endmodule
