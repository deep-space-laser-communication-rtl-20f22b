// harmonic_finder: order of a DLL harmonic lock from two neighbouring locks.
//
// The DLL launcher toggles, so a loop that can lock where the oscillator
// period equals the chain delay D can also lock at D/n for every whole n;
// at the n-th lock the period has only 1/n of the delay's resolution. Given
// the periods of two neighbouring locks, T_n = D/n and T_n1 = D/(n+1),
// the order follows from
//     n = T_n1 / (T_n - T_n1)
// and the delay from D = n * T_n. The periods are measured in whole ps, so
// the quotient is rounded to the nearest integer: n = (T_n1 + diff/2) / diff.
// A restoring divider computes it, one quotient bit per cycle (W cycles),
// then one cycle multiplies n by T_n. `err` is set (order 0) when T_n is not
// longer than T_n1.
// Interface: t_n_ps/t_n1_ps are taken on `start`; `done` pulses one cycle
// when order/delay_ps are valid; `busy` is high in between.
// Following the document: the mode-finding formula and the harmonic relation.
// This design's choice: rounding, the serial divider, the delay output.
`timescale 1ps/1fs
module harmonic_finder #(
  parameter int unsigned W = 16
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  input  logic [W-1:0]   t_n_ps,
  input  logic [W-1:0]   t_n1_ps,
  output logic           busy,
  output logic           done,
  output logic           err,
  output logic [W-1:0]   order,
  output logic [2*W-1:0] delay_ps
);
  localparam int unsigned CW = $clog2(W + 1);

  logic [W-1:0]  divisor, tn;
  logic [W:0]    rem;       // partial remainder, one bit wider than divisor
  logic [W-1:0]  num;       // dividend bits still to shift in
  logic [W-1:0]  quo;
  logic [CW-1:0] cnt;
  logic          mul;

  logic [W:0]    shifted;
  assign shifted = {rem[W-1:0], num[W-1]};

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy <= 1'b0; done <= 1'b0; err <= 1'b0; mul <= 1'b0;
      order <= '0; delay_ps <= '0;
      divisor <= '0; tn <= '0; rem <= '0; num <= '0; quo <= '0; cnt <= '0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        if (t_n_ps <= t_n1_ps) begin
          err <= 1'b1; order <= '0; delay_ps <= '0; done <= 1'b1;
        end else begin
          err     <= 1'b0;
          busy    <= 1'b1;
          divisor <= t_n_ps - t_n1_ps;
          tn      <= t_n_ps;
          // rounded quotient: divide (T_n1 + diff/2) by diff
          num     <= t_n1_ps + ((t_n_ps - t_n1_ps) >> 1);
          rem     <= '0;
          quo     <= '0;
          cnt     <= CW'(W);
        end
      end else if (busy && !mul) begin
        if (shifted >= {1'b0, divisor}) begin
          rem <= shifted - {1'b0, divisor};
          quo <= {quo[W-2:0], 1'b1};
        end else begin
          rem <= shifted;
          quo <= {quo[W-2:0], 1'b0};
        end
        num <= num << 1;
        cnt <= cnt - 1'b1;
        if (cnt == CW'(1)) mul <= 1'b1;
      end else if (busy && mul) begin
        order    <= quo;
        delay_ps <= quo * tn;
        mul      <= 1'b0;
        busy     <= 1'b0;
        done     <= 1'b1;
      end
    end
  end
endmodule
