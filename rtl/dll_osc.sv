// dll_osc: behavioural model of the DLL's controlled oscillator.
//
// The real oscillator is built from two FPGA PLLs fed by the system clock and
// gives a period adjustable in about 1 ps steps between 4 and 24 ns. This
// model produces a square wave whose period is period_ps picoseconds,
// clamped to MIN_PS..MAX_PS, read again at the start of every cycle, so a
// change takes effect at the next rising edge. While en is low the output
// rests low. Exact resolution and no jitter are simplifications of this model.
`timescale 1ps/1fs
module dll_osc #(
  parameter int unsigned MIN_PS = 4000,
  parameter int unsigned MAX_PS = 24000
) (
  input  logic        en,
  input  logic [15:0] period_ps,
  output logic        clk_out
);
  realtime half;

  initial clk_out = 1'b0;

  always begin
    if (!en) begin
      clk_out = 1'b0;
      wait (en);
    end
    if (32'(period_ps) < MIN_PS)      half = real'(MIN_PS) / 2.0;
    else if (32'(period_ps) > MAX_PS) half = real'(MAX_PS) / 2.0;
    else                              half = real'(period_ps) / 2.0;
    clk_out = 1'b1;
    #(half);
    clk_out = 1'b0;
    #(half);
  end
endmodule
