// tb_dll_meter: closes the measurement loop with the oscillator and chain
// models at fixed periods. The chain is set to a known delay D (about
// 9.1 ns). A period above D must give counter B = counter A (all ones), a
// period between D/2 and D all zeros, and a period between D/3 and D/2 all
// ones again (the harmonic lock the document points out). Also checks the
// window length of counter A.
`timescale 1ps/1fs
module tb_dll_meter;
  localparam int WIN = 64;
  logic rst_n = 0, en = 0, osc, launch, chain_out, done;
  logic [15:0] period = 12000;
  logic [6:0] cnt_a, cnt_b;
  int checks = 0, failures = 0;
  real dly;

  dll_osc osc_i (.en, .period_ps(period), .clk_out(osc));
  delay_chain #(.SEED(3)) ch (.in(launch), .set(9'd260), .out(chain_out));
  dll_meter #(.WINDOW(WIN)) dut (.clk(osc), .rst_n, .launch, .chain_out, .cnt_a, .cnt_b, .done);

  initial begin
    #100ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic at_period(input int p, input bit want_ones);
    period = 16'(p);
    @(posedge done);       // window that may straddle the change
    @(posedge done);
    #1;
    checks++;
    if (cnt_a != 7'(WIN) || cnt_b != (want_ones ? 7'(WIN) : 7'd0)) begin
      failures++;
      $display("period %0d (delay %0.1f): A=%0d B=%0d", p, dly, cnt_a, cnt_b);
    end
  endtask

  initial begin
    int d;
    dly = 6000.0 + 260.0 * 12.0 + 48.0 * (real'((260 * 260 * 193 + 260 * 7919 + 3 * 104729) % 1009) / 504.0 - 1.0);
    d = int'(dly);
    en = 1;
    repeat (4) @(posedge osc);
    rst_n = 1;
    at_period(d + 40, 1);
    at_period(d - 40, 0);
    at_period(d + 2000, 1);
    at_period(d * 2 / 3, 0);
    at_period(24000, 1);
    at_period(d * 2 / 5 + 3, 1);    // between D/3 and D/2: harmonic
    at_period(d + 3, 1);
    at_period(d - 3, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
