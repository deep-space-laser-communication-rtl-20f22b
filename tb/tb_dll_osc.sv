// tb_dll_osc: programs periods across the 4-24 ns range (and beyond it, to
// see the clamp) and measures the time between rising edges to 1 fs.
`timescale 1ps/1fs
module tb_dll_osc;
  logic en = 0, clk_out;
  logic [15:0] period_ps = 10000;
  int checks = 0, failures = 0;
  realtime t_last, per;

  dll_osc dut (.en, .period_ps, .clk_out);

  initial begin
    #20ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic measure(input int p, input int want);
    period_ps = 16'(p);
    repeat (2) @(posedge clk_out);
    t_last = $realtime;
    @(posedge clk_out);
    per = $realtime - t_last;
    checks++;
    if (per != real'(want)) begin
      failures++;
      $display("period %0d: measured %0.3f, expected %0d", p, per, want);
    end
  endtask

  initial begin
    #1000;
    checks++;
    if (clk_out !== 1'b0) begin failures++; $display("runs while disabled"); end
    en = 1;
    measure(4000, 4000);
    measure(24000, 24000);
    measure(6798, 6798);
    measure(9001, 9001);
    for (int k = 0; k < 50; k++) begin
      int p;
      p = 4000 + $urandom % 20001;
      measure(p, p);
    end
    measure(1000, 4000);
    measure(30000, 24000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
