// tb_dll_feedback: drives the feedback law with window results from an ideal
// meter (all ones when the period exceeds a chain delay D, none otherwise).
// Checks lock within 16 windows at D or D+1 ps, tracking of a drift of D by
// +25 ps and -40 ps within one window per ps, and a new search when D jumps
// beyond the range.
`timescale 1ps/1fs
module tb_dll_feedback;
  logic clk = 0, rst_n = 0, done = 0, locked, upd;
  logic [10:0] cnt_a, cnt_b;
  logic [15:0] period_ps;
  int checks = 0, failures = 0;
  int D;
  int windows = 0;

  always #2500 clk = ~clk;
  dll_feedback #(.CW(11)) dut (.*);

  task automatic window();
    @(negedge clk);
    cnt_a = 11'd1024;
    cnt_b = (int'(period_ps) > D) ? 11'd1024 : 11'd0;
    done = 1;
    @(negedge clk);
    done = 0;
    repeat (3) @(negedge clk);
    windows++;
  endtask

  task automatic check_near(input string what);
    checks++;
    if (!locked || int'(period_ps) < D - 1 || int'(period_ps) > D + 1) begin
      failures++;
      $display("%s: period %0d locked %0d, delay %0d", what, period_ps, locked, D);
    end
  endtask

  initial begin
    #10ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int trial = 0; trial < 20; trial++) begin
      D = 6000 + $urandom % 12000;
      rst_n = 0; @(negedge clk); rst_n = 1;
      windows = 0;
      while (!locked && windows < 40) window();
      checks++;
      if (windows > 16) begin failures++; $display("lock took %0d windows", windows); end
      check_near("lock");
      repeat (4) window();
      check_near("hold");
    end
    D = D + 25;
    repeat (27) window();
    check_near("drift up");
    D = D - 40;
    repeat (42) window();
    check_near("drift down");
    // delay beyond the range: the period runs to the end and the search restarts
    D = 30000;
    windows = 0;
    while (locked && windows < 40000) window();
    checks++;
    if (locked) begin failures++; $display("no restart"); end
    D = 7777;
    windows = 0;
    while (!locked && windows < 40) window();
    check_near("relock");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
