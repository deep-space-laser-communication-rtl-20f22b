// tb_harmonic_finder: gives harmonic_finder the periods of neighbouring
// harmonic locks of chain delays D from 6 to 12 ns, for orders n = 1..6,
// measured to whole ps (T = round(D/n) plus a random error of -1..+1 ps),
// and checks the order found against n and the delay against n * T_n.
// Also checks the error case (T_n not longer than T_n1) and that the
// result comes W + 2 cycles after start.
`timescale 1ps/1fs
module tb_harmonic_finder;
  localparam int W = 16;
  logic clk = 0, rst_n = 0, start = 0;
  logic [W-1:0] t_n_ps = 0, t_n1_ps = 0;
  logic busy, done, err;
  logic [W-1:0] order;
  logic [2*W-1:0] delay_ps;
  int checks = 0, failures = 0;

  harmonic_finder #(.W(W)) dut (.*);

  always #2500 clk = ~clk;

  task automatic run(input int tn, input int tn1, output int cycles);
    @(negedge clk);
    t_n_ps = W'(tn); t_n1_ps = W'(tn1); start = 1;
    @(negedge clk);
    start = 0;
    cycles = 1;
    while (!done) begin @(negedge clk); cycles++; end
  endtask

  initial begin
    int cyc;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < 300; k++) begin
      automatic int d = 6000 + int'($urandom_range(0, 6000));
      automatic int n = 1 + int'($urandom_range(0, 5));
      automatic int tn  = (d + n / 2) / n + int'($urandom_range(0, 2)) - 1;
      automatic int tn1 = (d + (n + 1) / 2) / (n + 1) + int'($urandom_range(0, 2)) - 1;
      run(tn, tn1, cyc);
      checks++;
      if (err || int'(order) != n) begin
        failures++;
        $display("D=%0d T_n=%0d T_n1=%0d: order %0d, expected %0d", d, tn, tn1, order, n);
      end
      checks++;
      if (int'(delay_ps) != n * tn) begin
        failures++;
        $display("delay %0d, expected %0d", delay_ps, n * tn);
      end
      checks++;
      if (cyc != W + 2) begin failures++; $display("latency %0d cycles", cyc); end
    end
    run(5000, 5000, cyc);
    checks++;
    if (!err || order != 0) begin failures++; $display("equal periods not flagged"); end
    run(4000, 6000, cyc);
    checks++;
    if (!err) begin failures++; $display("reversed periods not flagged"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
