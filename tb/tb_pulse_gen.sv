// tb_pulse_gen: sends launch vectors and checks that trig rises on exactly
// the clock edge where the counter reaches the coarse value, with the chain
// settings of that vector already applied, and still held on the two
// following edges; that trig is two cycles wide; that vectors four ticks
// apart all launch (50 Mpulse/s at 5 ns) while one only three ticks after
// the previous is dropped as late, and a vector already in the past too.
`timescale 1ps/1fs
module tb_pulse_gen;
  import sdpm_pkg::*;
  logic clk = 0, rst_n = 0;
  launch_vec_t in_lv;
  logic in_valid = 0, in_ready, trig, launched, late;
  coarse_t now;
  chain_set_t set_a, set_b;
  int checks = 0, failures = 0, nlate = 0, nlaunch = 0;
  launch_vec_t exp_q[$];
  logic trig_d;
  int width;

  always #2500 clk = ~clk;
  pulse_gen dut (.*);

  // check on every clock edge after the flops have updated
  always @(posedge clk) begin
    #1;
    if (rst_n) begin
      if (late) nlate++;
      if (trig && !trig_d) begin
        launch_vec_t e;
        e = exp_q.pop_front();
        nlaunch++;
        checks++;
        if (now != e.coarse || set_a != e.set_a || set_b != e.set_b) begin
          failures++;
          $display("launch at %0d sets %h/%h, expected %0d %h/%h", now, set_a, set_b, e.coarse, e.set_a, e.set_b);
        end
        width = 1;
        fork
          begin
            automatic launch_vec_t ee = e;
            repeat (2) begin
              @(posedge clk); #1;
              checks++;
              if (set_a != ee.set_a || set_b != ee.set_b) begin failures++; $display("settings not held at %0d: %h/%h vs %h/%h", now, set_a, set_b, ee.set_a, ee.set_b); end
            end
          end
        join_none
      end else if (trig) width++;
      if (!trig && trig_d) begin
        checks++;
        if (width != 2) begin failures++; $display("pulse width %0d", width); end
      end
      trig_d = trig;
    end
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic push(input coarse_t c, input bit expect_launch);
    launch_vec_t v;
    v = '{coarse: c, set_b: chain_set_t'($urandom), set_a: chain_set_t'($urandom)};
    @(negedge clk);
    in_lv = v; in_valid = 1;
    @(posedge clk);
    while (!in_ready) @(posedge clk);
    if (expect_launch) exp_q.push_back(v);
    @(negedge clk);
    in_valid = 0;
  endtask

  initial begin
    coarse_t t;
    trig_d = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (5) @(posedge clk);
    // random spacing, always reachable
    t = now + 10;
    for (int k = 0; k < 100; k++) begin
      push(t, 1);
      t = t + 4 + $urandom % 9;
    end
    // back to back at the 4-tick limit
    t = now + 10;
    for (int k = 0; k < 30; k++) begin push(t, 1); t = t + 4; end
    // 3 ticks after the previous: late
    push(t, 1);
    push(t + 3, 0);
    // already in the past
    repeat (20) @(posedge clk);
    push(now - 5, 0);
    push(now + 1, 0);
    push(now + 6, 1);
    repeat (30) @(posedge clk);
    checks++;
    if (nlate != 3) begin failures++; $display("late count %0d, expected 3", nlate); end
    checks++;
    if (exp_q.size() != 0 || nlaunch != 132) begin failures++; $display("launches %0d", nlaunch); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
