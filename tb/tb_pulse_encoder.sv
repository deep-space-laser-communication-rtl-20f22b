// tb_pulse_encoder: checks that each output time vector equals the previous
// one plus the interval, computed in absolute picoseconds
// (coarse * 5000 + fine), that fine stays below 5000, that the first symbol
// and a schedule that falls behind the counter both restart at
// now + LEAD_CYCLES with a resync strobe, and the rate of one interval per
// two cycles.
`timescale 1ps/1fs
module tb_pulse_encoder;
  import sdpm_pkg::*;
  localparam int LEAD = 16;
  logic clk = 0, rst_n = 0;
  coarse_t now = 0;
  logic [31:0] in_ivl_ps;
  logic in_valid = 0, in_ready, out_valid, out_ready = 1, resync;
  time_vec_t out_tv;
  int checks = 0, failures = 0, nresync = 0, nout = 0;
  longint last_abs;
  longint ivls[$];
  bit have_last = 0;

  always #2500 clk = ~clk;
  always @(posedge clk) now <= now + 1;

  pulse_encoder #(.LEAD_CYCLES(LEAD)) dut (.*);

  always @(posedge clk) begin
    if (rst_n && out_valid && out_ready) begin
      longint a, iv;
      a  = longint'(out_tv.coarse) * 5000 + longint'(out_tv.fine);
      iv = ivls.pop_front();
      checks++;
      nout++;
      if (out_tv.fine >= 5000) begin failures++; $display("fine out of range %0d", out_tv.fine); end
      if (resync) begin
        nresync++;
        checks++;
        // restart point: LEAD ticks ahead of the counter when it was computed,
        // so at most LEAD-1 ahead now that it is taken
        if (out_tv.fine != 0 || (out_tv.coarse - now) > LEAD - 1 || (out_tv.coarse - now) < LEAD - 8) begin
          failures++;
          $display("resync to %0d.%0d, now %0d", out_tv.coarse, out_tv.fine, now);
        end
      end else if (!have_last || a != last_abs + iv) begin
        failures++;
        $display("time %0d, expected %0d", a, last_abs + iv);
      end
      last_abs  = a;
      have_last = 1;
    end
  end

  always @(negedge clk) out_ready <= ($urandom % 5 != 0);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic push(input int iv);
    @(negedge clk);
    in_ivl_ps = 32'(iv);
    in_valid  = 1;
    @(posedge clk);
    while (!in_ready) @(posedge clk);
    ivls.push_back(longint'(iv));
    @(negedge clk);
    in_valid = 0;
  endtask

  initial begin
    int t0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < 300; k++) push(18000 + $urandom % 5000);
    // data slower than the schedule: short intervals then a long gap
    repeat (2000) @(posedge clk);
    for (int k = 0; k < 50; k++) push(1000 + $urandom % 9000);
    for (int k = 0; k < 200; k++) push($urandom % 200000);
    // rate with no back-pressure
    @(negedge clk);
    t0 = $time;
    for (int k = 0; k < 50; k++) push(20000);
    checks++;
    if (($time - t0) / 5000 > 2 * 50 + 4) begin failures++; $display("rate too low"); end
    repeat (20) @(posedge clk);
    checks++;
    if (nresync < 2) begin failures++; $display("resync seen %0d times", nresync); end
    checks++;
    if (ivls.size() != 0) begin failures++; $display("%0d outputs missing", ivls.size()); end
    $display("resyncs: %0d, outputs %0d", nresync, nout);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
