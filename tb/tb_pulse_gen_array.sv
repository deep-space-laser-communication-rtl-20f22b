// tb_pulse_gen_array: five generators behind one launch-vector stream.
//
// Launch vectors come 2 or 3 ticks apart (on average 80 Mpulse/s, above the
// 50 Mpulse/s of one generator), with chain settings 0..150 so that the
// 5 ns wide pulses stay apart in the OR. For each vector the testbench works
// out the trigger time independently from the chain formula,
//     clock edge where the counter becomes the coarse value + 2 * 6000 + (set_a + set_b) * 12 + nl_a + nl_b,
// with nl as in the chain model (seeds 1 and 2), and checks every rising edge
// of trig_out against it (0.01 ps). Also checks that no vector is late, that
// the vectors are dealt round-robin, that one generator never launches twice
// within 4 ticks, and that the pulses left faster than one generator could
// launch them.
`timescale 1ps/1fs
module tb_pulse_gen_array;
  import sdpm_pkg::*;
  localparam int N = 5;
  localparam int NVEC = 400;

  logic clk = 0, rst_n = 0;
  launch_vec_t in_lv = '0;
  logic in_valid = 0, in_ready;
  coarse_t now;
  logic [N-1:0] trig, launched, late;
  logic trig_out;
  int checks = 0, failures = 0;

  pulse_gen_array #(.N_GEN(N), .MIN_SPACING(4), .PULSE_CYCLES(1)) dut (.*);

  always #2500 clk = ~clk;

  function automatic real nl(int s, int seed);
    int h = (s * s * 193 + s * 7919 + seed * 104729) % 1009;
    return 48.0 * (real'(h) / 504.0 - 1.0);
  endfunction

  // reference: time of the clock edge where the counter becomes 1
  realtime t1;
  always @(posedge clk) if (rst_n && now == 0) t1 = $realtime;

  real exp_q [$];
  int n_edges = 0, n_launch = 0, n_late = 0;
  int next_gen = 0;
  longint last_launch [N];
  realtime t_first = 0, t_last = 0;

  always @(posedge trig_out) begin
    real e;
    n_edges++;
    checks++;
    if (exp_q.size() == 0) begin failures++; $display("unexpected pulse at %0.2f", $realtime); end
    else begin
      e = exp_q.pop_front() + t1 - 5000.0;
      if ($realtime - e > 0.01 || e - $realtime > 0.01) begin
        failures++;
        $display("pulse at %0.3f ps, expected %0.3f", $realtime, e);
      end
    end
    if (n_edges == 1) t_first = $realtime;
    t_last = $realtime;
  end

  always @(posedge clk) begin
    if (rst_n) begin
      if (late != 0) n_late++;
      for (int g = 0; g < N; g++) if (launched[g]) begin
        n_launch++;
        checks++;
        if (g != next_gen) begin failures++; $display("generator %0d launched, expected %0d", g, next_gen); end
        next_gen = (g + 1) % N;
        checks++;
        if (last_launch[g] >= 0 && longint'(now) - last_launch[g] < 4) begin
          failures++; $display("generator %0d launched twice within 4 ticks", g);
        end
        last_launch[g] = longint'(now);
      end
    end
  end

  initial begin
    longint c;
    for (int g = 0; g < N; g++) last_launch[g] = -1;
    repeat (3) @(negedge clk);
    rst_n = 1;
    c = 20;
    for (int k = 0; k < NVEC; k++) begin
      automatic int sa = int'($urandom_range(0, 150));
      automatic int sb = int'($urandom_range(0, 150));
      c += longint'($urandom_range(2, 3));
      in_lv = '{coarse: coarse_t'(c), set_b: chain_set_t'(sb), set_a: chain_set_t'(sa)};
      in_valid = 1;
      // the trigger rises on the edge where the counter becomes c
      exp_q.push_back(real'(c) * 5000.0 + 12000.0 + real'(sa + sb) * 12.0 + nl(sa, 1) + nl(sb, 2));
      @(posedge clk);
      while (!in_ready) @(posedge clk);
      @(negedge clk);
      in_valid = 0;
    end
    repeat (40) @(posedge clk);
    #30000;
    checks++;
    if (n_late != 0) begin failures++; $display("%0d vectors late", n_late); end
    checks++;
    if (n_launch != NVEC || n_edges != NVEC) begin
      failures++; $display("%0d launches, %0d pulses, expected %0d", n_launch, n_edges, NVEC);
    end
    checks++;
    if ((t_last - t_first) / real'(NVEC - 1) >= 20000.0) begin
      failures++; $display("mean spacing %0.1f ps, not faster than one generator", (t_last - t_first) / real'(NVEC - 1));
    end
    $display("%0d pulses, mean spacing %0.2f ns (%0.1f Mpulse/s)", n_edges,
             (t_last - t_first) / real'(NVEC - 1) / 1000.0, 1.0e6 / ((t_last - t_first) / real'(NVEC - 1)));
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
