// tb_delay_chain: sends pulses through the chain model with random settings
// and measures the delay of both edges; it must be static + set * LSB + the
// per-setting error, which the testbench recomputes from the formula in the
// model's description, and it must follow a change of drift_ps. Two pulses
// in flight at once must both come out.
`timescale 1ps/1fs
module tb_delay_chain;
  logic in = 0, out;
  logic [8:0] set = 0;
  int checks = 0, failures = 0;
  realtime t_in, t_out;

  delay_chain #(.SET_W(9), .LSB_FS(12000), .STATIC_PS(6000), .NL_PS(48), .SEED(5)) dut (.in, .set, .out);

  function automatic real expect_ps(int s, real drift);
    int h;
    h = (s * s * 193 + s * 7919 + 5 * 104729) % 1009;
    return 6000.0 + real'(s) * 12.0 + 48.0 * (real'(h) / 504.0 - 1.0) + drift;
  endfunction

  always @(posedge out) t_out = $realtime;

  initial begin
    #50ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic pulse(input int s, input real drift);
    real e;
    set = 9'(s);
    #100;
    t_in = $realtime;
    in = 1;
    #5000;
    in = 0;
    #20000;
    e = expect_ps(s, drift);
    checks++;
    if ((t_out - t_in) - e > 0.01 || e - (t_out - t_in) > 0.01) begin
      failures++;
      $display("set %0d: delay %0.3f ps, expected %0.3f", s, t_out - t_in, e);
    end
  endtask

  initial begin
    for (int k = 0; k < 200; k++) pulse($urandom % 512, 0.0);
    pulse(0, 0.0);
    pulse(511, 0.0);
    dut.drift_ps = 37.5;
    for (int k = 0; k < 50; k++) pulse($urandom % 512, 37.5);
    dut.drift_ps = 0.0;
    // two pulses 3 ns apart inside a 6+ ns chain
    begin
      int n;
      n = 0;
      set = 9'd100;
      #100;
      fork
        begin in = 1; #1500; in = 0; #1500; in = 1; #1500; in = 0; end
        repeat (2) begin @(posedge out); n++; end
      join
      checks++;
      if (n != 2) begin failures++; $display("pulses in flight lost"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
