// tb_delay_sequence: the bench sequence of pulse intervals 20, 22, 18, 20,
// 18 ns, sent through the whole modulator as data.
//
// With M = 4, tau = 2 ns and T_g = 16 ns the intervals T_g + (s + 1) tau are
// 18, 20 and 22 ns for slots 0, 1 and 2, i.e. data words 0, 1 and 3 (Gray).
// The sequence is repeated four times (20 pulses, 5 bytes on the parallel
// port). Two copies of the top run side by side:
//   - dut_def, every parameter at its default: one launch per 4 clock ticks
//     (50 Mpulse/s). An 18 ns interval whose fine part does not carry is only
//     3 ticks long, so that pulse must be dropped and counted late;
//   - dut_fast, MIN_SPACING = 3: every pulse must be launched, on the tick the
//     testbench works out from the running sum of the intervals.
// The balancing table is left unwritten, so only the coarse launch tick and
// the pulse count are checked here (the fine delay is checked end to end in
// tb_sdpm_top).
`timescale 1ps/1fs
module tb_delay_sequence;
  import sdpm_pkg::*;
  localparam int NREP = 4;
  localparam int NPUL = 5 * NREP;
  localparam int SEQ_NS [5] = '{20, 22, 18, 20, 18};

  logic clk = 0, rst_n = 0;
  logic [7:0] byte_data = 0;
  logic byte_valid = 0, rdy_def, rdy_fast;
  logic [15:0] late_def, late_fast, pul_def, pul_fast;
  coarse_t now_def, now_fast;
  int checks = 0, failures = 0;

  always #2500 clk = ~clk;

  // Both copies see the same byte stream; a byte is taken when both are ready.
  logic byte_take;
  assign byte_take = byte_valid && rdy_def && rdy_fast;

  sdpm_top dut_def (
    .clk(clk), .rst_n(rst_n), .uart_rxd(1'b1),
    .byte_data(byte_data), .byte_valid(byte_take), .byte_ready(rdy_def), .data_sel(1'b1), .tv_mode(1'b0),
    .log2m(4'd2), .tau_ps(16'd2000), .tg_ps(24'd16000),
    .lut_we(1'b0), .lut_addr('0), .lut_wdata('0), .comp_en(1'b0), .dll_ref_ps(16'd0), .dll_chain_set(9'd0),
    .hf_start(1'b0), .hf_t_n_ps(16'd0), .hf_t_n1_ps(16'd0), .hf_done(), .hf_err(), .hf_order(), .hf_delay_ps(),
    .dll_period_ps(), .dll_locked(), .stat_late(late_def), .stat_resync(), .stat_pulses(pul_def),
    .stat_frame_err(), .now(now_def), .laser_trig());

  sdpm_top #(.MIN_SPACING(3)) dut_fast (
    .clk(clk), .rst_n(rst_n), .uart_rxd(1'b1),
    .byte_data(byte_data), .byte_valid(byte_take), .byte_ready(rdy_fast), .data_sel(1'b1), .tv_mode(1'b0),
    .log2m(4'd2), .tau_ps(16'd2000), .tg_ps(24'd16000),
    .lut_we(1'b0), .lut_addr('0), .lut_wdata('0), .comp_en(1'b0), .dll_ref_ps(16'd0), .dll_chain_set(9'd0),
    .hf_start(1'b0), .hf_t_n_ps(16'd0), .hf_t_n1_ps(16'd0), .hf_done(), .hf_err(), .hf_order(), .hf_delay_ps(),
    .dll_period_ps(), .dll_locked(), .stat_late(late_fast), .stat_resync(), .stat_pulses(pul_fast),
    .stat_frame_err(), .now(now_fast), .laser_trig());

  // Expected launch ticks of dut_fast, relative to the first pulse.
  int exp_tick [NPUL];
  int n_launch = 0;
  longint first_tick = 0;

  always @(posedge clk) begin
    if (rst_n && dut_fast.u_pga.launched[0]) begin
      // `launched` is set on the launch edge, so now - 1 is the launch tick
      automatic longint t = longint'(now_fast) - 1;
      if (n_launch == 0) first_tick = t;
      else if (n_launch < NPUL) begin
        checks++;
        if (t - first_tick != longint'(exp_tick[n_launch])) begin
          failures++;
          $display("pulse %0d launched at tick %0d, expected %0d", n_launch, t - first_tick, exp_tick[n_launch]);
        end
      end
      n_launch++;
    end
  end

  initial begin
    logic [39:0] bits;
    int sum_ps;
    bits = '0;
    sum_ps = 0;
    for (int k = 0; k < NPUL; k++) begin
      automatic int ns = SEQ_NS[k % 5];
      automatic int s = (ns - 16) / 2 - 1;            // slot
      automatic logic [1:0] w = 2'(s ^ (s >> 1));     // Gray code of the slot
      bits[39 - 2 * k -: 2] = w;
      // the first pulse restarts the schedule at fine 0; the interval k is the
      // time from pulse k-1 to pulse k
      if (k > 0) sum_ps += ns * 1000;
      exp_tick[k] = sum_ps / 5000;
    end
    repeat (5) @(posedge clk);
    rst_n = 1;
    repeat (3) @(posedge clk);
    for (int b = 0; b < 5; b++) begin
      @(negedge clk);
      byte_data = bits[39 - 8 * b -: 8];
      byte_valid = 1;
      @(posedge clk);
      while (!byte_take) @(posedge clk);
    end
    @(negedge clk);
    byte_valid = 0;
    repeat (400) @(posedge clk);
    checks++;
    if (int'(pul_fast) != NPUL || late_fast != 0) begin
      failures++;
      $display("MIN_SPACING 3: %0d pulses, %0d late, expected %0d and 0", pul_fast, late_fast, NPUL);
    end
    checks++;
    if (n_launch != NPUL) begin failures++; $display("%0d launches seen", n_launch); end
    checks++;
    if (late_def == 0 || int'(pul_def) + int'(late_def) != NPUL) begin
      failures++;
      $display("defaults: %0d pulses, %0d late; expected some 18 ns pulses dropped", pul_def, late_def);
    end
    $display("defaults: %0d of %0d pulses launched, %0d too close; MIN_SPACING 3: %0d launched",
             pul_def, NPUL, late_def, pul_fast);
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
