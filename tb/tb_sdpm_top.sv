// tb_sdpm_top: end-to-end run of the pulse modulator at its default sizes.
//
// 1. Waits for the DLL to lock onto its chain.
// 2. Calibrates: measures every setting of two chain models identical to the
//    design's chains A and B, picks for each fine delay f (0..5099 ps) the
//    pair whose summed delay is closest to 2*6000 + BASE + f, and writes the
//    balancing table through the top's ports.
// 3. Sends data in phases: M = 4 and M = 8 from the parallel port, a phase
//    after the chains have drifted by +30 ps each (compensation on), a phase
//    through the serial port, a phase in time-vector mode (intervals sent as
//    bytes, modulator bypassed), an overload phase with pulses closer than the
//    generator can launch, and a final normal phase.
// Checks: every time vector equals the previous one plus the interval the
// testbench derives itself from the data (Gray code, M-DPPM), and every laser
// trigger edge lies within tolerance of clock edge + 2*6000 + BASE + fine.
// After the lock, the harmonic finder is given the periods of neighbouring
// harmonic locks of the measured delay and must return their order.
// Each mechanism (DLL lock, harmonic order, DLL tracking, compensation, balancing table with
// borrow/carry, FIFO full, late drop, resync, M switch, both sources,
// time-vector mode) is
// counted and must have happened.
`timescale 1ps/1fs
module tb_sdpm_top;
  import sdpm_pkg::*;
  localparam int    BASE      = 3000;     // chains used mid-range, where pairs are dense
  localparam int    NSET      = 512;
  localparam int    DEPTH     = 5100;
  localparam int    CPB       = 1736;     // the top's default serial bit time

  logic clk = 0, rst_n = 0;
  logic uart_rxd = 1;
  logic [7:0] byte_data = 0;
  logic byte_valid = 0, byte_ready, data_sel = 1;
  logic [3:0] log2m = 2;
  logic [15:0] tau_ps = 100;
  logic [23:0] tg_ps = 20000;
  logic lut_we = 0;
  logic [12:0] lut_addr = 0;
  logic [17:0] lut_wdata = 0;
  logic comp_en = 0;
  logic [15:0] dll_ref_ps = 0;
  logic [8:0] dll_chain_set = 9'd260;
  logic [15:0] dll_period_ps, stat_late, stat_resync, stat_pulses, stat_frame_err;
  logic dll_locked, laser_trig;
  logic hf_start = 0, hf_done, hf_err;
  logic [15:0] hf_t_n_ps = 0, hf_t_n1_ps = 0, hf_order;
  logic [31:0] hf_delay_ps;
  int n_harm = 0;
  logic tv_mode = 0;
  longint ivl_q[$];             // intervals sent directly in time-vector mode
  int n_tvm = 0;
  coarse_t now;

  always #2500 clk = ~clk;

  sdpm_top dut (.*);

  int checks = 0, failures = 0;

  // -------- mechanism counters --------
  int n_lock = 0, n_track = 0, n_comp = 0, n_borrow = 0, n_full = 0, n_late = 0;
  int n_resync = 0, n_mswitch = 0, n_uart = 0, n_par = 0, n_laser = 0, n_timed = 0;

  // -------- reference model of modulation --------
  bit       bits[$];
  int       sym_l[$];           // word length used for each expected symbol
  longint   last_abs;
  bit       have_last = 0;
  bit       check_timing = 1;
  real      tol_ps = 0.6;
  realtime  t_ref_edge;          // time of the clock edge where now became REF_C
  coarse_t  ref_c;
  bit       have_ref = 0;
  real      exp_q[$];

  function automatic int gray_inv(int w, int l);
    for (int s = 0; s < (1 << l); s++) if ((s ^ (s >> 1)) == w) return s;
    return -1;
  endfunction

  // counter epoch
  always @(posedge clk) begin
    #1;
    if (rst_n && !have_ref && now == 100) begin
      t_ref_edge = $realtime - 1.0;
      ref_c = now;
      have_ref = 1;
    end
  end

  // time vectors out of the encoder
  always @(posedge clk) begin
    if (rst_n && dut.tv_valid && dut.tv_ready) begin
      int l, w, s;
      longint a, iv;
      l = sym_l.pop_front();
      w = 0;
      for (int i = 0; i < l; i++) w = (w << 1) | int'(bits.pop_front());
      s  = gray_inv(w, l);
      iv = longint'(tg_ps) + longint'(s + 1) * longint'(tau_ps);
      if (l == 0) iv = ivl_q.pop_front();   // time-vector mode
      a  = longint'(dut.tv.coarse) * 5000 + longint'(dut.tv.fine);
      if (dut.resync) n_resync++;
      else begin
        checks++;
        if (!have_last || a != last_abs + iv) begin
          failures++;
          $display("time vector %0d, expected %0d (word %0d slot %0d)", a, last_abs + iv, w, s);
        end
      end
      last_abs = a;
      have_last = 1;
      if (check_timing)
        exp_q.push_back(t_ref_edge + real'(longint'(dut.tv.coarse - ref_c)) * 5000.0
                        + 12000.0 + real'(BASE) + real'(dut.tv.fine));
    end
    if (rst_n && dut.u_comp.in_valid && dut.u_comp.in_ready) begin
      if (dut.u_comp.dclamp != 0) n_comp++;
      if (dut.u_comp.coarse_c != dut.tv.coarse) n_borrow++;
    end
    if (rst_n && !dut.lv_ready) n_full++;
    if (rst_n && dut.late) n_late++;
  end

  // laser trigger edges
  always @(posedge laser_trig) begin
    n_laser++;
    if (check_timing) begin
      real e, err;
      if (exp_q.size() == 0) begin
        checks++; failures++;
        $display("unexpected trigger at %0.1f", $realtime);
      end else begin
        e = exp_q.pop_front();
        err = $realtime - e;
        checks++;
        n_timed++;
        if (err > tol_ps || err < -tol_ps) begin
          failures++;
          $display("trigger at %0.3f ps, expected %0.3f (error %0.3f ps)", $realtime, e, err);
        end
      end
    end
  end

  // -------- watchdog --------
  initial begin
    repeat (1500000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // -------- calibration chains (same models as chains A and B) --------
  logic       ca_in = 0, cb_in = 0, ca_out, cb_out;
  logic [8:0] ca_set = 0, cb_set = 0;
  delay_chain #(.SEED(1)) cal_a (.in(ca_in), .set(ca_set), .out(ca_out));
  delay_chain #(.SEED(2)) cal_b (.in(cb_in), .set(cb_set), .out(cb_out));
  real dA[NSET], dB[NSET];
  realtime ta, tb;
  always @(posedge ca_out) ta = $realtime;
  always @(posedge cb_out) tb = $realtime;

  real best_err[DEPTH];
  int  best_pair[DEPTH];

  // for every fine delay f, the pair (a, b) whose measured sum is nearest
  // to 2*6000 + BASE + f
  function automatic void pick_pairs();
    for (int f = 0; f < DEPTH; f++) begin best_err[f] = 1.0e9; best_pair[f] = 0; end
    for (int a = 0; a < NSET; a++) begin
      for (int b = 0; b < NSET; b++) begin
        real v, e;
        int  f;
        v = dA[a] + dB[b] - 12000.0 - real'(BASE);
        f = int'(v);                    // nearest integer
        if (f >= 0 && f < DEPTH) begin
          e = (v > real'(f)) ? v - real'(f) : real'(f) - v;
          if (e < best_err[f]) begin best_err[f] = e; best_pair[f] = (b << 9) | a; end
        end
      end
    end
  endfunction

  task automatic calibrate();
    realtime t0;
    for (int s = 0; s < NSET; s++) begin
      ca_set = 9'(s); cb_set = 9'(s);
      #100;
      t0 = $realtime;
      ca_in = 1; cb_in = 1;
      #20000;
      ca_in = 0; cb_in = 0;
      #20000;
      dA[s] = ta - t0;
      dB[s] = tb - t0;
    end
    pick_pairs();
    for (int f = 0; f < DEPTH; f++) begin
      checks++;
      if (best_err[f] > 0.5) begin
        failures++;
        $display("no chain pair within 0.5 ps of fine delay %0d", f);
      end
      @(negedge clk);
      lut_we = 1; lut_addr = 13'(f); lut_wdata = 18'(best_pair[f]);
    end
    @(negedge clk);
    lut_we = 0;
  endtask

  // -------- data sources --------
  // time-vector mode: each interval sent as 4 bytes, least significant first
  task automatic phase_tv(input int n);
    data_sel = 1;
    tv_mode = 1;
    for (int k = 0; k < n; k++) begin
      logic [31:0] iv;
      iv = 32'(20000 + $urandom_range(0, 10000));
      sym_l.push_back(0);
      ivl_q.push_back(longint'(iv));
      for (int j = 0; j < 4; j++) begin
        @(negedge clk);
        byte_data = iv[8*j +: 8]; byte_valid = 1;
        @(posedge clk);
        while (!byte_ready) @(posedge clk);
        @(negedge clk);
        byte_valid = 0;
      end
      n_tvm++;
    end
    drain();
    tv_mode = 0;
  endtask

  task automatic send_par(input int nbytes);
    data_sel = 1;
    for (int k = 0; k < nbytes; k++) begin
      logic [7:0] b;
      b = 8'($urandom);
      @(negedge clk);
      byte_data = b; byte_valid = 1;
      @(posedge clk);
      while (!byte_ready) @(posedge clk);
      for (int i = 7; i >= 0; i--) bits.push_back(b[i]);
      n_par++;
      @(negedge clk);
      byte_valid = 0;
    end
  endtask

  task automatic send_uart(input int nbytes);
    data_sel = 0;
    for (int k = 0; k < nbytes; k++) begin
      logic [7:0] b;
      b = 8'($urandom);
      for (int i = 7; i >= 0; i--) bits.push_back(b[i]);
      uart_rxd = 0; repeat (CPB) @(posedge clk);
      for (int i = 0; i < 8; i++) begin uart_rxd = b[i]; repeat (CPB) @(posedge clk); end
      uart_rxd = 1; repeat (CPB) @(posedge clk);
      n_uart++;
    end
  endtask

  // word lengths follow log2m, which only changes between phases
  task automatic expect_words(input int nbits, input int l);
    for (int k = 0; k < nbits / l; k++) sym_l.push_back(l);
  endtask

  task automatic drain();
    int idle;
    idle = 0;
    while (idle < 200) begin
      @(posedge clk);
      if (dut.fq_valid || dut.tv_valid || dut.ivl_valid || dut.lv_valid || dut.trig) idle = 0;
      else idle++;
    end
    #30000;
  endtask

  task automatic phase_par(input int l, input int nbytes, input int tau, input int tg);
    if (int'(log2m) != l) n_mswitch++;
    log2m = 4'(l); tau_ps = 16'(tau); tg_ps = 24'(tg);
    expect_words(nbytes * 8, l);
    send_par(nbytes);
    drain();
  endtask

  initial begin
    int p0;
    repeat (5) @(posedge clk);
    rst_n = 1;
    // 1. DLL lock
    wait (dll_locked);
    n_lock++;
    $display("DLL locked at %0d ps after %0.1f us", dll_period_ps, $realtime / 1.0e6);
    checks++;
    begin
      real dll_d;
      dll_d = 6000.0 + 260.0 * 12.0 + 48.0 * (real'((260 * 260 * 193 + 260 * 7919 + 3 * 104729) % 1009) / 504.0 - 1.0);
      if (real'(dll_period_ps) < dll_d - 1.0 || real'(dll_period_ps) > dll_d + 2.0) begin
        failures++;
        $display("DLL period %0d, chain delay %0.2f", dll_period_ps, dll_d);
      end
    end
    // 1b. harmonic order: periods the loop would lock at on its 2nd and
    // 3rd harmonic of the measured delay
    for (int n = 1; n <= 4; n++) begin
      @(negedge clk);
      hf_t_n_ps  = 16'((int'(dll_period_ps) + n / 2) / n);
      hf_t_n1_ps = 16'((int'(dll_period_ps) + (n + 1) / 2) / (n + 1));
      hf_start = 1;
      @(negedge clk);
      hf_start = 0;
      while (!hf_done) @(negedge clk);
      checks++;
      if (hf_err || int'(hf_order) != n || hf_delay_ps > 32'(dll_period_ps) + 32'(n) || hf_delay_ps + 32'(n) < 32'(dll_period_ps)) begin
        failures++;
        $display("harmonic %0d: order %0d delay %0d (DLL %0d)", n, hf_order, hf_delay_ps, dll_period_ps);
      end else n_harm++;
    end
    // 2. calibration
    calibrate();
    repeat (5000) @(posedge clk);   // let the DLL settle into its 1 ps dither
    dll_ref_ps = dll_period_ps;
    // 3a. M = 4, no compensation: exact to the table's rounding
    tol_ps = 0.6;
    phase_par(2, 40, 100, 20000);
    // 3b. M = 8
    phase_par(3, 30, 100, 19900);
    // 3c. drift +30 ps on every chain; the DLL follows; compensation on
    comp_en = 1;
    tol_ps = 5.0;
    dut.u_pga.g_gen[0].u_chain_a.drift_ps = 30.0;
    dut.u_pga.g_gen[0].u_chain_b.drift_ps = 30.0;
    dut.u_chain_dll.drift_ps = 30.0;
    cal_a.drift_ps = 30.0;
    cal_b.drift_ps = 30.0;
    p0 = int'(dll_ref_ps);
    while (int'(dll_period_ps) < p0 + 29) @(posedge clk);
    n_track++;
    phase_par(2, 40, 100, 20000);
    phase_par(4, 40, 57, 20000);
    // 3d. serial source, M = 4
    log2m = 2; n_mswitch++;
    expect_words(3 * 8, 2);
    send_uart(3);
    drain();
    // 3d'. time-vector mode: chosen intervals, modulator bypassed
    phase_tv(40);
    // 3e. overload: pulses every ~5 ns; late drops and restarts, no timing check
    check_timing = 0;
    phase_par(2, 30, 100, 4000);
    exp_q.delete();
    check_timing = 1;
    // 3f. back to normal
    phase_par(2, 20, 100, 20000);

    // -------- results --------
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("%0d expected triggers missing", exp_q.size()); end
    checks++;
    if (int'(stat_pulses) != n_laser) begin failures++; $display("pulse count %0d vs %0d triggers", stat_pulses, n_laser); end
    checks++;
    if (int'(stat_late) != n_late) begin failures++; $display("late count %0d vs %0d", stat_late, n_late); end
    checks++;
    if (stat_frame_err != 0) begin failures++; $display("serial frame errors"); end
    $display("mechanisms: lock=%0d harmonic=%0d track=%0d comp=%0d borrow/carry=%0d fifo_full=%0d late=%0d resync=%0d M_switch=%0d serial=%0d parallel=%0d time_vector=%0d triggers=%0d timed=%0d",
             n_lock, n_harm, n_track, n_comp, n_borrow, n_full, n_late, n_resync, n_mswitch, n_uart, n_par, n_tvm, n_laser, n_timed);
    if (n_lock == 0)   begin failures++; $display("DLL never locked"); end
    if (n_harm == 0)   begin failures++; $display("no harmonic order found"); end
    if (n_tvm == 0)    begin failures++; $display("time-vector mode never used"); end
    if (n_track == 0)  begin failures++; $display("DLL never tracked"); end
    if (n_comp == 0)   begin failures++; $display("compensation never applied"); end
    if (n_borrow == 0) begin failures++; $display("no coarse borrow/carry"); end
    if (n_full == 0)   begin failures++; $display("FIFO never full"); end
    if (n_late == 0)   begin failures++; $display("no late pulse"); end
    if (n_resync == 0) begin failures++; $display("no resync"); end
    if (n_mswitch == 0) begin failures++; $display("M never switched"); end
    if (n_uart == 0 || n_par == 0) begin failures++; $display("a source unused"); end
    checks += 9;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
