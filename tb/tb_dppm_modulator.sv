// tb_dppm_modulator: feeds random bytes in phases of fixed M (log2m = 2, 3,
// 1, 8, 4, 5) and checks each symbol against an independent model: the bits
// taken MSB first, the slot found by searching for the s whose Gray code
// s ^ (s >> 1) equals the word, and the interval T_g + (s + 1) * tau.
// Random back-pressure on the output; one phase runs without it and checks
// the rate of one symbol per cycle.
`timescale 1ps/1fs
module tb_dppm_modulator;
  logic clk = 0, rst_n = 0;
  logic [7:0]  in_data;
  logic        in_valid = 0, in_ready;
  logic [3:0]  log2m = 2;
  logic [15:0] tau_ps = 100;
  logic [23:0] tg_ps = 20000;
  logic [31:0] out_ivl_ps;
  logic [7:0]  out_slot;
  logic        out_valid, out_ready = 1;
  int checks = 0, failures = 0;
  bit bits[$];
  int nsym = 0;
  bit stall_en = 1;

  always #2500 clk = ~clk;

  dppm_modulator dut (.*);

  function automatic int gray_inv(int w, int l);
    for (int s = 0; s < (1 << l); s++) if ((s ^ (s >> 1)) == w) return s;
    return -1;
  endfunction

  // output checker
  always @(posedge clk) begin
    if (rst_n && out_valid && out_ready) begin
      int w, s, l;
      l = (log2m == 0) ? 1 : int'(log2m);
      w = 0;
      for (int i = 0; i < l; i++) begin
        w = (w << 1) | int'(bits.pop_front());
      end
      s = gray_inv(w, l);
      checks++;
      nsym++;
      if (int'(out_slot) != s || out_ivl_ps != 32'(tg_ps) + 32'(s + 1) * 32'(tau_ps)) begin
        failures++;
        $display("word %0d (l=%0d): slot %0d ivl %0d, expected %0d / %0d", w, l, out_slot, out_ivl_ps,
                 s, 32'(tg_ps) + 32'(s + 1) * 32'(tau_ps));
      end
    end
  end

  always @(negedge clk) out_ready <= stall_en ? ($urandom % 4 != 0) : 1'b1;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_phase(input int l, input int nbytes, input int tau, input int tg);
    @(negedge clk);
    log2m = 4'(l); tau_ps = 16'(tau); tg_ps = 24'(tg);
    for (int k = 0; k < nbytes; k++) begin
      in_data  = 8'($urandom);
      in_valid = 1;
      @(posedge clk);
      while (!in_ready) @(posedge clk);
      for (int i = 7; i >= 0; i--) bits.push_back(in_data[i]);
      @(negedge clk);
    end
    in_valid = 0;
    while (bits.size() >= l) @(posedge clk);
    repeat (4) @(posedge clk);
  endtask

  initial begin
    int t0, n0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    run_phase(2, 64, 100, 20000);     // M = 4
    run_phase(3, 63, 100, 20000);     // M = 8, words straddle bytes
    run_phase(1, 16, 250, 5000);      // M = 2
    run_phase(8, 32, 10, 1000);       // M = 256
    run_phase(4, 40, 60, 0);          // M = 16, no guard time
    run_phase(5, 25, 77, 12345);      // M = 32
    // rate: with no back-pressure and M = 256, one symbol per clock
    stall_en = 0;
    n0 = nsym; t0 = 0;
    fork
      run_phase(8, 64, 100, 20000);
      forever @(posedge clk) if (nsym > n0) t0++;
    join_any
    disable fork;
    checks++;
    if (nsym - n0 != 64 || t0 > 64 + 8) begin
      failures++;
      $display("rate: %0d symbols in %0d cycles", nsym - n0, t0);
    end
    checks++;
    if (bits.size() != 0 && bits.size() >= 5) begin failures++; $display("bits left over: %0d", bits.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
