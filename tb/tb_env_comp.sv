// tb_env_comp: fills the balancing table with a known pattern, then sends
// time vectors with compensation off, with a positive and with a negative
// DLL drift (and one beyond the clamp). The expected corrected time is
// worked out in absolute ps: coarse*5000 + fine - 2*drift, and the settings
// must be the table entry for the corrected fine value. Also checks the
// two-cycle latency from input to output.
`timescale 1ps/1fs
module tb_env_comp;
  import sdpm_pkg::*;
  localparam int DEPTH = 5100;
  logic clk = 0, rst_n = 0;
  time_vec_t in_tv;
  logic in_valid = 0, in_ready, comp_en = 0, lut_we = 0, out_valid, out_ready = 1;
  logic [15:0] dll_period_ps = 9000, dll_ref_ps = 9000;
  logic [12:0] lut_addr;
  logic [17:0] lut_wdata;
  launch_vec_t out_lv;
  int checks = 0, failures = 0;

  always #2500 clk = ~clk;
  env_comp dut (.*);

  function automatic logic [17:0] pattern(int f);
    return {9'(f * 7 + 3), 9'(f ^ 9'h1a5)};
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic one(input int c, input int f, input int drift, input bit en);
    longint want;
    int cyc;
    int d;
    @(negedge clk);
    comp_en = en;
    dll_period_ps = 16'(9000 + drift);
    in_tv = '{coarse: coarse_t'(c), fine: fine_t'(f)};
    in_valid = 1;
    @(posedge clk);
    @(negedge clk);
    in_valid = 0;
    cyc = 0;
    while (!out_valid) begin @(negedge clk); cyc++; end
    d = en ? 2 * drift : 0;
    if (d > 4999) d = 4999;
    if (d < -4999) d = -4999;
    want = longint'(c) * 5000 + f - d;
    checks++;
    if (longint'(out_lv.coarse) != want / 5000 ||
        {out_lv.set_b, out_lv.set_a} != pattern(int'(want % 5000)) || cyc != 1) begin
      failures++;
      $display("in %0d.%0d drift %0d: got coarse %0d sets %h (latency %0d), want %0d / %h",
               c, f, drift, out_lv.coarse, {out_lv.set_b, out_lv.set_a}, cyc + 1, want / 5000, pattern(int'(want % 5000)));
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk);
      lut_we = 1; lut_addr = 13'(a); lut_wdata = pattern(a);
    end
    @(negedge clk);
    lut_we = 0;
    for (int k = 0; k < 200; k++) one(1000 + k, $urandom % 5000, 0, 0);
    for (int k = 0; k < 200; k++) one(2000 + k, $urandom % 5000, 31, 1);
    for (int k = 0; k < 200; k++) one(3000 + k, $urandom % 5000, -27, 1);
    for (int k = 0; k < 50; k++)  one(4000 + k, $urandom % 5000, 3000, 1);
    one(5000, 0, 1, 1);       // borrow
    one(5001, 4999, -1, 1);   // carry
    one(5002, 17, 55, 0);     // drift ignored when disabled
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
