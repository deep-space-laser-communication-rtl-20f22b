// pulse_gen_array: several pulse generators behind one timestamp FIFO,
// merged by an OR, to go beyond the pulse rate of one generator.
//
// One generator with its two delay chains can launch one pulse per
// MIN_SPACING clock ticks (50 Mpulse/s at the defaults), because its chain
// settings must stay put while a pulse is inside. This block deals the launch
// vectors from the timestamp FIFO round-robin to N_GEN copies of pulse_gen,
// each with its own chain A and chain B, and ORs the N_GEN chain outputs into
// one trigger. Neighbouring pulses then go to different generators, so
// pulses may follow each other every tick as long as each generator sees at
// most one per MIN_SPACING ticks, which the round-robin order gives whenever
// N_GEN >= MIN_SPACING. With N_GEN = 1 it is the single generator of the
// prototype.
// All generators start from the same reset, so their coarse counters agree;
// `now` is taken from generator 0. All chain pairs are built alike and share
// one calibration (the same balancing table and DLL): the chain models of
// every generator use the same seeds. Pulses closer than PULSE_CYCLES ticks
// overlap in the OR and merge.
// Interface: launch vectors on valid/ready; a vector is taken by the
// generator whose turn it is, when that generator is idle (a vector already
// too late is taken and dropped). `launched` and `late` have one bit per
// generator, each a one-cycle strobe.
// Following the document: several pulse generators of 50 Mpulse/s for one
// timestamp FIFO, combined by a fast OR, with one calibration/DLL per
// modulator. This design's choice: round-robin dealing, shared seeds.
`timescale 1ps/1fs
module pulse_gen_array
  import sdpm_pkg::*;
#(
  parameter int unsigned N_GEN        = 5,
  parameter int unsigned MIN_SPACING  = 4,
  parameter int unsigned PULSE_CYCLES = 2,
  parameter int unsigned LSB_FS       = 12000,
  parameter int unsigned STATIC_PS    = 6000
) (
  input  logic              clk,
  input  logic              rst_n,
  input  launch_vec_t       in_lv,
  input  logic              in_valid,
  output logic              in_ready,
  output coarse_t           now,
  output logic [N_GEN-1:0]  trig,       // electrical pulses entering the chains
  output logic [N_GEN-1:0]  launched,
  output logic [N_GEN-1:0]  late,
  output logic              trig_out    // OR of all chain outputs, to the laser
);
  localparam int unsigned SW = (N_GEN > 1) ? $clog2(N_GEN) : 1;

  logic [SW-1:0]     turn;
  logic [N_GEN-1:0]  ready, b_out;
  coarse_t           now_g [N_GEN];

  assign in_ready = ready[turn];
  assign now      = now_g[0];
  assign trig_out = |b_out;

  always_ff @(posedge clk) begin
    if (!rst_n) turn <= '0;
    else if (in_valid && in_ready)
      turn <= (32'(turn) == N_GEN - 1) ? '0 : turn + 1'b1;
  end

  for (genvar i = 0; i < N_GEN; i++) begin : g_gen
    chain_set_t set_a, set_b;
    logic       a_out;

    pulse_gen #(.MIN_SPACING(MIN_SPACING), .PULSE_CYCLES(PULSE_CYCLES)) u_pg (
      .clk(clk), .rst_n(rst_n),
      .in_lv(in_lv), .in_valid(in_valid && 32'(turn) == i), .in_ready(ready[i]),
      .now(now_g[i]), .set_a(set_a), .set_b(set_b),
      .trig(trig[i]), .launched(launched[i]), .late(late[i]));

    delay_chain #(.SET_W(SET_W), .LSB_FS(LSB_FS), .STATIC_PS(STATIC_PS), .SEED(1)) u_chain_a (
      .in(trig[i]), .set(set_a), .out(a_out));
    delay_chain #(.SET_W(SET_W), .LSB_FS(LSB_FS), .STATIC_PS(STATIC_PS), .SEED(2)) u_chain_b (
      .in(a_out), .set(set_b), .out(b_out[i]));
  end
endmodule
