// sdpm_top: software-defined pulse modulator for a pulsed laser downlink.
//
// Data bytes become laser trigger edges placed with picosecond resolution.
//   data in  -> uart_rx (serial) or the parallel byte port, chosen by data_sel
//            -> dppm_modulator : Gray code + M-DPPM, interval to previous pulse
//               (or, with tv_mode, ivl_assembler: the bytes are the intervals)
//            -> pulse_encoder  : absolute time = {coarse tick, fine ps}
//            -> env_comp       : subtract DLL-measured drift, look up the
//                                settings of chains A and B (balancing table)
//            -> sync_fifo      : timestamp FIFO
//            -> pulse_gen_array: N_GEN pulse generators (5 ns coarse counter,
//                                launch on the tick), each followed by
//                                delay_chain A -> delay_chain B, ORed
//                                into laser_trig
// A delay-locked loop runs beside it on its own oscillator: dll_osc (a
// period-programmable clock), dll_meter (launcher and arbiter flip-flops,
// counters A and B around a third delay chain) and dll_feedback (locks the
// period to that chain's delay). The locked period crosses into the modulator
// clock through word_sync and feeds env_comp. harmonic_finder works out the
// order of a harmonic DLL lock from two neighbouring lock periods given at
// the hf_* ports.
// The chain of blocks, the coarse/fine split, the two balanced chains, the
// 5 ns counter, the 512-entry chains, the 5100-entry table, the DLL structure
// and its 4-24 ns oscillator follow the document. The error-correction stage
// the document places between the input decoder and the modulator is not
// included (no code is specified). N_GEN defaults to the prototype's single
// generator; more generators behind the one FIFO (5 per modulator in the
// document's scaled-up arrangement) need a faster front end than this one,
// whose compensation stage takes 3 cycles per pulse. The clock multiplier, the atomic clock
// reference and the laser are outside this module.
// Timing: clk is the 200 MHz modulator clock; the trigger's rising edge comes
// 2*STATIC_PS + BASE + fine ps after the clock edge where the counter reaches
// the pulse's coarse value, BASE being the offset the balancing table was
// calibrated for. delay_chain and dll_osc are simulation models, so this top
// simulates with delays; for an FPGA they are replaced by placed logic.
// rst_n is used synchronously in the clk domain and as the asynchronous
// assert of the oscillator-domain reset synchroniser, on purpose. The slot
// index, the FIFO fill levels and the serial FIFO's space flag are left
// unconnected: they are status a host may bring out; `trig` (any generator
// firing) is kept for observation.
`timescale 1ps/1fs
module sdpm_top
  import sdpm_pkg::*;
#(
  parameter int unsigned CLKS_PER_BIT = 1736,
  parameter int unsigned MAX_LOG2M    = 8,
  parameter int unsigned LEAD_CYCLES  = 16,
  parameter int unsigned FIFO_DEPTH   = 16,
  parameter int unsigned LUT_DEPTH    = 5100,
  parameter int unsigned MIN_SPACING  = 4,
  parameter int unsigned N_GEN        = 1,
  parameter int unsigned PULSE_CYCLES = 2,
  parameter int unsigned DLL_WINDOW   = 1024,
  parameter int unsigned DLL_MIN_PS   = 4000,
  parameter int unsigned DLL_MAX_PS   = 24000,
  parameter int unsigned LSB_FS       = 12000,
  parameter int unsigned STATIC_PS    = 6000,
  localparam int unsigned LAW         = $clog2(LUT_DEPTH)
) (
  input  logic               clk,
  input  logic               rst_n,
  // data input
  input  logic               uart_rxd,
  input  logic [7:0]         byte_data,
  input  logic               byte_valid,
  output logic               byte_ready,
  input  logic               data_sel,
  input  logic               tv_mode,     // 1: bytes are intervals, modulator bypassed
  // modulation settings
  input  logic [3:0]         log2m,
  input  logic [15:0]        tau_ps,
  input  logic [23:0]        tg_ps,
  // calibration
  input  logic               lut_we,
  input  logic [LAW-1:0]     lut_addr,
  input  logic [2*SET_W-1:0] lut_wdata,
  input  logic               comp_en,
  input  logic [15:0]        dll_ref_ps,
  input  logic [SET_W-1:0]   dll_chain_set,
  // harmonic-order finder (two neighbouring DLL lock periods)
  input  logic               hf_start,
  input  logic [15:0]        hf_t_n_ps,
  input  logic [15:0]        hf_t_n1_ps,
  output logic               hf_done,
  output logic               hf_err,
  output logic [15:0]        hf_order,
  output logic [31:0]        hf_delay_ps,
  // status
  output logic [15:0]        dll_period_ps,
  output logic               dll_locked,
  output logic [15:0]        stat_late,
  output logic [15:0]        stat_resync,
  output logic [15:0]        stat_pulses,
  output logic [15:0]        stat_frame_err,
  output coarse_t            now,
  // to the laser pulse driver
  output logic               laser_trig
);
  // ---------------- input bus decoder ----------------
  logic [7:0] u_data, uq_data, src_data;
  logic       u_valid, u_ferr, uq_valid, uq_ready, src_valid, src_ready;
  logic [4:0] uq_count;
  logic       uq_space;

  uart_rx #(.CLKS_PER_BIT(CLKS_PER_BIT)) u_uart (
    .clk(clk), .rst_n(rst_n), .rxd(uart_rxd),
    .data(u_data), .valid(u_valid), .frame_err(u_ferr));

  // the serial decoder has no back-pressure: a small FIFO absorbs its bytes
  sync_fifo #(.WIDTH(8), .DEPTH(16)) u_ufifo (
    .clk(clk), .rst_n(rst_n),
    .in_data(u_data), .in_valid(u_valid), .in_ready(uq_space),
    .out_data(uq_data), .out_valid(uq_valid), .out_ready(uq_ready),
    .count(uq_count));

  assign src_data   = data_sel ? byte_data  : uq_data;
  assign src_valid  = data_sel ? byte_valid : uq_valid;
  assign byte_ready = data_sel && src_ready;
  assign uq_ready   = !data_sel && src_ready;

  // ---------------- modulation and time vectors ----------------
  logic [31:0]          ivl;
  logic [MAX_LOG2M-1:0] slot;
  logic                 ivl_valid, ivl_ready;
  time_vec_t            tv;
  logic                 tv_valid, tv_ready, resync;
  launch_vec_t          lv, fq_lv;
  logic                 lv_valid, lv_ready, fq_valid, fq_ready;
  logic [$clog2(FIFO_DEPTH):0] fq_count;

  logic [31:0] m_ivl, a_ivl;
  logic        m_in_ready, a_in_ready, m_valid, a_valid;

  dppm_modulator #(.MAX_LOG2M(MAX_LOG2M)) u_mod (
    .clk(clk), .rst_n(rst_n),
    .in_data(src_data), .in_valid(src_valid && !tv_mode), .in_ready(m_in_ready),
    .log2m(log2m), .tau_ps(tau_ps), .tg_ps(tg_ps),
    .out_ivl_ps(m_ivl), .out_slot(slot), .out_valid(m_valid), .out_ready(ivl_ready && !tv_mode));

  // time-vector mode: intervals straight from the input bytes
  ivl_assembler #(.BYTES(4)) u_asm (
    .clk(clk), .rst_n(rst_n),
    .in_data(src_data), .in_valid(src_valid && tv_mode), .in_ready(a_in_ready),
    .out_ivl_ps(a_ivl), .out_valid(a_valid), .out_ready(ivl_ready && tv_mode));

  assign src_ready = tv_mode ? a_in_ready : m_in_ready;
  assign ivl       = tv_mode ? a_ivl      : m_ivl;
  assign ivl_valid = tv_mode ? a_valid    : m_valid;

  pulse_encoder #(.LEAD_CYCLES(LEAD_CYCLES)) u_enc (
    .clk(clk), .rst_n(rst_n), .now(now),
    .in_ivl_ps(ivl), .in_valid(ivl_valid), .in_ready(ivl_ready),
    .out_tv(tv), .out_valid(tv_valid), .out_ready(tv_ready), .resync(resync));

  logic [15:0] dll_period_sync;
  logic        dll_locked_sync;

  env_comp #(.LUT_DEPTH(LUT_DEPTH)) u_comp (
    .clk(clk), .rst_n(rst_n),
    .in_tv(tv), .in_valid(tv_valid), .in_ready(tv_ready),
    .comp_en(comp_en && dll_locked_sync), .dll_period_ps(dll_period_sync), .dll_ref_ps(dll_ref_ps),
    .lut_we(lut_we), .lut_addr(lut_addr), .lut_wdata(lut_wdata),
    .out_lv(lv), .out_valid(lv_valid), .out_ready(lv_ready));

  sync_fifo #(.WIDTH($bits(launch_vec_t)), .DEPTH(FIFO_DEPTH)) u_tsfifo (
    .clk(clk), .rst_n(rst_n),
    .in_data(lv), .in_valid(lv_valid), .in_ready(lv_ready),
    .out_data(fq_lv), .out_valid(fq_valid), .out_ready(fq_ready),
    .count(fq_count));

  // ---------------- timing: counter and delay chains ----------------
  // N_GEN pulse generators, each with chains A and B, behind the FIFO; their
  // outputs are ORed into laser_trig.
  logic [N_GEN-1:0] trig_g, launched_g, late_g;
  logic             trig, late;
  logic [$clog2(N_GEN+1)-1:0] n_launched;

  pulse_gen_array #(.N_GEN(N_GEN), .MIN_SPACING(MIN_SPACING), .PULSE_CYCLES(PULSE_CYCLES),
                    .LSB_FS(LSB_FS), .STATIC_PS(STATIC_PS)) u_pga (
    .clk(clk), .rst_n(rst_n),
    .in_lv(fq_lv), .in_valid(fq_valid), .in_ready(fq_ready),
    .now(now), .trig(trig_g), .launched(launched_g), .late(late_g),
    .trig_out(laser_trig));

  assign trig       = |trig_g;
  assign late       = |late_g;
  assign n_launched = $countones(launched_g);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      stat_late      <= '0;
      stat_resync    <= '0;
      stat_pulses    <= '0;
      stat_frame_err <= '0;
    end else begin
      stat_pulses <= stat_pulses + 16'(n_launched);
      if (u_ferr)   stat_frame_err <= stat_frame_err + 1'b1;
      if (late)   stat_late   <= stat_late + 1'b1;
      if (resync && tv_valid && tv_ready) stat_resync <= stat_resync + 1'b1;
    end
  end

  // ---------------- delay-locked loop ----------------
  localparam int unsigned DCW = $clog2(DLL_WINDOW + 1);
  logic            osc_clk, osc_rst_n, dll_launch, dll_chain_out, dll_done, dll_upd;
  logic [1:0]      osc_rst_sync;
  logic [DCW-1:0]  dll_a, dll_b;
  logic [15:0]     period_osc;
  logic            locked_osc;

  dll_osc #(.MIN_PS(DLL_MIN_PS), .MAX_PS(DLL_MAX_PS)) u_osc (
    .en(1'b1), .period_ps(period_osc), .clk_out(osc_clk));

  // reset synchroniser into the oscillator domain
  always_ff @(posedge osc_clk or negedge rst_n) begin
    if (!rst_n) osc_rst_sync <= 2'b00;
    else        osc_rst_sync <= {osc_rst_sync[0], 1'b1};
  end
  assign osc_rst_n = osc_rst_sync[1];

  dll_meter #(.WINDOW(DLL_WINDOW)) u_meter (
    .clk(osc_clk), .rst_n(osc_rst_n),
    .launch(dll_launch), .chain_out(dll_chain_out),
    .cnt_a(dll_a), .cnt_b(dll_b), .done(dll_done));

  delay_chain #(.SET_W(SET_W), .LSB_FS(LSB_FS), .STATIC_PS(STATIC_PS), .SEED(3)) u_chain_dll (
    .in(dll_launch), .set(dll_chain_set), .out(dll_chain_out));

  dll_feedback #(.MIN_PS(DLL_MIN_PS), .MAX_PS(DLL_MAX_PS), .CW(DCW)) u_fb (
    .clk(osc_clk), .rst_n(osc_rst_n),
    .cnt_a(dll_a), .cnt_b(dll_b), .done(dll_done),
    .period_ps(period_osc), .locked(locked_osc), .upd(dll_upd));

  word_sync #(.W(17)) u_sync (
    .src_clk(osc_clk), .src_rst_n(osc_rst_n),
    .src_data({locked_osc, period_osc}), .src_load(dll_upd),
    .dst_clk(clk), .dst_rst_n(rst_n),
    .dst_data({dll_locked_sync, dll_period_sync}), .dst_new());

  // Order n of a harmonic lock from the periods of locks n and n+1, and the
  // chain delay n * T_n; used by calibration software that steps the DLL
  // through its harmonics.
  harmonic_finder #(.W(16)) u_hf (
    .clk(clk), .rst_n(rst_n), .start(hf_start), .t_n_ps(hf_t_n_ps), .t_n1_ps(hf_t_n1_ps),
    .busy(), .done(hf_done), .err(hf_err), .order(hf_order), .delay_ps(hf_delay_ps));

  assign dll_period_ps = dll_period_sync;
  assign dll_locked    = dll_locked_sync;
endmodule
