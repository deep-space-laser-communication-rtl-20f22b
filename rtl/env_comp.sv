// env_comp: environmental compensation of a pulse time, and chain lookup.
//
// The delay chains drift with temperature, voltage, radiation and aging.
// The DLL keeps measuring its own copy of a chain; when the balancing table
// was calibrated that measurement was dll_ref_ps, now it is dll_period_ps.
// If the measured chain has become slower by d = dll_period_ps - dll_ref_ps,
// each of the CHAINS data chains in series is taken to have slowed by the
// same d, and every pulse would arrive CHAINS*d late; so with comp_en the fine
// delay is reduced by CHAINS*d (clamped to +-(CLK_PS-1)); a borrow or carry moves the pulse one coarse
// tick, so the corrected fine value stays in 0..CLK_PS-1. The corrected fine
// value addresses the balancing table (balance_lut, instantiated here, with
// its write port brought out), which returns the settings of chains A and B.
// Timing: accepts one time vector, reads the table in the next cycle and
// presents the launch vector from the cycle after; the next input is taken
// when the output has been accepted (3 cycles per pulse at full rate).
// The document gives the place of this block and its inputs; the correction
// law (subtract CHAINS times the measured drift) is this design's choice.
`timescale 1ps/1fs
module env_comp
  import sdpm_pkg::*;
#(
  parameter int unsigned LUT_DEPTH = 5100,
  parameter int unsigned CHAINS    = 2,
  localparam int unsigned LAW      = $clog2(LUT_DEPTH)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  time_vec_t        in_tv,
  input  logic             in_valid,
  output logic             in_ready,
  input  logic             comp_en,
  input  logic [15:0]      dll_period_ps,
  input  logic [15:0]      dll_ref_ps,
  input  logic             lut_we,
  input  logic [LAW-1:0]   lut_addr,
  input  logic [2*SET_W-1:0] lut_wdata,
  output launch_vec_t      out_lv,
  output logic             out_valid,
  input  logic             out_ready
);
  typedef enum logic [1:0] {IDLE, READ, HOLD} state_t;
  state_t state;

  logic signed [17:0] drift, dclamp, f;
  coarse_t            coarse_c, coarse_q;
  fine_t              fine_c;
  logic [2*SET_W-1:0] rdata;

  assign in_ready = (state == IDLE);

  localparam logic signed [17:0] LIM  = 18'(CLK_PS - 1);
  localparam logic signed [17:0] CLKS = 18'(CLK_PS);
  localparam logic signed [17:0] GAIN = 18'(CHAINS);

  always_comb begin
    drift = comp_en ? GAIN * ($signed({2'b00, dll_period_ps}) - $signed({2'b00, dll_ref_ps})) : 18'sd0;
    if (drift > LIM)       dclamp = LIM;
    else if (drift < -LIM) dclamp = -LIM;
    else                   dclamp = drift;
    f        = $signed({5'b0, in_tv.fine}) - dclamp;
    coarse_c = in_tv.coarse;
    if (f < 0) begin
      f        = f + CLKS;
      coarse_c = in_tv.coarse - 1'b1;
    end else if (f >= CLKS) begin
      f        = f - CLKS;
      coarse_c = in_tv.coarse + 1'b1;
    end
    fine_c = FINE_W'(f);
  end

  balance_lut #(.DEPTH(LUT_DEPTH), .SET_W(SET_W)) u_lut (
    .clk   (clk),
    .we    (lut_we),
    .waddr (lut_addr),
    .wdata (lut_wdata),
    .re    (in_valid && in_ready),
    .raddr (LAW'(fine_c)),
    .rdata (rdata)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state     <= IDLE;
      coarse_q  <= '0;
      out_lv    <= '0;
      out_valid <= 1'b0;
    end else begin
      case (state)
        IDLE: if (in_valid) begin
          coarse_q <= coarse_c;
          state    <= READ;
        end
        READ: begin
          out_lv    <= '{coarse: coarse_q, set_b: rdata[2*SET_W-1:SET_W], set_a: rdata[SET_W-1:0]};
          out_valid <= 1'b1;
          state     <= HOLD;
        end
        HOLD: if (out_ready) begin
          out_valid <= 1'b0;
          state     <= IDLE;
        end
        default: state <= IDLE;
      endcase
    end
  end
endmodule
