// pulse_gen: coarse counter and pulse launcher in front of the delay chains.
//
// A free-running counter steps once per clock (5 ns); its value is the
// coarse time every other block schedules against (`now`). The generator
// takes the next launch vector, sets the two delay chains (set_a, set_b) and
// raises `trig` on the clock edge where the counter reaches the vector's
// coarse value; trig stays high PULSE_CYCLES cycles and enters chain A, whose
// output feeds chain B. The chains then add the fine delay.
// The settings are written at least one cycle before the launch edge and held
// MIN_SPACING-1 cycles after it, long enough for the rising edge to have left
// chain A and entered chain B; so pulses can be at most one per MIN_SPACING
// cycles: 4 cycles, 20 ns, is the 50 Mpulse/s the document gives as the
// limit of one pulse generator. A vector whose coarse value is less than two
// ticks ahead when it is taken can no longer be launched on time; it is
// dropped and `late` pulses for one cycle.
// Following the document: counter for coarse time, delay chains for fine
// time, 50 Mpulse/s per generator. This design's choice: pulse width,
// handshake, the late rule.
`timescale 1ps/1fs
module pulse_gen
  import sdpm_pkg::*;
#(
  parameter int unsigned MIN_SPACING  = 4,
  parameter int unsigned PULSE_CYCLES = 2
) (
  input  logic        clk,
  input  logic        rst_n,
  input  launch_vec_t in_lv,
  input  logic        in_valid,
  output logic        in_ready,
  output coarse_t     now,
  output chain_set_t  set_a,
  output chain_set_t  set_b,
  output logic        trig,
  output logic        launched,
  output logic        late
);
  typedef enum logic [1:0] {IDLE, ARMED, HOLD} state_t;
  state_t  state;
  coarse_t target;
  logic [7:0] hold_cnt, pw_cnt;

  assign in_ready = (state == IDLE);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state    <= IDLE;
      now      <= '0;
      target   <= '0;
      set_a    <= '0;
      set_b    <= '0;
      trig     <= 1'b0;
      launched <= 1'b0;
      late     <= 1'b0;
      hold_cnt <= '0;
      pw_cnt   <= '0;
    end else begin
      now      <= now + 1'b1;
      launched <= 1'b0;
      late     <= 1'b0;
      if (pw_cnt != 0) begin
        pw_cnt <= pw_cnt - 1'b1;
        if (pw_cnt == 8'd1) trig <= 1'b0;
      end
      case (state)
        IDLE: if (in_valid) begin
          if (coarse_ge(in_lv.coarse, now + coarse_t'(2))) begin
            target <= in_lv.coarse;
            set_a  <= in_lv.set_a;
            set_b  <= in_lv.set_b;
            state  <= ARMED;
          end else begin
            late <= 1'b1;
          end
        end
        ARMED: if (now + 1'b1 == target) begin
          trig     <= 1'b1;
          pw_cnt   <= 8'(PULSE_CYCLES);
          launched <= 1'b1;
          hold_cnt <= 8'(MIN_SPACING - 2);
          state    <= HOLD;
        end
        HOLD: begin
          if (hold_cnt <= 8'd1) state <= IDLE;
          hold_cnt <= hold_cnt - 1'b1;
        end
        default: state <= IDLE;
      endcase
    end
  end

  // The pulse must be low again before the next launch.
  initial assert (PULSE_CYCLES < MIN_SPACING && PULSE_CYCLES >= 1 && MIN_SPACING >= 3)
    else $error("pulse_gen: need 1 <= PULSE_CYCLES < MIN_SPACING and MIN_SPACING >= 3");
endmodule
