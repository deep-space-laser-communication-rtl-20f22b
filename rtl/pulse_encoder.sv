// pulse_encoder: turns pulse-to-pulse intervals into absolute pulse times.
//
// Each interval (ps) from the modulator is split into whole coarse-counter
// periods and a remainder, q = ivl / CLK_PS and r = ivl % CLK_PS (a divide by
// a constant), in the first cycle. In the second the remainder is added to the
// fine part of the previous pulse time with a carry into the coarse part, so
// the output time vector always has 0 <= fine < CLK_PS:
//     fine'   = (fine + r) mod CLK_PS
//     coarse' = coarse + q + carry
// The coarse value is the counter value on whose edge the pulse leaves, the
// fine value the delay the chains add after it (coarse/fine split as in the
// document's timing diagram).
// The schedule must stay ahead of the free-running counter (`now`). At the
// first symbol, or when a gap in the data has let the counter catch up (the
// new time would be less than LEAD_CYCLES ahead), the schedule restarts at
// now + LEAD_CYCLES with fine = 0, and that time vector carries the
// `resync` flag (held with out_tv, like the data). This
// restart rule is this design's choice.
// Interface: valid/ready in and out; one interval every two cycles.
`timescale 1ps/1fs
module pulse_encoder
  import sdpm_pkg::*;
#(
  parameter int unsigned IVL_W       = 32,
  parameter int unsigned LEAD_CYCLES = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  coarse_t          now,
  input  logic [IVL_W-1:0] in_ivl_ps,
  input  logic             in_valid,
  output logic             in_ready,
  output time_vec_t        out_tv,
  output logic             out_valid,
  input  logic             out_ready,
  output logic             resync
);
  logic             pend;
  logic [IVL_W-1:0] q;
  fine_t            r;
  time_vec_t        last;
  logic             started;

  logic [FINE_W:0] fsum;
  logic            carry;
  coarse_t         nxt_coarse, limit;
  fine_t           nxt_fine;
  logic            fire, late;

  assign in_ready = !pend;
  assign fire     = pend && (!out_valid || out_ready);

  always_comb begin
    fsum       = (FINE_W+1)'(last.fine) + (FINE_W+1)'(r);
    carry      = (32'(fsum) >= CLK_PS);
    nxt_fine   = carry ? FINE_W'(32'(fsum) - CLK_PS) : FINE_W'(fsum);
    nxt_coarse = last.coarse + coarse_t'(q) + coarse_t'(carry);
    limit      = now + coarse_t'(LEAD_CYCLES);
    late       = !started || !coarse_ge(nxt_coarse, limit);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      pend      <= 1'b0;
      q         <= '0;
      r         <= '0;
      last      <= '0;
      started   <= 1'b0;
      out_valid <= 1'b0;
      out_tv    <= '0;
      resync    <= 1'b0;
    end else begin
      if (in_valid && in_ready) begin
        q    <= in_ivl_ps / IVL_W'(CLK_PS);
        r    <= FINE_W'(in_ivl_ps % IVL_W'(CLK_PS));
        pend <= 1'b1;
      end
      if (fire) begin
        pend      <= 1'b0;
        out_valid <= 1'b1;
        started   <= 1'b1;
        if (late) begin
          last   <= '{coarse: limit, fine: '0};
          out_tv <= '{coarse: limit, fine: '0};
          resync <= 1'b1;
        end else begin
          last   <= '{coarse: nxt_coarse, fine: nxt_fine};
          out_tv <= '{coarse: nxt_coarse, fine: nxt_fine};
          resync <= 1'b0;
        end
      end else if (out_ready) begin
        out_valid <= 1'b0;
      end
    end
  end
endmodule
