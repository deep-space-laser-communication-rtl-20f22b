// dppm_modulator: Gray-coded M-ary differential pulse position modulator.
//
// The byte stream is cut into words of log2m bits (M = 2**log2m slots), taken
// MSB first; a word may straddle two bytes. Each word w is sent in slot s,
// where s is the Gray-code inverse of w (gray(s) = s ^ (s >> 1) = w), so a
// pulse detected one slot early or late costs one bit. In differential PPM
// the guard time starts right after the previous pulse, so the output is the
// time from the previous pulse to this one:
//     out_ivl_ps = tg_ps + (s + 1) * tau_ps
// whose mean over the M symbols is (M + 1) * tau / 2 + T_g, the average the
// data-rate formula of M-DPPM uses.
//
// Interface: bytes arrive on a valid/ready handshake; symbols leave on a
// registered valid/ready handshake, one per cycle at most. log2m (1..MAX_LOG2M,
// 0 is read as 1), tau_ps and tg_ps are sampled per symbol, so M and the slot
// width can change between symbols.
// Following the document: Gray code, M-DPPM, variable M and slot width.
// This design's choice: bit order, the word buffer, the handshake.
`timescale 1ps/1fs
module dppm_modulator #(
  parameter int unsigned MAX_LOG2M = 8,
  parameter int unsigned TAU_W     = 16,
  parameter int unsigned TG_W      = 24,
  parameter int unsigned IVL_W     = 32
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [7:0]           in_data,
  input  logic                 in_valid,
  output logic                 in_ready,
  input  logic [3:0]           log2m,
  input  logic [TAU_W-1:0]     tau_ps,
  input  logic [TG_W-1:0]      tg_ps,
  output logic [IVL_W-1:0]     out_ivl_ps,
  output logic [MAX_LOG2M-1:0] out_slot,
  output logic                 out_valid,
  input  logic                 out_ready
);
  localparam int unsigned BUF_W = MAX_LOG2M + 8;
  localparam int unsigned CNT_W = $clog2(BUF_W + 1);

  logic [BUF_W-1:0] bitbuf;     // valid bits in [cnt-1:0], oldest highest
  logic [CNT_W-1:0] cnt;

  logic [CNT_W-1:0]     len;
  logic                 take;
  logic [CNT_W-1:0]     cnt_after;
  logic                 load;
  logic [MAX_LOG2M-1:0] word, slot;
  logic [BUF_W-1:0]     shifted;

  always_comb begin
    if (log2m == 0)                    len = CNT_W'(1);
    else if (32'(log2m) > MAX_LOG2M)   len = CNT_W'(MAX_LOG2M);
    else                               len = CNT_W'(log2m);
    take      = (cnt >= len) && (!out_valid || out_ready);
    cnt_after = take ? cnt - len : cnt;
    in_ready  = (32'(cnt_after) + 8 <= BUF_W);
    load      = in_valid && in_ready;
    // extract the oldest len bits
    shifted = bitbuf >> (cnt - len);
    for (int i = 0; i < MAX_LOG2M; i++)
      word[i] = (i < 32'(len)) ? shifted[i] : 1'b0;
    // Gray to binary: s[i] = xor of w[MAX-1:i]
    for (int i = 0; i < MAX_LOG2M; i++) begin
      slot[i] = 1'b0;
      for (int j = i; j < MAX_LOG2M; j++) slot[i] = slot[i] ^ word[j];
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      bitbuf     <= '0;
      cnt        <= '0;
      out_valid  <= 1'b0;
      out_ivl_ps <= '0;
      out_slot   <= '0;
    end else begin
      if (load) begin
        bitbuf <= {bitbuf[BUF_W-9:0], in_data};
        cnt    <= cnt_after + CNT_W'(8);
      end else begin
        cnt    <= cnt_after;
      end
      if (take) begin
        out_valid  <= 1'b1;
        out_slot   <= slot;
        out_ivl_ps <= IVL_W'(tg_ps) + IVL_W'((MAX_LOG2M+1)'(slot) + 1'b1) * IVL_W'(tau_ps);
      end else if (out_ready) begin
        out_valid  <= 1'b0;
      end
    end
  end
endmodule
