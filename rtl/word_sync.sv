// word_sync: carries a slowly changing word between two clock domains.
//
// On src_load the source side registers src_data and toggles a flag. The
// flag crosses to the destination clock through two flip-flops; when the
// synchronised flag changes, the destination registers the held word, which
// has been stable for at least two destination cycles by then. A new load
// must not come before the previous one has arrived (about three destination
// cycles); the DLL updates once per measurement window, far slower. dst_data
// shows RESET_VAL after reset until the first word arrives, and dst_new
// pulses one destination cycle per word. The clock crossing is this design's
// choice; the document does not describe one.
`timescale 1ps/1fs
module word_sync #(
  parameter int unsigned W               = 16,
  parameter logic [W-1:0] RESET_VAL      = '0
) (
  input  logic         src_clk,
  input  logic         src_rst_n,
  input  logic [W-1:0] src_data,
  input  logic         src_load,
  input  logic         dst_clk,
  input  logic         dst_rst_n,
  output logic [W-1:0] dst_data,
  output logic         dst_new
);
  logic [W-1:0] held;
  logic         tog;
  logic [2:0]   sync;

  always_ff @(posedge src_clk) begin
    if (!src_rst_n) begin
      held <= RESET_VAL;
      tog  <= 1'b0;
    end else if (src_load) begin
      held <= src_data;
      tog  <= ~tog;
    end
  end

  always_ff @(posedge dst_clk) begin
    if (!dst_rst_n) begin
      sync     <= '0;
      dst_data <= RESET_VAL;
      dst_new  <= 1'b0;
    end else begin
      sync    <= {sync[1:0], tog};
      dst_new <= 1'b0;
      if (sync[2] != sync[1]) begin
        dst_data <= held;
        dst_new  <= 1'b1;
      end
    end
  end
endmodule
