// ivl_assembler: builds pulse intervals directly from input bytes.
//
// In time-vector mode the modulator is bypassed: the host sends the time
// from one pulse to the next itself, as BYTES bytes per interval, least
// significant byte first, in ps. This is how a test sequence of chosen
// intervals is played out through the timing hardware. The block collects
// the bytes and presents the interval on a valid/ready handshake; it takes
// no byte while a finished interval waits.
// Following the document: the modulator can take its time vectors from the
// serial link. This design's choice: byte count, byte order, units of ps.
`timescale 1ps/1fs
module ivl_assembler #(
  parameter int unsigned BYTES = 4
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [7:0]         in_data,
  input  logic               in_valid,
  output logic               in_ready,
  output logic [8*BYTES-1:0] out_ivl_ps,
  output logic               out_valid,
  input  logic               out_ready
);
  localparam int unsigned CW = (BYTES > 1) ? $clog2(BYTES) : 1;
  logic [CW-1:0] idx;

  assign in_ready = !out_valid;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      idx        <= '0;
      out_ivl_ps <= '0;
      out_valid  <= 1'b0;
    end else begin
      if (out_valid && out_ready) out_valid <= 1'b0;
      if (in_valid && in_ready) begin
        out_ivl_ps[8*idx +: 8] <= in_data;
        if (32'(idx) == BYTES - 1) begin
          idx       <= '0;
          out_valid <= 1'b1;
        end else begin
          idx <= idx + 1'b1;
        end
      end
    end
  end
endmodule
