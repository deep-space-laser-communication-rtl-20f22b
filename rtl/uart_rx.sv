// uart_rx: serial input decoder for the modulator's data and time vectors.
//
// Receives 8N1 frames (start bit, 8 data bits LSB first, one stop bit) on an
// idle-high line. The line is passed through a two-flop synchroniser; a start
// bit is confirmed at its middle, then every bit is sampled at its middle,
// CLKS_PER_BIT clock cycles apart. Each frame produces a one-cycle `valid`
// strobe with the byte on `data`, one cycle after the middle of the stop
// bit; `frame_err` accompanies a frame whose stop bit was low (the byte is
// then discarded).
// The document only names a serial link as the way data and time vectors
// reach the modulator; the frame format and the default 115200 baud at a
// 200 MHz clock are this design's choice.
`timescale 1ps/1fs
module uart_rx #(
  parameter int unsigned CLKS_PER_BIT = 1736
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       rxd,
  output logic [7:0] data,
  output logic       valid,
  output logic       frame_err
);
  typedef enum logic [1:0] {IDLE, START, DATA, STOP} state_t;
  localparam int unsigned CW = $clog2(CLKS_PER_BIT + 1);

  state_t        state;
  logic [CW-1:0] cnt;
  logic [2:0]    bit_idx;
  logic [7:0]    shreg;
  logic [1:0]    sync;

  wire rx = sync[1];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state     <= IDLE;
      cnt       <= '0;
      bit_idx   <= '0;
      shreg     <= '0;
      sync      <= 2'b11;
      data      <= '0;
      valid     <= 1'b0;
      frame_err <= 1'b0;
    end else begin
      sync      <= {sync[0], rxd};
      valid     <= 1'b0;
      frame_err <= 1'b0;
      case (state)
        IDLE: if (!rx) begin
          state <= START;
          cnt   <= CW'(CLKS_PER_BIT / 2 - 1);
        end
        START: if (cnt == 0) begin
          if (!rx) begin
            state   <= DATA;
            cnt     <= CW'(CLKS_PER_BIT - 1);
            bit_idx <= '0;
          end else begin
            state <= IDLE;            // glitch, not a start bit
          end
        end else cnt <= cnt - 1'b1;
        DATA: if (cnt == 0) begin
          shreg <= {rx, shreg[7:1]};
          cnt   <= CW'(CLKS_PER_BIT - 1);
          if (bit_idx == 3'd7) state <= STOP;
          bit_idx <= bit_idx + 1'b1;
        end else cnt <= cnt - 1'b1;
        STOP: if (cnt == 0) begin
          state <= IDLE;
          if (rx) begin
            data  <= shreg;
            valid <= 1'b1;
          end else begin
            frame_err <= 1'b1;
          end
        end else cnt <= cnt - 1'b1;
        default: state <= IDLE;
      endcase
    end
  end
endmodule
