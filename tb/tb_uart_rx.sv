// tb_uart_rx: sends random 8N1 frames to uart_rx and compares each byte; a
// frame with a low stop bit must raise frame_err and produce no byte. Also
// checks that the byte appears within one bit time after the stop bit starts.
`timescale 1ps/1fs
module tb_uart_rx;
  localparam int CPB = 16;
  logic clk = 0, rst_n = 0, rxd = 1;
  logic [7:0] data;
  logic valid, frame_err;
  int checks = 0, failures = 0;
  int nvalid = 0, nerr = 0;
  byte unsigned got[$];

  always #2500 clk = ~clk;

  uart_rx #(.CLKS_PER_BIT(CPB)) dut (.clk, .rst_n, .rxd, .data, .valid, .frame_err);

  always @(posedge clk) begin
    if (rst_n && valid) begin got.push_back(data); nvalid++; end
    if (rst_n && frame_err) nerr++;
  end

  task automatic send(input logic [7:0] b, input logic stop);
    rxd = 0; repeat (CPB) @(posedge clk);
    for (int i = 0; i < 8; i++) begin rxd = b[i]; repeat (CPB) @(posedge clk); end
    rxd = stop; repeat (CPB) @(posedge clk);
    rxd = 1; repeat (2) @(posedge clk);
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] sent[$];
    repeat (5) @(posedge clk);
    rst_n = 1;
    repeat (5) @(posedge clk);
    for (int k = 0; k < 40; k++) begin
      logic [7:0] b;
      b = 8'($urandom);
      sent.push_back(b);
      send(b, 1'b1);
      checks++;
      if (got.size() != 1 || got[0] != b) begin
        failures++;
        $display("byte %0d: sent %02h got %0d bytes", k, b, got.size());
      end
      got.delete();
    end
    // bad stop bit
    send(8'h5A, 1'b0);
    rxd = 1; repeat (CPB * 2) @(posedge clk);
    checks++;
    if (nerr != 1 || got.size() != 0) begin failures++; $display("frame error not flagged"); end
    // after the error the receiver must resynchronise
    send(8'hC3, 1'b1);
    checks++;
    if (got.size() != 1 || got[0] != 8'hC3) begin failures++; $display("no recovery after frame error"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
