// tb_ivl_assembler: sends random 32-bit intervals as 4 bytes each, least
// significant first, with random gaps on the input and random back-pressure
// on the output, and checks every assembled interval against the value sent
// and that no interval is lost or repeated.
`timescale 1ps/1fs
module tb_ivl_assembler;
  logic clk = 0, rst_n = 0;
  logic [7:0] in_data = 0;
  logic in_valid = 0, in_ready;
  logic [31:0] out_ivl_ps;
  logic out_valid, out_ready = 0;
  int checks = 0, failures = 0;
  logic [31:0] sent[$];
  int n_got = 0;
  localparam int NIVL = 300;

  ivl_assembler #(.BYTES(4)) dut (.*);

  always #2500 clk = ~clk;

  always @(posedge clk) begin
    if (rst_n && out_valid && out_ready) begin
      checks++;
      n_got++;
      if (sent.size() == 0) begin failures++; $display("extra interval %0d", out_ivl_ps); end
      else begin
        automatic logic [31:0] e = sent.pop_front();
        if (out_ivl_ps != e) begin failures++; $display("interval %0d, expected %0d", out_ivl_ps, e); end
      end
    end
  end

  always @(negedge clk) out_ready <= ($urandom_range(0, 2) != 0);

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < NIVL; k++) begin
      automatic logic [31:0] iv = $urandom;
      sent.push_back(iv);
      for (int j = 0; j < 4; j++) begin
        @(negedge clk);
        in_data = iv[8*j +: 8]; in_valid = 1;
        @(posedge clk);
        while (!in_ready) @(posedge clk);
        @(negedge clk);
        in_valid = 0;
        repeat ($urandom_range(0, 2)) @(negedge clk);
      end
    end
    repeat (20) @(posedge clk);
    checks++;
    if (n_got != NIVL) begin failures++; $display("%0d intervals out of %0d", n_got, NIVL); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
