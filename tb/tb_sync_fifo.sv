// tb_sync_fifo: random pushes and pops against a queue model; checks order,
// the full flag at DEPTH entries, the count, and simultaneous push and pop.
`timescale 1ps/1fs
module tb_sync_fifo;
  localparam int W = 12, D = 8;
  logic clk = 0, rst_n = 0;
  logic [W-1:0] in_data, out_data;
  logic in_valid = 0, in_ready, out_valid, out_ready = 0;
  logic [3:0] count;
  int checks = 0, failures = 0, fulls = 0;
  logic [W-1:0] model[$];

  always #2500 clk = ~clk;
  sync_fifo #(.WIDTH(W), .DEPTH(D)) dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 4000; cyc++) begin
      // bias the traffic so the FIFO goes both full and empty
      in_valid  = ($urandom % 100) < ((cyc / 500) % 2 ? 80 : 30);
      out_ready = ($urandom % 100) < ((cyc / 500) % 2 ? 30 : 80);
      in_data   = W'($urandom);
      #1;
      checks++;
      if (32'(count) != model.size() || in_ready != (model.size() < D) || out_valid != (model.size() > 0)) begin
        failures++;
        $display("flags wrong: count=%0d model=%0d", count, model.size());
      end
      if (model.size() == D) fulls++;
      if (out_valid) begin
        checks++;
        if (out_data != model[0]) begin failures++; $display("data %h expected %h", out_data, model[0]); end
      end
      @(posedge clk);
      if (out_valid && out_ready) void'(model.pop_front());
      if (in_valid && in_ready) model.push_back(in_data);
      #1;
    end
    checks++;
    if (fulls == 0) begin failures++; $display("never full"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
