// tb_word_sync: loads words on a 7.3 ns source clock and checks that each
// arrives unchanged and in order on a 5 ns destination clock, with one
// dst_new pulse per word, within four destination cycles.
`timescale 1ps/1fs
module tb_word_sync;
  logic src_clk = 0, dst_clk = 0, src_rst_n = 0, dst_rst_n = 0, src_load = 0, dst_new;
  logic [15:0] src_data, dst_data;
  int checks = 0, failures = 0;
  logic [15:0] sent[$];
  realtime t_load[$];

  always #3650 src_clk = ~src_clk;
  always #2500 dst_clk = ~dst_clk;

  word_sync #(.W(16), .RESET_VAL(16'hBEEF)) dut (.*);

  always @(posedge dst_clk) if (dst_rst_n && dst_new) begin
    logic [15:0] e;
    realtime t;
    e = sent.pop_front();
    t = t_load.pop_front();
    checks++;
    if (dst_data != e || $realtime - t > 4.0 * 5000.0 + 7300.0) begin
      failures++;
      $display("got %h after %0.0f ps, expected %h", dst_data, $realtime - t, e);
    end
  end

  initial begin
    #10ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge src_clk);
    src_rst_n = 1; dst_rst_n = 1;
    @(posedge dst_clk);
    #1;
    checks++;
    if (dst_data != 16'hBEEF) begin failures++; $display("reset value %h", dst_data); end
    for (int k = 0; k < 100; k++) begin
      @(negedge src_clk);
      src_data = 16'($urandom);
      src_load = 1;
      sent.push_back(src_data);
      t_load.push_back($realtime);
      @(negedge src_clk);
      src_load = 0;
      repeat (3 + $urandom % 5) @(negedge src_clk);
    end
    repeat (10) @(posedge dst_clk);
    checks++;
    if (sent.size() != 0) begin failures++; $display("%0d words lost", sent.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
