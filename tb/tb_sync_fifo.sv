// Testbench for sync_fifo: random pushes and pops against a queue model;
// checks data order, count, and that full and empty are reached and respected.
module tb_sync_fifo;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic in_valid, in_ready, out_valid, out_ready;
  logic [15:0] in_data, out_data; logic [4:0] count;
  sync_fifo #(.W(16), .DEPTH(16)) dut (.clk, .rst, .in_valid, .in_ready, .in_data, .out_valid, .out_ready, .out_data, .count);
  logic [15:0] q[$];
  int fulls = 0, empties = 0;
  initial begin
    repeat (10000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    in_valid = 0; out_ready = 0; in_data = 0;
    repeat (3) @(posedge clk); rst = 0;
    for (int t = 0; t < 4000; t++) begin
      @(negedge clk);
      // phases: mostly push, then mostly pop
      in_valid = $urandom_range(0, 9) < ((t / 500) % 2 ? 3 : 8);
      out_ready = $urandom_range(0, 9) < ((t / 500) % 2 ? 8 : 3);
      in_data = 16'($urandom);
      #1;
      checks++;
      if (count != 5'(q.size()) || in_ready != (q.size() < 16) || out_valid != (q.size() > 0)) failures++;
      if (q.size() == 16) fulls++;
      if (q.size() == 0) empties++;
      if (out_valid && out_ready) begin checks++; if (out_data != q[0]) failures++; end
      @(posedge clk);
      if (out_valid && out_ready) void'(q.pop_front());
      if (in_valid && in_ready) q.push_back(in_data);
    end
    checks++; if (fulls == 0 || empties == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
