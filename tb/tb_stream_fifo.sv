// Testbench for stream_fifo: random stream words (random end-of-event
// flags) pass through in order; the complete-event indication must equal
// "the model queue holds a word with end-of-event set" at every cycle.
module tb_stream_fifo;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic in_valid, in_ready, in_eoe, in_ovf, out_valid, out_ready, out_eoe, out_ovf, ev_avail;
  logic [63:0] in_data, out_data; logic [3:0] in_nbytes, out_nbytes; logic [3:0] count;
  stream_fifo #(.W(64), .DEPTH(8)) dut (.clk, .rst, .in_valid, .in_ready, .in_data, .in_nbytes, .in_eoe, .in_ovf,
    .out_valid, .out_ready, .out_data, .out_nbytes, .out_eoe, .out_ovf, .ev_avail, .count);
  typedef struct packed { logic [63:0] d; logic [3:0] n; logic e; logic o; } w_t;
  w_t q[$];
  int avail_seen = 0, not_avail_nonempty = 0;
  initial begin
    repeat (10000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    logic has;
    in_valid = 0; out_ready = 0;
    repeat (3) @(posedge clk); rst = 0;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      in_valid = $urandom_range(0, 9) < 6; out_ready = $urandom_range(0, 9) < 5;
      in_data = {$urandom, $urandom}; in_nbytes = 4'($urandom_range(0, 8));
      in_eoe = $urandom_range(0, 4) == 0; in_ovf = $urandom_range(0, 1);
      #1;
      has = 0; foreach (q[i]) if (q[i].e) has = 1;
      checks++; if (ev_avail != has) failures++;
      if (has) avail_seen++;
      if (!has && q.size() != 0) not_avail_nonempty++;
      if (out_valid && out_ready) begin
        checks++; if ({out_data, out_nbytes, out_eoe, out_ovf} != q[0]) failures++;
      end
      @(posedge clk);
      if (out_valid && out_ready) void'(q.pop_front());
      if (in_valid && in_ready) q.push_back({in_data, in_nbytes, in_eoe, in_ovf});
    end
    checks++; if (avail_seen == 0 || not_avail_nonempty == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
