// Testbench for gbt_splitter: random frames with random per-half data-valid
// bits and random back-pressure on each half; every half word must come out
// on its own port, in order, exactly once.
module tb_gbt_splitter;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [1:0]  in_dv;  logic in_ready;  logic [79:0] in_frame;
  logic hv, hr, lv, lr;  logic [39:0] hd, ld;
  gbt_splitter dut (.clk, .rst, .in_dv, .in_ready, .in_frame,
    .hi_valid(hv), .hi_ready(hr), .hi_data(hd), .lo_valid(lv), .lo_ready(lr), .lo_data(ld));

  logic [39:0] qh[$], ql[$];
  int sent = 0, n_hi = 0, n_lo = 0;
  localparam int N = 400;

  initial begin
    repeat (2000) @(posedge clk);
    failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  always @(negedge clk) begin
    hr <= $urandom_range(0, 3) != 0;
    lr <= $urandom_range(0, 2) != 0;
  end

  initial begin
    in_dv = 0; in_frame = 0; hr = 0; lr = 0;
    repeat (3) @(posedge clk); rst = 0;
    while (sent < N) begin
      @(negedge clk);
      in_dv = 2'($urandom_range(0, 3));
      in_frame = {$urandom, $urandom, 16'($urandom)};
      #1;
      if (in_dv != 0 && in_ready) begin
        if (in_dv[1]) qh.push_back(in_frame[79:40]);
        if (in_dv[0]) ql.push_back(in_frame[39:0]);
        sent++;
      end
    end
    @(negedge clk); in_dv = 0;
    repeat (200) @(posedge clk);
    checks++; if (qh.size() != 0 || ql.size() != 0) begin failures++; $display("left over %0d %0d", qh.size(), ql.size()); end
    checks++; if (n_hi == 0 || n_lo == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // negedge-driven inputs, sampled at posedge
  always @(posedge clk) if (!rst) begin
    if (hv && hr) begin
      checks++; n_hi++;
      if (qh.size() == 0 || hd != qh[0]) begin failures++; $display("hi mismatch %h", hd); end
      if (qh.size() != 0) void'(qh.pop_front());
    end
    if (lv && lr) begin
      checks++; n_lo++;
      if (ql.size() == 0 || ld != ql[0]) begin failures++; $display("lo mismatch %h", ld); end
      if (ql.size() != 0) void'(ql.pop_front());
    end
  end
endmodule
