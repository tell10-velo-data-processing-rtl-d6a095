// Testbench for ddr_fifo_ctrl with a small memory (ADDR_W = 8: 32 packets
// of 8 words) and the SDRAM model with random wait states.  Random words
// go in; the output is stalled for a long stretch so the memory fills up,
// then drained.  Checked: output equals input in order, the buffer reaches
// full, every burst is 8 consecutive addresses, wait states occurred.
module tb_ddr_fifo_ctrl;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  localparam int AW = 8;
  logic in_valid, in_ready, out_valid, out_ready, mw, mr, wq, rv;
  logic [255:0] in_data, out_data, wd, rd; logic [AW-1:0] ma; logic [AW-3:0] level;
  int waits;
  ddr_fifo_ctrl #(.ADDR_W(AW)) dut (.clk, .rst, .in_valid, .in_ready, .in_data, .out_valid, .out_ready, .out_data,
    .mem_addr(ma), .mem_write(mw), .mem_read(mr), .mem_wdata(wd), .mem_waitreq(wq), .mem_rdata(rd), .mem_rvalid(rv), .level);
  ddr3_model #(.ADDR_W(AW)) u_mem (.clk, .rst, .addr(ma), .write(mw), .read(mr), .wdata(wd), .waitreq(wq), .rdata(rd),
    .rvalid(rv), .wait_cycles(waits));

  logic [255:0] q[$];
  int sent = 0, got = 0, full_seen = 0, beat_err = 0;
  localparam int NW = 8 * 80;
  initial begin
    repeat (40000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    in_valid = 0; out_ready = 0; in_data = '0;
    repeat (3) @(posedge clk); rst = 0;
    while (sent < NW) begin
      @(negedge clk);
      in_valid = $urandom_range(0, 3) != 0;
      in_data = {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom};
      out_ready = (sent > 420) && ($urandom_range(0, 3) != 0);
      #1; if (in_valid && in_ready) begin q.push_back(in_data); sent++; end
    end
    @(negedge clk); in_valid = 0; out_ready = 1;
    wait (got == NW);
    repeat (5) @(posedge clk);
    checks++; if (full_seen == 0) begin failures++; $display("memory never full"); end
    checks++; if (waits == 0 || beat_err != 0) begin failures++; $display("waits %0d, burst errors %0d", waits, beat_err); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  logic [AW-1:0] last_a; logic last_cmd; logic last_kind;
  always @(posedge clk) if (!rst) begin
    if (level == (1 << (AW - 3))) full_seen++;
    if ((mw || mr) && !wq) begin
      // inside a burst the address advances by one; bursts start on 8-word boundaries
      if (ma[2:0] == 0) begin end
      else if (!(last_cmd && last_kind == mw && ma == last_a + 1'b1)) beat_err++;
      last_a <= ma; last_cmd <= 1; last_kind <= mw;
    end
    if (out_valid && out_ready) begin
      checks++; got++;
      if (q.size() == 0 || out_data != q[0]) failures++;
      if (q.size() != 0) void'(q.pop_front());
    end
  end
endmodule
