// Testbench for nspp_reconstruct: random nSPP packets (random hit counts
// 0..15) are serialised into a byte stream, cut into 5-byte words and fed
// with random gaps; the output must give every packet whole, with the right
// bunch counter, byte count and bytes, under random back-pressure.
module tb_nspp_reconstruct;
  import tell10_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic in_valid, in_ready, out_valid, out_ready;
  logic [39:0] in_data;
  spp_t out_spp;
  nspp_reconstruct dut (.clk, .rst, .in_valid, .in_ready, .in_data, .out_valid, .out_ready, .out_spp);

  localparam int NPKT = 300;
  spp_t exp_q[$];
  byte unsigned stream[$];
  int got = 0;

  // build one packet: header 28 bits, n hit addresses, n ToTs, 4 pad bits
  function automatic spp_t make_pkt();
    spp_t p; int n; logic [SPP_W-1:0] bits; int pos;
    n = $urandom_range(1, 16);
    bits = '0;
    pos = SPP_W;
    bits[pos-1 -: 12] = 12'($urandom); pos -= 12;
    bits[pos-1 -: 12] = 12'($urandom); pos -= 12;
    bits[pos-1 -: 4]  = 4'(n - 1);     pos -= 4;
    for (int i = 0; i < 2 * n; i++) begin bits[pos-1 -: 4] = 4'($urandom); pos -= 4; end
    p.bcnt = bits[SPP_W-1 -: 12];
    p.nbytes = 5'(4 + n);
    p.data = bits;
    return p;
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  always @(negedge clk) out_ready <= $urandom_range(0, 3) != 0;

  initial begin
    spp_t p;
    in_valid = 0; in_data = 0; out_ready = 0;
    for (int k = 0; k < NPKT; k++) begin
      p = make_pkt();
      exp_q.push_back(p);
      for (int b = 0; b < p.nbytes; b++) stream.push_back(p.data[SPP_W-1-8*b -: 8]);
    end
    while (stream.size() % 5 != 0) stream.push_back(8'h00);  // tail filler
    repeat (3) @(posedge clk); rst = 0;
    while (stream.size() != 0) begin
      @(negedge clk);
      in_valid = $urandom_range(0, 4) != 0;
      in_data = {stream[0], stream[1], stream[2], stream[3], stream[4]};
      #1;
      if (in_valid && in_ready) repeat (5) void'(stream.pop_front());
    end
    @(negedge clk); in_valid = 0;
    repeat (100) @(posedge clk);
    checks++; if (got != NPKT) begin failures++; $display("got %0d of %0d", got, NPKT); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (!rst && out_valid && out_ready) begin
    checks++;
    if (got < NPKT) begin
      if (out_spp != exp_q[0]) begin
        failures++; $display("pkt %0d mismatch: got %h n=%0d exp %h n=%0d", got, out_spp.data, out_spp.nbytes, exp_q[0].data, exp_q[0].nbytes);
      end
      void'(exp_q.pop_front());
    end
    got++;
  end
endmodule
