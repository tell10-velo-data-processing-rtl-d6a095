// Testbench for linker0: two random packet streams with random gaps and
// back-pressure.  Checked: every packet of each side comes out once and in
// its side's order, nothing else comes out, and with both sides busy the
// two alternate.
module tb_linker0;
  import tell10_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic av, ar, bv, br, ov, orr;
  spp_t as_, bs, os;
  linker0 dut (.clk, .rst, .a_valid(av), .a_ready(ar), .a_spp(as_), .b_valid(bv), .b_ready(br), .b_spp(bs),
               .out_valid(ov), .out_ready(orr), .out_spp(os));

  spp_t qa[$], qb[$];
  int na = 0, nb = 0, sent_a = 0, sent_b = 0, alt = 0, both = 0;
  logic last_b;
  localparam int N = 300;

  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  function automatic spp_t rnd(input logic side);
    spp_t p; p = '0; p.bcnt = {side, 11'($urandom)}; p.nbytes = 5'($urandom_range(5, 20));
    p.data = {$urandom, $urandom, $urandom, $urandom, $urandom}; return p;
  endfunction

  initial begin
    av = 0; bv = 0; orr = 0; as_ = '0; bs = '0;
    repeat (3) @(posedge clk); rst = 0;
    while (sent_a < N || sent_b < N) begin
      @(negedge clk);
      if (!av && sent_a < N && $urandom_range(0, 3) != 0) begin av = 1; as_ = rnd(0); end
      if (!bv && sent_b < N && $urandom_range(0, 3) != 0) begin bv = 1; bs = rnd(1); end
      orr = $urandom_range(0, 4) != 0;
      @(posedge clk);
      if (av && ar) begin qa.push_back(as_); sent_a++; end
      if (bv && br) begin qb.push_back(bs); sent_b++; end
      if (ov && orr) begin
        checks++;
        if (av && bv) begin both++; if (os.bcnt[11] != last_b) alt++; end
        last_b = os.bcnt[11];
        if (os.bcnt[11] == 1'b0) begin if (os != as_) failures++; na++; end
        else begin if (os != bs) failures++; nb++; end
      end
      #1;
      if (av && qa.size() != 0 && qa[$] == as_) av = 0;
      if (bv && qb.size() != 0 && qb[$] == bs) bv = 0;
    end
    checks++; if (na != N || nb != N) begin failures++; $display("na=%0d nb=%0d", na, nb); end
    checks++; if (both == 0 || alt * 10 < both * 9) begin failures++; $display("alternation %0d of %0d", alt, both); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
