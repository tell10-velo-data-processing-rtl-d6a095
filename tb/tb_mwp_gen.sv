// Testbench for mwp_gen: random 256-bit stream words (byte counts 0..32,
// end-of-event and overflow flags), then flush.  The expected packets are
// built independently: per data word an info word {byte count, flags {5'b0,
// overflow, empty, end of event}, XOR of the 16-bit halves}, seven per
// header with their XOR checksum in bits 239:224, filler slots zero.  A
// phase with continuous input and output checks the rate of 7 data words
// per 8 cycles.
module tb_mwp_gen;
  import tell10_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic in_valid, in_ready, in_eoe, in_ovf, flush, out_valid, out_ready;
  logic [255:0] in_data, out_data; logic [5:0] in_nbytes;
  mwp_gen dut (.clk, .rst, .in_valid, .in_ready, .in_data, .in_nbytes, .in_eoe, .in_ovf, .flush,
               .out_valid, .out_ready, .out_data);

  typedef struct packed { logic [255:0] d; logic [5:0] n; logic e; logic o; } w_t;
  w_t src[$]; logic [255:0] expq[$];
  localparam int NW = 703;   // not a multiple of 7: the last packet needs filler

  function automatic logic [15:0] x16(input logic [255:0] w);
    logic [15:0] c = 0; for (int i = 0; i < 16; i++) c ^= w[16 * i +: 16]; return c;
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    w_t w; logic [255:0] h, dw[7]; int s;
    s = 0; h = '0;
    for (int i = 0; i < (NW + 6) / 7 * 7; i++) begin
      if (i < NW) begin
        for (int k = 0; k < 8; k++) w.d[32 * k +: 32] = $urandom;
        w.e = $urandom_range(0, 2) == 0; w.n = (w.e && $urandom_range(0, 3) == 0) ? 6'd0 : 6'($urandom_range(1, 32));
        w.o = $urandom_range(0, 5) == 0;
        src.push_back(w);
        h[32 * s +: 32] = {2'b0, w.n, 5'b0, w.e && w.o, w.e && w.n == 0, w.e, x16(w.d)};
        dw[s] = w.d;
      end else begin
        h[32 * s +: 32] = '0; dw[s] = '0;
      end
      s++;
      if (s == 7) begin
        h[239:224] = x16({32'b0, h[223:0]}); h[255:240] = '0;
        expq.push_back(h); for (int k = 0; k < 7; k++) expq.push_back(dw[k]);
        s = 0; h = '0;
      end
    end
  end
  int t_start, t_end;
  initial begin
    in_valid = 0; flush = 0; out_ready = 0; {in_data, in_nbytes, in_eoe, in_ovf} = '0;
    repeat (3) @(posedge clk); rst = 0;
    // phase 1: continuous flow for 350 words
    @(negedge clk); out_ready = 1; t_start = $time;
    while (src.size() > NW - 350) begin
      in_valid = 1; {in_data, in_nbytes, in_eoe, in_ovf} = src[0];
      #1; if (in_ready) void'(src.pop_front());
      @(negedge clk);
    end
    t_end = $time;
    checks++;
    if ((t_end - t_start) / 10 > 350 * 8 / 7 + 4) begin failures++; $display("rate: %0d cycles for 350 words", (t_end - t_start) / 10); end
    // phase 2: random gaps and back-pressure
    fork
      forever begin @(negedge clk); out_ready = $urandom_range(0, 3) != 0; end
    join_none
    while (src.size() != 0) begin
      in_valid = $urandom_range(0, 3) != 0; {in_data, in_nbytes, in_eoe, in_ovf} = src[0];
      #1; if (in_valid && in_ready) void'(src.pop_front());
      @(negedge clk);
    end
    in_valid = 0;
    repeat (20) @(posedge clk);
    @(negedge clk); flush = 1;
    repeat (60) @(posedge clk);
    checks++; if (expq.size() != 0) begin failures++; $display("%0d words missing", expq.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  always @(posedge clk) if (!rst && out_valid && out_ready) begin
    checks++;
    if (expq.size() == 0) failures++;
    else begin
      if (out_data != expq[0]) begin failures++; if (failures < 4) $display("got %h\nexp %h", out_data, expq[0]); end
      void'(expq.pop_front());
    end
  end
endmodule
