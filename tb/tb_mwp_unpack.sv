// Testbench for mwp_unpack: MWP packets are built here from random stream
// words (info words, XOR checksums, filler slots in some packets), a few
// header and data checksums are corrupted on purpose.  Checked: the stream
// words come back with their byte counts and flags, filler slots vanish,
// the event ID counts end-of-event flags from 0, and both error counters
// equal the number of corruptions.
module tb_mwp_unpack;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic in_valid, in_ready, out_valid, out_ready, out_eoe, out_ovf;
  logic [255:0] in_data, out_data; logic [5:0] out_nbytes; logic [31:0] out_evid; logic [15:0] hdr_err, data_err;
  mwp_unpack dut (.clk, .rst, .in_valid, .in_ready, .in_data, .out_valid, .out_ready, .out_data, .out_nbytes,
                  .out_eoe, .out_ovf, .out_evid, .hdr_err, .data_err);
  typedef struct packed { logic [255:0] d; logic [5:0] n; logic e; logic o; logic [31:0] id; } o_t;
  logic [255:0] inq[$]; o_t expq[$];
  int n_hbad = 0, n_dbad = 0;
  function automatic logic [15:0] x16(input logic [255:0] w);
    logic [15:0] c = 0; for (int i = 0; i < 16; i++) c ^= w[16 * i +: 16]; return c;
  endfunction
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    logic [255:0] h, dw[7]; o_t o; int evid; logic e, ov; logic [5:0] n; int nfill;
    evid = 0;
    for (int p = 0; p < 120; p++) begin
      h = '0; nfill = (p % 10 == 9) ? $urandom_range(1, 6) : 0;
      for (int s = 0; s < 7; s++) begin
        if (s >= 7 - nfill) begin dw[s] = '0; continue; end
        for (int k = 0; k < 8; k++) dw[s][32 * k +: 32] = $urandom;
        e = $urandom_range(0, 2) == 0; n = (e && $urandom_range(0, 3) == 0) ? 6'd0 : 6'($urandom_range(1, 32));
        ov = e && ($urandom_range(0, 4) == 0);
        h[32 * s +: 32] = {2'b0, n, 5'b0, ov, e && n == 0, e, x16(dw[s])};
        o.d = dw[s]; o.n = n; o.e = e; o.o = ov; o.id = evid; expq.push_back(o);
        if (e) evid++;
      end
      h[239:224] = x16({32'b0, h[223:0]});
      if (p % 13 == 6) begin h[239:224] ^= 16'h0100; n_hbad++; end
      inq.push_back(h);
      for (int s = 0; s < 7; s++) begin
        if (p % 17 == 3 && s == 2) begin dw[s][5] ^= 1'b1; n_dbad++; expq[expq.size() - 7 + nfill + 2].d = dw[s]; end
        inq.push_back(dw[s]);
      end
    end
  end
  always @(negedge clk) out_ready <= $urandom_range(0, 3) != 0;
  initial begin
    in_valid = 0; in_data = '0;
    repeat (3) @(posedge clk); rst = 0;
    while (inq.size() != 0) begin
      @(negedge clk); in_valid = $urandom_range(0, 3) != 0; in_data = inq[0];
      #1; if (in_valid && in_ready) void'(inq.pop_front());
    end
    @(negedge clk); in_valid = 0;
    repeat (30) @(posedge clk);
    checks++; if (expq.size() != 0) begin failures++; $display("%0d missing", expq.size()); end
    checks++; if (int'(hdr_err) != n_hbad || int'(data_err) != n_dbad) begin failures++; $display("errs %0d/%0d exp %0d/%0d", hdr_err, data_err, n_hbad, n_dbad); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  always @(posedge clk) if (!rst && out_valid && out_ready) begin
    checks++;
    if (expq.size() == 0) failures++;
    else begin
      if ({out_data, out_nbytes, out_eoe, out_ovf, out_evid} != expq[0]) begin failures++; if (failures < 4) $display("mismatch id %0d exp %0d", out_evid, expq[0].id); end
      void'(expq.pop_front());
    end
  end
endmodule
