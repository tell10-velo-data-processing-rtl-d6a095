// Testbench for nspp_unpack: events of 0..3 random nSPP packets are written
// as time-reorder words (1..3 words per packet, empty events as one flagged
// word).  The expected hits are built from the packet fields: {4'b0, 3'b0,
// link id, super-pixel address, hit address, ToT}, two per 64-bit word with
// byte count 8 (4 for a last odd hit), end of event and overflow on the
// event's last word; an empty event gives one word with byte count 0.
module tb_nspp_unpack;
  import tell10_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic in_valid, in_ready, out_valid, out_ready, out_eoe, out_ovf;
  tr_word_t in_word;
  logic [63:0] out_data; logic [3:0] out_nbytes;
  localparam logic [4:0] LID = 5'd19;
  nspp_unpack dut (.clk, .rst, .link_id(LID), .in_valid, .in_ready, .in_word, .out_valid, .out_ready,
                   .out_data, .out_nbytes, .out_eoe, .out_ovf);

  typedef struct packed { logic [63:0] d; logic [3:0] n; logic e; logic o; } ow_t;
  tr_word_t inq[$];
  ow_t expq[$];
  int nodd = 0, nempty = 0;

  initial begin
    repeat (30000) @(posedge clk);
    failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  always @(negedge clk) out_ready <= $urandom_range(0, 3) != 0;

  initial begin
    int np, n, nbytes, nw;
    logic [11:0] sp; logic [3:0] ad [16]; logic [3:0] tt [16];
    logic [191:0] bits; logic ovf;
    logic [31:0] hits[$];
    tr_word_t w; ow_t o;
    for (int e = 0; e < 200; e++) begin
      np = $urandom_range(0, 3); ovf = ($urandom_range(0, 7) == 0);
      hits.delete();
      if (np == 0) begin
        w = '0; w.eoe = 1; w.empty = 1; w.ovf = ovf; inq.push_back(w);
        o.d = '0; o.n = 0; o.e = 1; o.o = ovf; expq.push_back(o); nempty++;
        continue;
      end
      for (int k = 0; k < np; k++) begin
        n = $urandom_range(1, 16); sp = 12'($urandom);
        bits = '0;
        bits[191 -: 28] = {12'($urandom), sp, 4'(n - 1)};
        for (int i = 0; i < n; i++) begin
          ad[i] = 4'($urandom); tt[i] = 4'($urandom);
          bits[191 - 28 - 4 * i -: 4] = ad[i];
          bits[191 - 28 - 4 * n - 4 * i -: 4] = tt[i];
          hits.push_back({4'b0, 3'b0, LID, sp, ad[i], tt[i]});
        end
        nbytes = 4 + n; nw = (nbytes + 7) / 8;
        for (int j = 0; j < nw; j++) begin
          w = '0; w.data = bits[191 - 64 * j -: 64]; w.eospp = (j == nw - 1);
          w.eoe = (k == np - 1) && (j == nw - 1); w.ovf = w.eoe && ovf;
          inq.push_back(w);
        end
        // hits of one packet leave two by two
        for (int i = 0; i < n; i += 2) begin
          o.d = {hits[0], (i + 1 < n) ? hits[1] : 32'h0};
          o.n = (i + 1 < n) ? 4'd8 : 4'd4;
          if (i + 1 >= n) nodd++;
          void'(hits.pop_front()); if (i + 1 < n) void'(hits.pop_front());
          o.e = (k == np - 1) && (i + 2 >= n); o.o = o.e && ovf;
          expq.push_back(o);
        end
      end
    end
    in_valid = 0; in_word = '0;
    repeat (3) @(posedge clk); rst = 0;
    while (inq.size() != 0) begin
      @(negedge clk);
      in_valid = $urandom_range(0, 3) != 0; in_word = inq[0];
      #1; if (in_valid && in_ready) void'(inq.pop_front());
    end
    @(negedge clk); in_valid = 0;
    repeat (200) @(posedge clk);
    checks++; if (expq.size() != 0) begin failures++; $display("%0d words missing", expq.size()); end
    checks++; if (nodd == 0 || nempty == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (!rst && out_valid && out_ready) begin
    checks++;
    if (expq.size() == 0) begin failures++; $display("extra"); end
    else begin
      if ({out_data, out_nbytes, out_eoe, out_ovf} != expq[0]) begin
        failures++; if (failures < 5) $display("got %h %0d %b%b exp %h %0d %b%b", out_data, out_nbytes, out_eoe, out_ovf, expq[0].d, expq[0].n, expq[0].e, expq[0].o);
      end
      void'(expq.pop_front());
    end
  end
endmodule
