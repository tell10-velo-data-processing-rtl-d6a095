// Testbench for time_reorder (small buffer: 32 events, margin 4).  Events
// 0..NEV-1 get 0..4 packets of 1..3 words; packets are sent out of time
// order (each delayed by a random 0..JIT bunch crossings).  A reference
// model keeps, per event, the words of the packets that fit in the 8-word
// slot, in arrival order.  Checked: every word (data, end of packet, end of
// event, empty, overflow) in bunch-counter order, the drop counter, the
// 3 + words write timing per packet, and that a packet arriving after its
// event was read is dropped.
module tb_time_reorder;
  import tell10_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam int EVD = 32, MARG = 4, EVW = 8, NEV = 150, JIT = 12;
  logic in_valid, in_ready, flush, out_valid, out_ready;
  spp_t in_spp;  tr_word_t out_word;  logic [15:0] drop_cnt;
  time_reorder #(.EV_DEPTH(EVD), .EV_WORDS(EVW), .MARGIN(MARG)) dut (
    .clk, .rst, .in_valid, .in_ready, .in_spp, .flush, .out_valid, .out_ready, .out_word, .drop_cnt);

  typedef struct { int t; spp_t p; } arr_t;
  arr_t arr[$];
  int ev_words[NEV];
  logic ev_ovf[NEV];
  tr_word_t exp_ev[NEV][$];
  tr_word_t exp_q[$];
  int drops = 0, ooo = 0, ovf_events = 0, empty_events = 0;

  initial begin
    repeat (60000) @(posedge clk);
    failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  always @(negedge clk) out_ready <= $urandom_range(0, 4) != 0;

  initial begin
    int np, nb, nw, last_b;
    spp_t p; tr_word_t w; arr_t a;
    logic [191:0] wide;
    in_valid = 0; in_spp = '0; flush = 0; out_ready = 0;
    for (int e = 0; e < NEV; e++) begin
      np = (e % 17 == 5) ? 6 : $urandom_range(0, 3);
      for (int k = 0; k < np; k++) begin
        nb = (e % 17 == 5) ? 20 : $urandom_range(5, 20);
        p.bcnt = 12'(e); p.nbytes = 5'(nb);
        p.data = {$urandom, $urandom, $urandom, $urandom, $urandom};
        p.data = p.data & ~({SPP_W{1'b1}} >> (8 * nb));
        a.t = e * 4 + $urandom_range(0, JIT * 4); a.p = p;
        arr.push_back(a);
      end
    end
    arr.sort() with (item.t);
    // reference: per event, in arrival order
    last_b = 0;
    foreach (arr[i]) begin
      p = arr[i].p; nw = (p.nbytes + 7) / 8;
      if (int'(p.bcnt) < last_b) ooo++;
      last_b = int'(p.bcnt);
      if (ev_words[p.bcnt] + nw <= EVW) begin
        wide = {p.data, 32'h0};
        for (int k = 0; k < nw; k++) begin
          w = '0; w.data = wide[191 - 64 * k -: 64]; w.eospp = (k == nw - 1);
          exp_ev[p.bcnt].push_back(w);
        end
        ev_words[p.bcnt] += nw;
      end else begin
        ev_ovf[p.bcnt] = 1; drops++;
      end
    end
    for (int e = 0; e < NEV; e++) begin
      if (exp_ev[e].size() == 0) begin
        w = '0; w.eoe = 1; w.empty = 1; w.ovf = ev_ovf[e]; exp_q.push_back(w); empty_events++;
      end else begin
        exp_ev[e][exp_ev[e].size() - 1].eoe = 1;
        exp_ev[e][exp_ev[e].size() - 1].ovf = ev_ovf[e];
        foreach (exp_ev[e][k]) exp_q.push_back(exp_ev[e][k]);
      end
      if (ev_ovf[e]) ovf_events++;
    end
    repeat (3) @(posedge clk); rst = 0;
    foreach (arr[i]) begin
      int t0, fits;
      @(negedge clk);
      in_valid = 1; in_spp = arr[i].p;
      #1; while (!in_ready) begin @(negedge clk); #1; end
      @(posedge clk); #1;
      in_valid = 0;
      // write timing: ready again after 3 + words cycles
      t0 = 0;
      while (!in_ready) begin @(posedge clk); #1; t0++; end
      checks++;
      if (t0 + 1 < 4 || t0 + 1 > 6) begin failures++; $display("write took %0d cycles", t0 + 1); end
    end
    @(negedge clk); flush = 1;
    repeat (1500) @(posedge clk);
    // a late packet is dropped
    @(negedge clk); in_valid = 1; in_spp.bcnt = 12'(3); in_spp.nbytes = 5'd5;
    @(negedge clk); in_valid = 0;
    repeat (10) @(posedge clk);
    checks++; if (int'(drop_cnt) != drops + 1) begin failures++; $display("drop_cnt %0d exp %0d", drop_cnt, drops + 1); end
    checks++; if (exp_q.size() != 0) begin failures++; $display("%0d words missing", exp_q.size()); end
    checks++; if (ooo == 0 || ovf_events == 0 || empty_events == 0) begin failures++; $display("coverage ooo=%0d ovf=%0d empty=%0d", ooo, ovf_events, empty_events); end
    $display("out-of-order packets %0d, overflow events %0d, empty events %0d", ooo, ovf_events, empty_events);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (!rst && out_valid && out_ready) begin
    checks++;
    if (exp_q.size() == 0) begin failures++; $display("extra word"); end
    else begin
      if (out_word != exp_q[0]) begin
        failures++;
        if (failures < 10) $display("word mismatch got %h/%b%b%b%b exp %h/%b%b%b%b", out_word.data, out_word.eospp, out_word.eoe, out_word.empty, out_word.ovf,
                                    exp_q[0].data, exp_q[0].eospp, exp_q[0].eoe, exp_q[0].empty, exp_q[0].ovf);
      end
      void'(exp_q.pop_front());
    end
  end
endmodule
