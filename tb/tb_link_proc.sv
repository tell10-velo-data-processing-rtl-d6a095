// Testbench for link_proc, one GBT link from frames to hits, with a small
// reorder buffer (32 events, margin 4).  The shared generator makes 150
// bunch crossings of nSPP packets on both front-end halves, some out of
// time order, some crossings empty, some overflowing the event slot, and one
// late packet.  Frames are offered at random, output back-pressure is
// random; flush empties the buffer at the end.  Every event must hold
// exactly the expected hits (compared as sets), carry the link id, flag
// overflow where packets were lost, and drop_cnt must count every dropped
// packet.
module tb_link_proc;
  import tell10_pkg::*;
  `include "tell10_stim.svh"
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  localparam int EVD = 32, MARG = 4, NB = 150, LID = 13;
  logic [1:0] dv; logic gr, flush, ov, orr, oe, oo, ea;
  logic [79:0] frame; logic [63:0] od; logic [3:0] on; logic [15:0] drops;
  link_proc #(.LINK_ID(LID), .EV_DEPTH(EVD), .MARGIN(MARG)) dut (.clk, .rst, .gbt_dv(dv), .gbt_ready(gr),
    .gbt_frame(frame), .flush, .out_valid(ov), .out_ready(orr), .out_data(od), .out_nbytes(on),
    .out_eoe(oe), .out_ovf(oo), .ev_avail(ea), .drop_cnt(drops));
  link_gen g;
  int ev = 0, n_ovf_seen = 0, n_empty_seen = 0;
  int unsigned cur [$];
  initial begin
    repeat (60000) @(posedge clk);
    failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  always @(negedge clk) orr <= $urandom_range(0, 4) != 0;
  initial begin
    bit sh, sl;
    g = new(LID, NB, 3, EVD - MARG);
    g.build(70);
    dv = 0; frame = '0; flush = 0;
    repeat (3) @(posedge clk); rst = 0;
    while (!g.done()) begin
      @(negedge clk);
      sh = g.can_send(0) && $urandom_range(0, 3) != 0;
      sl = g.can_send(1) && $urandom_range(0, 3) != 0;
      dv = {sh, sl};
      frame = {sh ? {g.q[0][0], g.q[0][1], g.q[0][2], g.q[0][3], g.q[0][4]} : 40'h0,
               sl ? {g.q[1][0], g.q[1][1], g.q[1][2], g.q[1][3], g.q[1][4]} : 40'h0};
      #1;
      if (gr && sh) void'(g.take(0));
      if (gr && sl) void'(g.take(1));
    end
    @(negedge clk); dv = 0;
    repeat (300) @(posedge clk);
    flush = 1;
    for (int t = 0; t < 20000 && ev <= NB + 41; t++) @(posedge clk);
    @(negedge clk); flush = 0;
    repeat (100) @(posedge clk);
    checks++;
    if (ev <= NB + 40) begin failures++; $display("only %0d events", ev); end
    checks++;
    if (int'(drops) != g.n_ovf_drop + g.n_late_drop) begin
      failures++; $display("drop_cnt %0d exp %0d + %0d", drops, g.n_ovf_drop, g.n_late_drop);
    end
    checks++;
    if (n_ovf_seen != g.ovf.num()) begin failures++; $display("ovf events %0d exp %0d", n_ovf_seen, g.ovf.num()); end
    $display("packets %0d out-of-order %0d overflow drops %0d late %0d empty %0d/%0d",
             g.n_pkt, g.n_ooo, g.n_ovf_drop, g.n_late_drop, g.n_empty, n_empty_seen);
    if (g.n_ooo == 0 || g.n_ovf_drop == 0 || g.n_empty == 0) begin failures++; $display("a mechanism did not occur"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  always @(posedge clk) if (!rst && ov && orr) begin
    if (on == 4'd8) begin cur.push_back(od[63:32]); cur.push_back(od[31:0]); end
    else if (on == 4'd4) cur.push_back(od[63:32]);
    else if (on != 4'd0) begin failures++; $display("byte count %0d", on); end
    if (oe) begin
      int unsigned e [$];
      checks++;
      e.delete();
      if (g.hits.exists(ev)) e = g.hits[ev];
      cur.sort(); e.sort();
      if (cur != e) begin
        failures++;
        if (failures < 30) $display("event %0d: %0d hits, expected %0d", ev, cur.size(), e.size());
      end
      checks++;
      if (oo != g.ovf.exists(ev)) begin failures++; $display("event %0d ovf %b", ev, oo); end
      if (oo) n_ovf_seen++;
      if (cur.size() == 0) n_empty_seen++;
      cur.delete();
      ev++;
    end
  end
endmodule
