// Testbench for half_stream with small parameters: 12 links, reorder
// buffer of 32 events (margin 4), an SDRAM of 256 words, MEP factor 4.
// Each link gets its own generated nSPP traffic (out-of-order packets,
// empty crossings, overflowing crossings, one late packet on two links);
// the SDRAM model adds latency and wait states; level-0 decisions keep
// about three events in four, with some missing and some stale ones; MEP
// output back-pressure is random.  At the end flush drains the reorder
// buffers and closes the last MWP.  The MEP stream is checked byte by byte
// against the reference model (see mep_check.svh), plus drop counters,
// checksum error counters and trigger counters.
module tb_half_stream;
  import tell10_pkg::*;
  `include "tell10_stim.svh"
  `include "mep_check.svh"
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  localparam int EVD = 32, MARG = 4, NB = 150, AW = 8, F = 4;
  logic [11:0][1:0] dv; logic [11:0] gr; logic [11:0][79:0] frame; logic flush;
  logic [AW-1:0] ma; logic mw, mr, mwait, mrv; logic [255:0] mwd, mrd;
  logic dvld, drdy, dkeep; logic [31:0] devid;
  logic mv, mrdy, msop, meop; logic [255:0] md;
  logic [11:0][15:0] drops; logic [15:0] herr, derr, kcnt, rcnt, scnt, ncnt;
  int wait_cycles;
  half_stream #(.LINK_BASE(0), .EV_DEPTH(EVD), .MARGIN(MARG), .ADDR_W(AW), .MEP_FACTOR(F)) dut (
    .clk, .rst, .gbt_dv(dv), .gbt_ready(gr), .gbt_frame(frame), .flush,
    .mem_addr(ma), .mem_write(mw), .mem_read(mr), .mem_wdata(mwd), .mem_waitreq(mwait),
    .mem_rdata(mrd), .mem_rvalid(mrv), .dec_valid(dvld), .dec_ready(drdy), .dec_evid(devid),
    .dec_keep(dkeep), .mep_valid(mv), .mep_ready(mrdy), .mep_data(md), .mep_sop(msop), .mep_eop(meop),
    .drop_cnt(drops), .hdr_err(herr), .data_err(derr), .kept_cnt(kcnt), .rej_cnt(rcnt),
    .stale_cnt(scnt), .nodec_cnt(ncnt));
  ddr3_model #(.ADDR_W(AW), .LAT(6), .WAIT_PCT(20)) u_mem (.clk, .rst, .addr(ma), .write(mw), .read(mr),
    .wdata(mwd), .waitreq(mwait), .rdata(mrd), .rvalid(mrv), .wait_cycles);

  link_gen g [12];
  half_check hc;
  int n_fill = 0, n_bp = 0, drop_exp = 0;
  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  always @(negedge clk) mrdy <= $urandom_range(0, 3) != 0;
  // filler slots: info words of zero in the MWP headers written to the SDRAM
  always @(posedge clk) if (!rst && mw && !mwait && ma[2:0] == 3'd0)
    for (int k = 0; k < 7; k++) if (mwd[32*k +: 32] == 32'd0) n_fill++;
  always @(posedge clk) if (!rst && mv && !mrdy) n_bp++;
  always @(posedge clk) if (!rst && mv && mrdy) hc.word(md, msop, meop);

  initial begin
    dvld = 0; devid = '0; dkeep = 0;
    @(negedge rst);
    while (hc.dec.size() != 0) begin
      @(negedge clk); dvld = $urandom_range(0, 1); {devid, dkeep} = hc.dec[0];
      #1; if (dvld && drdy) void'(hc.dec.pop_front());
    end
    @(negedge clk); dvld = 0;
  end

  initial begin
    bit alldone; bit [1:0] s;
    hc = new(F, NB, 0);
    for (int i = 0; i < 12; i++) begin
      g[i] = new(i, NB, 3, EVD - MARG);
      g[i].build((i == 2 || i == 9) ? 40 + i : -1);
      hc.add_link(g[i]);
      drop_exp += g[i].n_ovf_drop + g[i].n_late_drop;
    end
    hc.make_decisions(NB + 200);
    dv = '0; frame = '0; flush = 0;
    repeat (3) @(posedge clk); rst = 0;
    do begin
      @(negedge clk);
      alldone = 1;
      for (int i = 0; i < 12; i++) begin
        s[1] = g[i].can_send(0) && $urandom_range(0, 3) != 0;
        s[0] = g[i].can_send(1) && $urandom_range(0, 3) != 0;
        dv[i] = s;
        frame[i] = {s[1] ? {g[i].q[0][0], g[i].q[0][1], g[i].q[0][2], g[i].q[0][3], g[i].q[0][4]} : 40'h0,
                    s[0] ? {g[i].q[1][0], g[i].q[1][1], g[i].q[1][2], g[i].q[1][3], g[i].q[1][4]} : 40'h0};
      end
      #1;
      for (int i = 0; i < 12; i++) begin
        if (gr[i] && dv[i][1]) void'(g[i].take(0));
        if (gr[i] && dv[i][0]) void'(g[i].take(1));
        if (!g[i].done()) alldone = 0;
      end
    end while (!alldone);
    @(negedge clk); dv = '0;
    repeat (300) @(posedge clk);
    flush = 1;
    for (int t = 0; t < 150000 && !hc.done(); t++) @(posedge clk);
    $display("flush ended at %0t, l0 input event %0d valid %b, mwp unpack valid %b", $time, dut.ui, dut.uv, dut.rv);
    @(negedge clk); flush = 0;
    repeat (50) @(posedge clk);
    checks++; if (!hc.done()) begin failures++; $display("only %0d of %0d events out", hc.k_idx, hc.k_need); end
    checks++;
    begin
      int d;
      d = 0;
      for (int i = 0; i < 12; i++) d += int'(drops[i]);
      if (d != drop_exp) begin failures++; $display("drops %0d expected %0d", d, drop_exp); end
    end
    checks++; if (herr != 0 || derr != 0) begin failures++; $display("checksum errors %0d %0d", herr, derr); end
    checks++;
    if (int'(rcnt) < hc.n_rej || int'(scnt) < hc.n_stale || int'(ncnt) < hc.n_nodec || int'(kcnt) < hc.n_ev) begin
      failures++; $display("trigger counters %0d %0d %0d %0d", kcnt, rcnt, scnt, ncnt);
    end
    $display("MEPs %0d events %0d (empty %0d) padding bytes %0d rejected %0d stale %0d no-decision %0d",
             hc.n_mep, hc.n_ev, hc.n_empty, hc.n_pad, rcnt, scnt, ncnt);
    $display("dropped packets %0d, filler slots %0d, SDRAM wait cycles %0d, MEP back-pressure cycles %0d",
             drop_exp, n_fill, wait_cycles, n_bp);
    checks += hc.checks; failures += hc.failures;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
