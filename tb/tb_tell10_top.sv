// End-to-end testbench of tell10_top at its default parameters (512-event
// reorder buffers with a margin of 16, 2^27-word SDRAMs, 4096 decisions, MEP
// factor 8): 24 GBT links of generated nSPP traffic, 560 checked bunch
// crossings, two SDRAM models with latency and wait states, level-0
// decisions per half and random back-pressure on both MEP outputs.
//
// Every mechanism is made to happen and counted:
//   packets out of time order, crossings without data on a link, event
//   slots that overflow (packets dropped), late packets (dropped), the
//   read side of the reordering advancing by itself (more than 496
//   crossings) and by flush, link back-pressure (frames refused), MWP
//   filler slots, SDRAM wait states, trigger rejects, stale and missing
//   decisions, MEP headers and padding, MEP output back-pressure.
// Checked: each MEP byte by byte against the reference model (mep_check),
// the drop counters against the generated drops, the checksum error
// counters at zero, the trigger counters, and that every count above is
// not zero.
module tb_tell10_top;
  import tell10_pkg::*;
  `include "tell10_stim.svh"
  `include "mep_check.svh"
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  localparam int NB = 560, DELAY = 512 - 16, F = 8;
  logic [23:0][1:0] dv; logic [23:0] gr; logic [23:0][79:0] frame; logic flush;
  logic [1:0][26:0] ma; logic [1:0] mw, mr, mwait, mrv; logic [1:0][255:0] mwd, mrd;
  logic [1:0] dvld, drdy, dkeep; logic [1:0][31:0] devid;
  logic [1:0] mv, mrdy, msop, meop; logic [1:0][255:0] md;
  logic [23:0][15:0] drops;
  logic [1:0][15:0] herr, derr, kcnt, rcnt, scnt, ncnt;
  int wait_cycles [2];
  tell10_top dut (
    .clk, .rst, .gbt_dv(dv), .gbt_ready(gr), .gbt_frame(frame), .flush,
    .mem_addr(ma), .mem_write(mw), .mem_read(mr), .mem_wdata(mwd), .mem_waitreq(mwait),
    .mem_rdata(mrd), .mem_rvalid(mrv), .dec_valid(dvld), .dec_ready(drdy), .dec_evid(devid),
    .dec_keep(dkeep), .mep_valid(mv), .mep_ready(mrdy), .mep_data(md), .mep_sop(msop), .mep_eop(meop),
    .drop_cnt(drops), .hdr_err(herr), .data_err(derr), .kept_cnt(kcnt), .rej_cnt(rcnt),
    .stale_cnt(scnt), .nodec_cnt(ncnt));

  link_gen g [24];
  half_check hc [2];
  int n_fill = 0, n_mep_bp = 0, n_gbt_bp = 0, n_self = 0;

  for (genvar h = 0; h < 2; h++) begin : g_half
    ddr3_model #(.ADDR_W(27), .LAT(10), .WAIT_PCT(25)) u_mem (.clk, .rst, .addr(ma[h]), .write(mw[h]),
      .read(mr[h]), .wdata(mwd[h]), .waitreq(mwait[h]), .rdata(mrd[h]), .rvalid(mrv[h]),
      .wait_cycles(wait_cycles[h]));
    always @(negedge clk) mrdy[h] <= $urandom_range(0, 3) != 0;
    always @(posedge clk) if (!rst && mw[h] && !mwait[h] && ma[h][2:0] == 3'd0)
      for (int k = 0; k < 7; k++) if (mwd[h][32*k +: 32] == 32'd0) n_fill++;
    always @(posedge clk) if (!rst && mv[h] && !mrdy[h]) n_mep_bp++;
    always @(posedge clk) if (!rst && mv[h] && mrdy[h]) hc[h].word(md[h], msop[h], meop[h]);
    initial begin
      dvld[h] = 0; devid[h] = '0; dkeep[h] = 0;
      @(negedge rst);
      while (hc[h].dec.size() != 0) begin
        @(negedge clk); dvld[h] = $urandom_range(0, 1); {devid[h], dkeep[h]} = hc[h].dec[0];
        #1; if (dvld[h] && drdy[h]) void'(hc[h].dec.pop_front());
      end
      @(negedge clk); dvld[h] = 0;
    end
  end

  // the read side of link 0's reordering starting events before flush
  always @(posedge clk) if (!rst && !flush && dut.g_half[0].u_half.g_link[0].u_link.u_reorder.rd_go) n_self++;

  initial begin
    repeat (2000000) @(posedge clk);
    failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    bit alldone; bit [1:0] s;
    int drop_exp [2], n_ooo, n_empty, n_ovf, n_late;
    n_ooo = 0; n_empty = 0; n_ovf = 0; n_late = 0; drop_exp = '{0, 0};
    for (int h = 0; h < 2; h++) hc[h] = new(F, NB, h);
    for (int i = 0; i < 24; i++) begin
      g[i] = new(i, NB, 3, DELAY);
      g[i].build((i == 4 || i == 17) ? DELAY + 30 + i : -1);
      hc[i / 12].add_link(g[i]);
      drop_exp[i / 12] += g[i].n_ovf_drop + g[i].n_late_drop;
      n_ooo += g[i].n_ooo; n_empty += g[i].n_empty; n_ovf += g[i].n_ovf_drop; n_late += g[i].n_late_drop;
    end
    for (int h = 0; h < 2; h++) hc[h].make_decisions(NB + 100);
    dv = '0; frame = '0; flush = 0;
    repeat (3) @(posedge clk); rst = 0;
    do begin
      @(negedge clk);
      alldone = 1;
      for (int i = 0; i < 24; i++) begin
        s[1] = g[i].can_send(0) && $urandom_range(0, 3) != 0;
        s[0] = g[i].can_send(1) && $urandom_range(0, 3) != 0;
        dv[i] = s;
        frame[i] = {s[1] ? {g[i].q[0][0], g[i].q[0][1], g[i].q[0][2], g[i].q[0][3], g[i].q[0][4]} : 40'h0,
                    s[0] ? {g[i].q[1][0], g[i].q[1][1], g[i].q[1][2], g[i].q[1][3], g[i].q[1][4]} : 40'h0};
      end
      #1;
      for (int i = 0; i < 24; i++) begin
        if (dv[i] != 0 && !gr[i]) n_gbt_bp++;
        if (gr[i] && dv[i][1]) void'(g[i].take(0));
        if (gr[i] && dv[i][0]) void'(g[i].take(1));
        if (!g[i].done()) alldone = 0;
      end
    end while (!alldone);
    @(negedge clk); dv = '0;
    repeat (300) @(posedge clk);
    flush = 1;
    for (int t = 0; t < 1500000 && !(hc[0].done() && hc[1].done()); t++) @(posedge clk);
    @(negedge clk); flush = 0;
    repeat (50) @(posedge clk);
    for (int h = 0; h < 2; h++) begin
      int d;
      d = 0;
      checks++;
      if (!hc[h].done()) begin failures++; $display("half %0d: only %0d of %0d events out", h, hc[h].k_idx, hc[h].k_need); end
      for (int i = 0; i < 12; i++) d += int'(drops[12 * h + i]);
      checks++; if (d != drop_exp[h]) begin failures++; $display("half %0d drops %0d expected %0d", h, d, drop_exp[h]); end
      checks++; if (herr[h] != 0 || derr[h] != 0) begin failures++; $display("half %0d checksum errors", h); end
      checks++;
      if (int'(rcnt[h]) < hc[h].n_rej || int'(scnt[h]) < hc[h].n_stale || int'(ncnt[h]) < hc[h].n_nodec ||
          int'(kcnt[h]) < hc[h].n_ev) begin
        failures++; $display("half %0d trigger counters %0d %0d %0d %0d", h, kcnt[h], rcnt[h], scnt[h], ncnt[h]);
      end
      checks += hc[h].checks; failures += hc[h].failures;
    end
    $display("packets out of time order      %0d", n_ooo);
    $display("link crossings without data    %0d", n_empty);
    $display("packets lost to slot overflow  %0d", n_ovf);
    $display("late packets dropped           %0d", n_late);
    $display("events read before flush (link 0)%0d", n_self);
    $display("GBT frames refused             %0d", n_gbt_bp);
    $display("MWP filler slots               %0d", n_fill);
    $display("SDRAM wait cycles              %0d %0d", wait_cycles[0], wait_cycles[1]);
    $display("events rejected                %0d %0d", rcnt[0], rcnt[1]);
    $display("stale decisions                %0d %0d", scnt[0], scnt[1]);
    $display("events without decision        %0d %0d", ncnt[0], ncnt[1]);
    $display("MEPs (events) checked          %0d (%0d) %0d (%0d)", hc[0].n_mep, hc[0].n_ev, hc[1].n_mep, hc[1].n_ev);
    $display("MEP padding bytes              %0d %0d", hc[0].n_pad, hc[1].n_pad);
    $display("MEP back-pressure cycles       %0d", n_mep_bp);
    checks++;
    if (n_ooo == 0 || n_empty == 0 || n_ovf == 0 || n_late == 0 || n_self == 0 || n_gbt_bp == 0 ||
        n_fill == 0 || wait_cycles[0] == 0 || wait_cycles[1] == 0 || rcnt[0] == 0 || rcnt[1] == 0 ||
        scnt[0] == 0 || scnt[1] == 0 || ncnt[0] == 0 || ncnt[1] == 0 || hc[0].n_mep == 0 ||
        hc[1].n_mep == 0 || hc[0].n_pad == 0 || hc[1].n_pad == 0 || n_mep_bp == 0) begin
      failures++; $display("a mechanism did not occur");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
