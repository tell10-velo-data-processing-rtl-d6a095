// Testbench for l0_trigger: events 0..NEV-1 of 1..3 words; decisions with a
// random keep bit for most events, none for some (those must be kept), and
// extra stale decisions for already-passed event IDs (those must be
// skipped).  Decisions arrive at their own random pace.  Checked: exactly
// the words of kept events come out, in order, and all four counters.
module tb_l0_trigger;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic dv, dr, dk, iv, ir, ie, io, ov, orr, oe, oo;
  logic [31:0] de, ii, oi; logic [255:0] id, od; logic [5:0] in_, on;
  logic [15:0] kept, rej, stale, nodec;
  l0_trigger #(.DEC_DEPTH(64)) dut (.clk, .rst, .dec_valid(dv), .dec_ready(dr), .dec_evid(de), .dec_keep(dk),
    .in_valid(iv), .in_ready(ir), .in_data(id), .in_nbytes(in_), .in_eoe(ie), .in_ovf(io), .in_evid(ii),
    .out_valid(ov), .out_ready(orr), .out_data(od), .out_nbytes(on), .out_eoe(oe), .out_ovf(oo), .out_evid(oi),
    .kept_cnt(kept), .rej_cnt(rej), .stale_cnt(stale), .nodec_cnt(nodec));
  typedef struct packed { logic [255:0] d; logic [5:0] n; logic e; logic o; logic [31:0] id; } w_t;
  w_t inq[$], expq[$]; logic [32:0] decq[$];
  int e_kept = 0, e_rej = 0, e_stale = 0, e_nodec = 0;
  localparam int NEV = 300;
  initial begin
    repeat (30000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    w_t w; int nw, mode, prev_mode; logic keep;
    prev_mode = 2;
    for (int e = 0; e < NEV; e++) begin
      // 0: no decision, 1: a stale one first, else normal.  An event with
      // no decision is only decided once a later decision is queued, so the
      // last event always has one, and a stale entry never names an event
      // that had none.
      mode = (e == NEV - 1) ? 2 : $urandom_range(0, 9);
      if (mode == 1 && prev_mode == 0) mode = 2;
      prev_mode = mode;
      keep = $urandom_range(0, 1);
      if (mode == 1 && e > 0) begin decq.push_back({32'(e - 1), 1'b1}); e_stale++; end
      if (mode == 0) begin keep = 1; e_nodec++; end
      else decq.push_back({32'(e), keep});
      if (keep) e_kept++; else e_rej++;
      nw = $urandom_range(1, 3);
      for (int k = 0; k < nw; k++) begin
        w.d = {8{$urandom}}; w.n = 6'($urandom_range(0, 32)); w.e = (k == nw - 1); w.o = w.e && $urandom_range(0, 1); w.id = e;
        inq.push_back(w); if (keep) expq.push_back(w);
      end
    end
  end
  initial begin
    dv = 0; de = 0; dk = 0;
    @(negedge rst);
    while (decq.size() != 0) begin
      @(negedge clk); dv = $urandom_range(0, 2) != 0; {de, dk} = decq[0];
      #1; if (dv && dr) void'(decq.pop_front());
    end
    @(negedge clk); dv = 0;
  end
  always @(negedge clk) orr <= $urandom_range(0, 3) != 0;
  initial begin
    iv = 0; {id, in_, ie, io, ii} = '0;
    repeat (3) @(posedge clk); rst = 0;
    while (inq.size() != 0) begin
      @(negedge clk); iv = $urandom_range(0, 3) != 0; {id, in_, ie, io, ii} = inq[0];
      #1; if (iv && ir) void'(inq.pop_front());
    end
    @(negedge clk); iv = 0;
    repeat (20) @(posedge clk);
    checks++; if (expq.size() != 0) begin failures++; $display("%0d missing", expq.size()); end
    checks++;
    if (int'(kept) != e_kept || int'(rej) != e_rej || int'(stale) != e_stale || int'(nodec) != e_nodec) begin
      failures++; $display("counters %0d %0d %0d %0d exp %0d %0d %0d %0d", kept, rej, stale, nodec, e_kept, e_rej, e_stale, e_nodec);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  always @(posedge clk) if (!rst && ov && orr) begin
    checks++;
    if (expq.size() == 0) failures++;
    else begin
      if ({od, on, oe, oo, oi} != expq[0]) begin failures++; if (failures < 4) $display("mismatch ev %0d exp %0d", oi, expq[0].id); end
      void'(expq.pop_front());
    end
  end
endmodule
