// Testbench for mep_gen with a MEP factor of 4: random events of 0 to 3
// words (full 32-byte words, then an even tail of 0..32 bytes) with
// increasing event IDs, random back-pressure on the output.  A byte-level
// model builds every MEP: 32-byte header {first event ID, MEP length, MEP
// factor, zeros}, then per event a 16-bit length and its bytes, zeros up to
// the word boundary.  Every output word, sop and eop is compared.
module tb_mep_gen;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  localparam int F = 4, NEV = 200;     // NEV a multiple of F: every MEP closes
  logic iv, ir, ie, ov, orr, sop, eop;
  logic [255:0] id, od; logic [5:0] inb; logic [31:0] iid;
  mep_gen #(.MEP_FACTOR(F), .DEPTH(64)) dut (.clk, .rst, .in_valid(iv), .in_ready(ir), .in_data(id),
    .in_nbytes(inb), .in_eoe(ie), .in_evid(iid), .out_valid(ov), .out_ready(orr), .out_data(od),
    .out_sop(sop), .out_eop(eop));
  typedef struct packed { logic [255:0] d; logic [5:0] n; logic e; logic [31:0] id; } w_t;
  typedef struct packed { logic [255:0] d; logic s; logic e; } o_t;
  w_t inq[$]; o_t expq[$];
  int nmep = 0;
  initial begin
    repeat (40000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  // builds the expected words of one MEP from its byte list
  task automatic emit(byte unsigned b[$]);
    o_t o; int nw;
    while (b.size() % 32 != 0) b.push_back(8'h00);
    nw = b.size() / 32;
    for (int k = 0; k < nw; k++) begin
      for (int j = 0; j < 32; j++) o.d[255 - 8*j -: 8] = b[32*k + j];
      o.s = (k == 0); o.e = (k == nw - 1);
      expq.push_back(o);
    end
  endtask
  initial begin
    w_t w; int nw, len, sum; logic [31:0] first, evid; byte unsigned recs[$], b[$];
    evid = $urandom;
    for (int m = 0; m < NEV / F; m++) begin
      recs.delete(); sum = 0; first = evid;
      for (int e = 0; e < F; e++) begin
        nw = $urandom_range(0, 3); len = 0;
        b.delete();
        for (int k = 0; k <= nw; k++) begin
          w.d = {8{$urandom}}; w.n = (k == nw) ? 6'(2 * $urandom_range(0, 16)) : 6'd32;
          w.e = (k == nw); w.id = evid;
          inq.push_back(w);
          for (int j = 0; j < int'(w.n); j++) b.push_back(w.d[255 - 8*j -: 8]);
          len += int'(w.n);
        end
        recs.push_back(8'(len >> 8)); recs.push_back(8'(len));
        foreach (b[j]) recs.push_back(b[j]);
        sum += 2 + len;
        evid = evid + 1;
      end
      b.delete();
      for (int j = 0; j < 4; j++) b.push_back(8'(first >> (24 - 8*j)));
      for (int j = 0; j < 3; j++) b.push_back(8'(sum >> (16 - 8*j)));
      b.push_back(8'(F));
      for (int j = 0; j < 24; j++) b.push_back(8'h00);
      foreach (recs[j]) b.push_back(recs[j]);
      emit(b);
      nmep++;
    end
  end
  always @(negedge clk) orr <= $urandom_range(0, 3) != 0;
  initial begin
    iv = 0; {id, inb, ie, iid} = '0;
    repeat (3) @(posedge clk); rst = 0;
    while (inq.size() != 0) begin
      @(negedge clk); iv = $urandom_range(0, 4) != 0; {id, inb, ie, iid} = inq[0];
      #1; if (iv && ir) void'(inq.pop_front());
    end
    @(negedge clk); iv = 0;
    for (int t = 0; t < 2000 && expq.size() != 0; t++) @(posedge clk);
    repeat (20) @(posedge clk);
    checks++; if (expq.size() != 0) begin failures++; $display("%0d words missing", expq.size()); end
    $display("MEPs %0d", nmep);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  always @(posedge clk) if (!rst && ov && orr) begin
    checks++;
    if (expq.size() == 0) begin failures++; $display("extra word"); end
    else begin
      if (od != expq[0].d || sop != expq[0].s || eop != expq[0].e) begin
        failures++;
        if (failures < 4) $display("mismatch sop %b/%b eop %b/%b\n %h\n %h", sop, expq[0].s, eop, expq[0].e, od, expq[0].d);
      end
      void'(expq.pop_front());
    end
  end
endmodule
