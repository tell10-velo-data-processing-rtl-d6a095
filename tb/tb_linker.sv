// Testbench for linker (3 inputs, 64 bits) behind three stream FIFOs fed at
// different random rates.  Expected output for each event: the fragment of
// input 0, then 1, then 2, word for word, with end-of-event only on the last
// word and the overflow flags of the three fragments ORed onto it.  Also
// checked: the linker never starts an event before all three fragments are
// complete (it then never waits for data in mid-event).
module tb_linker;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  localparam int N = 3, NEV = 200;
  typedef struct packed { logic [63:0] d; logic [3:0] n; logic e; logic o; } w_t;

  logic [N-1:0] fv, fr, fe, fo, fa, iv, ir, ie, io;
  logic [N-1:0][63:0] fd, id; logic [N-1:0][3:0] fn, in_;
  logic ov, orr, oe, oo; logic [63:0] od; logic [3:0] on;
  for (genvar i = 0; i < N; i++) begin : g
    stream_fifo #(.W(64), .DEPTH(16)) u_f (.clk, .rst, .in_valid(iv[i]), .in_ready(ir[i]), .in_data(id[i]),
      .in_nbytes(in_[i]), .in_eoe(ie[i]), .in_ovf(io[i]), .out_valid(fv[i]), .out_ready(fr[i]), .out_data(fd[i]),
      .out_nbytes(fn[i]), .out_eoe(fe[i]), .out_ovf(fo[i]), .ev_avail(fa[i]), .count());
  end
  linker #(.N(N), .W(64)) dut (.clk, .rst, .in_valid(fv), .in_ready(fr), .in_data(fd), .in_nbytes(fn), .in_eoe(fe),
    .in_ovf(fo), .in_ev_avail(fa), .out_valid(ov), .out_ready(orr), .out_data(od), .out_nbytes(on), .out_eoe(oe), .out_ovf(oo));

  w_t src[N][$]; w_t expq[$];
  int stalls = 0;
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    w_t w; int nw; logic ovf; int eidx;
    for (int e = 0; e < NEV; e++) begin
      ovf = 0;
      for (int i = 0; i < N; i++) begin
        nw = $urandom_range(1, 3);
        for (int k = 0; k < nw; k++) begin
          w.d = {$urandom, $urandom}; w.n = 4'($urandom_range(0, 8)); w.e = (k == nw - 1);
          w.o = w.e && ($urandom_range(0, 9) == 0); ovf |= w.o;
          src[i].push_back(w);
          w.e = w.e && (i == N - 1); w.o = w.e && ovf; expq.push_back(w);
        end
      end
    end
  end
  for (genvar i = 0; i < N; i++) begin : g_drv
    initial begin
      iv[i] = 0; id[i] = '0; in_[i] = '0; ie[i] = 0; io[i] = 0;
      @(negedge rst);
      while (src[i].size() != 0) begin
        @(negedge clk);
        iv[i] = $urandom_range(0, 9) < 3 + 2 * i;
        {id[i], in_[i], ie[i], io[i]} = src[i][0];
        #1; if (iv[i] && ir[i]) void'(src[i].pop_front());
      end
      @(negedge clk); iv[i] = 0;
    end
  end
  always @(negedge clk) orr <= $urandom_range(0, 5) != 0;
  initial begin
    repeat (3) @(posedge clk); rst = 0;
    wait (expq.size() == 0);
    repeat (5) @(posedge clk);
    checks++; if (stalls != 0) begin failures++; $display("linker waited mid-event %0d times", stalls); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  always @(posedge clk) if (!rst) begin
    if (dut.busy && !ov) stalls++;
    if (ov && orr) begin
      checks++;
      if (expq.size() == 0) failures++;
      else begin
        if ({od, on, oe, oo} != expq[0]) begin failures++; if (failures < 4) $display("mismatch"); end
        void'(expq.pop_front());
      end
    end
  end
endmodule
