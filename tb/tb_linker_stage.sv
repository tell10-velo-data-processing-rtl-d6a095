// Testbench for linker_stage in the stage-2 configuration (2 inputs, 128 ->
// 256 bits, 2-byte alignment) behind two stream FIFOs.  Reference: for each
// event, the bytes of input 0's fragment then input 1's, each word's bytes
// rounded up to 2 with zeros, cut into 32-byte words, last one partial.
module tb_linker_stage;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  localparam int N = 2, NEV = 200;
  typedef struct packed { logic [127:0] d; logic [4:0] n; logic e; logic o; } w_t;
  typedef struct packed { logic [255:0] d; logic [5:0] n; logic e; logic o; } o_t;

  logic [N-1:0] fv, fr, fe, fo, fa, iv, ir, ie, io;
  logic [N-1:0][127:0] fd, id; logic [N-1:0][4:0] fn, in_;
  logic ov, orr, oe, oo; logic [255:0] od; logic [5:0] on;
  for (genvar i = 0; i < N; i++) begin : g
    stream_fifo #(.W(128), .DEPTH(16)) u_f (.clk, .rst, .in_valid(iv[i]), .in_ready(ir[i]), .in_data(id[i]),
      .in_nbytes(in_[i]), .in_eoe(ie[i]), .in_ovf(io[i]), .out_valid(fv[i]), .out_ready(fr[i]), .out_data(fd[i]),
      .out_nbytes(fn[i]), .out_eoe(fe[i]), .out_ovf(fo[i]), .ev_avail(fa[i]), .count());
  end
  linker_stage #(.N(2), .IN_W(128), .OUT_W(256), .ALIGN(2)) dut (.clk, .rst, .in_valid(fv), .in_ready(fr),
    .in_data(fd), .in_nbytes(fn), .in_eoe(fe), .in_ovf(fo), .in_ev_avail(fa), .out_valid(ov), .out_ready(orr),
    .out_data(od), .out_nbytes(on), .out_eoe(oe), .out_ovf(oo));

  w_t src[N][$]; o_t expq[$];
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    w_t w; o_t o; int nw, nb; logic ovf; byte unsigned bytes[$];
    for (int e = 0; e < NEV; e++) begin
      ovf = 0; bytes.delete();
      for (int i = 0; i < N; i++) begin
        nw = $urandom_range(1, 3);
        for (int k = 0; k < nw; k++) begin
          w.d = {$urandom, $urandom, $urandom, $urandom}; nb = (e % 9 == 4) ? 0 : $urandom_range(0, 16);
          w.n = 5'(nb); w.e = (k == nw - 1); w.o = w.e && ($urandom_range(0, 9) == 0); ovf |= w.o;
          src[i].push_back(w);
          for (int b = 0; b < nb; b++) bytes.push_back(w.d[127 - 8 * b -: 8]);
          if (nb % 2) bytes.push_back(8'h00);
        end
      end
      if (bytes.size() == 0) begin o = '0; o.e = 1; o.o = ovf; expq.push_back(o); end
      while (bytes.size() != 0) begin
        o = '0;
        for (int b = 0; b < 32 && bytes.size() != 0; b++) begin o.d[255 - 8 * b -: 8] = bytes.pop_front(); o.n++; end
        o.e = (bytes.size() == 0); o.o = o.e && ovf; expq.push_back(o);
      end
    end
  end
  for (genvar i = 0; i < N; i++) begin : g_drv
    initial begin
      iv[i] = 0; id[i] = '0; in_[i] = '0; ie[i] = 0; io[i] = 0;
      @(negedge rst);
      while (src[i].size() != 0) begin
        @(negedge clk);
        iv[i] = $urandom_range(0, 9) < 4 + 3 * i;
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
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  always @(posedge clk) if (!rst && ov && orr) begin
    checks++;
    if (expq.size() == 0) failures++;
    else begin
      if ({od, on, oe, oo} != expq[0]) begin failures++; if (failures < 4) $display("got %h n%0d e%b exp %h n%0d e%b", od, on, oe, expq[0].d, expq[0].n, expq[0].e); end
      void'(expq.pop_front());
    end
  end
endmodule
