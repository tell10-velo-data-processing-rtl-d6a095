// padder_check: drives one padder instance with random events (random byte
// counts 0..IN_W/8, random bytes beyond the count that must be masked) and
// compares its output with a byte-level model: each word's bytes followed
// by zeros up to a multiple of ALIGN, the event's bytes cut into OUT_W/8
// byte words, the last one partial, an event without bytes as one word with
// count 0.  Reports its check and failure counts and when it is done.
module padder_check #(
  parameter int IN_W  = 64,
  parameter int OUT_W = 128,
  parameter int ALIGN = 1,
  parameter int NEV   = 300
) (
  input  logic clk,
  input  logic rst,
  output int   checks,
  output int   failures,
  output logic done,
  output int   multi      // events that needed an extra output cycle
);
  localparam int IB = IN_W / 8, OB = OUT_W / 8;
  logic in_valid, in_ready, in_eoe, in_ovf, out_valid, out_ready, out_eoe, out_ovf;
  logic [IN_W-1:0] in_data; logic [$clog2(IB):0] in_nbytes;
  logic [OUT_W-1:0] out_data; logic [$clog2(OB):0] out_nbytes;
  padder #(.IN_W(IN_W), .OUT_W(OUT_W), .ALIGN(ALIGN)) dut (.clk, .rst, .in_valid, .in_ready, .in_data,
    .in_nbytes, .in_eoe, .in_ovf, .out_valid, .out_ready, .out_data, .out_nbytes, .out_eoe, .out_ovf);

  typedef struct packed { logic [IN_W-1:0] d; logic [$clog2(IB):0] n; logic e; logic o; } iw_t;
  typedef struct packed { logic [OUT_W-1:0] d; logic [$clog2(OB):0] n; logic e; logic o; } ow_t;
  iw_t inq[$]; ow_t expq[$];

  initial begin
    byte unsigned bytes[$]; int nw, nb, r; logic ovf; iw_t w; ow_t o;
    checks = 0; failures = 0; done = 0; multi = 0;
    for (int e = 0; e < NEV; e++) begin
      nw = $urandom_range(1, 4); bytes.delete(); ovf = 0;
      for (int k = 0; k < nw; k++) begin
        nb = (e % 11 == 3) ? 0 : $urandom_range(0, IB);
        for (int i = 0; i < IN_W / 32; i++) w.d[32 * i +: 32] = $urandom;
        w.n = ($clog2(IB)+1)'(nb); w.e = (k == nw - 1); w.o = ($urandom_range(0, 9) == 0);
        ovf |= w.o;
        inq.push_back(w);
        for (int b = 0; b < nb; b++) bytes.push_back(w.d[IN_W - 1 - 8 * b -: 8]);
        r = ((nb + ALIGN - 1) / ALIGN) * ALIGN;
        for (int b = nb; b < r; b++) bytes.push_back(8'h00);
      end
      if (bytes.size() == 0) begin
        o = '0; o.e = 1; o.o = ovf; expq.push_back(o);
      end else begin
        while (bytes.size() != 0) begin
          o = '0;
          for (int b = 0; b < OB && bytes.size() != 0; b++) begin
            o.d[OUT_W - 1 - 8 * b -: 8] = bytes.pop_front(); o.n++;
          end
          o.e = (bytes.size() == 0); o.o = o.e && ovf;
          expq.push_back(o);
        end
      end
    end
  end

  always @(negedge clk) out_ready <= $urandom_range(0, 4) != 0;
  initial begin
    in_valid = 0; in_data = '0; in_nbytes = '0; in_eoe = 0; in_ovf = 0;
    @(negedge rst);
    while (inq.size() != 0) begin
      @(negedge clk);
      in_valid = $urandom_range(0, 5) != 0;
      {in_data, in_nbytes, in_eoe, in_ovf} = inq[0];
      #1; if (in_valid && in_ready) void'(inq.pop_front());
    end
    @(negedge clk); in_valid = 0;
    repeat (50) @(posedge clk);
    checks++; if (expq.size() != 0) begin failures++; $display("padder %0d->%0d: %0d words missing", IN_W, OUT_W, expq.size()); end
    done = 1;
  end

  always @(posedge clk) if (!rst) begin
    if (dut.pend) multi++;
    if (out_valid && out_ready) begin
      checks++;
      if (expq.size() == 0) failures++;
      else begin
        if ({out_data, out_nbytes, out_eoe, out_ovf} != expq[0]) begin
          failures++;
          if (failures < 4) $display("padder %0d->%0d got %h n%0d e%b o%b exp %h n%0d e%b o%b", IN_W, OUT_W,
            out_data, out_nbytes, out_eoe, out_ovf, expq[0].d, expq[0].n, expq[0].e, expq[0].o);
        end
        void'(expq.pop_front());
      end
    end
  end
endmodule
