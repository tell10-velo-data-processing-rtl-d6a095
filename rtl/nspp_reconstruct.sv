// nspp_reconstruct: rebuilds whole nSPP packets from one 40-bit front-end
// stream.
//
// The front end sends packets back to back on byte boundaries, 5 bytes per
// word, first byte in bits 39:32.  The block keeps a byte buffer of BUF_BYTES.
// Once 4 bytes are present the hit count c (bits 7:4 of byte 3) fixes the
// packet length: 28 + 8(c+1) bits, i.e. 5 + c bytes.  When that many bytes are
// buffered the packet leaves in one cycle as an spp_t (bunch counter, byte
// count, bytes left-aligned and zero beyond the count) and the buffer shifts
// by its length.  Only the hit count is needed to find the length, which is
// the point of the nSPP format.  A new word is accepted whenever it fits in
// the buffer, in the same cycle as a packet may leave; throughput is one
// input word per cycle and up to one packet per cycle.
module nspp_reconstruct #(
  parameter int unsigned BUF_BYTES = 32
) (
  input  logic                          clk,
  input  logic                          rst,
  input  logic                          in_valid,
  output logic                          in_ready,
  input  logic [tell10_pkg::HALF_W-1:0] in_data,
  output logic                          out_valid,
  input  logic                          out_ready,
  output tell10_pkg::spp_t              out_spp
);
  import tell10_pkg::*;

  localparam int unsigned IN_BYTES = HALF_W / 8;
  localparam int unsigned BUF_W    = BUF_BYTES * 8;
  localparam int unsigned CW       = $clog2(BUF_BYTES + 1);

  logic [BUF_W-1:0] buf_q;      // byte 0 in the top bits
  logic [CW-1:0]    cnt_q;
  logic [3:0]       hc;
  logic [CW-1:0]    len;
  logic             pkt_ok, pop, push;
  logic [BUF_W-1:0] shifted, ins;
  logic [CW-1:0]    cnt_after_pop;
  logic [SPP_W-1:0] keep_mask;

  assign hc       = buf_q[BUF_W-1-24-:4];
  assign len      = CW'(5) + CW'(hc);
  assign pkt_ok   = (cnt_q >= CW'(4)) && (cnt_q >= len);
  assign out_valid = pkt_ok;
  assign pop      = pkt_ok && out_ready;
  assign in_ready = (cnt_q + CW'(IN_BYTES) <= CW'(BUF_BYTES));
  assign push     = in_valid && in_ready;

  always_comb begin
    keep_mask       = ~({SPP_W{1'b1}} >> (8 * len));
    out_spp.bcnt    = buf_q[BUF_W-1-:BCNT_W];
    out_spp.nbytes  = 5'(len);
    out_spp.data    = buf_q[BUF_W-1-:SPP_W] & keep_mask;
    shifted         = pop ? (buf_q << (8 * len)) : buf_q;
    cnt_after_pop   = pop ? (cnt_q - len) : cnt_q;
    ins             = {in_data, {(BUF_W-HALF_W){1'b0}}} >> (8 * cnt_after_pop);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      buf_q <= '0;
      cnt_q <= '0;
    end else begin
      buf_q <= push ? (shifted | ins) : shifted;
      cnt_q <= cnt_after_pop + (push ? CW'(IN_BYTES) : CW'(0));
    end
  end
endmodule
