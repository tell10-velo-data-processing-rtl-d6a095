// nspp_unpack: turns the reordered nSPP packets of one link into single hits.
//
// Input: the 64-bit words of the time-reorder buffer, a packet being 1 to 3
// words closed by an end-of-packet bit, an event closed by an end-of-event
// bit, an event without packets being one word flagged empty.  The words of
// a packet are gathered (up to 192 bits); its 4-bit hit count alone gives
// the number of hits n = count + 1 and where the hit addresses and ToTs are.
// Each hit becomes a 32-bit slot {4'b0, 3'b0 padding, link source id 5b,
// hit address 16b = super-pixel address 12b & hit address 4b, ToT 4b}; two
// hits go out per 64-bit word with a byte count of 8, or 4 for a last odd
// hit (the data-valid calculation).  An empty event leaves as one word with
// byte count 0; the end-of-event and overflow flags are carried on the last
// word of the event.  Timing: one cycle per input word, then one cycle per
// output word; output is registered with valid/ready.
// The 32-bit hit slot (the hit format itself is 28 bits) and the omission
// of the ToT correction step, which is named but not specified, are choices
// of this design.
module nspp_unpack (
  input  logic                              clk,
  input  logic                              rst,
  input  logic [tell10_pkg::LINK_ID_W-1:0]  link_id,
  input  logic                              in_valid,
  output logic                              in_ready,
  input  tell10_pkg::tr_word_t              in_word,
  output logic                              out_valid,
  input  logic                              out_ready,
  output logic [63:0]                       out_data,
  output logic [3:0]                        out_nbytes,
  output logic                              out_eoe,
  output logic                              out_ovf
);
  import tell10_pkg::*;

  logic [3*TR_W-1:0] sbuf;
  logic [1:0]        widx;
  logic              emitting, last_ev, ev_ovf;
  logic [4:0]        hi;          // next hit to emit
  logic [4:0]        n;
  logic              can_load, in_fire;
  logic [HIT_W-1:0]  hit_a, hit_b;
  logic              two;

  assign can_load = !out_valid || out_ready;
  assign in_ready = !emitting && can_load;
  assign in_fire  = in_valid && in_ready;
  assign n        = 5'(sbuf[3*TR_W-1-24 -: 4]) + 5'd1;
  assign two      = (hi + 5'd1 < n);

  function automatic logic [HIT_W-1:0] hit(input logic [3*TR_W-1:0] b, input logic [4:0] i,
                                           input logic [4:0] nh, input logic [LINK_ID_W-1:0] id);
    logic [3:0] a, t;
    a = b[3*TR_W-1-28-4*i -: 4];
    t = b[3*TR_W-1-28-4*nh-4*i -: 4];
    return {4'b0, 3'b0, id, b[3*TR_W-1-12 -: 12], a, t};
  endfunction

  assign hit_a = hit(sbuf, hi, n, link_id);
  assign hit_b = two ? hit(sbuf, hi + 5'd1, n, link_id) : '0;

  always_ff @(posedge clk) begin
    if (rst) begin
      sbuf      <= '0;
      widx      <= '0;
      emitting  <= 1'b0;
      last_ev   <= 1'b0;
      ev_ovf    <= 1'b0;
      hi        <= '0;
      out_valid <= 1'b0;
      out_data  <= '0;
      out_nbytes <= '0;
      out_eoe   <= 1'b0;
      out_ovf   <= 1'b0;
    end else begin
      if (out_valid && out_ready) out_valid <= 1'b0;
      if (in_fire) begin
        if (in_word.empty) begin
          out_valid  <= 1'b1;
          out_data   <= '0;
          out_nbytes <= '0;
          out_eoe    <= 1'b1;
          out_ovf    <= in_word.ovf;
          widx       <= '0;
        end else begin
          sbuf[3*TR_W-1-TR_W*widx -: TR_W] <= in_word.data;
          if (in_word.eospp) begin
            widx     <= '0;
            emitting <= 1'b1;
            hi       <= '0;
            last_ev  <= in_word.eoe;
            ev_ovf   <= in_word.ovf;
          end else begin
            widx <= widx + 1'b1;
          end
        end
      end else if (emitting && can_load) begin
        out_valid  <= 1'b1;
        out_data   <= {hit_a, hit_b};
        out_nbytes <= two ? 4'd8 : 4'd4;
        out_eoe    <= last_ev && (hi + 5'd2 >= n);
        out_ovf    <= last_ev && (hi + 5'd2 >= n) && ev_ovf;
        hi         <= hi + 5'd2;
        if (hi + 5'd2 >= n) begin
          emitting <= 1'b0;
          sbuf     <= '0;
        end
      end
    end
  end
endmodule
