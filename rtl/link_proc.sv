// link_proc: the processing chain of one GBT link, from the 80-bit GBT data
// word to a stream of unpacked hits, one event after the other.
//
// gbt_splitter (input buffer, split into the two 40-bit front-end streams)
// -> two nspp_reconstruct with 16-packet FIFOs -> linker0 (merge the two
// halves) -> time_reorder (sort by bunch counter, one event per bunch
// crossing) -> nspp_unpack (hits with link source id, byte counts) -> a
// 64-bit stream FIFO of DEPTH words whose event counter tells the first
// linking stage when a whole event fragment is present.
// The link source id is LINK_ID.  drop_cnt counts packets the time
// reordering had to drop.  All stages use valid/ready, so back-pressure from
// the linkers propagates to the GBT input (gbt_ready).
module link_proc #(
  parameter int unsigned LINK_ID  = 0,
  parameter int unsigned EV_DEPTH = 512,
  parameter int unsigned EV_WORDS = 8,
  parameter int unsigned MARGIN   = 16,
  parameter int unsigned DEPTH    = 64
) (
  input  logic                         clk,
  input  logic                         rst,
  input  logic [1:0]                   gbt_dv,
  output logic                         gbt_ready,
  input  logic [tell10_pkg::GBT_W-1:0] gbt_frame,
  input  logic                         flush,
  output logic                         out_valid,
  input  logic                         out_ready,
  output logic [63:0]                  out_data,
  output logic [3:0]                   out_nbytes,
  output logic                         out_eoe,
  output logic                         out_ovf,
  output logic                         ev_avail,
  output logic [15:0]                  drop_cnt
);
  import tell10_pkg::*;

  logic              hv, hr, lv, lr;
  logic [HALF_W-1:0] hd, ld;
  logic [1:0]        rv, rr, fv, fr;
  spp_t              rs [2];
  spp_t              fs [2];
  logic              mv, mr;
  spp_t              ms;
  logic              tv, tr_rdy;
  tr_word_t          tw;
  logic              uv, ur, ue, uo;
  logic [63:0]       ud;
  logic [3:0]        un;

  gbt_splitter u_split (
    .clk, .rst, .in_dv(gbt_dv), .in_ready(gbt_ready), .in_frame(gbt_frame),
    .hi_valid(hv), .hi_ready(hr), .hi_data(hd), .lo_valid(lv), .lo_ready(lr), .lo_data(ld));

  nspp_reconstruct u_rec_hi (
    .clk, .rst, .in_valid(hv), .in_ready(hr), .in_data(hd),
    .out_valid(rv[0]), .out_ready(rr[0]), .out_spp(rs[0]));
  nspp_reconstruct u_rec_lo (
    .clk, .rst, .in_valid(lv), .in_ready(lr), .in_data(ld),
    .out_valid(rv[1]), .out_ready(rr[1]), .out_spp(rs[1]));

  for (genvar h = 0; h < 2; h++) begin : g_half
    sync_fifo #(.W($bits(spp_t)), .DEPTH(16)) u_fifo (
      .clk, .rst, .in_valid(rv[h]), .in_ready(rr[h]), .in_data(rs[h]),
      .out_valid(fv[h]), .out_ready(fr[h]), .out_data(fs[h]), .count());
  end

  linker0 u_link0 (
    .clk, .rst, .a_valid(fv[0]), .a_ready(fr[0]), .a_spp(fs[0]),
    .b_valid(fv[1]), .b_ready(fr[1]), .b_spp(fs[1]),
    .out_valid(mv), .out_ready(mr), .out_spp(ms));

  time_reorder #(.EV_DEPTH(EV_DEPTH), .EV_WORDS(EV_WORDS), .MARGIN(MARGIN)) u_reorder (
    .clk, .rst, .in_valid(mv), .in_ready(mr), .in_spp(ms), .flush,
    .out_valid(tv), .out_ready(tr_rdy), .out_word(tw), .drop_cnt);

  nspp_unpack u_unpack (
    .clk, .rst, .link_id(LINK_ID_W'(LINK_ID)), .in_valid(tv), .in_ready(tr_rdy), .in_word(tw),
    .out_valid(uv), .out_ready(ur), .out_data(ud), .out_nbytes(un), .out_eoe(ue), .out_ovf(uo));

  stream_fifo #(.W(64), .DEPTH(DEPTH)) u_out (
    .clk, .rst, .in_valid(uv), .in_ready(ur), .in_data(ud), .in_nbytes(un), .in_eoe(ue), .in_ovf(uo),
    .out_valid, .out_ready, .out_data, .out_nbytes, .out_eoe, .out_ovf, .ev_avail, .count());
endmodule
