// half_stream: one of the two independent halves of the board, 12 GBT links
// in, one stream of Multi Event Packets out.
//
// Links 0..11 (link source ids LINK_BASE..LINK_BASE+11) each run a
// link_proc.  Three linking stages merge their event fragments, every stage
// waiting until all its inputs hold the current event:
//   stage 1: four linkers of 3 links, 64 -> 128 bits, 1-byte padding,
//            each into a 128-bit stream FIFO of 64 words;
//   stage 2: two linkers of 2, 128 -> 256 bits, 2-byte padding,
//            each into a 256-bit stream FIFO of 64 words;
//   stage 3: one linker of 2, 256 -> 256 bits, 4-byte padding.
// Then the MWP generator, the SDRAM FIFO controller (external memory port
// brought out), MWP unpacking with checksum checks and event ID, the level-0
// trigger (decision port brought out) and MEP assembly.  flush drains the
// time-reorder buffers and closes the last MWP at the end of a run.  The
// MEP format has no flags, so the overflow flag of an event ends at the
// trigger output; it is in the MWP info words stored in the SDRAM.
module half_stream #(
  parameter int unsigned LINK_BASE  = 0,
  parameter int unsigned EV_DEPTH   = 512,
  parameter int unsigned MARGIN     = 16,
  parameter int unsigned ADDR_W     = 27,
  parameter int unsigned DEC_DEPTH  = 4096,
  parameter int unsigned MEP_FACTOR = 8
) (
  input  logic                                clk,
  input  logic                                rst,
  input  logic [11:0][1:0]                    gbt_dv,
  output logic [11:0]                         gbt_ready,
  input  logic [11:0][tell10_pkg::GBT_W-1:0]  gbt_frame,
  input  logic                                flush,
  output logic [ADDR_W-1:0]                   mem_addr,
  output logic                                mem_write,
  output logic                                mem_read,
  output logic [tell10_pkg::BUS_W-1:0]        mem_wdata,
  input  logic                                mem_waitreq,
  input  logic [tell10_pkg::BUS_W-1:0]        mem_rdata,
  input  logic                                mem_rvalid,
  input  logic                                dec_valid,
  output logic                                dec_ready,
  input  logic [tell10_pkg::EVID_W-1:0]       dec_evid,
  input  logic                                dec_keep,
  output logic                                mep_valid,
  input  logic                                mep_ready,
  output logic [tell10_pkg::BUS_W-1:0]        mep_data,
  output logic                                mep_sop,
  output logic                                mep_eop,
  output logic [11:0][15:0]                   drop_cnt,
  output logic [15:0]                         hdr_err,
  output logic [15:0]                         data_err,
  output logic [15:0]                         kept_cnt,
  output logic [15:0]                         rej_cnt,
  output logic [15:0]                         stale_cnt,
  output logic [15:0]                         nodec_cnt
);
  import tell10_pkg::*;

  // ---- links ----
  logic [11:0]       lv, lr, le, lo, la;
  logic [11:0][63:0] ld;
  logic [11:0][3:0]  ln;

  for (genvar i = 0; i < 12; i++) begin : g_link
    link_proc #(.LINK_ID(LINK_BASE + i), .EV_DEPTH(EV_DEPTH), .MARGIN(MARGIN)) u_link (
      .clk, .rst, .gbt_dv(gbt_dv[i]), .gbt_ready(gbt_ready[i]), .gbt_frame(gbt_frame[i]),
      .flush, .out_valid(lv[i]), .out_ready(lr[i]), .out_data(ld[i]), .out_nbytes(ln[i]),
      .out_eoe(le[i]), .out_ovf(lo[i]), .ev_avail(la[i]), .drop_cnt(drop_cnt[i]));
  end

  // ---- stage 1: 4 x (3 links), 64 -> 128, 1-byte alignment ----
  logic [3:0]        s1v, s1r, s1e, s1o, f1v, f1r, f1e, f1o, f1a;
  logic [3:0][127:0] s1d, f1d;
  logic [3:0][4:0]   s1n, f1n;

  for (genvar g = 0; g < 4; g++) begin : g_st1
    linker_stage #(.N(3), .IN_W(64), .OUT_W(128), .ALIGN(1)) u_stage (
      .clk, .rst, .in_valid(lv[3*g +: 3]), .in_ready(lr[3*g +: 3]), .in_data(ld[3*g +: 3]),
      .in_nbytes(ln[3*g +: 3]), .in_eoe(le[3*g +: 3]), .in_ovf(lo[3*g +: 3]), .in_ev_avail(la[3*g +: 3]),
      .out_valid(s1v[g]), .out_ready(s1r[g]), .out_data(s1d[g]), .out_nbytes(s1n[g]),
      .out_eoe(s1e[g]), .out_ovf(s1o[g]));
    stream_fifo #(.W(128), .DEPTH(64)) u_fifo (
      .clk, .rst, .in_valid(s1v[g]), .in_ready(s1r[g]), .in_data(s1d[g]), .in_nbytes(s1n[g]),
      .in_eoe(s1e[g]), .in_ovf(s1o[g]), .out_valid(f1v[g]), .out_ready(f1r[g]), .out_data(f1d[g]),
      .out_nbytes(f1n[g]), .out_eoe(f1e[g]), .out_ovf(f1o[g]), .ev_avail(f1a[g]), .count());
  end

  // ---- stage 2: 2 x (2 groups), 128 -> 256, 2-byte alignment ----
  logic [1:0]        s2v, s2r, s2e, s2o, f2v, f2r, f2e, f2o, f2a;
  logic [1:0][255:0] s2d, f2d;
  logic [1:0][5:0]   s2n, f2n;

  for (genvar g = 0; g < 2; g++) begin : g_st2
    linker_stage #(.N(2), .IN_W(128), .OUT_W(256), .ALIGN(2)) u_stage (
      .clk, .rst, .in_valid(f1v[2*g +: 2]), .in_ready(f1r[2*g +: 2]), .in_data(f1d[2*g +: 2]),
      .in_nbytes(f1n[2*g +: 2]), .in_eoe(f1e[2*g +: 2]), .in_ovf(f1o[2*g +: 2]), .in_ev_avail(f1a[2*g +: 2]),
      .out_valid(s2v[g]), .out_ready(s2r[g]), .out_data(s2d[g]), .out_nbytes(s2n[g]),
      .out_eoe(s2e[g]), .out_ovf(s2o[g]));
    stream_fifo #(.W(256), .DEPTH(64)) u_fifo (
      .clk, .rst, .in_valid(s2v[g]), .in_ready(s2r[g]), .in_data(s2d[g]), .in_nbytes(s2n[g]),
      .in_eoe(s2e[g]), .in_ovf(s2o[g]), .out_valid(f2v[g]), .out_ready(f2r[g]), .out_data(f2d[g]),
      .out_nbytes(f2n[g]), .out_eoe(f2e[g]), .out_ovf(f2o[g]), .ev_avail(f2a[g]), .count());
  end

  // ---- stage 3: 1 x (2 groups), 256 -> 256, 4-byte alignment ----
  logic             s3v, s3r, s3e, s3o;
  logic [255:0]     s3d;
  logic [5:0]       s3n;
  linker_stage #(.N(2), .IN_W(256), .OUT_W(256), .ALIGN(4)) u_stage3 (
    .clk, .rst, .in_valid(f2v), .in_ready(f2r), .in_data(f2d), .in_nbytes(f2n), .in_eoe(f2e),
    .in_ovf(f2o), .in_ev_avail(f2a), .out_valid(s3v), .out_ready(s3r), .out_data(s3d),
    .out_nbytes(s3n), .out_eoe(s3e), .out_ovf(s3o));

  // ---- MWP generator and SDRAM buffer ----
  logic         wv, wr, rv, rr;
  logic [255:0] wd, rd;
  mwp_gen u_mwp (
    .clk, .rst, .in_valid(s3v), .in_ready(s3r), .in_data(s3d), .in_nbytes(s3n), .in_eoe(s3e),
    .in_ovf(s3o), .flush, .out_valid(wv), .out_ready(wr), .out_data(wd));

  ddr_fifo_ctrl #(.ADDR_W(ADDR_W)) u_ddr (
    .clk, .rst, .in_valid(wv), .in_ready(wr), .in_data(wd), .out_valid(rv), .out_ready(rr),
    .out_data(rd), .mem_addr, .mem_write, .mem_read, .mem_wdata, .mem_waitreq, .mem_rdata,
    .mem_rvalid, .level());

  // ---- unpack, trigger, MEP ----
  logic              uv, ur, ue, uo;
  logic [255:0]      ud;
  logic [5:0]        un;
  logic [EVID_W-1:0] ui;
  mwp_unpack u_unpack (
    .clk, .rst, .in_valid(rv), .in_ready(rr), .in_data(rd), .out_valid(uv), .out_ready(ur),
    .out_data(ud), .out_nbytes(un), .out_eoe(ue), .out_ovf(uo), .out_evid(ui), .hdr_err, .data_err);

  logic              tv, tr, te, to;
  logic [255:0]      td;
  logic [5:0]        tn;
  logic [EVID_W-1:0] ti;
  l0_trigger #(.DEC_DEPTH(DEC_DEPTH)) u_l0 (
    .clk, .rst, .dec_valid, .dec_ready, .dec_evid, .dec_keep,
    .in_valid(uv), .in_ready(ur), .in_data(ud), .in_nbytes(un), .in_eoe(ue), .in_ovf(uo), .in_evid(ui),
    .out_valid(tv), .out_ready(tr), .out_data(td), .out_nbytes(tn), .out_eoe(te), .out_ovf(to),
    .out_evid(ti), .kept_cnt, .rej_cnt, .stale_cnt, .nodec_cnt);

  mep_gen #(.MEP_FACTOR(MEP_FACTOR)) u_mep (
    .clk, .rst, .in_valid(tv), .in_ready(tr), .in_data(td), .in_nbytes(tn), .in_eoe(te),
    .in_evid(ti), .out_valid(mep_valid), .out_ready(mep_ready), .out_data(mep_data),
    .out_sop(mep_sop), .out_eop(mep_eop));
endmodule
