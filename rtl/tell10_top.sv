// tell10_top: data processing of the TELL10 readout board for the VELO
// pixel detector: 24 GBT links in, two independent streams of Multi Event
// Packets out.
//
// The 24 links are split into two halves of 12 (links 0-11 and 12-23), each
// a half_stream with its own DDR3 SDRAM port, level-0 decision input and MEP
// output, so that no bus wider than 256 bits is needed.  Port arrays are
// indexed by half (0, 1).  GBT data words enter as 80-bit frames with a data-valid
// bit per 40-bit half (one in five cycles at the 200 MHz processing clock for a 40 MHz
// link); the GBT receivers, the SDRAM devices and the Ethernet framers are
// outside this module.  flush drains the buffers at the end of a run.
module tell10_top #(
  parameter int unsigned EV_DEPTH   = 512,
  parameter int unsigned MARGIN     = 16,
  parameter int unsigned ADDR_W     = 27,
  parameter int unsigned DEC_DEPTH  = 4096,
  parameter int unsigned MEP_FACTOR = 8
) (
  input  logic                                clk,
  input  logic                                rst,
  input  logic [23:0][1:0]                    gbt_dv,
  output logic [23:0]                         gbt_ready,
  input  logic [23:0][tell10_pkg::GBT_W-1:0]  gbt_frame,
  input  logic                                flush,
  output logic [1:0][ADDR_W-1:0]              mem_addr,
  output logic [1:0]                          mem_write,
  output logic [1:0]                          mem_read,
  output logic [1:0][tell10_pkg::BUS_W-1:0]   mem_wdata,
  input  logic [1:0]                          mem_waitreq,
  input  logic [1:0][tell10_pkg::BUS_W-1:0]   mem_rdata,
  input  logic [1:0]                          mem_rvalid,
  input  logic [1:0]                          dec_valid,
  output logic [1:0]                          dec_ready,
  input  logic [1:0][tell10_pkg::EVID_W-1:0]  dec_evid,
  input  logic [1:0]                          dec_keep,
  output logic [1:0]                          mep_valid,
  input  logic [1:0]                          mep_ready,
  output logic [1:0][tell10_pkg::BUS_W-1:0]   mep_data,
  output logic [1:0]                          mep_sop,
  output logic [1:0]                          mep_eop,
  output logic [23:0][15:0]                   drop_cnt,
  output logic [1:0][15:0]                    hdr_err,
  output logic [1:0][15:0]                    data_err,
  output logic [1:0][15:0]                    kept_cnt,
  output logic [1:0][15:0]                    rej_cnt,
  output logic [1:0][15:0]                    stale_cnt,
  output logic [1:0][15:0]                    nodec_cnt
);
  for (genvar h = 0; h < 2; h++) begin : g_half
    half_stream #(.LINK_BASE(12 * h), .EV_DEPTH(EV_DEPTH), .MARGIN(MARGIN), .ADDR_W(ADDR_W),
                  .DEC_DEPTH(DEC_DEPTH), .MEP_FACTOR(MEP_FACTOR)) u_half (
      .clk, .rst, .gbt_dv(gbt_dv[12*h +: 12]), .gbt_ready(gbt_ready[12*h +: 12]),
      .gbt_frame(gbt_frame[12*h +: 12]), .flush,
      .mem_addr(mem_addr[h]), .mem_write(mem_write[h]), .mem_read(mem_read[h]),
      .mem_wdata(mem_wdata[h]), .mem_waitreq(mem_waitreq[h]), .mem_rdata(mem_rdata[h]),
      .mem_rvalid(mem_rvalid[h]), .dec_valid(dec_valid[h]), .dec_ready(dec_ready[h]),
      .dec_evid(dec_evid[h]), .dec_keep(dec_keep[h]), .mep_valid(mep_valid[h]),
      .mep_ready(mep_ready[h]), .mep_data(mep_data[h]), .mep_sop(mep_sop[h]), .mep_eop(mep_eop[h]),
      .drop_cnt(drop_cnt[12*h +: 12]), .hdr_err(hdr_err[h]), .data_err(data_err[h]),
      .kept_cnt(kept_cnt[h]), .rej_cnt(rej_cnt[h]), .stale_cnt(stale_cnt[h]),
      .nodec_cnt(nodec_cnt[h]));
  end
endmodule
