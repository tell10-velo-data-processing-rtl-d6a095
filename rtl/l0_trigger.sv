// l0_trigger: applies the level-0 trigger decisions to the event stream.
//
// Decisions arrive as {event ID 32b, keep 1b} and wait in a 33-bit x
// DEC_DEPTH (4096) FIFO, enough for about 100 us of decisions; the block
// sits after the SDRAM so decisions have that long to arrive.  At the first
// word of each event the head decision is examined: same event ID -> it is
// used and popped; older ID -> it belongs to an event already gone, it is
// popped and counted in stale_cnt, and the next one is examined; newer ID ->
// the event has no decision, it is kept and counted in nodec_cnt.  While
// the FIFO is empty the event waits for its decision.  Kept
// events pass word by word (combinational path, valid/ready); rejected
// events are read and discarded.  Events are counted in kept_cnt and
// rej_cnt.  Deciding takes one cycle per event.  The handling of missing or
// stale decisions is this design's choice.
module l0_trigger #(
  parameter int unsigned DEC_DEPTH = 4096
) (
  input  logic                           clk,
  input  logic                           rst,
  input  logic                           dec_valid,
  output logic                           dec_ready,
  input  logic [tell10_pkg::EVID_W-1:0]  dec_evid,
  input  logic                           dec_keep,
  input  logic                           in_valid,
  output logic                           in_ready,
  input  logic [tell10_pkg::BUS_W-1:0]   in_data,
  input  logic [5:0]                     in_nbytes,
  input  logic                           in_eoe,
  input  logic                           in_ovf,
  input  logic [tell10_pkg::EVID_W-1:0]  in_evid,
  output logic                           out_valid,
  input  logic                           out_ready,
  output logic [tell10_pkg::BUS_W-1:0]   out_data,
  output logic [5:0]                     out_nbytes,
  output logic                           out_eoe,
  output logic                           out_ovf,
  output logic [tell10_pkg::EVID_W-1:0]  out_evid,
  output logic [15:0]                    kept_cnt,
  output logic [15:0]                    rej_cnt,
  output logic [15:0]                    stale_cnt,
  output logic [15:0]                    nodec_cnt
);
  import tell10_pkg::*;

  logic                 q_valid, q_pop;
  logic [EVID_W:0]      q_data;
  logic [EVID_W-1:0]    q_evid;
  logic                 q_keep;
  logic                 in_event, keep_cur;
  logic signed [EVID_W-1:0] diff;

  sync_fifo #(.W(EVID_W + 1), .DEPTH(DEC_DEPTH)) u_dec (
    .clk, .rst, .in_valid(dec_valid), .in_ready(dec_ready), .in_data({dec_evid, dec_keep}),
    .out_valid(q_valid), .out_ready(q_pop), .out_data(q_data), .count());

  assign q_evid = q_data[EVID_W:1];
  assign q_keep = q_data[0];
  assign diff   = in_evid - q_evid;
  assign q_pop  = !in_event && in_valid && q_valid && (diff >= 0);

  assign out_valid  = in_event && keep_cur && in_valid;
  assign in_ready   = in_event && (keep_cur ? out_ready : 1'b1);
  assign out_data   = in_data;
  assign out_nbytes = in_nbytes;
  assign out_eoe    = in_eoe;
  assign out_ovf    = in_ovf;
  assign out_evid   = in_evid;

  always_ff @(posedge clk) begin
    if (rst) begin
      in_event  <= 1'b0;
      keep_cur  <= 1'b0;
      kept_cnt  <= '0;
      rej_cnt   <= '0;
      stale_cnt <= '0;
      nodec_cnt <= '0;
    end else if (!in_event) begin
      if (in_valid && q_valid) begin
        if (diff > 0) begin
          stale_cnt <= stale_cnt + 1'b1;
        end else if (diff == 0) begin
          in_event <= 1'b1;
          keep_cur <= q_keep;
        end else begin
          in_event  <= 1'b1;
          keep_cur  <= 1'b1;
          nodec_cnt <= nodec_cnt + 1'b1;
        end
      end
    end else if (in_valid && in_ready && in_eoe) begin
      in_event <= 1'b0;
      if (keep_cur) kept_cnt <= kept_cnt + 1'b1;
      else          rej_cnt  <= rej_cnt + 1'b1;
    end
  end
endmodule
