// mep_gen: Multi Event Packet assembly, the last stage before the network.
//
// Incoming events (256-bit words with byte counts) are buffered in a DEPTH
// word FIFO.  A MEP is sent only once all of its events are in, so DEPTH
// must hold MEP_FACTOR of the largest events: the time reordering caps an
// event at 8 words per link, at most 48 hits or 192 bytes once unpacked, so
// 12 links make at most about 75 words with alignment padding and 8 events
// about 600 words, hence 1024.  While they enter, the byte length of each event is summed and
// queued, and after every MEP_FACTOR events a descriptor {event ID of the
// first event, MEP length} is queued; MEP length is the sum over the events
// of 2 + event length, the bytes of the event records after the header.
// Once a descriptor is ready the MEP is sent: the header word {event ID 32b,
// MEP length 24b, MEP factor 8b, zeros} in bits 255:224, 223:200, 199:192,
// then for each event its 16-bit byte length followed at once by its data
// bytes.  The pieces go through a padder with 2-byte granularity, so the
// records are packed without gaps and only the last word of the MEP is
// padded.  An empty event is a length of zero and nothing else.  The output
// carries no byte counts any more: out_sop marks the header word, out_eop
// the last word.  One piece per cycle into the padder, valid/ready output.
// The MEP factor default (8), the meaning of the length field and the 2-byte
// packing (the design's table gives the MEP padder 4-byte alignment, its
// output format packs 16-bit length fields back to back) are this design's
// reading of the format.
module mep_gen #(
  parameter int unsigned MEP_FACTOR = 8,
  parameter int unsigned DEPTH      = 1024
) (
  input  logic                           clk,
  input  logic                           rst,
  input  logic                           in_valid,
  output logic                           in_ready,
  input  logic [tell10_pkg::BUS_W-1:0]   in_data,
  input  logic [5:0]                     in_nbytes,
  input  logic                           in_eoe,
  input  logic [tell10_pkg::EVID_W-1:0]  in_evid,
  output logic                           out_valid,
  input  logic                           out_ready,
  output logic [tell10_pkg::BUS_W-1:0]   out_data,
  output logic                           out_sop,
  output logic                           out_eop
);
  import tell10_pkg::*;

  localparam int unsigned FW = (MEP_FACTOR > 1) ? $clog2(MEP_FACTOR) : 1;

  // ---------------- input side: buffer and length accounting ----------------
  logic              d_ready, l_ready, s_ready, in_fire;
  logic              mid;                    // inside an event
  logic [15:0]       ev_len, ev_len_now;
  logic [23:0]       mep_sum, mep_sum_now;
  logic [FW-1:0]     ev_cnt;
  logic [EVID_W-1:0] mep_evid, first_evid;
  logic              push_desc;

  assign in_ready    = d_ready && l_ready && s_ready;
  assign in_fire     = in_valid && in_ready;
  assign ev_len_now  = ev_len + 16'(in_nbytes);
  assign mep_sum_now = mep_sum + 24'd2 + 24'(ev_len_now);
  assign first_evid  = (ev_cnt == '0 && !mid) ? in_evid : mep_evid;
  assign push_desc   = in_fire && in_eoe && ev_cnt == FW'(MEP_FACTOR - 1);

  always_ff @(posedge clk) begin
    if (rst) begin
      mid      <= 1'b0;
      ev_len   <= '0;
      mep_sum  <= '0;
      ev_cnt   <= '0;
      mep_evid <= '0;
    end else if (in_fire) begin
      mep_evid <= first_evid;
      if (in_eoe) begin
        mid    <= 1'b0;
        ev_len <= '0;
        if (ev_cnt == FW'(MEP_FACTOR - 1)) begin
          ev_cnt  <= '0;
          mep_sum <= '0;
        end else begin
          ev_cnt  <= ev_cnt + 1'b1;
          mep_sum <= mep_sum_now;
        end
      end else begin
        mid    <= 1'b1;
        ev_len <= ev_len_now;
      end
    end
  end

  logic             dq_valid, dq_pop;
  logic [BUS_W-1:0] dq_data;
  logic [5:0]       dq_nbytes;
  logic             dq_eoe;
  logic             lq_valid, lq_pop;
  logic [15:0]      lq_len;
  logic             sq_valid, sq_pop;
  logic [EVID_W+23:0] sq_desc;

  sync_fifo #(.W(BUS_W + 7), .DEPTH(DEPTH)) u_data (
    .clk, .rst, .in_valid(in_fire), .in_ready(d_ready), .in_data({in_data, in_nbytes, in_eoe}),
    .out_valid(dq_valid), .out_ready(dq_pop), .out_data({dq_data, dq_nbytes, dq_eoe}), .count());
  sync_fifo #(.W(16), .DEPTH(DEPTH)) u_len (
    .clk, .rst, .in_valid(in_fire && in_eoe), .in_ready(l_ready), .in_data(ev_len_now),
    .out_valid(lq_valid), .out_ready(lq_pop), .out_data(lq_len), .count());
  sync_fifo #(.W(EVID_W + 24), .DEPTH(16)) u_desc (
    .clk, .rst, .in_valid(push_desc), .in_ready(s_ready), .in_data({first_evid, mep_sum_now}),
    .out_valid(sq_valid), .out_ready(sq_pop), .out_data(sq_desc), .count());

  // ---------------- output side: header, lengths and data into the padder ----------------
  typedef enum logic [1:0] {O_HDR, O_LEN, O_DATA} ostate_t;
  ostate_t          os;
  logic [FW-1:0]    ev_i;
  logic             p_valid, p_ready, p_eoe;
  logic [BUS_W-1:0] p_data;
  logic [5:0]       p_nbytes;
  logic             last_ev;

  assign last_ev = (ev_i == FW'(MEP_FACTOR - 1));

  always_comb begin
    p_valid  = 1'b0;
    p_data   = '0;
    p_nbytes = '0;
    p_eoe    = 1'b0;
    sq_pop   = 1'b0;
    lq_pop   = 1'b0;
    dq_pop   = 1'b0;
    case (os)
      O_HDR: begin
        p_valid  = sq_valid;
        p_data   = {sq_desc, 8'(MEP_FACTOR), {(BUS_W-EVID_W-32){1'b0}}};
        p_nbytes = 6'(BUS_W / 8);
        sq_pop   = sq_valid && p_ready;
      end
      O_LEN: begin
        p_valid  = lq_valid;
        p_data   = {lq_len, {(BUS_W-16){1'b0}}};
        p_nbytes = 6'd2;
        lq_pop   = lq_valid && p_ready;
      end
      O_DATA: begin
        p_valid  = dq_valid;
        p_data   = dq_data;
        p_nbytes = dq_nbytes;
        p_eoe    = dq_eoe && last_ev;
        dq_pop   = dq_valid && p_ready;
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      os   <= O_HDR;
      ev_i <= '0;
    end else if (p_valid && p_ready) begin
      case (os)
        O_HDR:  begin os <= O_LEN; ev_i <= '0; end
        O_LEN:  os <= O_DATA;
        O_DATA: if (dq_eoe) begin
          if (last_ev) os <= O_HDR;
          else begin
            os   <= O_LEN;
            ev_i <= ev_i + 1'b1;
          end
        end
        default: os <= O_HDR;
      endcase
    end
  end

  logic [5:0] o_nbytes;
  logic       o_ovf;
  padder #(.IN_W(BUS_W), .OUT_W(BUS_W), .ALIGN(2)) u_pad (
    .clk, .rst, .in_valid(p_valid), .in_ready(p_ready), .in_data(p_data), .in_nbytes(p_nbytes),
    .in_eoe(p_eoe), .in_ovf(1'b0), .out_valid, .out_ready, .out_data, .out_nbytes(o_nbytes),
    .out_eoe(out_eop), .out_ovf(o_ovf));

  // only the last word of a MEP may be partly filled; nothing carries an
  // overflow flag into the padder
  a_full_words: assert property (@(posedge clk) disable iff (rst)
    out_valid && !out_eop |-> o_nbytes == 6'(BUS_W / 8));
  a_no_ovf: assert property (@(posedge clk) disable iff (rst) out_valid |-> !o_ovf);

  always_ff @(posedge clk) begin
    if (rst) out_sop <= 1'b1;
    else if (out_valid && out_ready) out_sop <= out_eop;
  end
endmodule
