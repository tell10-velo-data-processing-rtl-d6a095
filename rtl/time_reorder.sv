// time_reorder: puts the nSPP packets of one link back into bunch-crossing
// order.
//
// The front-end chips send packets out of time order.  Each packet is
// written into a data RAM slot chosen by the low bits of its bunch counter
// (BCnt mod EV_DEPTH), EV_WORDS 64-bit words per slot plus an end-of-packet
// bit (65-bit words).  A second, 20-bit RAM per slot holds the BCnt, the
// number of words already stored and an overflow flag; it is kept twice, one
// copy read by the write side and one by the read side.  A flip-flop per slot
// says whether the slot was written since it was last read.
//
// Write side, per packet: cycle 0 accept and address the length RAM, cycle 1
// wait, cycles 2.. write the 1, 2 or 3 words of the packet behind the words
// already in the slot, then one cycle to update the length: 3 + words cycles
// (4, 5 or 6).  A packet that does not fit in the slot is dropped and the
// event is flagged as overflowed; a packet whose event was already read out
// is dropped as late.  drop_cnt counts both.
//
// Read side: events leave in BCnt order, starting at BCnt 0 after reset, as
// soon as the newest BCnt written is more than DELAY = EV_DEPTH - MARGIN
// events ahead, or a waiting packet is DELAY or more events ahead (so a jump
// of the bunch counter over empty crossings pushes the read side on instead
// of losing data), and all of them while flush is high.  Per event: one cycle to start,
// one to wait for the length, then one word per cycle; an event with nothing
// stored leaves as a single word flagged empty.  So every bunch crossing
// produces at least one word downstream, which later stages count to
// rebuild the event number.  Words go through a 16-entry output FIFO.
// The two-cycle RAM reads follow from the three-clock RAM access of the
// target FPGA; the flag flip-flops, the flush input and the BCnt wrap at
// 4096 are choices of this design.
module time_reorder #(
  parameter int unsigned EV_DEPTH = 512,
  parameter int unsigned EV_WORDS = 8,
  parameter int unsigned MARGIN   = 16
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 in_valid,
  output logic                 in_ready,
  input  tell10_pkg::spp_t     in_spp,
  input  logic                 flush,
  output logic                 out_valid,
  input  logic                 out_ready,
  output tell10_pkg::tr_word_t out_word,
  output logic [15:0]          drop_cnt
);
  import tell10_pkg::*;

  localparam int unsigned SW    = $clog2(EV_DEPTH);
  localparam int unsigned KW    = $clog2(EV_WORDS);
  localparam int unsigned NWW   = KW + 1;
  localparam int unsigned DELAY = EV_DEPTH - MARGIN;
  localparam int unsigned OF_DEPTH = 16;

  typedef struct packed {
    logic [BCNT_W-1:0] bcnt;
    logic [NWW-1:0]    nwords;
    logic              ovf;
  } len_t;
  localparam int unsigned LEN_W = $bits(len_t);

  typedef enum logic [1:0] {W_IDLE, W_WAIT, W_WORDS, W_UPD} wstate_t;
  typedef enum logic [1:0] {R_IDLE, R_WAIT, R_LEN, R_WORDS} rstate_t;

  wstate_t           ws;
  logic              rd_go;
  rstate_t           rs;
  logic [BCNT_W-1:0] nb, rp;                 // newest BCnt written, next BCnt to read
  logic [EV_DEPTH-1:0] slot_valid;

  // ---------------- write side ----------------
  spp_t              w_spp;
  logic [1:0]        w_k;
  logic [BCNT_W-1:0] d_in;
  logic              in_window, in_late;
  logic [SW-1:0]     w_slot;
  len_t              w_len_rd, w_len_new;
  logic [NWW-1:0]    w_base, w_nw;
  logic              w_fits;
  logic              d_we;
  logic [SW+KW-1:0]  d_waddr;
  logic [TR_W:0]     d_wdata;
  logic [3*TR_W-1:0] w_words;

  // d_in: distance of the packet's event from the next event to read.  A
  // packet behind it (late) is dropped; one DELAY or more ahead waits, and
  // pushes the read side forward, until it is inside the window.  An event
  // the read side starts in this very cycle is not written.
  assign d_in      = in_spp.bcnt - rp;
  assign in_late   = (d_in >= BCNT_W'(2048));
  assign in_window = !in_late && (d_in < BCNT_W'(DELAY)) && !(rd_go && d_in == '0);
  assign in_ready  = (ws == W_IDLE) && (in_late || in_window);
  assign w_slot    = w_spp.bcnt[SW-1:0];
  assign w_nw      = NWW'((w_spp.nbytes + 5'd7) >> 3);
  assign w_base    = (slot_valid[w_slot] && w_len_rd.bcnt == w_spp.bcnt) ? w_len_rd.nwords : '0;
  assign w_fits    = (w_base + w_nw <= NWW'(EV_WORDS));
  assign w_words   = {w_spp.data, {(3*TR_W-SPP_W){1'b0}}};

  always_comb begin
    w_len_new.bcnt   = w_spp.bcnt;
    w_len_new.nwords = w_fits ? (w_base + w_nw) : w_base;
    w_len_new.ovf    = !w_fits ||
                       (slot_valid[w_slot] && w_len_rd.bcnt == w_spp.bcnt && w_len_rd.ovf);
    d_we    = (ws == W_WORDS) && w_fits;
    d_waddr = {w_slot, KW'(w_base + NWW'(w_k))};
    d_wdata = {w_words[3*TR_W-1-TR_W*w_k -: TR_W], (NWW'(w_k) + 1'b1 == w_nw)};
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      ws       <= W_IDLE;
      w_k      <= '0;
      nb       <= '0;
      drop_cnt <= '0;
      w_spp    <= '0;
    end else begin
      case (ws)
        W_IDLE: if (in_valid && in_ready) begin
          if (!in_late) begin
            w_spp <= in_spp;
            w_k   <= '0;
            ws    <= W_WAIT;
            if ((in_spp.bcnt - nb) != '0 && !(in_spp.bcnt - nb >= BCNT_W'(2048)))
              nb <= in_spp.bcnt;
          end else begin
            drop_cnt <= drop_cnt + 1'b1;
          end
        end
        W_WAIT:  ws <= W_WORDS;
        W_WORDS: begin
          if (!w_fits) begin
            drop_cnt <= drop_cnt + 1'b1;
            ws       <= W_UPD;
          end else if (NWW'(w_k) + 1'b1 == w_nw) begin
            ws <= W_UPD;
          end else begin
            w_k <= w_k + 1'b1;
          end
        end
        W_UPD:   ws <= W_IDLE;
      endcase
    end
  end

  // ---------------- read side ----------------
  logic [BCNT_W-1:0] ahead;
  logic [BCNT_W-1:0] r_bcnt;
  logic [SW-1:0]     r_slot;
  logic              r_valid;
  len_t              r_len_rd;
  logic [NWW-1:0]    r_n, r_k;
  logic              r_ovf;
  logic [SW+KW-1:0]  d_raddr;
  logic [TR_W:0]     d_rdata;
  logic [1:0]        p_valid, p_last;      // read pipeline tags (2 cycles)
  logic              p_ovf [2];
  tr_word_t          of_in;
  logic              of_push, of_ready;
  logic [$clog2(OF_DEPTH):0] of_count;
  logic              of_room;

  assign ahead   = nb + 1'b1 - rp;
  assign of_room = (of_count < OF_DEPTH[$clog2(OF_DEPTH):0] - EV_WORDS[$clog2(OF_DEPTH):0] - 3);
  assign rd_go   = (rs == R_IDLE) && of_room &&
                   (ahead != '0) && (ahead < BCNT_W'(2048)) &&
                   (ahead > BCNT_W'(DELAY) || flush ||
                    (ws == W_IDLE && in_valid && !in_late && d_in >= BCNT_W'(DELAY))) &&
                   !(ws != W_IDLE && w_spp.bcnt == rp);
  assign r_slot  = r_bcnt[SW-1:0];
  assign d_raddr = {r_slot, KW'(r_k)};

  always_ff @(posedge clk) begin
    if (rst) begin
      rs      <= R_IDLE;
      rp      <= '0;
      r_bcnt  <= '0;
      r_valid <= 1'b0;
      r_n     <= '0;
      r_k     <= '0;
      r_ovf   <= 1'b0;
    end else begin
      case (rs)
        R_IDLE: if (rd_go) begin
          r_bcnt  <= rp;
          r_valid <= slot_valid[rp[SW-1:0]];
          rp      <= rp + 1'b1;
          r_k     <= '0;
          rs      <= R_WAIT;
        end
        R_WAIT: rs <= R_LEN;
        R_LEN: begin
          r_n   <= (r_valid && r_len_rd.bcnt == r_bcnt) ? r_len_rd.nwords : '0;
          r_ovf <= r_valid && r_len_rd.bcnt == r_bcnt && r_len_rd.ovf;
          if (r_valid && r_len_rd.bcnt == r_bcnt && r_len_rd.nwords > NWW'(1)) begin
            r_k <= NWW'(1);
            rs  <= R_WORDS;
          end else begin
            rs <= R_IDLE;
          end
        end
        R_WORDS: begin
          if (r_k + 1'b1 == r_n) rs <= R_IDLE;
          r_k <= r_k + 1'b1;
        end
      endcase
    end
  end

  // slot flags: set by the write side when it records a packet, cleared by
  // the read side when it starts an event
  always_ff @(posedge clk) begin
    if (rst) slot_valid <= '0;
    else begin
      if (rs == R_IDLE && rd_go) slot_valid[rp[SW-1:0]] <= 1'b0;
      if (ws == W_UPD)           slot_valid[w_slot]     <= 1'b1;
    end
  end

  // tags for words in flight through the data RAM
  logic iss_valid, iss_last, iss_ovf, len_has;
  assign len_has = r_valid && r_len_rd.bcnt == r_bcnt && r_len_rd.nwords != '0;
  always_comb begin
    iss_valid = 1'b0;
    iss_last  = 1'b0;
    iss_ovf   = 1'b0;
    if (rs == R_LEN && len_has) begin
      iss_valid = 1'b1;
      iss_last  = (r_len_rd.nwords == NWW'(1));
      iss_ovf   = r_len_rd.ovf;
    end else if (rs == R_WORDS) begin
      iss_valid = 1'b1;
      iss_last  = (r_k + 1'b1 == r_n);
      iss_ovf   = r_ovf;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      p_valid <= '0;
      p_last  <= '0;
      p_ovf   <= '{1'b0, 1'b0};
    end else begin
      p_valid <= {p_valid[0], iss_valid};
      p_last  <= {p_last[0], iss_last};
      p_ovf   <= '{iss_ovf, p_ovf[0]};
    end
  end

  always_comb begin
    of_in   = '0;
    of_push = 1'b0;
    if (p_valid[1]) begin
      of_push     = 1'b1;
      of_in.data  = d_rdata[TR_W:1];
      of_in.eospp = d_rdata[0];
      of_in.eoe   = p_last[1];
      of_in.ovf   = p_last[1] && p_ovf[1];
    end else if (rs == R_LEN && !len_has) begin
      of_push     = 1'b1;
      of_in.eoe   = 1'b1;
      of_in.empty = 1'b1;
      of_in.ovf   = r_valid && r_len_rd.bcnt == r_bcnt && r_len_rd.ovf;
    end
  end

  // an empty-event word and a data word never coincide: an empty event is
  // decided in R_LEN, two cycles after the previous event's last issue at
  // the latest, and words issued in R_LEN/R_WORDS of that event arrive
  // before the next event reaches R_LEN
  a_of_no_collision: assert property (@(posedge clk) disable iff (rst)
    !(p_valid[1] && rs == R_LEN && !len_has));
  a_of_no_overflow: assert property (@(posedge clk) disable iff (rst) !(of_push && !of_ready));

  // ---------------- memories ----------------
  sdp_ram #(.W(TR_W+1), .DEPTH(EV_DEPTH*EV_WORDS)) u_data (
    .clk, .we(d_we), .waddr(d_waddr), .wdata(d_wdata), .raddr(d_raddr), .rd_data(d_rdata));

  logic [LEN_W-1:0] w_len_raw, r_len_raw;
  sdp_ram #(.W(LEN_W), .DEPTH(EV_DEPTH)) u_len_w (
    .clk, .we(ws == W_UPD), .waddr(w_slot), .wdata(w_len_new),
    .raddr(ws == W_IDLE ? in_spp.bcnt[SW-1:0] : w_slot), .rd_data(w_len_raw));
  sdp_ram #(.W(LEN_W), .DEPTH(EV_DEPTH)) u_len_r (
    .clk, .we(ws == W_UPD), .waddr(w_slot), .wdata(w_len_new),
    .raddr(rs == R_IDLE ? rp[SW-1:0] : r_slot), .rd_data(r_len_raw));
  assign w_len_rd = len_t'(w_len_raw);
  assign r_len_rd = len_t'(r_len_raw);

  sync_fifo #(.W($bits(tr_word_t)), .DEPTH(OF_DEPTH)) u_ofifo (
    .clk, .rst, .in_valid(of_push), .in_ready(of_ready), .in_data(of_in),
    .out_valid, .out_ready, .out_data(out_word), .count(of_count));
endmodule
