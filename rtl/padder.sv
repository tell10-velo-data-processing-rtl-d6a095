// padder: byte padding of one event's data into wider words.
//
// Every input word brings nbytes valid bytes (first byte on top).  The count
// is rounded up to a multiple of ALIGN bytes and the bytes are placed right
// after the bytes already collected, zeros filling the rounding gap.  When
// more than OUT_W/8 bytes are collected a full output word leaves and the
// rest starts the next one; a word that is exactly full is held until the
// next input shows whether it is the last of the event, so the end-of-event
// flag always sits on a word carrying data.  On the end-of-event word the collected bytes leave even if
// the word is not full, with zero padding after them; if the event ends with
// more bytes than one output word holds, the remainder leaves in an extra
// cycle, during which the input is stalled.  An event without bytes leaves as
// one word with byte count 0.  Padding therefore appears only at the end of
// an event.  Coarser ALIGN means fewer possible byte positions and smaller
// shifters.  Output is registered, valid/ready on both sides, one input word
// per cycle.
module padder #(
  parameter int unsigned IN_W  = 64,
  parameter int unsigned OUT_W = 128,
  parameter int unsigned ALIGN = 1
) (
  input  logic                       clk,
  input  logic                       rst,
  input  logic                       in_valid,
  output logic                       in_ready,
  input  logic [IN_W-1:0]            in_data,
  input  logic [$clog2(IN_W/8):0]    in_nbytes,
  input  logic                       in_eoe,
  input  logic                       in_ovf,
  output logic                       out_valid,
  input  logic                       out_ready,
  output logic [OUT_W-1:0]           out_data,
  output logic [$clog2(OUT_W/8):0]   out_nbytes,
  output logic                       out_eoe,
  output logic                       out_ovf
);
  localparam int unsigned OB  = OUT_W / 8;
  localparam int unsigned FW  = $clog2(2 * OB + 1);   // fill arithmetic width
  localparam int unsigned ONW = $clog2(OB) + 1;

  logic [OUT_W-1:0]   acc;
  logic [FW-1:0]      fill;
  logic               pend;       // remainder of an event still to send
  logic               ovf_acc;
  logic               can_load, in_fire;
  logic [FW-1:0]      nr, total;
  logic [IN_W-1:0]    masked;
  logic [2*OUT_W-1:0] wide;

  assign can_load = !out_valid || out_ready;
  assign in_ready = can_load && !pend;
  assign in_fire  = in_valid && in_ready;

  always_comb begin
    nr     = ((FW'(in_nbytes) + FW'(ALIGN - 1)) / FW'(ALIGN)) * FW'(ALIGN);
    total  = fill + nr;
    masked = in_data & ~({IN_W{1'b1}} >> (8 * in_nbytes));
    wide   = {acc, {OUT_W{1'b0}}} | ({masked, {(2*OUT_W-IN_W){1'b0}}} >> (8 * fill));
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      acc        <= '0;
      fill       <= '0;
      pend       <= 1'b0;
      ovf_acc    <= 1'b0;
      out_valid  <= 1'b0;
      out_data   <= '0;
      out_nbytes <= '0;
      out_eoe    <= 1'b0;
      out_ovf    <= 1'b0;
    end else begin
      if (out_valid && out_ready) out_valid <= 1'b0;
      if (pend && can_load) begin
        out_valid  <= 1'b1;
        out_data   <= acc;
        out_nbytes <= ONW'(fill);
        out_eoe    <= 1'b1;
        out_ovf    <= ovf_acc;
        acc        <= '0;
        fill       <= '0;
        pend       <= 1'b0;
        ovf_acc    <= 1'b0;
      end else if (in_fire) begin
        if (total > FW'(OB) || (total == FW'(OB) && in_eoe)) begin
          out_valid  <= 1'b1;
          out_data   <= wide[2*OUT_W-1 -: OUT_W];
          out_nbytes <= ONW'(OB);
          acc        <= wide[OUT_W-1:0];
          fill       <= total - FW'(OB);
          if (in_eoe && total == FW'(OB)) begin
            out_eoe <= 1'b1;
            out_ovf <= ovf_acc || in_ovf;
            ovf_acc <= 1'b0;
          end else begin
            out_eoe <= 1'b0;
            out_ovf <= 1'b0;
            ovf_acc <= ovf_acc || in_ovf;
            pend    <= in_eoe;
          end
        end else if (in_eoe) begin
          out_valid  <= 1'b1;
          out_data   <= wide[2*OUT_W-1 -: OUT_W];
          out_nbytes <= ONW'(total);
          out_eoe    <= 1'b1;
          out_ovf    <= ovf_acc || in_ovf;
          acc        <= '0;
          fill       <= '0;
          ovf_acc    <= 1'b0;
        end else begin
          acc     <= wide[2*OUT_W-1 -: OUT_W];
          fill    <= total;
          ovf_acc <= ovf_acc || in_ovf;
        end
      end
    end
  end

  a_fill_range: assert property (@(posedge clk) disable iff (rst) fill <= FW'(OB));
endmodule
