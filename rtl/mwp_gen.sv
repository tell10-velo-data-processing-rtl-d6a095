// mwp_gen: Multi Word Packet generator, the last step before the SDRAM.
//
// The SDRAM has no parity bits and must be written in blocks, so data is
// grouped into packets of one header word and WORDS (7) data words, 256 bits
// each.  For every data word a 32-bit info word is made: data valid 8b (the
// byte count), flags 8b (bit0 end of event, bit1 event empty, bit2 event RAM
// overflow) and a 16-bit checksum, the XOR of the sixteen 16-bit halves of
// the word.  The header holds info word k in bits 32k+31:32k, the XOR
// checksum of those 224 bits in bits 239:224, and zero in 255:240; it is sent
// first, then the seven data words.  An event without data takes one slot
// whose data word is zero.
//
// Two banks of seven slots alternate: one fills from the input while the
// other is sent, so the input stalls one cycle per packet (8 output words
// for 7 input words).  flush closes a partly filled bank with filler slots
// (info word zero), so the last events of a run reach the output.  Output
// valid/ready; no sideband marks the header, packets are always 8 words.
// Packet layout and info fields follow the MWP format; the checksum
// function, the bit positions and the flush are this design's choices.
module mwp_gen #(
  parameter int unsigned WORDS = 7
) (
  input  logic                           clk,
  input  logic                           rst,
  input  logic                           in_valid,
  output logic                           in_ready,
  input  logic [tell10_pkg::BUS_W-1:0]   in_data,
  input  logic [5:0]                     in_nbytes,
  input  logic                           in_eoe,
  input  logic                           in_ovf,
  input  logic                           flush,
  output logic                           out_valid,
  input  logic                           out_ready,
  output logic [tell10_pkg::BUS_W-1:0]   out_data
);
  import tell10_pkg::*;

  localparam int unsigned IW = $clog2(WORDS + 1);

  logic [BUS_W-1:0] dbank [2][WORDS];
  mwp_info_t        ibank [2][WORDS];
  logic [1:0]       bfull;
  logic             fb, eb;
  logic [IW-1:0]    fi, ei;
  logic             in_fire, out_fire, do_flush;
  mwp_info_t        info_new;
  logic [BUS_W-1:0] hdr;

  assign in_ready = !bfull[fb];
  assign in_fire  = in_valid && in_ready;
  assign do_flush = flush && !in_valid && !bfull[fb] && fi != '0;
  assign out_valid = bfull[eb];
  assign out_fire = out_valid && out_ready;

  always_comb begin
    info_new.dv    = 8'(in_nbytes);
    info_new.flags = '0;
    info_new.flags[FLAG_EOE]   = in_eoe;
    info_new.flags[FLAG_EMPTY] = in_eoe && in_nbytes == '0;
    info_new.flags[FLAG_OVF]   = in_eoe && in_ovf;
    info_new.csum  = xor16(in_data);
    hdr = '0;
    for (int k = 0; k < WORDS; k++) hdr[32*k +: 32] = ibank[eb][k];
    hdr[32*WORDS +: 16] = xor16({{(BUS_W-32*WORDS){1'b0}}, hdr[32*WORDS-1:0]});
    out_data = (ei == '0) ? hdr : dbank[eb][ei - 1'b1];
  end

  always_ff @(posedge clk) begin
    if (in_fire) begin
      dbank[fb][fi] <= in_data;
      ibank[fb][fi] <= info_new;
    end else if (do_flush) begin
      for (int k = 0; k < WORDS; k++)
        if (IW'(k) >= fi) begin
          dbank[fb][k] <= '0;
          ibank[fb][k] <= '0;
        end
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      bfull <= '0;
      fb    <= 1'b0;
      eb    <= 1'b0;
      fi    <= '0;
      ei    <= '0;
    end else begin
      if (in_fire && fi == IW'(WORDS - 1) || do_flush) begin
        bfull[fb] <= 1'b1;
        fb        <= !fb;
        fi        <= '0;
      end else if (in_fire) begin
        fi <= fi + 1'b1;
      end
      if (out_fire) begin
        if (ei == IW'(WORDS)) begin
          bfull[eb] <= 1'b0;
          eb        <= !eb;
          ei        <= '0;
        end else begin
          ei <= ei + 1'b1;
        end
      end
    end
  end
endmodule
