// mwp_unpack: reads MWP packets coming back from the SDRAM, checks them and
// rebuilds the event stream.
//
// A packet is a header word followed by WORDS data words.  The header is
// kept; its 16-bit XOR checksum (bits 239:224 over the seven info words) is
// compared and a mismatch counted in hdr_err.  For data word k the info word
// k gives the byte count, the flags and the checksum of the word; a mismatch
// is counted in data_err and the word is still passed on.  Filler slots
// (info word zero) are dropped.  Since event numbers are not stored in the
// SDRAM, a 32-bit event ID is counted here from the end-of-event flags,
// starting at 0 after reset; every output word carries the ID of its event.
// One input word per cycle; output registered with valid/ready.
module mwp_unpack #(
  parameter int unsigned WORDS = 7
) (
  input  logic                           clk,
  input  logic                           rst,
  input  logic                           in_valid,
  output logic                           in_ready,
  input  logic [tell10_pkg::BUS_W-1:0]   in_data,
  output logic                           out_valid,
  input  logic                           out_ready,
  output logic [tell10_pkg::BUS_W-1:0]   out_data,
  output logic [5:0]                     out_nbytes,
  output logic                           out_eoe,
  output logic                           out_ovf,
  output logic [tell10_pkg::EVID_W-1:0]  out_evid,
  output logic [15:0]                    hdr_err,
  output logic [15:0]                    data_err
);
  import tell10_pkg::*;

  localparam int unsigned IW = $clog2(WORDS + 1);

  logic [32*WORDS-1:0] hdr;
  logic [IW-1:0]       idx;          // 0: header expected, k+1: data word k
  logic [EVID_W-1:0]   evid;
  mwp_info_t           info;
  logic                can_load, in_fire, filler;

  assign can_load = !out_valid || out_ready;
  assign in_ready = can_load;
  assign in_fire  = in_valid && in_ready;
  assign info     = mwp_info_t'(hdr[32*(32'(idx) - 1) +: 32]);
  assign filler   = (info == '0);

  always_ff @(posedge clk) begin
    if (rst) begin
      hdr        <= '0;
      idx        <= '0;
      evid       <= '0;
      hdr_err    <= '0;
      data_err   <= '0;
      out_valid  <= 1'b0;
      out_data   <= '0;
      out_nbytes <= '0;
      out_eoe    <= 1'b0;
      out_ovf    <= 1'b0;
      out_evid   <= '0;
    end else begin
      if (out_valid && out_ready) out_valid <= 1'b0;
      if (in_fire) begin
        if (idx == '0) begin
          hdr <= in_data[32*WORDS-1:0];
          if (in_data[32*WORDS +: 16] != xor16({{(BUS_W-32*WORDS){1'b0}}, in_data[32*WORDS-1:0]}))
            hdr_err <= hdr_err + 1'b1;
          idx <= idx + 1'b1;
        end else begin
          idx <= (idx == IW'(WORDS)) ? '0 : idx + 1'b1;
          if (!filler) begin
            if (xor16(in_data) != info.csum) data_err <= data_err + 1'b1;
            out_valid  <= 1'b1;
            out_data   <= in_data;
            out_nbytes <= 6'(info.dv);
            out_eoe    <= info.flags[FLAG_EOE];
            out_ovf    <= info.flags[FLAG_OVF];
            out_evid   <= evid;
            if (info.flags[FLAG_EOE]) evid <= evid + 1'b1;
          end
        end
      end
    end
  end
endmodule
