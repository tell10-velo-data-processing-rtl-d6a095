// tell10_pkg: types and constants shared by the TELL10 VELO data-processing
// blocks.
//
// Byte order convention used everywhere: the first byte of a word sits in its
// most significant bits (byte 0 = bits W-1:W-8), and a byte count says how many
// leading bytes are valid.  The nSPP packet layout (bunch counter 12b, super
// pixel address 12b, hit count 4b, then 4-bit hit addresses and 4-bit ToTs)
// follows the nSPP format; a packet with hit count c carries c+1 hits and is
// 28 + 8(c+1) bits long, stored in 4 + c + 1 bytes (last nibble padding).
package tell10_pkg;

  localparam int unsigned GBT_W       = 80;   // GBT data field
  localparam int unsigned HALF_W      = 40;   // one front-end stream
  localparam int unsigned SPP_BYTES   = 20;   // longest nSPP: 156 bits -> 20 bytes
  localparam int unsigned SPP_W       = SPP_BYTES * 8;
  localparam int unsigned BCNT_W      = 12;
  localparam int unsigned LINK_ID_W   = 5;
  localparam int unsigned HIT_W       = 32;   // one unpacked hit in a 32-bit slot
  localparam int unsigned TR_W        = 64;   // time-reorder RAM data word
  localparam int unsigned BUS_W       = 256;  // stage 3, MWP, SDRAM and MEP width
  localparam int unsigned EVID_W      = 32;

  // One reconstructed nSPP.
  typedef struct packed {
    logic [BCNT_W-1:0] bcnt;
    logic [4:0]        nbytes;   // 5..20
    logic [SPP_W-1:0]  data;     // packet bytes, first byte in the top bits
  } spp_t;

  // One word read out of the time-reorder buffer.
  typedef struct packed {
    logic [TR_W-1:0] data;
    logic            eospp;  // last word of an nSPP
    logic            eoe;    // last word of the event
    logic            empty;  // event without data (data invalid)
    logic            ovf;    // packets of this event were dropped
  } tr_word_t;

  // MWP info word (one per data word).
  typedef struct packed {
    logic [7:0]  dv;        // valid bytes in the data word
    logic [7:0]  flags;     // bit0 end of event, bit1 event empty, bit2 event RAM overflow
    logic [15:0] csum;
  } mwp_info_t;

  localparam int unsigned FLAG_EOE   = 0;
  localparam int unsigned FLAG_EMPTY = 1;
  localparam int unsigned FLAG_OVF   = 2;

  // 16-bit XOR checksum over the 16-bit halves of a 256-bit word.
  function automatic logic [15:0] xor16(input logic [BUS_W-1:0] w);
    logic [15:0] c;
    c = '0;
    for (int i = 0; i < BUS_W / 16; i++) c ^= w[i*16 +: 16];
    return c;
  endfunction

endpackage
