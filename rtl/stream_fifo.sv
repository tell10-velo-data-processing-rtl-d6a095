// stream_fifo: FIFO for byte-stream words that also counts the complete
// events it holds.
//
// A stream word is {data W bits, byte count, end-of-event, overflow flag};
// the first byte of data sits in its top bits.  Each word with end-of-event
// set that enters increments the event counter, and one that leaves
// decrements it, so ev_avail tells a linker that at least one whole event
// fragment is stored and it may start reading without stalling mid-event.
// Show-ahead output, valid/ready handshake on both sides.
module stream_fifo #(
  parameter int unsigned W     = 64,
  parameter int unsigned DEPTH = 64
) (
  input  logic                   clk,
  input  logic                   rst,
  input  logic                   in_valid,
  output logic                   in_ready,
  input  logic [W-1:0]           in_data,
  input  logic [$clog2(W/8):0]   in_nbytes,
  input  logic                   in_eoe,
  input  logic                   in_ovf,
  output logic                   out_valid,
  input  logic                   out_ready,
  output logic [W-1:0]           out_data,
  output logic [$clog2(W/8):0]   out_nbytes,
  output logic                   out_eoe,
  output logic                   out_ovf,
  output logic                   ev_avail,
  output logic [$clog2(DEPTH):0] count
);
  localparam int unsigned NBW = $clog2(W/8) + 1;
  localparam int unsigned PW  = W + NBW + 2;
  localparam int unsigned CW  = $clog2(DEPTH) + 1;

  logic [CW-1:0] events;
  logic          push, pop;

  sync_fifo #(.W(PW), .DEPTH(DEPTH)) u_fifo (
    .clk, .rst, .in_valid, .in_ready,
    .in_data({in_data, in_nbytes, in_eoe, in_ovf}),
    .out_valid, .out_ready,
    .out_data({out_data, out_nbytes, out_eoe, out_ovf}),
    .count);

  assign push     = in_valid && in_ready && in_eoe;
  assign pop      = out_valid && out_ready && out_eoe;
  assign ev_avail = (events != '0);

  always_ff @(posedge clk) begin
    if (rst) events <= '0;
    else     events <= events + CW'(push) - CW'(pop);
  end
endmodule
