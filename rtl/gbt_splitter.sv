// gbt_splitter: small input buffer for one GBT link that splits every 80-bit
// GBT data word into the two 40-bit front-end streams packed into it (bits
// 79:40 and bits 39:0).
//
// Frames enter a DEPTH-entry FIFO together with a data-valid bit per half
// (in_dv[1] for bits 79:40, in_dv[0] for bits 39:0); a frame is written when
// either is set.  The valid halves of the head frame are offered on
// independent valid/ready ports; a flag per half remembers that it was
// already taken, and the frame is popped when every valid half is gone.
// So each half-stream may stall on its own without losing alignment.
// One clock domain: the 40 MHz GBT rate appears as in_dv on one cycle in
// five of the 200 MHz processing clock (the clock-domain crossing of the
// real input buffer is not modelled).
module gbt_splitter #(
  parameter int unsigned DEPTH = 4
) (
  input  logic                        clk,
  input  logic                        rst,
  input  logic [1:0]                  in_dv,
  output logic                        in_ready,
  input  logic [tell10_pkg::GBT_W-1:0]  in_frame,
  output logic                        hi_valid,
  input  logic                        hi_ready,
  output logic [tell10_pkg::HALF_W-1:0] hi_data,
  output logic                        lo_valid,
  input  logic                        lo_ready,
  output logic [tell10_pkg::HALF_W-1:0] lo_data
);
  import tell10_pkg::*;

  logic             f_valid, f_pop;
  logic [GBT_W-1:0] f_data;
  logic [1:0]       f_dv;
  logic             hi_taken, lo_taken;
  logic             hi_fire, lo_fire;

  sync_fifo #(.W(GBT_W + 2), .DEPTH(DEPTH)) u_buf (
    .clk, .rst, .in_valid(|in_dv), .in_ready, .in_data({in_dv, in_frame}),
    .out_valid(f_valid), .out_ready(f_pop), .out_data({f_dv, f_data}), .count());

  assign hi_valid = f_valid && f_dv[1] && !hi_taken;
  assign lo_valid = f_valid && f_dv[0] && !lo_taken;
  assign hi_data  = f_data[GBT_W-1:HALF_W];
  assign lo_data  = f_data[HALF_W-1:0];
  assign hi_fire  = hi_valid && hi_ready;
  assign lo_fire  = lo_valid && lo_ready;
  assign f_pop    = f_valid && (!f_dv[1] || hi_taken || hi_fire) && (!f_dv[0] || lo_taken || lo_fire);

  always_ff @(posedge clk) begin
    if (rst || f_pop) begin
      hi_taken <= 1'b0;
      lo_taken <= 1'b0;
    end else begin
      if (hi_fire) hi_taken <= 1'b1;
      if (lo_fire) lo_taken <= 1'b1;
    end
  end
endmodule
