// linker0: merges the packet streams of the two halves of one GBT link.
//
// Both inputs are FIFOs of whole nSPP packets.  A round-robin pointer picks
// the side whose turn it is when both have a packet, otherwise whichever has
// one; one packet per cycle goes out.  Packet order inside a bunch crossing
// does not matter because the time reordering that follows sorts by bunch
// counter.  Output is a valid/ready stream of spp_t.
module linker0 (
  input  logic             clk,
  input  logic             rst,
  input  logic             a_valid,
  output logic             a_ready,
  input  tell10_pkg::spp_t a_spp,
  input  logic             b_valid,
  output logic             b_ready,
  input  tell10_pkg::spp_t b_spp,
  output logic             out_valid,
  input  logic             out_ready,
  output tell10_pkg::spp_t out_spp
);
  logic turn_b;   // 1: b has priority
  logic pick_b;

  assign pick_b    = b_valid && (turn_b || !a_valid);
  assign out_valid = a_valid || b_valid;
  assign out_spp   = pick_b ? b_spp : a_spp;
  assign a_ready   = out_ready && !pick_b;
  assign b_ready   = out_ready && pick_b;

  always_ff @(posedge clk) begin
    if (rst) turn_b <= 1'b0;
    else if (out_valid && out_ready) turn_b <= !pick_b;
  end
endmodule
