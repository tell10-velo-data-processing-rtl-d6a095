// sdp_ram: simple dual-port RAM (one write port, one read port) with a
// registered output, as the FPGA block RAMs are used.
//
// Timing: the read address is registered at the end of the address cycle,
// the array is read at the end of the next one, and rd_data holds the word
// in the cycle after that: the address cycle plus two, the three-clock read
// access the buffers are designed around.  A write and a read of the same address in
// one cycle return the old contents.
module sdp_ram #(
  parameter int unsigned W     = 8,
  parameter int unsigned DEPTH = 16
) (
  input  logic                     clk,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] waddr,
  input  logic [W-1:0]             wdata,
  input  logic [$clog2(DEPTH)-1:0] raddr,
  output logic [W-1:0]             rd_data
);
  logic [W-1:0]             mem [DEPTH];
  logic [$clog2(DEPTH)-1:0] raddr_q;

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    raddr_q <= raddr;
    rd_data <= mem[raddr_q];
  end
endmodule
