// ddr3_model: behavioural model of the 256-bit DDR3 SDRAM as seen through
// its controller's word port, for simulation only.  Stores words in an
// associative array (so the full 2^27-word address space costs nothing until
// written), accepts one command per cycle unless waitreq is high (random
// wait states when WAIT_PCT > 0), and returns read data in order, LAT
// cycles after the command, with rvalid.  Counts wait cycles.  Commands are
// ignored while rst is high, when the controller's outputs are not yet
// defined.
module ddr3_model #(
  parameter int ADDR_W   = 27,
  parameter int LAT      = 6,
  parameter int WAIT_PCT = 20
) (
  input  logic              clk,
  input  logic              rst,
  input  logic [ADDR_W-1:0] addr,
  input  logic              write,
  input  logic              read,
  input  logic [255:0]      wdata,
  output logic              waitreq,
  output logic [255:0]      rdata,
  output logic              rvalid,
  output int                wait_cycles
);
  logic [255:0] mem [longint unsigned];
  typedef struct { longint due; logic [255:0] d; } rd_t;
  rd_t pipe[$];
  longint cyc = 0;
  initial begin waitreq = 0; rvalid = 0; rdata = '0; wait_cycles = 0; end
  always @(posedge clk) begin
    rd_t r;
    cyc <= cyc + 1;
    if (!rst && (write || read) && waitreq) wait_cycles <= wait_cycles + 1;
    if (!rst && write && !waitreq) mem[longint'(addr)] = wdata;
    if (!rst && read && !waitreq) begin
      r.due = cyc + LAT;
      r.d = mem.exists(longint'(addr)) ? mem[longint'(addr)] : '0;
      pipe.push_back(r);
    end
    if (pipe.size() != 0 && pipe[0].due <= cyc) begin
      rvalid <= 1; rdata <= pipe[0].d; void'(pipe.pop_front());
    end else begin
      rvalid <= 0;
    end
    waitreq <= ($urandom_range(0, 99) < WAIT_PCT);
  end
endmodule
