// ddr_fifo_ctrl: uses the external DDR3 SDRAM as one large FIFO of MWP
// packets (the de-randomizing buffer in front of the trigger and network).
//
// Words from the MWP generator enter an IN_DEPTH-word FIFO.  The SDRAM is a
// circular buffer of 2^ADDR_W 256-bit words with a write and a read pointer.
// Transfers are always whole packets of BLOCK (8) consecutive words: a write
// burst starts when the input FIFO holds a packet and the buffer is not full,
// a read burst when the buffer holds a packet and the OUT_DEPTH-word output
// FIFO has room for it beyond the reads still in flight.  When both are
// possible they alternate.  Memory port: one command per cycle, word
// address, held while mem_waitreq is high; read data returns in order with
// mem_rvalid after any latency.  level counts the packets stored.
// Block transfers and the buffer sizes follow the design; the port protocol
// and the arbitration are this design's choices.
module ddr_fifo_ctrl #(
  parameter int unsigned ADDR_W    = 27,
  parameter int unsigned BLOCK     = 8,
  parameter int unsigned IN_DEPTH  = 128,
  parameter int unsigned OUT_DEPTH = 64
) (
  input  logic                         clk,
  input  logic                         rst,
  input  logic                         in_valid,
  output logic                         in_ready,
  input  logic [tell10_pkg::BUS_W-1:0] in_data,
  output logic                         out_valid,
  input  logic                         out_ready,
  output logic [tell10_pkg::BUS_W-1:0] out_data,
  output logic [ADDR_W-1:0]            mem_addr,
  output logic                         mem_write,
  output logic                         mem_read,
  output logic [tell10_pkg::BUS_W-1:0] mem_wdata,
  input  logic                         mem_waitreq,
  input  logic [tell10_pkg::BUS_W-1:0] mem_rdata,
  input  logic                         mem_rvalid,
  output logic [ADDR_W-$clog2(BLOCK):0] level
);
  import tell10_pkg::*;

  localparam int unsigned BW  = $clog2(BLOCK);
  localparam int unsigned LW  = ADDR_W - BW + 1;
  localparam int unsigned OCW = $clog2(OUT_DEPTH) + 1;
  localparam logic [LW-1:0] CAP = LW'(1) << (ADDR_W - BW);

  typedef enum logic [1:0] {S_IDLE, S_WR, S_RD} state_t;
  state_t            st;
  logic [ADDR_W-1:0] wptr, rptr;
  logic [BW:0]       beat;
  logic              last_wr;
  logic [OCW-1:0]    outstanding;

  logic                 if_valid, if_ready;
  logic [BUS_W-1:0]     if_data;
  logic [$clog2(IN_DEPTH):0] if_count;
  logic [OCW-1:0]       of_count;
  logic                 of_ready;
  logic                 can_wr, can_rd, cmd_ok;

  sync_fifo #(.W(BUS_W), .DEPTH(IN_DEPTH)) u_in (
    .clk, .rst, .in_valid, .in_ready, .in_data,
    .out_valid(if_valid), .out_ready(if_ready), .out_data(if_data), .count(if_count));

  sync_fifo #(.W(BUS_W), .DEPTH(OUT_DEPTH)) u_out (
    .clk, .rst, .in_valid(mem_rvalid), .in_ready(of_ready), .in_data(mem_rdata),
    .out_valid, .out_ready, .out_data, .count(of_count));

  assign can_wr = (if_count >= ($clog2(IN_DEPTH)+1)'(BLOCK)) && (level != CAP);
  assign can_rd = (level != '0) &&
                  (32'(of_count) + 32'(outstanding) + BLOCK <= OUT_DEPTH);
  assign cmd_ok = !mem_waitreq;

  assign mem_write = (st == S_WR);
  assign mem_read  = (st == S_RD);
  assign mem_addr  = (st == S_RD) ? rptr : wptr;
  assign mem_wdata = if_data;
  assign if_ready  = (st == S_WR) && cmd_ok;

  always_ff @(posedge clk) begin
    if (rst) begin
      st          <= S_IDLE;
      wptr        <= '0;
      rptr        <= '0;
      beat        <= '0;
      last_wr     <= 1'b0;
      level       <= '0;
      outstanding <= '0;
    end else begin
      outstanding <= outstanding + OCW'(st == S_RD && cmd_ok) - OCW'(mem_rvalid);
      case (st)
        S_IDLE: begin
          beat <= '0;
          if (can_wr && (!can_rd || !last_wr)) begin
            st      <= S_WR;
            last_wr <= 1'b1;
          end else if (can_rd) begin
            st      <= S_RD;
            last_wr <= 1'b0;
            level   <= level - 1'b1;
          end
        end
        S_WR: if (cmd_ok) begin
          wptr <= wptr + 1'b1;
          beat <= beat + 1'b1;
          if (beat == (BW+1)'(BLOCK - 1)) begin
            st    <= S_IDLE;
            level <= level + 1'b1;
          end
        end
        S_RD: if (cmd_ok) begin
          rptr <= rptr + 1'b1;
          beat <= beat + 1'b1;
          if (beat == (BW+1)'(BLOCK - 1)) st <= S_IDLE;
        end
        default: st <= S_IDLE;
      endcase
    end
  end

  a_wr_has_data: assert property (@(posedge clk) disable iff (rst) if_ready |-> if_valid);
  a_rdata_has_room: assert property (@(posedge clk) disable iff (rst) !(mem_rvalid && !of_ready));
  a_cmd_stable: assert property (@(posedge clk) disable iff (rst)
    (mem_write || mem_read) && mem_waitreq |=> $stable(mem_addr) && (mem_write || mem_read));
endmodule
