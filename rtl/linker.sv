// linker: assembles the fragments of one event coming from N inputs.
//
// Each input is a stream FIFO that reports whether it holds a complete event
// fragment.  When all N do, the linker reads the fragment of input 0 up to
// its end-of-event word, then input 1, and so on, forwarding every word to
// the padder.  Only the word closing the fragment of input N-1 keeps its
// end-of-event flag; the overflow flags of all fragments are ORed onto it.
// Reading from a FIFO only when a whole fragment is present means the
// linker never waits in the middle of an event.  One word per cycle.
module linker #(
  parameter int unsigned N = 3,
  parameter int unsigned W = 64
) (
  input  logic                       clk,
  input  logic                       rst,
  input  logic [N-1:0]               in_valid,
  output logic [N-1:0]               in_ready,
  input  logic [N-1:0][W-1:0]        in_data,
  input  logic [N-1:0][$clog2(W/8):0] in_nbytes,
  input  logic [N-1:0]               in_eoe,
  input  logic [N-1:0]               in_ovf,
  input  logic [N-1:0]               in_ev_avail,
  output logic                       out_valid,
  input  logic                       out_ready,
  output logic [W-1:0]               out_data,
  output logic [$clog2(W/8):0]       out_nbytes,
  output logic                       out_eoe,
  output logic                       out_ovf
);
  localparam int unsigned SELW = (N > 1) ? $clog2(N) : 1;

  logic            busy;
  logic [SELW-1:0] sel;
  logic            ovf_acc;
  logic            last_in;

  assign last_in    = (sel == SELW'(N - 1));
  assign out_valid  = busy && in_valid[sel];
  assign out_data   = in_data[sel];
  assign out_nbytes = in_nbytes[sel];
  assign out_eoe    = in_eoe[sel] && last_in;
  assign out_ovf    = in_eoe[sel] && last_in && (ovf_acc || in_ovf[sel]);

  always_comb begin
    in_ready      = '0;
    in_ready[sel] = busy && out_ready;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      busy    <= 1'b0;
      sel     <= '0;
      ovf_acc <= 1'b0;
    end else if (!busy) begin
      if (&in_ev_avail) begin
        busy    <= 1'b1;
        sel     <= '0;
        ovf_acc <= 1'b0;
      end
    end else if (out_valid && out_ready && in_eoe[sel]) begin
      ovf_acc <= ovf_acc || in_ovf[sel];
      if (last_in) busy <= 1'b0;
      else         sel  <= sel + 1'b1;
    end
  end
endmodule
