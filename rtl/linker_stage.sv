// linker_stage: one linking stage of the data flow, a linker reading N
// stream FIFOs followed by the padder that packs the assembled event into
// OUT_W-bit words at ALIGN-byte granularity.  The three stages use
// (N, IN_W, OUT_W, ALIGN) = (3, 64, 128, 1), (2, 128, 256, 2) and
// (2, 256, 256, 4).  Latency: the linker is combinational, the padder adds
// one register.
module linker_stage #(
  parameter int unsigned N     = 3,
  parameter int unsigned IN_W  = 64,
  parameter int unsigned OUT_W = 128,
  parameter int unsigned ALIGN = 1
) (
  input  logic                          clk,
  input  logic                          rst,
  input  logic [N-1:0]                  in_valid,
  output logic [N-1:0]                  in_ready,
  input  logic [N-1:0][IN_W-1:0]        in_data,
  input  logic [N-1:0][$clog2(IN_W/8):0] in_nbytes,
  input  logic [N-1:0]                  in_eoe,
  input  logic [N-1:0]                  in_ovf,
  input  logic [N-1:0]                  in_ev_avail,
  output logic                          out_valid,
  input  logic                          out_ready,
  output logic [OUT_W-1:0]              out_data,
  output logic [$clog2(OUT_W/8):0]      out_nbytes,
  output logic                          out_eoe,
  output logic                          out_ovf
);
  logic                     l_valid, l_ready, l_eoe, l_ovf;
  logic [IN_W-1:0]          l_data;
  logic [$clog2(IN_W/8):0]  l_nbytes;

  linker #(.N(N), .W(IN_W)) u_linker (
    .clk, .rst, .in_valid, .in_ready, .in_data, .in_nbytes, .in_eoe, .in_ovf, .in_ev_avail,
    .out_valid(l_valid), .out_ready(l_ready), .out_data(l_data), .out_nbytes(l_nbytes),
    .out_eoe(l_eoe), .out_ovf(l_ovf));

  padder #(.IN_W(IN_W), .OUT_W(OUT_W), .ALIGN(ALIGN)) u_padder (
    .clk, .rst, .in_valid(l_valid), .in_ready(l_ready), .in_data(l_data), .in_nbytes(l_nbytes),
    .in_eoe(l_eoe), .in_ovf(l_ovf), .out_valid, .out_ready, .out_data, .out_nbytes, .out_eoe, .out_ovf);
endmodule
