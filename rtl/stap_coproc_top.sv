// stap_coproc_top: the two inner-product co-processors for STAP weight
// calculation, side by side.
//
// Adaptive weight calculation (QR decomposition or conjugate gradient) spends
// most of its time in vector inner products. Both co-processors take two
// vectors of block-floating-point mantissas from the host over a 36-bit path
// and return a short list of partial sums that the host adds:
//   mac_* : multiply-and-accumulate; one pair per cycle; S = 7 partial sums
//           per vector, each with its own exponent.
//   mad_* : multiply-and-add; two words (four operands) per core cycle, the
//           input side at twice the core rate; N/2 partial sums per vector.
// In the original system the two are alternative loads of the same FPGA; here
// both are instantiated, each with its own clock, reset and ports. The host
// processor and the interconnection bus are outside this design: their data
// path appears as the in_/out_ ports.
module stap_coproc_top
  import stap_pkg::*;
(
  // multiply-and-accumulate co-processor
  input  logic             mac_clk,
  input  logic             mac_rst_n,
  input  logic             mac_in_valid,
  output logic             mac_in_ready,
  input  logic [BUS_W-1:0] mac_in_data,
  output logic             mac_out_valid,
  input  logic             mac_out_ready,
  output logic [BUS_W-1:0] mac_out_data,
  output logic             mac_norm_evt,
  // multiply-and-add co-processor (mad_clk is the fast input clock)
  input  logic             mad_clk,
  input  logic             mad_rst_n,
  input  logic             mad_in_valid,
  output logic             mad_in_ready,
  input  logic [BUS_W-1:0] mad_in_data,
  output logic             mad_out_valid,
  input  logic             mad_out_ready,
  output logic [BUS_W-1:0] mad_out_data,
  output logic             mad_set_evt
);

  mac_coproc u_mac (
    .clk(mac_clk), .rst_n(mac_rst_n),
    .in_valid(mac_in_valid), .in_ready(mac_in_ready), .in_data(mac_in_data),
    .out_valid(mac_out_valid), .out_ready(mac_out_ready), .out_data(mac_out_data),
    .norm_evt(mac_norm_evt)
  );

  mad_coproc u_mad (
    .clk(mad_clk), .rst_n(mad_rst_n),
    .in_valid(mad_in_valid), .in_ready(mad_in_ready), .in_data(mad_in_data),
    .out_valid(mad_out_valid), .out_ready(mad_out_ready), .out_data(mad_out_data),
    .set_evt(mad_set_evt)
  );

endmodule
