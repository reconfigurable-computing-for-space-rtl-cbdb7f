// mad_coproc: the multiply-and-add inner-product co-processor.
//
// Reduces two N-vectors to N/2 partial sums x[2i]*y[2i] + x[2i+1]*y[2i+1];
// the host adds these N/2 values to finish the inner product. Path:
//   input buffer -> input state machine (fast clock) -> two multipliers,
//   1's comp/register, adder (core, half rate) -> output buffer.
// The core takes four operands and performs three operations (two multiplies
// and an add) per core cycle.
//
// Clocking: clk is the fast clock of the input state machine and the buffers.
// A toggle flop makes the core enable, high every second cycle, so the core
// runs at half the rate of the input side.
//
// Host interface: in_* takes 36-bit words (stap_pkg::in_word_t), two per
// operand set: {a1,b1} then {a2,b2}, the second with the last flag if it ends
// the vector. An odd vector length is padded by the host with a zero pair.
// out_* gives one word per set: bit 35 is the last flag, bits 34:0 the
// sign-extended two's complement sum. Results keep the block exponent of the
// product of the two vectors.
//
// Flow control: a word leaves the input buffer only if the output buffer has
// room for every result already in flight plus one, so results are never lost.
//
// The structure and the 2:1 clock ratio follow the document; the enable-based
// clocking, the flow control and the word layouts are this design's choices.
module mad_coproc
  import stap_pkg::*;
#(
  parameter int unsigned PROD_W    = 16,
  parameter int unsigned ADD_W     = 18,
  parameter int unsigned BUF_DEPTH = 16
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  output logic              in_ready,
  input  logic [BUS_W-1:0]  in_data,
  output logic              out_valid,
  input  logic              out_ready,
  output logic [BUS_W-1:0]  out_data,
  output logic              set_evt
);

  localparam int unsigned AW = $clog2(BUF_DEPTH);

  logic core_ce;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) core_ce <= 1'b0;
    else        core_ce <= !core_ce;
  end

  // input buffer
  logic             ib_valid, ib_ready;
  logic [BUS_W-1:0] ib_data;
  logic [AW:0]      ib_used_unused;

  io_buffer #(.W(BUS_W), .DEPTH(BUF_DEPTH)) u_ibuf (
    .clk(clk), .rst_n(rst_n),
    .wr_valid(in_valid), .wr_ready(in_ready), .wr_data(in_data),
    .rd_valid(ib_valid), .rd_ready(ib_ready), .rd_data(ib_data),
    .used(ib_used_unused)
  );

  // results in flight, for the output-room check
  logic [AW:0]      ob_used;
  logic [AW+1:0]    inflight;
  logic             allow, res_wr;

  assign allow = (32'(ob_used) + 32'(inflight)) < BUF_DEPTH;

  logic          s_valid, s_last;
  operand_pair_t s_p1, s_p2;

  mad_input_fsm u_infsm (
    .clk(clk), .rst_n(rst_n), .core_ce(core_ce), .allow(allow),
    .in_valid(ib_valid), .in_ready(ib_ready), .in_word(in_word_t'(ib_data)),
    .set_valid(s_valid), .set_p1(s_p1), .set_p2(s_p2), .set_last(s_last),
    .set_evt(set_evt)
  );

  logic             r_valid, r_last;
  logic [ADD_W-1:0] r_sum;

  mad_core #(.PROD_W(PROD_W), .ADD_W(ADD_W)) u_core (
    .clk(clk), .rst_n(rst_n), .ce(core_ce),
    .in_valid(s_valid), .in_last(s_last), .p1(s_p1), .p2(s_p2),
    .out_valid(r_valid), .out_last(r_last), .out_sum(r_sum)
  );

  assign res_wr = r_valid && core_ce;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) inflight <= '0;
    else        inflight <= inflight + (AW+2)'(set_evt) - (AW+2)'(res_wr);
  end

  // output buffer
  logic ob_wr_ready;

  io_buffer #(.W(BUS_W), .DEPTH(BUF_DEPTH)) u_obuf (
    .clk(clk), .rst_n(rst_n),
    .wr_valid(res_wr), .wr_ready(ob_wr_ready),
    .wr_data({r_last, (BUS_W-1)'(signed'(r_sum))}),
    .rd_valid(out_valid), .rd_ready(out_ready), .rd_data(out_data),
    .used(ob_used)
  );

  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n)
                                  res_wr |-> ob_wr_ready);

endmodule
