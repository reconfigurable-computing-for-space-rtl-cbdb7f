// mac_coproc: the multiply-and-accumulate inner-product co-processor.
//
// Reduces two N-vectors of block-floating-point mantissas to S partial sums
// (S = stages of the accumulator pipe, 7 at the default width). Path:
//   input buffer -> sign-magnitude multiplier -> accumulator (normalizing unit,
//   1's comp/register, pipelined CLA adder, feedback) -> output register ->
//   output buffer.
// One operand pair is accepted per cycle, so the unit performs two operations
// (a multiply and an add) per cycle.
//
// Host interface: in_* carries 36-bit words (stap_pkg::in_word_t): an operand
// pair {x, y} in bits 33:0 and a last-pair flag in bit 34. out_* carries S
// words per vector (see output_register for the layout); the host forms the
// inner product as the sum of psum * 2^exp, times 2^(ex+ey) of the two vectors.
//
// Flow control: words leave the input buffer only when no earlier vector is
// still draining and the output buffer has room for S results, so the output
// buffer never overflows and the pipes never stall.
//
// Timing: on a gap-free stream with the output side ready, N pairs enter in
// N cycles, and the first result word is valid S + 6 cycles (13 at the
// default width) after the last pair is accepted by the input buffer; the S
// results follow on consecutive cycles. The next vector is admitted once the
// last result of the previous one is in the output buffer.
//
// The data path follows the document; the flow control, the word layouts and
// the buffer depth are this design's choices.
module mac_coproc
  import stap_pkg::*;
#(
  parameter int unsigned PROD_W   = 16,
  parameter int unsigned ACC_W    = 20,
  parameter int unsigned EXP_W    = 6,
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
  output logic              norm_evt
);

  localparam int unsigned NS     = (ACC_W + 3) / 4;
  localparam int unsigned S      = NS + 2;
  localparam int unsigned SLOT_W = $clog2(S + 1);
  localparam int unsigned AW     = $clog2(BUF_DEPTH);

  // input buffer
  logic             ib_valid, ib_ready;
  logic [BUS_W-1:0] ib_data;
  logic [AW:0]      ib_used_unused;

  io_buffer #(.W(BUS_W), .DEPTH(BUF_DEPTH)) u_ibuf (
    .clk      (clk),
    .rst_n    (rst_n),
    .wr_valid (in_valid),
    .wr_ready (in_ready),
    .wr_data  (in_data),
    .rd_valid (ib_valid),
    .rd_ready (ib_ready),
    .rd_data  (ib_data),
    .used     (ib_used_unused)
  );

  // admission control
  in_word_t         w;
  logic             busy;
  logic [AW:0]      ob_used;
  logic             take;
  logic             or_valid;
  logic [BUS_W-1:0] or_word;

  assign w        = in_word_t'(ib_data);
  assign ib_ready = !busy && ((32'(BUF_DEPTH) - 32'(ob_used)) >= S);
  assign take     = ib_valid && ib_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                            busy <= 1'b0;
    else if (take && w.last)               busy <= 1'b1;
    else if (or_valid && or_word[BUS_W-1]) busy <= 1'b0;
  end

  // multiplier
  logic              m_valid, m_last, m_sign;
  logic [PROD_W-1:0] m_mag;

  sm_multiplier #(.MANT_W(MANT_W), .PROD_W(PROD_W), .TAG_W(1)) u_mul (
    .clk       (clk),
    .rst_n     (rst_n),
    .ce        (1'b1),
    .in_valid  (take),
    .in_tag    (w.last),
    .a_sign    (w.pair.x.sign),
    .a_mag     (w.pair.x.mag),
    .b_sign    (w.pair.y.sign),
    .b_mag     (w.pair.y.mag),
    .out_valid (m_valid),
    .out_tag   (m_last),
    .p_sign    (m_sign),
    .p_mag     (m_mag)
  );

  // accumulator
  logic              a_idle_unused;
  logic              e_valid, e_last;
  logic [SLOT_W-1:0] e_slot;
  logic [EXP_W-1:0]  e_exp;
  logic [ACC_W-1:0]  e_sum;

  mac_accumulator #(.PROD_W(PROD_W), .ACC_W(ACC_W), .EXP_W(EXP_W)) u_acc (
    .clk        (clk),
    .rst_n      (rst_n),
    .prod_valid (m_valid),
    .prod_last  (m_last),
    .prod_sign  (m_sign),
    .prod_mag   (m_mag),
    .idle       (a_idle_unused),
    .emit_valid (e_valid),
    .emit_last  (e_last),
    .emit_slot  (e_slot),
    .emit_exp   (e_exp),
    .emit_sum   (e_sum),
    .norm_evt   (norm_evt)
  );

  output_register #(.SLOT_W(SLOT_W), .EXP_W(EXP_W), .ACC_W(ACC_W), .OUT_W(BUS_W)) u_oreg (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (e_valid),
    .in_last   (e_last),
    .in_slot   (e_slot),
    .in_exp    (e_exp),
    .in_sum    (e_sum),
    .out_valid (or_valid),
    .out_word  (or_word)
  );

  // output buffer
  logic ob_wr_ready;

  io_buffer #(.W(BUS_W), .DEPTH(BUF_DEPTH)) u_obuf (
    .clk      (clk),
    .rst_n    (rst_n),
    .wr_valid (or_valid),
    .wr_ready (ob_wr_ready),
    .wr_data  (or_word),
    .rd_valid (out_valid),
    .rd_ready (out_ready),
    .rd_data  (out_data),
    .used     (ob_used)
  );

  // the admission control guarantees room for every result
  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n)
                                  or_valid |-> ob_wr_ready);

endmodule
