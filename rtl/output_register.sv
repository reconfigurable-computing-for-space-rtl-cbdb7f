// output_register: the output register of the multiply-and-accumulate unit.
//
// Captures each final partial sum leaving the accumulator and presents it as
// one 36-bit word for the output buffer:
//   [35]                 last partial sum of the vector
//   [34 -: SLOT_W]       partial-sum number (0 .. S-1)
//   next EXP_W bits      exponent E (value = sum * 2^E)
//   remaining low bits   partial sum, sign-extended two's complement
// out_valid is high for one cycle per captured word.
//
// The document shows an output register between the adder and the output
// buffer. The word layout is this design's choice.
module output_register #(
  parameter int unsigned SLOT_W = 3,
  parameter int unsigned EXP_W  = 6,
  parameter int unsigned ACC_W  = 20,
  parameter int unsigned OUT_W  = 36
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  input  logic              in_last,
  input  logic [SLOT_W-1:0] in_slot,
  input  logic [EXP_W-1:0]  in_exp,
  input  logic [ACC_W-1:0]  in_sum,
  output logic              out_valid,
  output logic [OUT_W-1:0]  out_word
);

  localparam int unsigned SUM_W = OUT_W - 1 - SLOT_W - EXP_W;

  if (SUM_W < ACC_W) begin : g_size_check
    $error("output_register: ACC_W does not fit in the output word");
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_word  <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid)
        out_word <= {in_last, in_slot, in_exp, SUM_W'(signed'(in_sum))};
    end
  end

endmodule
