// ones_comp_register: the "1's comp/register" stage in front of the adder.
//
// Lane a is always a sign-magnitude product. Its magnitude is zero-extended to
// W bits and bit-inverted when the sign is set, which is its one's complement.
// The sign is registered next to it and goes to the adder as a carry-in, which
// turns the one's complement into the two's complement negative. Lane b is the
// same when B_IS_SM = 1 (multiply-and-add: two products). When B_IS_SM = 0
// (multiply-and-accumulate), lane b is the fed-back partial sum, already in
// two's complement, and is only registered; its sign output is then zero.
//
// Timing: one register stage, advancing when ce is high.
//
// The document names the stage and shows the sign lines bypassing it to the
// adder. Reading those sign lines as carry-ins is this design's interpretation.
module ones_comp_register #(
  parameter int unsigned IN_W    = 16,
  parameter int unsigned W       = 20,
  parameter bit          B_IS_SM = 1'b1
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            ce,
  input  logic            a_sign,
  input  logic [IN_W-1:0] a_mag,
  input  logic            b_sign,   // used only when B_IS_SM
  input  logic [W-1:0]    b_val,    // magnitude in the low IN_W bits when B_IS_SM
  output logic            a_sign_q,
  output logic [W-1:0]    a_q,
  output logic            b_sign_q,
  output logic [W-1:0]    b_q
);

  logic [W-1:0] a_ext, b_ext;
  logic [W-1:0] a_oc, b_oc;

  always_comb begin
    a_ext = W'(a_mag);
    a_oc  = a_sign ? ~a_ext : a_ext;
    if (B_IS_SM) begin
      b_ext = W'(b_val[IN_W-1:0]);
      b_oc  = b_sign ? ~b_ext : b_ext;
    end else begin
      b_ext = b_val;
      b_oc  = b_val;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_sign_q <= 1'b0;
      a_q      <= '0;
      b_sign_q <= 1'b0;
      b_q      <= '0;
    end else if (ce) begin
      a_sign_q <= a_sign;
      a_q      <= a_oc;
      b_sign_q <= B_IS_SM ? b_sign : 1'b0;
      b_q      <= b_oc;
    end
  end

endmodule
