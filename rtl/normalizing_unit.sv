// normalizing_unit: first stage of the multiply-and-accumulate pipe.
//
// Brings the new product (operand a) and the fed-back partial sum (operand b)
// to a common binary point before they are added. Each partial sum carries an
// exponent E: its true value is sum * 2^E. Two steps, in one register stage:
//   1. If the top two bits of the W-bit two's complement partial sum differ
//      (|sum| >= 2^(W-2)), the sum is shifted right by one (arithmetic) and E
//      is incremented, so the coming addition cannot overflow. At the largest
//      exponent the sum is left as it is.
//   2. The product magnitude is shifted right by the (new) E so that it is
//      expressed on the same scale as the partial sum.
// When fb_use is low the partial sum is taken as zero with E = 0, which starts
// a new accumulation.
//
// Timing: one register stage. norm_evt is high in the cycle after a
// renormalising shift of the partial sum.
//
// The document says the unit shifts the binary point of the mantissa and makes
// a compensating adjustment to the exponent before the addition. The threshold,
// the one-bit step and the exponent width are this design's choices.
module normalizing_unit #(
  parameter int unsigned PROD_W = 16,
  parameter int unsigned W      = 20,
  parameter int unsigned EXP_W  = 6
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              a_sign,
  input  logic [PROD_W-1:0] a_mag,
  input  logic              fb_use,
  input  logic [W-1:0]      fb_val,
  input  logic [EXP_W-1:0]  fb_exp,
  output logic              a_sign_q,
  output logic [PROD_W-1:0] a_mag_q,
  output logic [W-1:0]      b_q,
  output logic [EXP_W-1:0]  exp_q,
  output logic              norm_evt
);

  logic [W-1:0]     b_in, b_n;
  logic [EXP_W-1:0] e_in, e_n;
  logic             shift;

  always_comb begin
    b_in  = fb_use ? fb_val : '0;
    e_in  = fb_use ? fb_exp : '0;
    shift = (b_in[W-1] != b_in[W-2]) && (e_in != '1);
    b_n   = shift ? {b_in[W-1], b_in[W-1:1]} : b_in;
    e_n   = shift ? e_in + 1'b1 : e_in;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_sign_q <= 1'b0;
      a_mag_q  <= '0;
      b_q      <= '0;
      exp_q    <= '0;
      norm_evt <= 1'b0;
    end else begin
      a_sign_q <= a_sign;
      a_mag_q  <= (32'(e_n) >= PROD_W) ? '0 : (a_mag >> e_n);
      b_q      <= b_n;
      exp_q    <= e_n;
      norm_evt <= shift;
    end
  end

endmodule
