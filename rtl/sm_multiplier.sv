// sm_multiplier: pipelined sign-magnitude mantissa multiplier (the "X" unit).
//
// Multiplies two operands of one sign bit and a MANT_W-bit fractional
// magnitude. The sign of the product is the XOR of the signs. The magnitude
// product is formed in two pipeline stages: the first multiplies the
// multiplicand by the low and the high half of the multiplier, the second adds
// the two partial products. Only the upper PROD_W bits of the 2*MANT_W-bit
// product are kept (truncation), so the product has the same fractional
// format and the same precision as the inputs.
//
// Timing: latency 2 enabled cycles; a new pair may enter on every cycle with
// ce high. All registers advance only when ce is high. A tag of TAG_W bits
// travels alongside the data.
//
// The document gives the operand format (sign + 16-bit mantissa) and that the
// multiplier is pipelined. The two-stage split and the truncation to PROD_W bits
// are this design's choices.
module sm_multiplier #(
  parameter int unsigned MANT_W = 16,
  parameter int unsigned PROD_W = 16,
  parameter int unsigned TAG_W  = 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              ce,
  input  logic              in_valid,
  input  logic [TAG_W-1:0]  in_tag,
  input  logic              a_sign,
  input  logic [MANT_W-1:0] a_mag,
  input  logic              b_sign,
  input  logic [MANT_W-1:0] b_mag,
  output logic              out_valid,
  output logic [TAG_W-1:0]  out_tag,
  output logic              p_sign,
  output logic [PROD_W-1:0] p_mag
);

  localparam int unsigned LO_W = MANT_W / 2;
  localparam int unsigned HI_W = MANT_W - LO_W;

  // stage 1: two partial products
  logic                     s1_valid;
  logic [TAG_W-1:0]         s1_tag;
  logic                     s1_sign;
  logic [MANT_W+LO_W-1:0]   s1_pp_lo;
  logic [MANT_W+HI_W-1:0]   s1_pp_hi;

  // stage 2: full product
  logic [2*MANT_W-1:0]      full;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_valid  <= 1'b0;
      s1_tag    <= '0;
      s1_sign   <= 1'b0;
      s1_pp_lo  <= '0;
      s1_pp_hi  <= '0;
      out_valid <= 1'b0;
      out_tag   <= '0;
      p_sign    <= 1'b0;
      p_mag     <= '0;
    end else if (ce) begin
      s1_valid  <= in_valid;
      s1_tag    <= in_tag;
      s1_sign   <= a_sign ^ b_sign;
      s1_pp_lo  <= (MANT_W+LO_W)'(a_mag) * (MANT_W+LO_W)'(b_mag[LO_W-1:0]);
      s1_pp_hi  <= (MANT_W+HI_W)'(a_mag) * (MANT_W+HI_W)'(b_mag[MANT_W-1:LO_W]);
      out_valid <= s1_valid;
      out_tag   <= s1_tag;
      p_sign    <= s1_sign;
      p_mag     <= full[2*MANT_W-1 -: PROD_W];
    end
  end

  always_comb begin
    full = (2*MANT_W)'(s1_pp_lo) + ((2*MANT_W)'(s1_pp_hi) << LO_W);
  end

endmodule
