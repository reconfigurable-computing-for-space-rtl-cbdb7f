// mad_core: the multiply-and-add pipeline (two multipliers and an adder).
//
// Each operand set {a1, b1, a2, b2} gives one result a1*b1 + a2*b2: two
// sign-magnitude multipliers work in parallel, the 1's comp/register stage
// one's-complements each negative product, and the adder adds both with the
// two product signs as carries. A single carry-in cannot take two carries, so
// the first of them is folded in by a row of full adders (3:2 carry-save)
// ahead of the CLA pipe, which takes the second as its carry-in. Three
// operations per core cycle.
//
// Timing: all registers advance when ce is high (one core cycle). Latency
// 2 (multiply) + 1 (1's comp/register) + ceil(ADD_W/4) (adder) core cycles;
// one set per core cycle. out_valid and the result stay up for a whole core
// cycle; a consumer takes them in the fast cycle where ce is high.
//
// The two 16-bit multipliers, the 1's comp/register stage and the adder with
// both sign lines follow the document; the carry-save fold, the truncated
// products and the adder width are this design's choices.
module mad_core
  import stap_pkg::*;
#(
  parameter int unsigned PROD_W = 16,
  parameter int unsigned ADD_W  = 18
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              ce,
  input  logic              in_valid,
  input  logic              in_last,
  input  operand_pair_t     p1,     // {a1, b1}
  input  operand_pair_t     p2,     // {a2, b2}
  output logic              out_valid,
  output logic              out_last,
  output logic [ADD_W-1:0]  out_sum
);

  localparam int unsigned NS  = (ADD_W + 3) / 4;
  localparam int unsigned LAT = NS + 1;   // after the multipliers

  logic              m1_valid, m2_valid_unused, m1_last, m2_last_unused;
  logic              m1_sign, m2_sign;
  logic [PROD_W-1:0] m1_mag, m2_mag;

  sm_multiplier #(.MANT_W(MANT_W), .PROD_W(PROD_W), .TAG_W(1)) u_mul_a (
    .clk(clk), .rst_n(rst_n), .ce(ce),
    .in_valid(in_valid), .in_tag(in_last),
    .a_sign(p1.x.sign), .a_mag(p1.x.mag), .b_sign(p1.y.sign), .b_mag(p1.y.mag),
    .out_valid(m1_valid), .out_tag(m1_last), .p_sign(m1_sign), .p_mag(m1_mag)
  );

  sm_multiplier #(.MANT_W(MANT_W), .PROD_W(PROD_W), .TAG_W(1)) u_mul_b (
    .clk(clk), .rst_n(rst_n), .ce(ce),
    .in_valid(in_valid), .in_tag(in_last),
    .a_sign(p2.x.sign), .a_mag(p2.x.mag), .b_sign(p2.y.sign), .b_mag(p2.y.mag),
    .out_valid(m2_valid_unused), .out_tag(m2_last_unused), .p_sign(m2_sign), .p_mag(m2_mag)
  );

  logic             c_sa, c_sb;
  logic [ADD_W-1:0] c_a, c_b;

  ones_comp_register #(.IN_W(PROD_W), .W(ADD_W), .B_IS_SM(1'b1)) u_ocr (
    .clk(clk), .rst_n(rst_n), .ce(ce),
    .a_sign(m1_sign), .a_mag(m1_mag), .b_sign(m2_sign), .b_val(ADD_W'(m2_mag)),
    .a_sign_q(c_sa), .a_q(c_a), .b_sign_q(c_sb), .b_q(c_b)
  );

  // 3:2 carry-save row: c_a + c_b + c_sa  ->  cs_s + cs_c
  logic [ADD_W-1:0] cs_s, cs_c, third;

  always_comb begin
    third = ADD_W'(c_sa);
    cs_s  = c_a ^ c_b ^ third;
    cs_c  = ((c_a & c_b) | (c_a & third) | (c_b & third)) << 1;
  end

  cla_pipe_adder #(.W(ADD_W)) u_add (
    .clk(clk), .rst_n(rst_n), .ce(ce),
    .x(cs_s), .y(cs_c), .cin(c_sb), .s(out_sum)
  );

  logic [1:0] tag_pipe [LAT];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < LAT; k++) tag_pipe[k] <= '0;
    end else if (ce) begin
      tag_pipe[0] <= {m1_valid, m1_last};
      for (int k = 1; k < LAT; k++) tag_pipe[k] <= tag_pipe[k-1];
    end
  end

  assign out_valid = tag_pipe[LAT-1][1];
  assign out_last  = tag_pipe[LAT-1][0];

endmodule
