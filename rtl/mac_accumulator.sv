// mac_accumulator: pipelined accumulator of the multiply-and-accumulate unit.
//
// A normalizing unit, a 1's comp/register stage and a pipelined 4-bit CLA
// adder form a pipe of S = 2 + ceil(ACC_W/4) stages. The adder output is fed
// back to the normalizing unit, so each product is added to the partial sum
// that left the adder S cycles earlier. The pipe therefore holds S independent
// partial sums, and product number i of a vector goes to partial sum i mod S.
// One product enters per cycle; a cycle without a product injects a zero, so
// the partial sums keep circulating.
//
// Control (IDLE -> ACC -> DRAIN -> IDLE): the first product of a vector starts
// it, and for the first S injections the feedback is taken as zero. After the
// product flagged last, S zero products are injected and tagged "emit": they
// leave the adder S cycles later carrying the final value of each partial sum,
// with its exponent and slot number. The host adds the S partial sums, each
// scaled by 2^exp.
//
// Interface: prod_* is the multiplier output stream (no back-pressure).
// emit_* is the stream of final partial sums (S words per vector, emit_last on
// the last). idle is high when no vector is being accumulated or drained.
//
// The structure (normalizing unit, 1's complement register, adder, feedback,
// as many partial sums as pipe stages) follows the document. The control, the
// zero-feedback start, the drain and the accumulator width are this design's
// choices.
module mac_accumulator #(
  parameter int unsigned PROD_W = 16,
  parameter int unsigned ACC_W  = 20,
  parameter int unsigned EXP_W  = 6,
  localparam int unsigned NS     = (ACC_W + 3) / 4,
  localparam int unsigned S      = NS + 2,
  localparam int unsigned SLOT_W = $clog2(S + 1)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              prod_valid,
  input  logic              prod_last,
  input  logic              prod_sign,
  input  logic [PROD_W-1:0] prod_mag,
  output logic              idle,
  output logic              emit_valid,
  output logic              emit_last,
  output logic [SLOT_W-1:0] emit_slot,
  output logic [EXP_W-1:0]  emit_exp,
  output logic [ACC_W-1:0]  emit_sum,
  output logic              norm_evt
);

  typedef enum logic [1:0] {IDLE, ACC, DRAIN} state_t;

  typedef struct packed {
    logic              emit;
    logic              last;
    logic [SLOT_W-1:0] slot;
  } tag_t;

  state_t            state;
  logic [SLOT_W-1:0] inj;    // injections in this vector, saturating at S
  logic [SLOT_W-1:0] slot;   // partial sum the next injection goes to
  logic [SLOT_W-1:0] dcnt;   // drain injections so far

  logic              inject, take_prod, fb_use;
  tag_t              tag_in;
  tag_t              tag_pipe [S];

  // feedback from the adder output
  logic [ACC_W-1:0]  fb_val;
  logic [EXP_W-1:0]  fb_exp;

  always_comb begin
    take_prod = prod_valid && (state != DRAIN);
    inject    = (state != IDLE) || prod_valid;
    fb_use    = (state != IDLE) && (inj == SLOT_W'(S));
    tag_in    = '{emit: (state == DRAIN),
                  last: (state == DRAIN) && (dcnt == SLOT_W'(S - 1)),
                  slot: slot};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= IDLE;
      inj   <= '0;
      slot  <= '0;
      dcnt  <= '0;
    end else begin
      if (inject) begin
        if (state == IDLE) begin
          inj  <= SLOT_W'(1);
          slot <= SLOT_W'(1);
        end else begin
          if (inj != SLOT_W'(S)) inj <= inj + 1'b1;
          slot <= (slot == SLOT_W'(S - 1)) ? '0 : slot + 1'b1;
        end
      end
      unique case (state)
        IDLE: if (prod_valid) begin
          state <= prod_last ? DRAIN : ACC;
          dcnt  <= '0;
        end
        ACC: if (prod_valid && prod_last) begin
          state <= DRAIN;
          dcnt  <= '0;
        end
        DRAIN: begin
          dcnt <= dcnt + 1'b1;
          if (dcnt == SLOT_W'(S - 1)) state <= IDLE;
        end
        default: state <= IDLE;
      endcase
    end
  end

  assign idle = (state == IDLE);

  // stage 1: normalizing unit
  logic              n_sign;
  logic [PROD_W-1:0] n_mag;
  logic [ACC_W-1:0]  n_b;
  logic [EXP_W-1:0]  n_exp;

  normalizing_unit #(.PROD_W(PROD_W), .W(ACC_W), .EXP_W(EXP_W)) u_norm (
    .clk      (clk),
    .rst_n    (rst_n),
    .a_sign   (take_prod ? prod_sign : 1'b0),
    .a_mag    (take_prod ? prod_mag : '0),
    .fb_use   (fb_use),
    .fb_val   (fb_val),
    .fb_exp   (fb_exp),
    .a_sign_q (n_sign),
    .a_mag_q  (n_mag),
    .b_q      (n_b),
    .exp_q    (n_exp),
    .norm_evt (norm_evt)
  );

  // stage 2: 1's complement / register
  logic              c_sign, c_bsign_unused;
  logic [ACC_W-1:0]  c_a, c_b;

  ones_comp_register #(.IN_W(PROD_W), .W(ACC_W), .B_IS_SM(1'b0)) u_ocr (
    .clk      (clk),
    .rst_n    (rst_n),
    .ce       (1'b1),
    .a_sign   (n_sign),
    .a_mag    (n_mag),
    .b_sign   (1'b0),
    .b_val    (n_b),
    .a_sign_q (c_sign),
    .a_q      (c_a),
    .b_sign_q (c_bsign_unused),
    .b_q      (c_b)
  );

  // stages 3 .. S: adder, sign of a as carry-in
  cla_pipe_adder #(.W(ACC_W)) u_add (
    .clk   (clk),
    .rst_n (rst_n),
    .ce    (1'b1),
    .x     (c_b),
    .y     (c_a),
    .cin   (c_sign),
    .s     (fb_val)
  );

  // exponent and tags travel beside the data
  logic [EXP_W-1:0] exp_pipe [NS+1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < S; k++)    tag_pipe[k] <= '0;
      for (int k = 0; k <= NS; k++)  exp_pipe[k] <= '0;
    end else begin
      tag_pipe[0] <= inject ? tag_in : '0;
      for (int k = 1; k < S; k++)    tag_pipe[k] <= tag_pipe[k-1];
      exp_pipe[0] <= n_exp;
      for (int k = 1; k <= NS; k++)  exp_pipe[k] <= exp_pipe[k-1];
    end
  end

  assign fb_exp     = exp_pipe[NS];
  assign emit_valid = tag_pipe[S-1].emit;
  assign emit_last  = tag_pipe[S-1].last;
  assign emit_slot  = tag_pipe[S-1].slot;
  assign emit_exp   = fb_exp;
  assign emit_sum   = fb_val;

endmodule
