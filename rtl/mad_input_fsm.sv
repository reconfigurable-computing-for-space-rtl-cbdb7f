// mad_input_fsm: input state machine of the multiply-and-add co-processor.
//
// The multiply-and-add core needs four 17-bit operands per core cycle, but the
// host data path is 36 bits wide and carries only two. This state machine runs
// at twice the core rate: it takes the first word (operands a1, b1) and holds
// it for one of its cycles, then takes the second word (operands a2, b2, and
// the last-of-vector flag) and presents all four operands together as one
// operand set to the core.
//
// Clocking: clk is the fast (input) clock. The core runs on the same clock with
// the enable core_ce high every second cycle, the equivalent of a half-rate
// core clock aligned with this one. The set stays valid until a cycle with
// core_ce high, when the core takes it. Two words arrive at most once per two
// fast cycles, so the set is always taken before the next one is complete;
// in_ready still guards against it.
//
// Interface: in_* is a valid/ready word stream (stap_pkg::in_word_t). allow
// lets the surrounding logic hold input back (no room for results).
//
// The two-to-one clock ratio and the holding of the first two operands follow
// the document. The enable-based clocking and the handshake are this design's
// choices.
module mad_input_fsm
  import stap_pkg::*;
(
  input  logic          clk,
  input  logic          rst_n,
  input  logic          core_ce,
  input  logic          allow,
  input  logic          in_valid,
  output logic          in_ready,
  input  in_word_t      in_word,
  output logic          set_valid,
  output operand_pair_t set_p1,    // {a1, b1}
  output operand_pair_t set_p2,    // {a2, b2}
  output logic          set_last,
  output logic          set_evt    // a set was completed this cycle
);

  typedef enum logic {FIRST, SECOND} state_t;

  state_t        state;
  operand_pair_t hold;

  always_comb begin
    if (state == FIRST) in_ready = allow;
    else                in_ready = allow && (!set_valid || core_ce);
  end

  assign set_evt = in_valid && in_ready && (state == SECOND);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= FIRST;
      hold      <= '0;
      set_valid <= 1'b0;
      set_p1    <= '0;
      set_p2    <= '0;
      set_last  <= 1'b0;
    end else begin
      if (set_valid && core_ce) set_valid <= 1'b0;
      if (in_valid && in_ready) begin
        if (state == FIRST) begin
          hold  <= in_word.pair;
          state <= SECOND;
        end else begin
          set_p1    <= hold;
          set_p2    <= in_word.pair;
          set_last  <= in_word.last;
          set_valid <= 1'b1;
          state     <= FIRST;
        end
      end
    end
  end

  a_no_overwrite: assert property (@(posedge clk) disable iff (!rst_n)
                                   set_evt |-> (!set_valid || core_ce));

endmodule
