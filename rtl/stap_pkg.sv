// stap_pkg: widths and word layouts shared by the inner-product co-processors.
//
// Operands are block-floating-point mantissas in sign-magnitude form: one sign
// bit and a 16-bit magnitude, read as a fraction 0.m. The exponent of a whole
// vector is kept by the host and never reaches the hardware. The 36-bit host
// data path carries one operand pair per word, plus a flag that marks the last
// pair of a vector. The 17-bit operand and the 36-bit path follow the document.
// The position of the flag and the reserved bit are this design's choice.
package stap_pkg;

  localparam int unsigned MANT_W = 16;  // magnitude bits of an operand
  localparam int unsigned BUS_W  = 36;  // host/board data path

  typedef struct packed {
    logic              sign;
    logic [MANT_W-1:0] mag;
  } sm_operand_t;                       // 17 bits

  typedef struct packed {
    sm_operand_t x;
    sm_operand_t y;
  } operand_pair_t;                     // 34 bits

  // One input word on the 36-bit path.
  typedef struct packed {
    logic          rsvd;   // bit 35, ignored
    logic          last;   // bit 34, last pair of the vector
    operand_pair_t pair;   // bits 33:0, {x, y}
  } in_word_t;

endpackage
