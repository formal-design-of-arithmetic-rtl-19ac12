// arith_pkg: number-system types and algorithm selectors shared by the
// arithmetic modules.
//
// Signed-digit numbers are carried digit by digit as small packed structs:
//   sd2_digit_t  radix-2 signed digit in {-1,0,1}, value = p - n
//                (the "positive/negative" bit pair, as in the PPnp/PPnn and
//                Fp/Fn wire pairs of the multiplier netlist).
//   sd4_digit_t  radix-4 signed digit in {-2..2}, value = (s ? -1 : 1) * (2*d1 + d0)
//                (sign bit plus two magnitude bits, the Bs/Bd1/Bd0 triple).
// The magnitude coding of sd4_digit_t (d1 = "two", d0 = "one", never both)
// is this design's choice; only the three-wire split is given.
//
// adder_alg_e and moa_alg_e name the two-operand and multi-operand addition
// algorithms that the parameterised multiplier, constant multiplier and
// multiply accumulator can be built from.
package arith_pkg;

  typedef struct packed {
    logic p;   // +1 when set
    logic n;   // -1 when set
  } sd2_digit_t;

  typedef struct packed {
    logic s;   // sign: 1 = negative
    logic d1;  // magnitude 2
    logic d0;  // magnitude 1
  } sd4_digit_t;

  // Two-operand (final stage) adder algorithms.
  typedef enum logic [3:0] {
    ADD_RCA       = 4'd0,   // ripple carry
    ADD_CLA       = 4'd1,   // carry lookahead
    ADD_RB_CLA    = 4'd2,   // ripple-block CLA
    ADD_BLOCK_CLA = 4'd3,   // block CLA (two-level lookahead)
    ADD_KS        = 4'd4,   // Kogge-Stone
    ADD_BK        = 4'd5,   // Brent-Kung
    ADD_HC        = 4'd6,   // Han-Carlson
    ADD_CSEL      = 4'd7,   // carry select
    ADD_CSUM      = 4'd8,   // conditional sum
    ADD_CSKIP     = 4'd9,   // fixed-block-size carry skip
    ADD_VCSKIP    = 4'd10   // variable-block-size carry skip
  } adder_alg_e;

  // Multi-operand (partial product accumulation) algorithms.
  typedef enum logic [1:0] {
    MOA_ARRAY   = 2'd0,     // linear array of carry-save adders
    MOA_WALLACE = 2'd1,     // Wallace tree of (3,2) counters
    MOA_C42     = 2'd2,     // (4;2) compressor tree
    MOA_RB      = 2'd3      // redundant-binary addition tree
  } moa_alg_e;

  // Value of one radix-2 signed digit.
  function automatic int sd2_value(sd2_digit_t d);
    return int'(d.p) - int'(d.n);
  endfunction

endpackage
