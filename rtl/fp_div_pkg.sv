// Shared constants and types of the double precision divider.
//
// The divider works on IEEE 754 binary64 numbers: sign in bit 63, an 11-bit
// biased exponent in bits 62..52 and a 52-bit fraction in bits 51..0, with a
// bias of 1023. The rounding-mode encoding of the two rmode bits is the one
// the interface defines: 00 nearest-even, 01 toward zero, 10 toward +inf
// (up), 11 toward -inf (down).
//
// Between the stages the quotient travels as a 56-bit "mantissa term": bit 55
// is the leading (hidden) one, bits 54..3 the 52 fraction bits, bit 2 the
// guard bit, bit 1 the round bit and bit 0 a sticky bit that is set when any
// lower quotient bit or the final remainder is non-zero. The exponent travels
// as a 12-bit two's-complement biased exponent; values of zero or below mean
// the result has to be denormalised. Both the widths of the mantissa term and
// of the exponent term are those printed on the block interconnection; their
// bit-level meaning is this design's choice.
package fp_div_pkg;

  localparam int unsigned EXP_W   = 11;
  localparam int unsigned FRAC_W  = 52;
  localparam int unsigned SIG_W   = FRAC_W + 1;   // significand with hidden bit
  localparam int unsigned MANT_W  = 56;           // mantissa term width
  localparam int unsigned EXPT_W  = 12;           // exponent term width
  localparam int unsigned BIAS    = 1023;
  localparam int unsigned EXP_MAX = (1 << EXP_W) - 1;  // 2047: inf / NaN

  // One quotient bit per clock: 56 bits give the hidden bit, 52 fraction
  // bits, guard and round even when the quotient is below one.
  localparam int unsigned QUOT_BITS = MANT_W;

  // Clock edges, counted from the first edge that samples enable high, after
  // which each stage holds the result of the operation.
  localparam int unsigned DIV_LATENCY   = QUOT_BITS + 2;      // load + steps + normalise
  localparam int unsigned ROUND_LATENCY = DIV_LATENCY + 1;
  localparam int unsigned TOTAL_LATENCY = ROUND_LATENCY + 1;  // ready rises here

  typedef enum logic [1:0] {
    RM_NEAREST_EVEN = 2'b00,
    RM_TO_ZERO      = 2'b01,
    RM_UP           = 2'b10,
    RM_DOWN         = 2'b11
  } rmode_e;

  typedef struct packed {
    logic              sign;
    logic [EXP_W-1:0]  exp;
    logic [FRAC_W-1:0] frac;
  } fp64_t;

  localparam fp64_t QNAN = '{sign: 1'b0, exp: '1, frac: {1'b1, {(FRAC_W-1){1'b0}}}};

endpackage
