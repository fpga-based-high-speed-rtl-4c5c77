// fp_round: denormalisation, rounding and packing of the quotient.
//
// Inputs are the 12-bit signed biased exponent term, the 56-bit mantissa
// term (hidden bit 55, fraction 54..3, guard 2, round 1, sticky 0), the sign
// and the rounding mode. If the exponent term is zero or negative the result
// is subnormal: the mantissa term is shifted right by 1 - exponent places
// (at most 56; anything shifted out is ORed into the sticky bit) and the
// exponent field becomes 0. The 53 kept bits are then incremented when the
// rounding mode asks for it:
//   00 nearest-even: guard set and (round, sticky or the kept LSB set)
//   01 toward zero : never
//   10 up          : any dropped bit set and sign positive
//   11 down        : any dropped bit set and sign negative
// A carry out of the 53 bits raises the exponent by one; a subnormal that
// rounds up into the hidden bit becomes the smallest normal (exponent 1).
//
// Outputs, registered on every edge with enable high: round_out is the packed
// binary64 {sign, exponent[10:0], fraction}; exponent_final is the 12-bit
// unsigned exponent field, which may reach 2047 or 2048, meaning overflow
// (fp_exception replaces the result then); round_lost holds {guard,
// round|sticky} of the bits rounding dropped, for the inexact and underflow
// flags. Latency: one clock edge.
//
// The rounding-mode encoding and the port names follow the design
// description; the mantissa term layout, the denormalisation and the extra
// round_lost output, which carries the dropped bits on to fp_exception, are
// this design's choices. Synchronous active-high reset.
module fp_round
  import fp_div_pkg::*;
(
  input  logic                     clk,
  input  logic                     rst,
  input  logic                     enable,
  input  logic [1:0]               round_mode,
  input  logic                     sign_term,
  input  logic signed [EXPT_W-1:0] exponent_term,
  input  logic [MANT_W-1:0]        mantissa_term,
  output logic [EXPT_W-1:0]        exponent_final,
  output logic [63:0]              round_out,
  output logic [1:0]               round_lost
);

  rmode_e mode;
  assign mode = rmode_e'(round_mode);

  logic                    subnormal;
  logic [6:0]              shift;
  logic [2*MANT_W-1:0]     wide;
  logic [MANT_W-1:0]       mant_d;
  logic [SIG_W-1:0]        kept;
  logic                    guard, rest, lsb, inexact, inc;
  logic [SIG_W:0]          sum;
  logic [EXPT_W-1:0]       exp_f;
  logic [FRAC_W-1:0]       frac_f;

  always_comb begin
    subnormal = exponent_term <= 0;
    if (!subnormal)
      shift = '0;
    else if (exponent_term < -12'sd55)
      shift = 7'(MANT_W);
    else
      shift = 7'(13'sd1 - 13'(exponent_term));
    wide   = {mantissa_term, {MANT_W{1'b0}}} >> shift;
    mant_d = wide[2*MANT_W-1:MANT_W];
    mant_d[0] = mant_d[0] | (wide[MANT_W-1:0] != '0);

    kept    = mant_d[MANT_W-1:3];
    guard   = mant_d[2];
    rest    = mant_d[1] | mant_d[0];
    lsb     = mant_d[3];
    inexact = guard | rest;
    unique case (mode)
      RM_NEAREST_EVEN: inc = guard & (rest | lsb);
      RM_TO_ZERO:      inc = 1'b0;
      RM_UP:           inc = inexact & ~sign_term;
      RM_DOWN:         inc = inexact & sign_term;
    endcase
    sum = {1'b0, kept} + (SIG_W+1)'(inc);

    if (subnormal) begin
      exp_f  = EXPT_W'(sum[SIG_W-1]);
      frac_f = sum[FRAC_W-1:0];
    end else if (sum[SIG_W]) begin
      exp_f  = exponent_term + 1'b1;
      frac_f = sum[FRAC_W:1];
    end else begin
      exp_f  = exponent_term;
      frac_f = sum[FRAC_W-1:0];
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      exponent_final <= '0;
      round_out      <= '0;
      round_lost     <= '0;
    end else if (enable) begin
      exponent_final <= exp_f;
      round_out      <= {sign_term, exp_f[EXP_W-1:0], frac_f};
      round_lost     <= {guard, rest};
    end
  end

endmodule
