// fp_exception: special operands, overflow and the status flags.
//
// Looks at the two original operands and at the rounded result from fp_round
// and registers the final result with five flags. In priority order:
//   - NaN operand, 0/0 or inf/inf: result is the canonical quiet NaN
//     (0x7FF8_0000_0000_0000); invalid is set for 0/0, inf/inf and for a
//     signalling NaN operand (quiet NaN in, quiet NaN out, no invalid).
//   - inf / finite, or finite non-zero / 0: signed infinity.
//   - 0 / non-zero, or finite / inf: signed zero.
//   - otherwise the rounded quotient; if its exponent field reached 2047 it
//     overflowed: the result is infinity in nearest-even mode, the largest
//     finite number in toward-zero mode, and infinity or the largest finite
//     number in the two directed modes depending on the sign; overflow and
//     inexact are set.
// inexact is set when rounding dropped a non-zero bit (round_lost) or on
// overflow. underflow is set when the delivered result is subnormal or zero
// and inexact. exception is set when the result comes from the special-case
// logic rather than from the divider: a NaN or infinite operand, or a zero
// divisor (this covers division by zero, which has no flag of its own).
//
// Interface: exponent_in is fp_round's exponent_final, in_except its packed
// result, mantissa_in its round_lost bits; opa, opb, rmode are the operands
// and rounding mode of the operation, held stable by the host. Registered on
// every edge with enable high: one clock edge of latency.
//
// The port list follows the design description, except for its En_enable
// output, whose function is not given and which is left out. The choice of
// NaN, the meaning of exception and the underflow rule (tininess judged on
// the delivered result) are this design's own. Synchronous active-high reset.
module fp_exception
  import fp_div_pkg::*;
(
  input  logic              clk,
  input  logic              rst,
  input  logic              enable,
  input  logic [1:0]        rmode,
  input  logic [63:0]       opa,
  input  logic [63:0]       opb,
  input  logic [EXPT_W-1:0] exponent_in,
  input  logic [63:0]       in_except,
  input  logic [1:0]        mantissa_in,
  output logic [63:0]       out,
  output logic              exception,
  output logic              inexact,
  output logic              invalid,
  output logic              overflow,
  output logic              underflow
);

  fp64_t a, b, q;
  assign a = opa;
  assign b = opb;
  assign q = in_except;

  rmode_e mode;
  assign mode = rmode_e'(rmode);

  logic a_nan, b_nan, a_snan, b_snan, a_inf, b_inf, a_zero, b_zero;
  logic sign;
  assign a_nan  = a.exp == '1 && a.frac != '0;
  assign b_nan  = b.exp == '1 && b.frac != '0;
  assign a_snan = a_nan && !a.frac[FRAC_W-1];
  assign b_snan = b_nan && !b.frac[FRAC_W-1];
  assign a_inf  = a.exp == '1 && a.frac == '0;
  assign b_inf  = b.exp == '1 && b.frac == '0;
  assign a_zero = a.exp == '0 && a.frac == '0;
  assign b_zero = b.exp == '0 && b.frac == '0;
  assign sign   = a.sign ^ b.sign;

  fp64_t inf_r, zero_r, max_r, res;
  logic  exc, inx, inv, ovf, unf, ovf_to_inf;

  always_comb begin
    inf_r  = '{sign: sign, exp: '1, frac: '0};
    zero_r = '{sign: sign, exp: '0, frac: '0};
    max_r  = '{sign: sign, exp: {{(EXP_W-1){1'b1}}, 1'b0}, frac: '1};
    unique case (mode)
      RM_NEAREST_EVEN: ovf_to_inf = 1'b1;
      RM_TO_ZERO:      ovf_to_inf = 1'b0;
      RM_UP:           ovf_to_inf = !sign;
      RM_DOWN:         ovf_to_inf = sign;
    endcase

    res = q;
    exc = 1'b0;
    inx = 1'b0;
    inv = 1'b0;
    ovf = 1'b0;
    unf = 1'b0;
    if (a_nan || b_nan || (a_zero && b_zero) || (a_inf && b_inf)) begin
      res = QNAN;
      exc = 1'b1;
      inv = a_snan || b_snan || (a_zero && b_zero) || (a_inf && b_inf);
    end else if (a_inf || b_zero) begin
      res = inf_r;
      exc = 1'b1;
    end else if (a_zero || b_inf) begin
      res = zero_r;
      exc = b_inf;
    end else if (exponent_in >= EXPT_W'(EXP_MAX)) begin
      res = ovf_to_inf ? inf_r : max_r;
      ovf = 1'b1;
      inx = 1'b1;
    end else begin
      inx = mantissa_in != '0;
      unf = inx && exponent_in == '0;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      out       <= '0;
      exception <= 1'b0;
      inexact   <= 1'b0;
      invalid   <= 1'b0;
      overflow  <= 1'b0;
      underflow <= 1'b0;
    end else if (enable) begin
      out       <= res;
      exception <= exc;
      inexact   <= inx;
      invalid   <= inv;
      overflow  <= ovf;
      underflow <= unf;
    end
  end

endmodule
