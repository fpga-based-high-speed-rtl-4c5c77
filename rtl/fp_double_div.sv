// fp_double_div: IEEE 754 binary64 divider, out = opa / opb.
//
// Three stages in a row: fp_div_int unpacks the operands and produces the
// significand quotient by a radix-2 digit recurrence (one quotient bit per
// clock), fp_round denormalises and rounds it in the selected mode, and
// fp_exception substitutes the results of special operands and overflow and
// computes the flags. A cycle counter here raises ready when the last stage
// holds the result.
//
// Handshake: the host sets opa, opb and rmode and raises enable, then holds
// all four until ready is high. ready rises TOTAL_LATENCY (60) clock edges
// after the first edge that sampled enable high and stays high, with out and
// the flags stable, while enable stays high. Dropping enable for at least one
// clock returns the unit to idle; the next rise of enable starts a new
// division. So one division takes 61 clocks from one start to the next.
//
// rmode: 00 round to nearest even, 01 toward zero, 10 toward +inf, 11 toward
// -inf. Flags: overflow, underflow, inexact, invalid (0/0, inf/inf,
// signalling NaN) and exception (the result came from the special-case logic:
// NaN or infinite operand or zero divisor). Synchronous active-high reset.
//
// The ports, the three sub-blocks and their connection follow the design
// description. The ready counter, the hold-enable handshake and the
// connection of fp_round's dropped bits to fp_exception are this design's
// own.
module fp_double_div
  import fp_div_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic        enable,
  input  logic [1:0]  rmode,
  input  logic [63:0] opa,
  input  logic [63:0] opb,
  output logic [63:0] out,
  output logic        ready,
  output logic        underflow,
  output logic        overflow,
  output logic        inexact,
  output logic        exception,
  output logic        invalid
);

  logic signed [EXPT_W-1:0] exponent_out;
  logic [MANT_W-1:0]        mantissa_7;
  logic                     sign;
  logic [EXPT_W-1:0]        exponent_final;
  logic [63:0]              round_out;
  logic [1:0]               round_lost;

  fp_div_int u_div (
    .clk, .rst, .enable, .rmode, .opa, .opb,
    .exponent_out, .mantissa_7, .sign
  );

  fp_round u_round (
    .clk, .rst, .enable,
    .round_mode    (rmode),
    .sign_term     (sign),
    .exponent_term (exponent_out),
    .mantissa_term (mantissa_7),
    .exponent_final,
    .round_out,
    .round_lost
  );

  fp_exception u_exc (
    .clk, .rst, .enable, .rmode, .opa, .opb,
    .exponent_in (exponent_final),
    .in_except   (round_out),
    .mantissa_in (round_lost),
    .out, .exception, .inexact, .invalid, .overflow, .underflow
  );

  // Ready counter: counts edges with enable high, saturating at the latency.
  localparam int unsigned CNT_W = $clog2(TOTAL_LATENCY + 1);
  logic [CNT_W-1:0] count;

  always_ff @(posedge clk) begin
    if (rst || !enable) begin
      count <= '0;
      ready <= 1'b0;
    end else begin
      if (count != CNT_W'(TOTAL_LATENCY)) count <= count + 1'b1;
      ready <= count >= CNT_W'(TOTAL_LATENCY - 1);
    end
  end

  // The operands and mode must not change while a division is in flight.
  property p_operands_held;
    @(posedge clk) disable iff (rst)
      enable && $past(enable) |-> $stable({opa, opb, rmode});
  endproperty
  a_operands_held: assert property (p_operands_held)
    else $error("fp_double_div: operands changed while enable was high");

endmodule
