// fp_div_int: operand unpacking and significand division by digit recurrence.
//
// While enable is low the unit is idle. On the first clock edge that sees
// enable high it captures the two operands: each significand gets its hidden
// bit (or, for a subnormal, is shifted left until its leading one reaches bit
// 52, lowering the operand's exponent accordingly), the result sign is the
// XOR of the operand signs and the result exponent is ea - eb + 1023. The
// next 56 edges run a radix-2 restoring recurrence, one quotient bit per
// edge: if the partial remainder is at least the divisor the bit is one and
// the divisor is subtracted, then the remainder is doubled. The last edge
// normalises the quotient (if it is below one it is shifted left and the
// exponent lowered by one), folds the non-zero remainder into the sticky bit,
// and registers the outputs, which then hold until enable goes low.
//
// Interface: opa, opb are binary64 operands; rmode is accepted as on the
// block's interconnection but not used here (rounding happens downstream).
// exponent_out is a 12-bit two's-complement biased exponent, saturated at
// 2047 (any value there overflows); mantissa_7 is the 56-bit mantissa term
// described in fp_div_pkg; sign is the result sign.
// Timing: outputs valid DIV_LATENCY (58) edges after enable is first sampled
// high; operands need only be stable at the first of those edges.
//
// The port list and the use of a digit recurrence follow the design
// description; the radix, the restoring form, the normalisation of subnormal
// operands and the output encodings are this design's choices. Zero,
// infinite and NaN operands produce meaningless outputs here; fp_exception
// replaces the result in those cases. Synchronous active-high reset.
module fp_div_int
  import fp_div_pkg::*;
(
  input  logic                     clk,
  input  logic                     rst,
  input  logic                     enable,
  input  logic [1:0]               rmode,
  input  logic [63:0]              opa,
  input  logic [63:0]              opb,
  output logic signed [EXPT_W-1:0] exponent_out,
  output logic [MANT_W-1:0]        mantissa_7,
  output logic                     sign
);

  localparam int unsigned CNT_W = $clog2(DIV_LATENCY + 1);
  localparam int unsigned REM_W = SIG_W + 1;

  fp64_t a, b;
  assign a = opa;
  assign b = opb;

  // Significand with hidden bit and a normalising left shift for subnormals.
  function automatic logic [5:0] lead_zeros(input logic [SIG_W-1:0] s);
    logic [5:0] n;
    n = 6'(SIG_W);
    for (int i = 0; i < int'(SIG_W); i++)
      if (s[i]) n = 6'(int'(SIG_W) - 1 - i);
    return n;
  endfunction

  logic [SIG_W-1:0] sig_a, sig_b, norm_a, norm_b;
  logic [5:0]       lz_a, lz_b;
  logic signed [13:0] exp_a, exp_b, exp_q;

  always_comb begin
    sig_a  = {a.exp != '0, a.frac};
    sig_b  = {b.exp != '0, b.frac};
    lz_a   = lead_zeros(sig_a);
    lz_b   = lead_zeros(sig_b);
    norm_a = sig_a << lz_a;
    norm_b = sig_b << lz_b;
    // A subnormal has the exponent of the smallest normal, 1.
    exp_a  = 14'(a.exp == '0 ? 1 : a.exp) - 14'(lz_a);
    exp_b  = 14'(b.exp == '0 ? 1 : b.exp) - 14'(lz_b);
    exp_q  = exp_a - exp_b + 14'(BIAS);
  end

  logic [CNT_W-1:0]   cnt;
  logic [REM_W-1:0]   rem;
  logic [SIG_W-1:0]   div;
  logic [QUOT_BITS-1:0] quot;
  logic signed [13:0] exp_r;
  logic               sign_r;

  // One recurrence step.
  logic             q_bit;
  logic [REM_W-1:0] rem_next;
  always_comb begin
    q_bit    = rem >= REM_W'(div);
    rem_next = q_bit ? (rem - REM_W'(div)) << 1 : rem << 1;
  end

  // Normalisation of the finished quotient.
  logic signed [13:0] exp_n;
  logic [MANT_W-1:0]  mant_n;
  logic               sticky;
  always_comb begin
    sticky = rem != '0;
    if (quot[QUOT_BITS-1]) begin
      mant_n = {quot[QUOT_BITS-1:1], quot[0] | sticky};
      exp_n  = exp_r;
    end else begin
      mant_n = {quot[QUOT_BITS-2:0], sticky};
      exp_n  = exp_r - 14'sd1;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      cnt          <= '0;
      rem          <= '0;
      div          <= '0;
      quot         <= '0;
      exp_r        <= '0;
      sign_r       <= 1'b0;
      exponent_out <= '0;
      mantissa_7   <= '0;
      sign         <= 1'b0;
    end else if (!enable) begin
      cnt <= '0;
    end else if (cnt == '0) begin
      rem    <= REM_W'(norm_a);
      div    <= norm_b;
      quot   <= '0;
      exp_r  <= exp_q;
      sign_r <= a.sign ^ b.sign;
      cnt    <= cnt + 1'b1;
    end else if (cnt <= CNT_W'(QUOT_BITS)) begin
      rem  <= rem_next;
      quot <= {quot[QUOT_BITS-2:0], q_bit};
      cnt  <= cnt + 1'b1;
    end else if (cnt == CNT_W'(QUOT_BITS + 1)) begin
      mantissa_7   <= mant_n;
      exponent_out <= exp_n > 14'sd2047 ? EXPT_W'(2047) : EXPT_W'(exp_n);
      sign         <= sign_r;
      cnt          <= cnt + 1'b1;
    end
  end

  // rmode is part of the block's interface but rounding is done downstream.
  logic unused_rmode;
  assign unused_rmode = ^rmode;

endmodule
