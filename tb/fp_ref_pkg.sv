// Reference model of binary64 division for the testbenches.
//
// Works with exact integer arithmetic, not with the divider's recurrence:
// the normalised significands are divided with a 128-bit integer divide
// (quotient and remainder), the number of quotient bits to drop is worked
// out from the exponent the result will have (52 fraction bits for a normal
// result, a fixed LSB weight of 2^-1074 for a subnormal one), and rounding
// compares the dropped part with one half ULP. Special operands follow the
// divider's specification: canonical quiet NaN, invalid for 0/0, inf/inf and
// signalling NaNs, exception for NaN/inf operands and zero divisors,
// underflow when the delivered result is subnormal or zero and inexact.
package fp_ref_pkg;

  typedef struct packed {
    logic [63:0] out;
    logic        exception;
    logic        inexact;
    logic        invalid;
    logic        overflow;
    logic        underflow;
  } result_t;

  // Side information about how the result came about, for coverage.
  typedef struct packed {
    logic special;       // produced by the special-case rules
    logic div_by_zero;
    logic subnormal_in;  // an operand was subnormal
    logic subnormal_out; // delivered result subnormal (non-zero)
    logic rounded_up;    // the kept bits were incremented
    logic carry_normal;  // a subnormal rounded up into the smallest normal
    logic flushed_zero;  // a non-zero quotient delivered as zero
  } info_t;

  function automatic result_t ref_div(input logic [63:0] a, input logic [63:0] b,
                                      input logic [1:0] rm, output info_t info);
    result_t r;
    logic sa, sb, s;
    int   ea, eb, ebias, d, p;
    logic [127:0] ma, mb, n, rem, kept, dropped, half;
    logic a_nan, b_nan, a_inf, b_inf, a_zero, b_zero, a_snan, b_snan;
    logic above, tie, inx, inc;
    logic [63:0] maxf, inff;
    int field;

    r = '0;
    info = '0;
    sa = a[63]; sb = b[63]; s = sa ^ sb;
    a_nan  = a[62:52] == 11'h7FF && a[51:0] != 0;
    b_nan  = b[62:52] == 11'h7FF && b[51:0] != 0;
    a_snan = a_nan && !a[51];
    b_snan = b_nan && !b[51];
    a_inf  = a[62:52] == 11'h7FF && a[51:0] == 0;
    b_inf  = b[62:52] == 11'h7FF && b[51:0] == 0;
    a_zero = a[62:0] == 0;
    b_zero = b[62:0] == 0;
    inff = {s, 11'h7FF, 52'h0};
    maxf = {s, 11'h7FE, {52{1'b1}}};
    info.subnormal_in = (a[62:52] == 0 && !a_zero) || (b[62:52] == 0 && !b_zero);

    if (a_nan || b_nan || (a_zero && b_zero) || (a_inf && b_inf)) begin
      r.out = 64'h7FF8_0000_0000_0000;
      r.exception = 1;
      r.invalid = a_snan || b_snan || (a_zero && b_zero) || (a_inf && b_inf);
      info.special = 1;
      return r;
    end
    if (a_inf || b_zero) begin
      r.out = inff;
      r.exception = 1;
      info.special = 1;
      info.div_by_zero = b_zero;
      return r;
    end
    if (a_zero || b_inf) begin
      r.out = {s, 63'h0};
      r.exception = b_inf;
      info.special = 1;
      return r;
    end

    // Unpack and normalise.
    ea = a[62:52] == 0 ? 1 : int'(a[62:52]);
    eb = b[62:52] == 0 ? 1 : int'(b[62:52]);
    ma = {75'h0, a[62:52] != 0, a[51:0]};
    mb = {75'h0, b[62:52] != 0, b[51:0]};
    while (!ma[52]) begin ma = ma << 1; ea--; end
    while (!mb[52]) begin mb = mb << 1; eb--; end

    n   = (ma << 64) / mb;
    rem = (ma << 64) % mb;
    p = n[64] ? 64 : 63;
    // Biased exponent of the exact quotient.
    ebias = ea - eb + 1023 + (p - 64);
    // Number of quotient bits below the result's LSB: 52 fraction bits for
    // a normal result, an LSB weight of 2^-1074 for a subnormal one (n has
    // an LSB weight of 2^(ua - ub - 64), ua and ub the unbiased exponents).
    if (ebias >= 1) d = p - 52;
    else            d = -1074 - ((ea - 1023) - (eb - 1023) - 64);
    if (d > 100) d = 100;

    kept    = n >> d;
    dropped = n - (kept << d);
    half    = 128'h1 << (d - 1);
    inx   = dropped != 0 || rem != 0;
    tie   = dropped == half && rem == 0;
    above = dropped > half || (dropped == half && rem != 0);
    case (rm)
      2'b00: inc = above || (tie && kept[0]);
      2'b01: inc = 0;
      2'b10: inc = inx && !s;
      default: inc = inx && s;
    endcase
    info.rounded_up = inc;
    kept = kept + inc;

    if (ebias >= 1) begin
      if (kept[53]) begin kept = kept >> 1; ebias++; end
      field = ebias;
    end else begin
      field = kept[52] ? 1 : 0;
      info.carry_normal = kept[52];
    end

    if (field >= 2047) begin
      r.overflow = 1;
      r.inexact  = 1;
      r.out = (rm == 2'b00 || (rm == 2'b10 && !s) || (rm == 2'b11 && s)) ? inff : maxf;
      return r;
    end
    r.out = {s, 11'(field), kept[51:0]};
    r.inexact = inx;
    r.underflow = inx && field == 0;
    info.subnormal_out = field == 0 && kept[51:0] != 0;
    info.flushed_zero  = field == 0 && kept[51:0] == 0;
    return r;
  endfunction

endpackage
