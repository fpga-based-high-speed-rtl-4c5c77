// Testbench of fp_div_int: significand quotient, exponent and sign.
//
// For random finite non-zero operands (normal and subnormal, all exponent
// ranges) the expected 56-bit mantissa term is computed with one integer
// division of the normalised significands, (ma << 55) / mb, normalised so
// that its leading one is at bit 55, with the sticky bit set from the
// remaining quotient bits and the remainder. The expected exponent is
// ea - eb + 1023 (minus one when the quotient is below one), saturated at
// 2047. Outputs are checked exactly 58 edges after enable is first sampled,
// and must not be there one edge earlier.
module tb_fp_div_int;
  import fp_div_pkg::*;

  logic clk = 0, rst, enable;
  logic [1:0] rmode;
  logic [63:0] opa, opb;
  logic signed [EXPT_W-1:0] exponent_out;
  logic [MANT_W-1:0] mantissa_7;
  logic sign;

  fp_div_int dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic [55:0] prev_m = '0;
  logic [11:0] prev_e = '0;
  initial begin
    #(10 * 1_000_000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what, input logic ok);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  function automatic logic [63:0] rand_finite(input int kind);
    logic [63:0] v;
    v = {$urandom, $urandom};
    case (kind)
      0: v[62:52] = 11'($urandom_range(1, 2046));
      1: v[62:52] = 11'(1023 + $signed($urandom_range(0, 20)) - 10);
      2: v[62:52] = 0;
      default: v[62:52] = 11'($urandom_range(2000, 2046));
    endcase
    if (v[62:0] == 0) v[0] = 1;
    return v;
  endfunction

  task automatic run(input logic [63:0] a, input logic [63:0] b);
    logic [127:0] ma, mb, q, r;
    int ea, eb, e;
    logic [55:0] m;
    ea = a[62:52] == 0 ? 1 : int'(a[62:52]);
    eb = b[62:52] == 0 ? 1 : int'(b[62:52]);
    ma = {75'h0, a[62:52] != 0, a[51:0]};
    mb = {75'h0, b[62:52] != 0, b[51:0]};
    while (!ma[52]) begin ma <<= 1; ea--; end
    while (!mb[52]) begin mb <<= 1; eb--; end
    q = (ma << 55) / mb;
    r = (ma << 55) % mb;
    e = ea - eb + 1023;
    if (q[55]) m = {q[55:1], q[0] | (r != 0)};
    else begin m = {q[54:0], r != 0}; e--; end
    if (e > 2047) e = 2047;

    @(negedge clk);
    opa = a; opb = b; rmode = 2'($urandom); enable = 1;
    repeat (DIV_LATENCY - 1) @(posedge clk);
    #1;
    check("previous result still held one edge early",
          mantissa_7 == prev_m && exponent_out == prev_e);
    // Operands may change once captured.
    opa = ~a; opb = ~b;
    @(posedge clk); #1;
    check($sformatf("%h / %h: mantissa %h expected %h", a, b, mantissa_7, m), mantissa_7 == m);
    check($sformatf("%h / %h: exponent %0d expected %0d", a, b, exponent_out, e), exponent_out == 12'(e));
    check("sign", sign == (a[63] ^ b[63]));
    repeat (3) @(posedge clk);
    #1;
    check("outputs hold", mantissa_7 == m && exponent_out == 12'(e));
    prev_m = m;
    prev_e = 12'(e);
    @(negedge clk) enable = 0;
  endtask

  initial begin
    rst = 1; enable = 0; opa = 0; opb = 0; rmode = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 0;
    run(64'h3FF0_0000_0000_0000, 64'h4008_0000_0000_0000);   // 1/3
    run(64'h4008_0000_0000_0000, 64'h3FF0_0000_0000_0000);   // 3/1 exact
    run(64'h7FEF_FFFF_FFFF_FFFF, 64'h0000_0000_0000_0001);   // saturated exponent
    run(64'h0000_0000_0000_0001, 64'h7FEF_FFFF_FFFF_FFFF);   // most negative exponent
    for (int i = 0; i < 2000; i++)
      run(rand_finite($urandom_range(0, 3)), rand_finite($urandom_range(0, 3)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
