// Testbench of fp_exception: special operands, overflow and the flags.
//
// Operands are drawn from the classes zero, subnormal, normal, infinity,
// quiet NaN and signalling NaN with random signs; the rounded result,
// its exponent field (0 to 2048) and the two dropped bits are random. The
// expected output and flags are written out from the specification table
// of special cases, in a different order from the module's priority chain.
// Checked one edge after the inputs are applied.
module tb_fp_exception;
  import fp_div_pkg::*;

  logic clk = 0, rst, enable;
  logic [1:0] rmode;
  logic [63:0] opa, opb, in_except, out;
  logic [EXPT_W-1:0] exponent_in;
  logic [1:0] mantissa_in;
  logic exception, inexact, invalid, overflow, underflow;

  fp_exception dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int seen[6];
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

  // 0 zero, 1 subnormal, 2 normal, 3 inf, 4 qNaN, 5 sNaN
  function automatic logic [63:0] make(input int cls);
    logic [63:0] v;
    v = {$urandom, $urandom};
    case (cls)
      0: v[62:0] = 0;
      1: begin v[62:52] = 0; if (v[51:0] == 0) v[0] = 1; end
      2: v[62:52] = 11'($urandom_range(1, 2046));
      3: v[62:0] = {11'h7FF, 52'h0};
      4: v[62:51] = 12'hFFF;
      default: begin v[62:51] = 12'hFFE; if (v[50:0] == 0) v[0] = 1; end
    endcase
    return v;
  endfunction

  task automatic run(input int ca, input int cb);
    logic [63:0] a, b, r, e_out;
    logic [11:0] ei;
    logic [1:0] mi, rm;
    logic s, e_exc, e_inx, e_inv, e_ovf, e_unf, nan_a, nan_b, fin_a, fin_b;
    a = make(ca); b = make(cb);
    rm = 2'($urandom);
    mi = 2'($urandom);
    ei = $urandom_range(0, 9) == 0 ? 12'($urandom_range(2047, 2048))
                                    : 12'($urandom_range(0, 2046));
    if ($urandom_range(0, 3) == 0) ei = 0;
    r = {$urandom, $urandom};
    r[62:52] = ei[10:0];
    s = a[63] ^ b[63];
    nan_a = ca >= 4; nan_b = cb >= 4;
    fin_a = ca <= 2; fin_b = cb <= 2;
    {e_exc, e_inx, e_inv, e_ovf, e_unf} = '0;
    e_out = r;
    if (fin_a && fin_b && ca != 0 && cb != 0) begin
      if (ei >= 2047) begin
        e_ovf = 1; e_inx = 1;
        if (rm == 0 || (rm == 2 && !s) || (rm == 3 && s)) e_out = {s, 11'h7FF, 52'h0};
        else e_out = {s, 11'h7FE, {52{1'b1}}};
      end else begin
        e_inx = mi != 0;
        e_unf = mi != 0 && ei == 0;
      end
    end else begin
      e_exc = !(ca == 0 && fin_b && cb != 0);
      if (nan_a || nan_b) begin
        e_out = 64'h7FF8_0000_0000_0000;
        e_inv = ca == 5 || cb == 5;
      end else if (ca == 0 && cb == 0) begin
        e_out = 64'h7FF8_0000_0000_0000; e_inv = 1;
      end else if (ca == 3 && cb == 3) begin
        e_out = 64'h7FF8_0000_0000_0000; e_inv = 1;
      end else if (ca == 3 || cb == 0) e_out = {s, 11'h7FF, 52'h0};
      else e_out = {s, 63'h0};
    end
    seen[0] += int'(e_ovf); seen[1] += int'(e_unf); seen[2] += int'(e_inv);
    seen[3] += int'(e_exc); seen[4] += int'(e_inx); seen[5] += int'(e_out == r);

    @(negedge clk);
    opa = a; opb = b; rmode = rm; in_except = r; exponent_in = ei; mantissa_in = mi; enable = 1;
    @(posedge clk); #1;
    check($sformatf("%h / %h rm=%0d ei=%0d mi=%b: out %h expected %h", a, b, rm, ei, mi, out, e_out),
          out == e_out);
    check($sformatf("%h / %h rm=%0d ei=%0d mi=%b: flags %b expected %b", a, b, rm, ei, mi,
                    {exception, inexact, invalid, overflow, underflow},
                    {e_exc, e_inx, e_inv, e_ovf, e_unf}),
          {exception, inexact, invalid, overflow, underflow} == {e_exc, e_inx, e_inv, e_ovf, e_unf});
    @(negedge clk) begin enable = 0; opa = ~a; end
    @(posedge clk); #1;
    check("held with enable low", out == e_out);
  endtask

  initial begin
    rst = 1; enable = 0; rmode = 0; opa = 0; opb = 0; in_except = 0; exponent_in = 0; mantissa_in = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int ca = 0; ca < 6; ca++)
      for (int cb = 0; cb < 6; cb++)
        for (int k = 0; k < 40; k++) run(ca, cb);
    for (int i = 0; i < 5000; i++) run($urandom_range(1, 2), $urandom_range(1, 2));
    foreach (seen[i]) check($sformatf("case %0d seen", i), seen[i] > 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
