// Testbench of fp_round: denormalisation, the four rounding modes, packing.
//
// Drives random mantissa terms (leading one at bit 55) with exponent terms
// over the whole signed range, concentrated around the subnormal boundary,
// plus exact ties and all-ones patterns. The expected result treats the
// mantissa term as an integer M: it keeps M >> d with d = 3 for a normal
// result and d = 3 + (1 - exponent) for a subnormal one, compares the
// dropped part with half of the kept LSB, and applies the rounding rule of
// the mode. Results are checked one edge after the inputs are applied.
module tb_fp_round;
  import fp_div_pkg::*;

  logic clk = 0, rst, enable;
  logic [1:0] round_mode;
  logic sign_term;
  logic signed [EXPT_W-1:0] exponent_term;
  logic [MANT_W-1:0] mantissa_term;
  logic [EXPT_W-1:0] exponent_final;
  logic [63:0] round_out;
  logic [1:0] round_lost;

  fp_round dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_sub = 0, n_carry = 0, n_tie = 0;
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

  task automatic run(input int e, input logic [55:0] m, input logic s, input logic [1:0] rm);
    logic [127:0] mm, kept, dropped, half;
    int d, f;
    logic inc, inx, tie, above;
    logic [1:0] lost;
    mm = {72'h0, m};
    d = e >= 1 ? 3 : 3 + (1 - e);
    if (d > 70) d = 70;
    kept = mm >> d;
    dropped = mm - (kept << d);
    half = 128'h1 << (d - 1);
    inx = dropped != 0;
    tie = dropped == half;
    above = dropped > half;
    lost = {dropped[d-1], (dropped & (half - 1)) != 0};
    case (rm)
      2'b00: inc = above || (tie && kept[0]);
      2'b01: inc = 0;
      2'b10: inc = inx && !s;
      default: inc = inx && s;
    endcase
    kept += inc;
    if (e >= 1) begin
      f = e;
      if (kept[53]) begin kept >>= 1; f++; n_carry++; end
    end else begin
      f = kept[52] ? 1 : 0;
      n_sub++;
    end
    n_tie += int'(tie);

    @(negedge clk);
    exponent_term = 12'(e); mantissa_term = m; sign_term = s; round_mode = rm; enable = 1;
    @(posedge clk); #1;
    check($sformatf("e=%0d m=%h s=%b rm=%0d: exponent %0d expected %0d", e, m, s, rm, exponent_final, f),
          exponent_final == 12'(f));
    check($sformatf("e=%0d m=%h s=%b rm=%0d: out %h expected %h", e, m, s, rm, round_out,
                    {s, 11'(f), kept[51:0]}),
          round_out == {s, 11'(f), kept[51:0]});
    check("lost bits", round_lost == lost);
    // Hold with enable low.
    @(negedge clk);
    enable = 0; mantissa_term = ~m;
    @(posedge clk); #1;
    check("held with enable low", round_out == {s, 11'(f), kept[51:0]});
  endtask

  initial begin
    logic [55:0] m;
    rst = 1; enable = 0; round_mode = 0; sign_term = 0; exponent_term = 0; mantissa_term = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int rm = 0; rm < 4; rm++)
      for (int s = 0; s < 2; s++) begin
        run(1000, {1'b1, 52'h0, 3'b100}, 1'(s), 2'(rm));       // tie, even
        run(1000, {1'b1, 52'h1, 3'b100}, 1'(s), 2'(rm));       // tie, odd
        run(1000, {1'b1, {52{1'b1}}, 3'b101}, 1'(s), 2'(rm));  // carry
        run(2047, {1'b1, {52{1'b1}}, 3'b111}, 1'(s), 2'(rm));  // to 2048
        run(0, {56{1'b1}}, 1'(s), 2'(rm));                     // into min normal
        run(-2048, {1'b1, 55'h1}, 1'(s), 2'(rm));
        run(-53, {1'b1, 55'h0}, 1'(s), 2'(rm));
        run(-52, {1'b1, 55'h0}, 1'(s), 2'(rm));
        run(-51, {1'b1, 55'h0}, 1'(s), 2'(rm));
      end
    for (int i = 0; i < 20000; i++) begin
      int e;
      m = {1'b1, 23'($urandom), $urandom};
      case ($urandom_range(0, 3))
        0: e = $urandom_range(0, 4095) - 2048;
        1: e = $urandom_range(0, 70) - 60;
        2: e = $urandom_range(1, 2047);
        default: begin e = $urandom_range(0, 70) - 60; m[2:0] = 3'b100; end
      endcase
      run(e, m, 1'($urandom), 2'($urandom));
    end
    check("subnormal results seen", n_sub > 0);
    check("carries seen", n_carry > 0);
    check("ties seen", n_tie > 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
