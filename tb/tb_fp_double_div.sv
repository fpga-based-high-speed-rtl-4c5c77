// End-to-end testbench of fp_double_div at its default (and only) size.
//
// Runs directed special cases, overflow and underflow boundaries, subnormal
// operands and results, and a few thousand random operand pairs in all four
// rounding modes through the enable/ready handshake. Each result and all
// five flags are compared with fp_ref_pkg's integer reference model, and in
// round-to-nearest-even mode also with the simulator's own double-precision
// division. The number of clock edges from the first edge that samples
// enable to ready must be 60. It also aborts one division by dropping enable
// early and checks that the following one is still correct. Every mechanism
// the design has (each flag, division by zero, subnormal in and out,
// rounding increments in every mode, a subnormal rounding up into the
// smallest normal, a quotient flushed to zero, an abort) must occur at
// least once.
module tb_fp_double_div;
  import fp_ref_pkg::*;

  localparam int LATENCY = 60;
  localparam int N_RANDOM = 20000;

  logic        clk = 0;
  logic        rst;
  logic        enable;
  logic [1:0]  rmode;
  logic [63:0] opa, opb, out;
  logic        ready, underflow, overflow, inexact, exception, invalid;

  fp_double_div dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_ovf = 0, n_unf = 0, n_inx = 0, n_inv = 0, n_exc = 0, n_dbz = 0;
  int n_sub_in = 0, n_sub_out = 0, n_carry = 0, n_flush = 0, n_abort = 0;
  int n_inc[4] = '{0, 0, 0, 0};

  initial begin
    #(10 * 2_000_000);
    failures++;
    $display("watchdog expired");
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

  task automatic run(input logic [63:0] a, input logic [63:0] b, input logic [1:0] rm);
    result_t exp_r;
    info_t   info;
    int      cycles;
    real     q;
    exp_r = ref_div(a, b, rm, info);
    @(negedge clk);
    opa = a; opb = b; rmode = rm; enable = 1;
    cycles = 0;
    do begin
      @(posedge clk);
      cycles++;
      #1;
    end while (!ready && cycles < 200);
    check($sformatf("latency %0d for %h / %h", cycles, a, b), cycles == LATENCY);
    check($sformatf("%h / %h rm=%0d: out %h exp %h flags %b%b%b%b%b exp %b%b%b%b%b",
                    a, b, rm, out, exp_r.out, exception, inexact, invalid, overflow, underflow,
                    exp_r.exception, exp_r.inexact, exp_r.invalid, exp_r.overflow, exp_r.underflow),
          {out, exception, inexact, invalid, overflow, underflow} == exp_r);
    if (rm == 2'b00 && !(out[62:52] == 11'h7FF && out[51:0] != 0)) begin
      q = $bitstoreal(a) / $bitstoreal(b);
      check($sformatf("%h / %h: real division gives %h", a, b, $realtobits(q)),
            out == $realtobits(q));
    end
    // The result holds while enable stays high.
    @(posedge clk); #1;
    check("result held", ready && {out, exception, inexact, invalid, overflow, underflow} == exp_r);
    @(negedge clk);
    enable = 0;
    @(posedge clk); #1;
    check("ready drops with enable", !ready);
    n_ovf += int'(exp_r.overflow);
    n_unf += int'(exp_r.underflow);
    n_inx += int'(exp_r.inexact);
    n_inv += int'(exp_r.invalid);
    n_exc += int'(exp_r.exception);
    n_dbz += int'(info.div_by_zero);
    n_sub_in += int'(info.subnormal_in);
    n_sub_out += int'(info.subnormal_out);
    n_carry += int'(info.carry_normal);
    n_flush += int'(info.flushed_zero);
    n_inc[rm] += int'(info.rounded_up);
  endtask

  function automatic logic [63:0] rand_op(input int kind);
    logic [63:0] v;
    v = {$urandom, $urandom};
    case (kind)
      0: ;                                                   // any pattern
      1: v[62:52] = 11'(1023 + $signed($urandom_range(0, 40)) - 20);
      2: v[62:52] = 11'h000;                                 // subnormal
      3: v[62:52] = 11'($urandom_range(1, 60));              // very small
      4: v[62:52] = 11'($urandom_range(1990, 2046));         // very large
      default: ;
    endcase
    return v;
  endfunction

  localparam logic [63:0] ONE   = 64'h3FF0_0000_0000_0000;
  localparam logic [63:0] THREE = 64'h4008_0000_0000_0000;
  localparam logic [63:0] PINF  = 64'h7FF0_0000_0000_0000;
  localparam logic [63:0] QNAN  = 64'h7FF8_0000_0000_0001;
  localparam logic [63:0] SNAN  = 64'h7FF0_0000_0000_0001;
  localparam logic [63:0] MAXF  = 64'h7FEF_FFFF_FFFF_FFFF;
  localparam logic [63:0] MINN  = 64'h0010_0000_0000_0000;
  localparam logic [63:0] MINS  = 64'h0000_0000_0000_0001;
  localparam logic [63:0] HALF  = 64'h3FE0_0000_0000_0000;
  localparam logic [63:0] ONEP  = 64'h3FF0_0000_0000_0001;  // 1 + 2^-52

  initial begin
    rst = 1; enable = 0; rmode = 0; opa = 0; opb = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;

    for (int rm = 0; rm < 4; rm++) begin
      run(ONE, THREE, 2'(rm));
      run({1'b1, ONE[62:0]}, THREE, 2'(rm));
      run(THREE, ONE, 2'(rm));
      run(0, 0, 2'(rm));
      run(PINF, {1'b1, PINF[62:0]}, 2'(rm));
      run(THREE, 0, 2'(rm));
      run({1'b1, THREE[62:0]}, 0, 2'(rm));
      run(PINF, THREE, 2'(rm));
      run(PINF, 0, 2'(rm));
      run(0, THREE, 2'(rm));
      run(THREE, PINF, 2'(rm));
      run(QNAN, ONE, 2'(rm));
      run(ONE, SNAN, 2'(rm));
      run(MAXF, HALF, 2'(rm));                        // overflow
      run({1'b1, MAXF[62:0]}, HALF, 2'(rm));
      run(MAXF, MINS, 2'(rm));                        // far overflow
      run(MINN, THREE, 2'(rm));                       // subnormal result
      run({1'b1, MINN[62:0]}, THREE, 2'(rm));
      run(MINN, ONEP, 2'(rm));                        // just below min normal
      run({1'b1, MINN[62:0]}, ONEP, 2'(rm));
      run(MINS, THREE, 2'(rm));                       // flushed towards zero
      run({1'b1, MINS[62:0]}, THREE, 2'(rm));
      run(MINS, MAXF, 2'(rm));
      run(MINS, 64'h0000_0000_0000_0003, 2'(rm));     // subnormal / subnormal
      run(64'h0008_0000_0000_0000, HALF, 2'(rm));     // subnormal in, normal out
      run(MINS, 64'h3FE0_0000_0000_0000, 2'(rm));     // 2^-1073 exact
      run(64'h0000_0000_0000_0003, 64'h4000_0000_0000_0000, 2'(rm)); // tie at 2^-1074
    end

    // Abort one division part-way, then check the next one.
    @(negedge clk);
    opa = THREE; opb = ONE; rmode = 0; enable = 1;
    repeat (20) @(posedge clk);
    @(negedge clk) enable = 0;
    @(posedge clk); #1;
    check("no ready after abort", !ready);
    n_abort++;
    run(ONE, THREE, 2'b00);

    for (int i = 0; i < N_RANDOM; i++)
      run(rand_op($urandom_range(0, 4)), rand_op($urandom_range(0, 4)), 2'($urandom_range(0, 3)));

    check("overflow seen", n_ovf > 0);
    check("underflow seen", n_unf > 0);
    check("inexact seen", n_inx > 0);
    check("invalid seen", n_inv > 0);
    check("exception seen", n_exc > 0);
    check("division by zero seen", n_dbz > 0);
    check("subnormal operand seen", n_sub_in > 0);
    check("subnormal result seen", n_sub_out > 0);
    check("rounding into smallest normal seen", n_carry > 0);
    check("result flushed to zero seen", n_flush > 0);
    check("abort seen", n_abort > 0);
    for (int rm = 0; rm < 4; rm++)
      check($sformatf("rounding increment in mode %0d seen", rm), rm == 1 ? n_inc[rm] == 0 : n_inc[rm] > 0);
    $display("overflow=%0d underflow=%0d inexact=%0d invalid=%0d exception=%0d div_by_zero=%0d",
             n_ovf, n_unf, n_inx, n_inv, n_exc, n_dbz);
    $display("subnormal_in=%0d subnormal_out=%0d carry_to_normal=%0d flushed=%0d aborts=%0d",
             n_sub_in, n_sub_out, n_carry, n_flush, n_abort);
    $display("round-ups per mode: %0d %0d %0d %0d", n_inc[0], n_inc[1], n_inc[2], n_inc[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
