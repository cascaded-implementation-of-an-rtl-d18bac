// tb_isqrt_fp32: end-to-end test of the single-precision inverse square root.
//
// Drives the combinational datapath with
//   * the two worked operands 0.03568 and 24.678, checking the seed, the square,
//     the first-stage adjusting factor and result and the exponent against the
//     hand-worked values, and the final result against 1/sqrt(v);
//   * every odd exponent power of two with a zero fraction (the overflow case)
//     and neighbours one ulp away on both sides;
//   * random positive normal operands over the whole exponent range.
// Each result is compared with 1/sqrt(v) evaluated in double precision; the
// datapath is not correctly rounded, so an error of up to 3 ulp is accepted
// (the worst case of the method with its 10-fraction-bit seed square is about
// 2.6 ulp). The largest error seen is printed. Mechanisms counted, each of which
// must occur: overflow lookahead firing, even and odd exponents, and a second
// stage correction of either sign (first-stage result below and above 1/sqrt(b)).
module tb_isqrt_fp32;
  import isqrt_pkg::*;

  localparam int N_RANDOM = 20000;

  fp32_t v, y;
  logic  ovf;

  int checks = 0, failures = 0;
  int n_ovf = 0, n_even = 0, n_odd = 0, n_dpos = 0, n_dneg = 0;
  real worst_ulp = 0.0;

  isqrt_fp32 dut (.v(v), .y(y), .ovf(ovf));

  initial begin : watchdog
    #1ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real fp_value(fp32_t f);
    return (1.0 + real'(f.mant) / 2.0**23) * 2.0**(real'(int'(f.exp)) - 127.0);
  endfunction

  function automatic real absr(real a);
    return a < 0.0 ? -a : a;
  endfunction

  task automatic check(input string what, input logic ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s (v=%h y=%h)", what, v, y);
    end
  endtask

  // apply one operand and compare with the double-precision reference
  task automatic apply(input fp32_t val);
    real r, got, ulp, err;
    v = val;
    #1;
    r   = 1.0 / $sqrt(fp_value(v));
    got = fp_value(y);
    ulp = 2.0 ** ($floor($ln(r) / $ln(2.0)) - 23.0);
    err = (got > r ? got - r : r - got) / ulp;
    if (err > worst_ulp) worst_ulp = err;
    check("result within 3 ulp", err <= 3.0);
    check("sign", y.sign == 1'b0);
    check("overflow lookahead", ovf == (v.exp[0] && v.mant == '0));
    if (ovf) begin
      n_ovf++;
      check("overflow gives an exact power of two", y.mant == '0 && err == 0.0);
    end
    if (v.exp[0]) n_odd++; else n_even++;
    if (dut.u_stage2.two_delta[BOT_W-1]) n_dneg++; else n_dpos++;
  endtask

  fp32_t f;

  initial begin
    // ---- worked example 1: v = 0.03568 -----------------------------------------
    f = 32'h3d12_2531;  // 0.03568
    apply(f);
    check("ex1 address", {v.exp[0], v.mant[22:16]} == 8'b0001_0010);
    check("ex1 seed 1.31640625", dut.x0 == 9'd337);
    check("ex1 square 01.1011101110", dut.q == 12'b01_1011101110);
    check("ex1 b", dut.b1 == 15'b100_1001_0001_0010);
    check("ex1 factor 1.000000010110100", dut.fac == 16'b1_000_0000_1011_0100);
    check("ex1 first stage 1.3236375", absr(real'(dut.x1) / 2.0**23 - 1.323637484) < 1.0e-8);
    check("ex1 exponent 10000001", y.exp == 8'b1000_0001);
    check("ex1 result 1.32351108", absr(real'({1'b1, y.mant}) / 2.0**23 - 1.32351108) < 2.0e-7);

    // ---- worked example 2: v = 24.678 -----------------------------------------
    f = 32'h41c5_6c8b;  // 24.678
    apply(f);
    check("ex2 address", {v.exp[0], v.mant[22:16]} == 8'b1100_0101);
    check("ex2 seed 1.60546875", dut.x0 == 9'd411);
    check("ex2 square 2.577148437", dut.q == 12'd2639);
    check("ex2 b", dut.b1 == 15'b011_0001_0101_1011);
    check("ex2 factor 1.000000001100110", dut.fac == 16'b1_000_0000_0110_0110);
    check("ex2 first stage 1.61046624", absr(real'(dut.x1) / 2.0**23 - 1.61046624) < 1.0e-8);
    check("ex2 exponent 01111100", y.exp == 8'b0111_1100);
    check("ex2 result 1.61040463", absr(real'({1'b1, y.mant}) / 2.0**23 - 1.61040463) < 2.0e-7);

    // ---- powers of two and their neighbours ------------------------------------
    for (int e = 1; e <= 254; e++) begin
      f = '{sign: 1'b0, exp: 8'(e), mant: '0};
      apply(f);
      f.mant = 23'd1;
      apply(f);
      f.mant = '1;
      apply(f);
    end

    // ---- random operands ------------------------------------------------------
    for (int i = 0; i < N_RANDOM; i++) begin
      f.sign = 1'b0;
      f.exp  = 8'(1 + ($urandom % 254));
      f.mant = 23'($urandom);
      apply(f);
    end

    $display("worst error %f ulp; overflow %0d, even %0d, odd %0d, delta>=0 %0d, delta<0 %0d",
             worst_ulp, n_ovf, n_even, n_odd, n_dpos, n_dneg);
    check("overflow lookahead exercised", n_ovf > 0);
    check("even exponents exercised", n_even > 0);
    check("odd exponents exercised", n_odd > 0);
    check("positive second-stage correction exercised", n_dpos > 0);
    check("negative second-stage correction exercised", n_dneg > 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
