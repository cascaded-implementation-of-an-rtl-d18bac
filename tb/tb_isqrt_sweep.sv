// tb_isqrt_sweep: accuracy sweep of the inverse square root over every
// mantissa.
//
// The result mantissa depends only on the exponent LSB and the 23 fraction
// bits, so the 2^24 operands 2^-1 * 1.m and 2^0 * 1.m cover every case the
// mantissa datapath can see. STRIDE selects every STRIDE-th fraction (1 for
// the full sweep); a fixed pseudo-random offset varies the low bits between
// steps. Each result is compared with 1/sqrt(v) in double precision. The test
// fails on any error above 3 ulp and prints the worst error and how many
// results fall within 0.5, 1, 2 and 3 ulp.
module tb_isqrt_sweep;
  import isqrt_pkg::*;

  localparam int STRIDE = 1;

  fp32_t v, y;
  logic  ovf;
  int checks = 0, failures = 0;
  int n_half = 0, n_one = 0, n_two = 0, n_three = 0;
  real worst = 0.0;

  isqrt_fp32 dut (.v(v), .y(y), .ovf(ovf));

  initial begin : watchdog
    #100ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real r, got, ulp, err, x;
    int  m;
    for (int e = 126; e <= 127; e++) begin
      for (int base = 0; base < (1 << MANT_W); base += STRIDE) begin
        m = base + ((base * 7 + e) % STRIDE);
        v = '{sign: 1'b0, exp: 8'(e), mant: MANT_W'(m)};
        #1;
        x   = (1.0 + real'(m) / 2.0**23) * (e == 127 ? 1.0 : 0.5);
        r   = 1.0 / $sqrt(x);
        got = (1.0 + real'(y.mant) / 2.0**23) * 2.0**(real'(int'(y.exp)) - 127.0);
        ulp = (r >= 1.0) ? 2.0**-23 : 2.0**-24;
        err = (got > r ? got - r : r - got) / ulp;
        if (err > worst) worst = err;
        if (err <= 0.5) n_half++;
        if (err <= 1.0) n_one++;
        if (err <= 2.0) n_two++;
        if (err <= 3.0) n_three++;
        checks++;
        if (err > 3.0) begin
          failures++;
          $display("FAIL v=%h y=%h error %f ulp", v, y, err);
        end
      end
    end
    $display("worst %f ulp; within 0.5/1/2/3 ulp: %0d/%0d/%0d/%0d of %0d",
             worst, n_half, n_one, n_two, n_three, checks);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
