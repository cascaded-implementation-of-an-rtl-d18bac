// tb_isqrt_stage2: checks the full-precision second iteration.
//
// For random b in [1/4, 1) the first-stage result is modelled as 1/sqrt(b)
// perturbed by a random relative error of up to +-2^-11 (larger than the first
// stage ever leaves). Checked against values computed in double precision:
//   * x2 equals x1*(3/2 - b*x1^2/2) to within 2^-27;
//   * the fraction is x2 rounded to 23 bits, ties away from zero;
//   * the bits of b*x1^2 above the kept bottom part are a pure sign extension,
//     i.e. 01.000000000 or 00.111111111, so dropping them loses nothing;
//   * the b = 1/4 case with the first-stage value the datapath produces rounds
//     to 2.0: fraction all zero and the carry into 2^1 set.
// Corrections of both signs are counted and must both occur.
module tb_isqrt_stage2;
  import isqrt_pkg::*;

  logic [X1_W-1:0]   x1;
  logic [B2_W-1:0]   b2;
  logic [X2_W-1:0]   x2;
  logic [MANT_W-1:0] mant;
  logic              mant_ge2;
  int checks = 0, failures = 0, n_pos = 0, n_neg = 0;

  isqrt_stage2 dut (.x1(x1), .b2(b2), .x2(x2), .mant(mant), .mant_ge2(mant_ge2));

  initial begin : watchdog
    #100us;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what, input logic ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s x1=%h b2=%h x2=%h mant=%h", what, x1, b2, x2, mant);
    end
  endtask

  initial begin
    real b, xt, xr, x2r, eps, err, rnd;
    for (int i = 0; i < 5000; i++) begin
      b2  = (i % 2 == 0) ? {1'b1, 24'($urandom)} : {2'b01, 23'($urandom)};
      b   = real'(b2) / 2.0**25;
      eps = (real'($urandom % 65536) / 32768.0 - 1.0) * 2.0**-11;
      xt  = 1.0 / $sqrt(b);
      // the first stage never reaches 2.0, so neither does the model of it
      xr  = xt * (1.0 + eps) >= 2.0 ? 2.0 - 2.0**-23 : xt * (1.0 + eps);
      x1  = X1_W'(longint'($floor(xr * 2.0**23)));
      #1;
      xr  = real'(x1) / 2.0**23;
      x2r = xr * (1.5 - b * xr * xr / 2.0);
      err = real'(x2) / 2.0**30 - x2r;
      check("x2 matches the iteration", err < 2.0**-27 && err > -(2.0**-27));
      rnd = real'(x2) / 2.0**30 * 2.0**23 + 0.5;
      check("rounded fraction", mant == MANT_W'(longint'($floor(rnd))));
      check("middle bits are a sign extension",
            dut.bx[BX_W-1:BOT_W-1] == 11'b01_000000000 ||
            dut.bx[BX_W-1:BOT_W-1] == 11'b00_111111111);
      check("carry into 2^1", mant_ge2 == (rnd >= 2.0**24));
      if (dut.two_delta[BOT_W-1]) n_neg++; else n_pos++;
    end
    // b = 1/4 exactly, x1 as produced by the first stage for that operand
    b2 = 25'h080_0000; x1 = 25'h0ff_fd02; #1;
    check("b = 1/4 rounds to 2.0", mant == '0 && mant_ge2);
    check("correction of each sign exercised", n_pos > 0 && n_neg > 0);
    $display("positive corrections %0d, negative %0d", n_pos, n_neg);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
