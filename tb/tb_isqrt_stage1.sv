// tb_isqrt_stage1: checks the reduced-precision first iteration.
//
// Operands are realistic: a random table address and fraction give b1, and the
// seed and its square are recomputed in double precision from the address
// range. Expected outputs are formed bit by bit with 64-bit integer arithmetic
// (product, bits p1..p14, ones' complement, second product), and x1 is also
// compared with the real-valued iteration x0*(3/2 - b1*q/2), which it must match
// to within 2^-13. The worked examples' factors and results are checked exactly.
module tb_isqrt_stage1;
  import isqrt_pkg::*;

  logic [B1_W-1:0]  b1;
  logic [Q_W-1:0]   q;
  logic [X0_W-1:0]  x0;
  logic [FAC_W-1:0] fac;
  logic [X1_W-1:0]  x1;
  int checks = 0, failures = 0;

  isqrt_stage1 dut (.b1(b1), .q(q), .x0(x0), .fac(fac), .x1(x1));

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
      $display("FAIL %s b1=%h q=%h x0=%h fac=%h x1=%h", what, b1, q, x0, fac, x1);
    end
  endtask

  initial begin
    longint p, keep, f, x;
    real    hi, xr, err;
    int     a, xs;
    for (int i = 0; i < 4000; i++) begin
      a  = int'($urandom % 256);
      hi = (a >= 128 ? 0.25 : 0.5) * (1.0 + real'(a % 128 + 1) / 128.0);
      xs = int'($floor(256.0 / $sqrt(hi)));
      x0 = X0_W'(xs);
      q  = Q_W'((xs * xs) / 64);
      // b1 inside the range of address a: leading bits fixed, 7 (or 8) random low bits
      b1 = (a >= 128) ? {2'b01, 7'(a), 6'($urandom)} : {1'b1, 7'(a), 7'($urandom)};
      #1;
      p    = longint'(b1) * longint'(q);
      keep = (p >> 11) & 64'h3fff;
      f    = 64'h8000 | (~keep & 64'h3fff);
      x    = f * longint'(x0);
      check("factor", fac == FAC_W'(f));
      check("x1", x1 == X1_W'(x));
      xr  = real'(x0) / 256.0 * (1.5 - real'(b1) / 32768.0 * real'(q) / 1024.0 / 2.0);
      err = real'(x1) / 2.0**23 - xr;
      check("x1 close to the real iteration", err < 2.0**-13 && err > -(2.0**-13));
    end
    b1 = 15'b100_1001_0001_0010; q = 12'b01_1011101110; x0 = 9'd337; #1;
    check("example 1 factor", fac == 16'b1_000_0000_1011_0100);
    check("example 1 x1", x1 == X1_W'(longint'(16'b1_000_0000_1011_0100) * 337));
    b1 = 15'b011_0001_0101_1011; q = 12'd2639; x0 = 9'd411; #1;
    check("example 2 factor", fac == 16'b1_000_0000_0110_0110);
    check("example 2 x1", x1 == X1_W'(longint'(16'b1_000_0000_0110_0110) * 411));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
