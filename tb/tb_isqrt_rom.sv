// tb_isqrt_rom: checks all 256 words of the seed table.
//
// For each address {e0, m22..m16} the expected seed is recomputed in double
// precision as floor(256/sqrt(hi)) with hi the exclusive upper end of the
// operand range of the address, and the expected square as x0^2 truncated to 10
// fraction bits. Also checked: the two table words quoted in the worked examples,
// and that b*x0^2 < 1 at the top of every range while one more seed LSB would
// break it (the seed is the largest 8-fraction-bit value with negative error).
module tb_isqrt_rom;
  import isqrt_pkg::*;

  logic [ROM_AW-1:0] addr;
  logic [X0_W-1:0]   x0;
  logic [Q_W-1:0]    q;
  int checks = 0, failures = 0;

  isqrt_rom dut (.addr(addr), .x0(x0), .q(q));

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
      $display("FAIL %s addr=%h x0=%0d q=%0d", what, addr, x0, q);
    end
  endtask

  initial begin
    real hi, b_top, xr, xn;
    int  x_exp, q_exp;
    for (int a = 0; a < ROM_N; a++) begin
      addr = 8'(a);
      #1;
      hi    = (a[7] ? 0.25 : 0.5) + (a[7] ? 0.25 : 0.5) * real'(a[6:0] + 1) / 128.0;
      x_exp = int'($floor(256.0 / $sqrt(hi)));
      q_exp = (x_exp * x_exp) / 64;
      check("seed", x0 == X0_W'(x_exp));
      check("square", q == Q_W'(q_exp));
      b_top = hi - 2.0 ** -26;
      xr    = real'(x0) / 256.0;
      xn    = real'(x0 + 1) / 256.0;
      check("negative error at top of range", b_top * xr * xr < 1.0);
      check("seed is the largest such value", hi * xn * xn > 1.0);
    end
    addr = 8'b0001_0010; #1;
    check("example 1 word", x0 == 9'd337 && q == 12'b01_1011101110);
    addr = 8'b1100_0101; #1;
    check("example 2 word", x0 == 9'd411 && q == 12'd2639);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
