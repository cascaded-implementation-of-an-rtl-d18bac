// tb_overflow_lookahead: checks the 24-input overflow detector.
//
// Applies the all-zero fraction with both exponent parities, every fraction
// with a single bit set, and random fractions, and compares with the rule
// "e0 = 1 and fraction = 0".
module tb_overflow_lookahead;
  import isqrt_pkg::*;

  logic              e0;
  logic [MANT_W-1:0] m;
  logic              ovf;
  int checks = 0, failures = 0, fired = 0;

  overflow_lookahead dut (.e0(e0), .m(m), .ovf(ovf));

  initial begin : watchdog
    #100us;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input logic e, input logic [MANT_W-1:0] mm);
    e0 = e; m = mm;
    #1;
    checks++;
    if (ovf) fired++;
    if (ovf != (e0 && m == '0)) begin
      failures++;
      $display("FAIL e0=%b m=%h ovf=%b", e0, m, ovf);
    end
  endtask

  initial begin
    apply(1'b1, '0);
    apply(1'b0, '0);
    for (int i = 0; i < MANT_W; i++) begin
      apply(1'b1, MANT_W'(1) << i);
      apply(1'b0, MANT_W'(1) << i);
    end
    for (int i = 0; i < 2000; i++) apply(1'($urandom), MANT_W'($urandom));
    checks++;
    if (fired == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
