// tb_exponent_unit: checks the exponent circuit for every normal exponent.
//
// Expected exponent: (380 - e)/2 for even e, (379 - e)/2 for odd e, plus 1 when
// the overflow input is set (only meaningful, and only applied, for odd e).
// Also checks the two worked examples (0111 1010 -> 1000 0001 and
// 1000 0011 -> 0111 1100).
module tb_exponent_unit;
  import isqrt_pkg::*;

  logic [EXP_W-1:0] e, s;
  logic             ovf;
  int checks = 0, failures = 0;

  exponent_unit dut (.e(e), .ovf(ovf), .s(s));

  initial begin : watchdog
    #100us;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input int ee, input logic o, input int expected);
    e = 8'(ee); ovf = o;
    #1;
    checks++;
    if (s != 8'(expected)) begin
      failures++;
      $display("FAIL e=%0d ovf=%b s=%0d expected %0d", ee, o, s, expected);
    end
  endtask

  initial begin
    for (int ee = 1; ee <= 254; ee++) begin
      if (ee % 2 == 0) apply(ee, 1'b0, (380 - ee) / 2);
      else begin
        apply(ee, 1'b0, (379 - ee) / 2);
        apply(ee, 1'b1, (379 - ee) / 2 + 1);
      end
    end
    apply(8'b0111_1010, 1'b0, 8'b1000_0001);
    apply(8'b1000_0011, 1'b0, 8'b0111_1100);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
