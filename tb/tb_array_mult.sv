// tb_array_mult: checks the array multiplier, unsigned and with a signed
// multiplier operand, against products computed with 64-bit integers.
module tb_array_mult;

  logic [14:0] ua;
  logic [11:0] ub;
  logic [26:0] up;
  logic [9:0]  sa;
  logic [12:0] sb;
  logic [22:0] sp;
  int checks = 0, failures = 0;

  array_mult #(.A_W(15), .B_W(12))                   dut_u (.a(ua), .b(ub), .p(up));
  array_mult #(.A_W(10), .B_W(13), .A_SIGNED(1'b1))  dut_s (.a(sa), .b(sb), .p(sp));

  initial begin : watchdog
    #100us;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint pu, ps;
    for (int i = 0; i < 5000; i++) begin
      ua = (i == 0) ? '1 : 15'($urandom);
      ub = (i == 0) ? '1 : 12'($urandom);
      sa = (i == 1) ? 10'h200 : 10'($urandom);
      sb = (i == 1) ? '1 : 13'($urandom);
      #1;
      pu = longint'(ua) * longint'(ub);
      ps = longint'($signed(sa)) * longint'(sb);
      checks += 2;
      if (up != 27'(pu)) begin
        failures++;
        $display("FAIL unsigned %0d*%0d = %0d", ua, ub, up);
      end
      if (sp != 23'(ps)) begin
        failures++;
        $display("FAIL signed %0d*%0d = %0d", $signed(sa), sb, $signed(sp));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
