// tb_denorm_shifter: checks the one-bit denormalizing shifter.
//
// For random fraction bits and both exponent parities, the 15-bit output is
// compared with the truncated value of b = 0.1m22..m9 (even) or half of it (odd),
// computed in double precision and scaled to 15 fraction bits.
module tb_denorm_shifter;
  import isqrt_pkg::*;

  logic            e0;
  logic [13:0]     m_hi;
  logic [B1_W-1:0] b1;
  int checks = 0, failures = 0;

  denorm_shifter dut (.e0(e0), .m_hi(m_hi), .b1(b1));

  initial begin : watchdog
    #100us;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real b;
    int  exp_b1;
    for (int i = 0; i < 4000; i++) begin
      e0   = i[0];
      m_hi = (i < 4) ? (i < 2 ? 14'h0000 : 14'h3fff) : 14'($urandom);
      #1;
      b      = (1.0 + real'(m_hi) / 16384.0) / (e0 ? 4.0 : 2.0);
      exp_b1 = int'($floor(b * 32768.0));
      checks++;
      if (b1 != B1_W'(exp_b1)) begin
        failures++;
        $display("FAIL e0=%b m=%h b1=%h expected %h", e0, m_hi, b1, exp_b1);
      end
    end
    // worked examples: 0.100 1001 0001 0010 and 0.011 0001 0101 1011
    e0 = 1'b0; m_hi = 14'b00_1001_0001_0010; #1;
    checks++; if (b1 != 15'b100_1001_0001_0010) failures++;
    e0 = 1'b1; m_hi = 14'b10_0010_1011_0110; #1;
    checks++; if (b1 != 15'b011_0001_0101_1011) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
