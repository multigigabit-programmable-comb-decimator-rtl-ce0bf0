// tb_hb_coeff_rom: reads all 16 addresses.  Checks the 13 stored values,
// zero above them, that every value fits 11 bits, that the signs alternate
// towards the centre (the shape of a half-band sinc), and that the DC gain
// 2*sum h(2m) + h(25) of the full filter is 1.0 (1024) within 0.5 %.
module tb_hb_coeff_rom;
  int checks = 0, failures = 0;
  logic [3:0] addr;
  logic signed [10:0] coeff;
  int expv [13] = '{3, -3, 4, -6, 9, -12, 16, -22, 29, -41, 61, -106, 325};

  hb_coeff_rom dut (.addr, .coeff);

  initial begin
    int dc;
    dc = 512;
    for (int a = 0; a < 16; a++) begin
      addr = 4'(a);
      #1;
      checks++;
      if (a < 13) begin
        dc += 2 * int'(coeff);
        if (int'(coeff) != expv[a]) begin failures++; $display("FAIL h(%0d)=%0d", 2*a, coeff); end
        checks++;
        // h(24) positive, then alternating signs away from the centre
        if ((int'(coeff) > 0) != ((12 - a) % 2 == 0)) begin failures++; $display("FAIL sign h(%0d)", 2*a); end
      end else if (coeff !== '0) begin
        failures++; $display("FAIL addr %0d not zero", a);
      end
    end
    checks++;
    if (dc < 1019 || dc > 1029) begin failures++; $display("FAIL DC gain %0d", dc); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
