// tb_sdcfl_full_adder: exhaustive check of both carry polarities of the
// full-adder cell against a + b + carry.
module tb_sdcfl_full_adder;
  int checks = 0, failures = 0;
  logic a, b, ci, s0, co0, s1, co1;

  sdcfl_full_adder #(.CIN_ACTIVE_LOW(1'b0)) dut0 (.a, .b, .ci(ci),  .s(s0), .co(co0));
  sdcfl_full_adder #(.CIN_ACTIVE_LOW(1'b1)) dut1 (.a, .b, .ci(~ci), .s(s1), .co(co1));

  initial begin
    for (int v = 0; v < 8; v++) begin
      int total;
      {a, b, ci} = 3'(v);
      #1;
      total = int'(a) + int'(b) + int'(ci);
      checks += 4;
      if (s0 !== total[0])   begin failures++; $display("FAIL s0 v=%0d", v); end
      if (co0 !== ~total[1]) begin failures++; $display("FAIL co0 (active low) v=%0d", v); end
      if (s1 !== total[0])   begin failures++; $display("FAIL s1 v=%0d", v); end
      if (co1 !== total[1])  begin failures++; $display("FAIL co1 (active high) v=%0d", v); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
