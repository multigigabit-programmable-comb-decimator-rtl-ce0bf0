// tb_pdiv: for every setting R = 0..7 the strobe must come every R+1
// clocks; the first strobe after reset comes R+1 clocks after it.
module tb_pdiv;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1, clkout;
  logic [2:0] r = '0;

  pdiv dut (.clk, .rst, .r, .clkout);

  always #5 clk = ~clk;

  initial begin
    for (int rv = 0; rv < 8; rv++) begin
      int last_t, n;
      rst = 1;
      r   = 3'(rv);
      @(posedge clk);
      @(negedge clk);
      rst = 0;
      last_t = -1;   // reset released: clock 0 is the first edge after it
      n = 0;
      for (int t = 0; t < 100; t++) begin
        if (clkout) begin
          checks++;
          if (t - last_t != rv + 1) begin
            failures++;
            $display("FAIL R=%0d strobe spacing %0d", rv, t - last_t);
          end
          last_t = t;
          n++;
        end
        @(negedge clk);
      end
      checks++;
      if (n < 100 / (rv + 1) - 1) begin failures++; $display("FAIL R=%0d only %0d strobes", rv, n); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
