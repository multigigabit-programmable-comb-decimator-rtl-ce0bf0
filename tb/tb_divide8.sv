// tb_divide8: clkin strobes with a period of 1..8 clocks; acc_res (and
// clkout) must come on every eighth strobe, acc must be its complement and
// fb_1..fb_4 must be acc_res delayed by 0..3 clocks.
module tb_divide8;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1, clkin = 0, clkout, acc_res, acc;
  logic [3:0] fb;
  logic [3:0] hist;   // acc_res of the last clocks, hist[k] = k clocks ago

  divide8 dut (.clk, .rst, .clkin, .clkout, .acc_res, .acc, .fb);

  always #5 clk = ~clk;

  initial begin
    for (int p = 1; p <= 8; p++) begin
      int strobes, dumps;
      rst = 1; clkin = 0; hist = '0;
      @(posedge clk);
      @(negedge clk);
      rst = 0;
      strobes = 0; dumps = 0;
      for (int t = 0; t < 80 * p; t++) begin
        clkin = (t % p) == p - 1;
        #1;
        if (clkin) strobes++;
        checks += 4;
        if (acc_res !== (clkin && strobes % 8 == 0)) begin
          failures++; $display("FAIL p=%0d t=%0d acc_res=%0b", p, t, acc_res);
        end
        if (clkout !== acc_res) begin failures++; $display("FAIL clkout"); end
        if (acc !== ~acc_res)   begin failures++; $display("FAIL acc"); end
        hist = {hist[2:0], acc_res};
        if (fb !== hist) begin failures++; $display("FAIL p=%0d t=%0d fb=%b exp=%b", p, t, fb, hist); end
        if (acc_res) dumps++;
        @(negedge clk);
      end
      checks++;
      if (dumps != 10) begin failures++; $display("FAIL p=%0d dumps=%0d", p, dumps); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
