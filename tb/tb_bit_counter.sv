// tb_bit_counter: random bit stream (mostly ones, so the count wraps
// around 2^13 several times); the count is compared every clock with a
// model count modulo 2^13.
module tb_bit_counter;
  localparam int unsigned W = 13;
  int checks = 0, failures = 0, wraps = 0;
  logic clk = 0, rst = 1, data = 0;
  logic [W-1:0] q;
  int model = 0;

  bit_counter #(.WIDTH(W)) dut (.clk, .rst, .data, .q);

  always #5 clk = ~clk;

  initial begin
    repeat (2) @(posedge clk);
    rst <= 0;
    @(negedge clk);
    for (int t = 0; t < 30000; t++) begin
      data = ($urandom % 8) != 0;
      @(posedge clk);
      #1;
      if (data) begin
        model++;
        if (model % (1 << W) == 0) wraps++;
      end
      checks++;
      if (q !== W'(model % (1 << W))) begin
        failures++;
        if (failures < 10) $display("FAIL t=%0d q=%0d exp=%0d", t, q, model % (1 << W));
      end
      @(negedge clk);
    end
    checks++;
    if (wraps == 0) begin failures++; $display("FAIL: count never wrapped"); end
    $display("wraps=%0d", wraps);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
