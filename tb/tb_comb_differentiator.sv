// tb_comb_differentiator: random words applied with a random strobe; on
// each strobe the output must become the difference (modulo 2^13) of this
// and the previously strobed word, and hold otherwise.
module tb_comb_differentiator;
  localparam int unsigned W = 13;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1, en = 0;
  logic [W-1:0] d = '0, q;
  logic [W-1:0] prev = '0, exp = '0;

  comb_differentiator #(.WIDTH(W)) dut (.clk, .rst, .en, .d, .q);

  always #5 clk = ~clk;

  initial begin
    repeat (2) @(posedge clk);
    rst <= 0;
    @(negedge clk);
    for (int t = 0; t < 5000; t++) begin
      d  = W'($urandom);
      en = ($urandom % 3) == 0;
      if (en) begin
        exp  = d - prev;
        prev = d;
      end
      @(posedge clk);
      #1;
      checks++;
      if (q !== exp) begin
        failures++;
        if (failures < 10) $display("FAIL t=%0d q=%0d exp=%0d", t, q, exp);
      end
      @(negedge clk);
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
