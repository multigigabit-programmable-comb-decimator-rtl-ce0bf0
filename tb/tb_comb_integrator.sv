// tb_comb_integrator: random 13-bit input words; the register is compared
// every clock with a running sum modulo 2^13 (one clock of latency).
module tb_comb_integrator;
  localparam int unsigned W = 13;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;
  logic [W-1:0] d = '0, q;
  longint model = 0;

  comb_integrator #(.WIDTH(W)) dut (.clk, .rst, .d, .q);

  always #5 clk = ~clk;

  initial begin
    repeat (2) @(posedge clk);
    rst <= 0;
    @(negedge clk);
    checks++;
    if (q !== '0) begin failures++; $display("FAIL reset value"); end
    for (int t = 0; t < 5000; t++) begin
      d = W'($urandom);
      model += longint'(d);
      @(posedge clk);
      #1;
      checks++;
      if (q !== W'(model)) begin
        failures++;
        if (failures < 10) $display("FAIL t=%0d q=%0d exp=%0d", t, q, W'(model));
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
