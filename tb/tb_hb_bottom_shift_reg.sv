// tb_hb_bottom_shift_reg: random samples with a random enable; the last
// word must always be the sample entered 13 enables earlier (zero before).
module tb_hb_bottom_shift_reg;
  localparam int NP = 13;
  int checks = 0, failures = 0, n = 0;
  logic clk = 0, rst = 1, en = 0;
  logic signed [9:0] x = '0, x25;
  logic signed [9:0] hist [1000];

  hb_bottom_shift_reg #(.NP(NP), .SW(10)) dut (.clk, .rst, .en, .x, .x25);

  always #5 clk = ~clk;

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst = 0;
    for (int t = 0; t < 2000 && n < 990; t++) begin
      en = $urandom % 2;
      x  = 10'($urandom);
      if (en) begin hist[n] = x; n++; end
      @(posedge clk);
      #1;
      checks++;
      if (x25 !== (n > NP - 1 ? hist[n - NP] : 10'sd0)) begin
        failures++;
        if (failures < 10) $display("FAIL t=%0d x25=%0d", t, x25);
      end
      @(negedge clk);
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
