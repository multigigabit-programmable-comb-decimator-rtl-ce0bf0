// tb_hb_arith: random operation sequences: clear (capturing x25), 13 mac
// clocks with random taps and coefficients, the last of them with last
// high.  y must equal sum (tap_lo + tap_hi) * coeff + x25 * 512 and
// y_valid must pulse exactly once, on the clock after the last product.
module tb_hb_arith;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1, clear = 0, mac = 0, last = 0, y_valid;
  logic signed [9:0]  tap_lo = '0, tap_hi = '0, x25 = '0;
  logic signed [10:0] coeff = '0;
  logic signed [21:0] y;

  hb_arith #(.SW(10), .CW(11)) dut (.clk, .rst, .clear, .mac, .last, .tap_lo, .tap_hi,
                                    .coeff, .x25, .y, .y_valid);

  always #5 clk = ~clk;

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst = 0;
    for (int op = 0; op < 300; op++) begin
      longint exp;
      clear = 1;
      x25 = 10'($urandom);
      exp = longint'(x25) * 512;
      @(posedge clk); #1;
      checks++;
      if (y_valid) begin failures++; $display("FAIL y_valid early"); end
      @(negedge clk);
      clear = 0;
      x25 = 10'($urandom);       // must not matter after the clear
      for (int k = 0; k < 13; k++) begin
        mac = 1; last = (k == 12);
        tap_lo = 10'($urandom); tap_hi = 10'($urandom);
        // mostly small coefficients as in the ROM, sometimes full range
        coeff = (op % 4 == 0) ? 11'($urandom) : 11'(int'($urandom % 200) - 100);
        exp += (longint'(tap_lo) + longint'(tap_hi)) * longint'(coeff);
        @(posedge clk); #1;
        checks++;
        if (y_valid !== (k == 12)) begin failures++; $display("FAIL y_valid op=%0d k=%0d", op, k); end
        @(negedge clk);
      end
      mac = 0; last = 0;
      checks++;
      if (y !== 22'(exp)) begin
        failures++;
        if (failures < 10) $display("FAIL op=%0d y=%0d exp=%0d", op, y, exp);
      end
      repeat ($urandom % 3) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
