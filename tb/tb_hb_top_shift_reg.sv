// tb_hb_top_shift_reg: feeds numbered samples 1, 2, 3, ... with one
// shift_in and NP = 13 rotate clocks each (sometimes with idle clocks in
// between) and checks after clock k of each period that
// tap_lo = x_e(n-(12-k)) and tap_hi = x_e(n-13-k), i.e. that the 13
// symmetric pairs of the 26 newest samples appear in order.  Samples
// older than the first one read as zero.
module tb_hb_top_shift_reg;
  localparam int NP = 13;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1, shift_in = 0, rotate = 0;
  logic signed [9:0] x = '0, tap_lo, tap_hi;

  hb_top_shift_reg #(.NP(NP), .SW(10)) dut (.clk, .rst, .shift_in, .rotate, .x, .tap_lo, .tap_hi);

  always #5 clk = ~clk;

  function automatic int sample(input int idx);
    return idx >= 1 ? idx : 0;
  endfunction

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst = 0;
    for (int n = 1; n <= 80; n++) begin
      for (int k = 0; k <= NP; k++) begin
        shift_in = (k == 0);
        rotate   = (k != 0);
        x        = 10'(n);
        @(posedge clk);
        #1;
        if (k < NP) begin
          checks += 2;
          if (int'(tap_lo) != sample(n - (NP - 1 - k))) begin
            failures++;
            if (failures < 10) $display("FAIL n=%0d k=%0d tap_lo=%0d exp=%0d", n, k, tap_lo, sample(n-(NP-1-k)));
          end
          if (int'(tap_hi) != sample(n - NP - k)) begin
            failures++;
            if (failures < 10) $display("FAIL n=%0d k=%0d tap_hi=%0d exp=%0d", n, k, tap_hi, sample(n-NP-k));
          end
        end
        @(negedge clk);
      end
      shift_in = 0; rotate = 0;
      repeat ($urandom % 3) @(negedge clk);
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
