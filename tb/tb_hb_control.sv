// tb_hb_control: input strobes 7 and then 11 clocks apart.  Checks that samples
// alternate even/odd starting with even, that an even sample gives one
// shift_in/clear clock followed by exactly 13 rotate/mac clocks with ROM
// addresses 12, 11, ..., 0, last only on the final one, and that the
// sequence takes 14 clocks in all.
module tb_hb_control;
  int checks = 0, failures = 0, sequences = 0;
  logic clk = 0, rst = 1, in_valid = 0;
  logic even, shift_in, odd_en, rotate, clear, mac, last, busy;
  logic [3:0] addr;

  hb_control #(.NP(13)) dut (.clk, .rst, .in_valid, .even, .shift_in, .odd_en, .rotate,
                             .addr, .clear, .mac, .last, .busy);

  always #5 clk = ~clk;

  // expected state: k = clocks since the last shift_in (-1: idle)
  int k = -1;
  int nsamp = 0;

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst = 0;
    for (int t = 0; t < 3000; t++) begin
      // tightest legal rate (7 clocks per sample) first, then a slower one
      in_valid = (t < 1500) ? (t % 7 == 0) : (t % 11 == 0);
      #1;
      checks += 6;
      if (in_valid && (even !== (nsamp % 2 == 0))) begin failures++; $display("FAIL even t=%0d", t); end
      if (shift_in !== (in_valid && nsamp % 2 == 0)) begin failures++; $display("FAIL shift_in t=%0d", t); end
      if (odd_en !== (in_valid && nsamp % 2 == 1)) begin failures++; $display("FAIL odd_en t=%0d", t); end
      if (clear !== shift_in) begin failures++; $display("FAIL clear t=%0d", t); end
      if ((rotate !== (k >= 1)) || (mac !== (k >= 1)) || (busy !== (k >= 1))) begin
        failures++; $display("FAIL rotate/mac/busy t=%0d k=%0d", t, k);
      end
      if (k >= 1 && (addr !== 4'(13 - k) || last !== (k == 13))) begin
        failures++; $display("FAIL addr/last t=%0d k=%0d addr=%0d", t, k, addr);
      end
      if (k >= 1 && last) sequences++;
      // advance the model
      if (shift_in) k = 1;
      else if (k == 13) k = -1;
      else if (k >= 1) k++;
      if (in_valid) nsamp++;
      @(negedge clk);
    end
    checks++;
    if (sequences < 100) begin failures++; $display("FAIL only %0d sequences", sequences); end
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
