// tb_halfband_decimator: random 10-bit samples (full-scale noise, then a
// slow full-scale square wave that drives the sums to their extremes) with
// 7..12 clocks between samples.  Every output is compared with the direct
// form y(n) = sum_j h(j) x(2n - j) over all 51 taps of the half-band
// filter, built here from its definition: h(2m) = h(50-2m) from the table
// below, odd taps zero, h(25) = 512.  Also checks that there is one output
// per two inputs and that it comes 14 clocks after its even sample.
module tb_halfband_decimator;
  int checks = 0, failures = 0, outputs = 0;
  logic clk = 0, rst = 1, x_valid = 0, y_valid;
  logic signed [9:0]  x = '0;
  logic signed [21:0] y;
  int xs [4000];
  int hh [51];
  int hev [13] = '{3, -3, 4, -6, 9, -12, 16, -22, 29, -41, 61, -106, 325};
  int nin = 0;
  int t = 0;
  int t_even [$];               // start times of pending outputs

  halfband_decimator #(.SW(10)) dut (.clk, .rst, .x, .x_valid, .y, .y_valid);

  always #5 clk = ~clk;
  always @(posedge clk) t++;

  // output checker
  always @(negedge clk) if (!rst && y_valid) begin
    longint exp;
    int n2;
    n2 = 2 * outputs;             // index of the even sample of this output
    exp = 0;
    for (int j = 0; j < 51; j++) if (n2 - j >= 0) exp += longint'(hh[j]) * longint'(xs[n2 - j]);
    checks += 2;
    if (y !== 22'(exp)) begin
      failures++;
      if (failures < 10) $display("FAIL out %0d y=%0d exp=%0d", outputs, y, exp);
    end
    if (t_even.size() == 0 || t - t_even.pop_front() != 14) begin
      failures++;
      $display("FAIL latency at output %0d", outputs);
    end
    outputs++;
  end

  initial begin
    foreach (hh[j]) hh[j] = 0;
    for (int m = 0; m < 13; m++) begin hh[2*m] = hev[m]; hh[50 - 2*m] = hev[m]; end
    hh[25] = 512;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst = 0;
    for (int i = 0; i < 1200; i++) begin
      int v;
      if (i < 600) v = int'($urandom % 1024) - 512;
      else         v = ((i / 40) % 2 == 0) ? 511 : -512;
      xs[i] = v;
      x = 10'(v);
      x_valid = 1;
      if (i % 2 == 0) t_even.push_back(t);
      @(negedge clk);
      x_valid = 0;
      x = 10'($urandom);
      repeat (6 + ($urandom % 6)) @(negedge clk);
      nin++;
    end
    repeat (20) @(negedge clk);
    checks++;
    if (outputs != nin / 2) begin failures++; $display("FAIL outputs=%0d inputs=%0d", outputs, nin); end
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
