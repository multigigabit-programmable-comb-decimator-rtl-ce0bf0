// tb_comb_decimator: drives random bit streams of varying density at
// decimation ratios M = 8, 16, 32 and 64 (R = 0, 1, 3, 7) and compares each
// output with a direct convolution of the input with the impulse response
// of [(1 - z^-M)/(1 - z^-1)]^3 (three boxcars of length M convolved),
// modulo 2^13.  It also checks the output rate (one word per M clocks) and
// the latency: the dump is in cycle T_n = (n+1)M - 1 after reset, the word
// covers inputs up to cycle T_n - 3 and appears in cycle T_n + 4.
module tb_comb_decimator;
  localparam int unsigned W = 13;
  localparam int MAXLEN = 64 * 40 + 16;
  int checks = 0, failures = 0, wrapped_outputs = 0, modes = 0;
  logic clk = 0, rst = 1, data = 0, q_valid;
  logic [2:0] r = '0;
  logic [W-1:0] q;
  bit   x [MAXLEN];
  longint h [3*64];

  comb_decimator #(.WIDTH(W)) dut (.clk, .rst, .data, .r, .q, .q_valid);

  always #5 clk = ~clk;

  // impulse response of three cascaded length-M boxcars
  task automatic make_h(input int m);
    longint b1 [3*64];
    longint b2 [3*64];
    foreach (b1[i]) begin b1[i] = 0; b2[i] = 0; h[i] = 0; end
    for (int i = 0; i < m; i++) b1[i] = 1;
    for (int i = 0; i < 2*m - 1; i++)
      for (int k = 0; k < m; k++) if (i - k >= 0) b2[i] += b1[i-k];
    for (int i = 0; i < 3*m - 2; i++)
      for (int k = 0; k < m; k++) if (i - k >= 0) h[i] += b2[i-k];
  endtask

  initial begin
    int rv_list [4] = '{0, 1, 3, 7};
    foreach (rv_list[ri]) begin
      int m, nout, density, last_valid;
      m = 8 * (rv_list[ri] + 1);
      make_h(m);
      rst = 1; r = 3'(rv_list[ri]); data = 0;
      @(posedge clk);
      @(negedge clk);
      rst = 0;
      modes++;
      nout = 0; last_valid = -1;
      for (int c = 0; c < 40 * m; c++) begin
        density = 1 + (c / (4 * m)) % 7;       // ones in 8, changes slowly
        x[c] = ($urandom % 8) < density;
        data = x[c];
        #1;
        if (q_valid) begin
          longint exp;
          int tn;
          tn = c - 4;
          exp = 0;
          for (int k = 0; k <= 3*m - 3; k++)
            if (tn - 3 - k >= 0) exp += h[k] * longint'(x[tn - 3 - k]);
          if (exp >= (1 << W)) wrapped_outputs++;
          checks += 2;
          if (q !== W'(exp)) begin
            failures++;
            if (failures < 10) $display("FAIL M=%0d n=%0d q=%0d exp=%0d (mod 2^13 of %0d)", m, nout, q, W'(exp), exp);
          end
          if ((last_valid < 0 && c != m - 1 + 4) || (last_valid >= 0 && c - last_valid != m)) begin
            failures++;
            $display("FAIL M=%0d output timing c=%0d last=%0d", m, c, last_valid);
          end
          last_valid = c;
          nout++;
        end
        @(negedge clk);
      end
      checks++;
      if (nout < 38) begin failures++; $display("FAIL M=%0d only %0d outputs", m, nout); end
    end
    checks++;
    if (wrapped_outputs == 0) begin failures++; $display("FAIL no output exceeded 13 bits"); end
    $display("modes=%0d wrapped_outputs=%0d", modes, wrapped_outputs);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000 * 8) @(posedge clk);
    failures++;
    $display("watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
