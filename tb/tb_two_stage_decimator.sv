// tb_two_stage_decimator: end-to-end test of the two-stage decimator at
// its default sizes.  A second-order sigma-delta modulator model turns a
// sine wave into a bit stream; the stream is decimated with R = 1 (comb
// ratio 16, total 32: the main configuration), then R = 0 (8, total 16) and
// R = 3 (32, total 64) and R = 7 (64, total 128), where the 13-bit comb
// output wraps, with a reset between modes.
// Reference: the comb output is the convolution of the bits with three
// length-M boxcars (modulo 2^13), the half-band input is its top 10 bits
// with the MSB inverted, and the final output is the 51-tap direct-form
// FIR of those samples at even indices.  Counts how often each mechanism
// happened (mode switches, comb dumps, counter wrap-around, comb outputs
// beyond 13 bits, rotations of the top register, non-zero centre-tap
// contributions) and fails if one never did.  Also checks that final words
// come every 2*M1 clocks.
module tb_two_stage_decimator;
  import decim_pkg::*;
  localparam int MAXC = 64 * 300;
  int checks = 0, failures = 0;
  int n_modes = 0, n_dumps = 0, n_cnt_wraps = 0, n_comb_wraps = 0, n_hb_out = 0, n_centre = 0;
  logic clk = 0, rst = 1, data = 0;
  logic [2:0] r = '0;
  logic [COMB_W-1:0] comb_q;
  logic comb_valid, y_valid;
  logic signed [HB_YW-1:0] y;

  bit x [MAXC];
  longint h [3*64];
  int hs [400];        // half-band input samples (reference)
  int hh [51];
  int hev [13] = '{3, -3, 4, -6, 9, -12, 16, -22, 29, -41, 61, -106, 325};

  two_stage_decimator dut (.clk, .rst, .data, .r, .comb_q, .comb_valid, .y, .y_valid);

  always #5 clk = ~clk;

  task automatic make_h(input int m);
    longint b2 [3*64];
    foreach (b2[i]) begin b2[i] = 0; h[i] = 0; end
    for (int i = 0; i < 2*m - 1; i++) for (int k = 0; k < m; k++) if (i - k >= 0 && i - k < m) b2[i] += 1;
    for (int i = 0; i < 3*m - 2; i++) for (int k = 0; k < m; k++) if (i - k >= 0) h[i] += b2[i-k];
  endtask

  // counts rotate clocks of the top register (internal probe for coverage)
  int n_rot = 0;
  always @(posedge clk) if (!rst && dut.u_hb.rotate) n_rot++;

  task automatic run_mode(input int rv, input int n_out);
    int m, nc, nh, cycles, ones, last_y;
    real v1, v2, fb, u;
    m = 8 * (rv + 1);
    make_h(m);
    rst = 1; r = 3'(rv); data = 0;
    @(posedge clk);
    @(negedge clk);
    rst = 0;
    n_modes++;
    v1 = 0; v2 = 0; fb = 0;
    nc = 0; nh = 0; ones = 0; last_y = -1;
    cycles = 2 * m * n_out + 40;
    for (int c = 0; c < cycles; c++) begin
      // second-order sigma-delta modulator, input amplitude 0.5 of full scale
      u  = 0.5 * $sin(2.0 * 3.14159265358979 * real'(c) / real'(m * 24));
      v1 = v1 + u - fb;
      v2 = v2 + v1 - fb;
      x[c] = (v2 >= 0.0);
      fb = x[c] ? 1.0 : -1.0;
      data = x[c];
      if (x[c]) begin ones++; if (ones % (1 << COMB_W) == 0) n_cnt_wraps++; end
      #1;
      if (comb_valid) begin
        longint e;
        int tn, cq;
        tn = c - 4;
        e = 0;
        for (int k = 0; k <= 3*m - 3; k++) if (tn - 3 - k >= 0) e += h[k] * longint'(x[tn - 3 - k]);
        if (e >= (1 << COMB_W)) n_comb_wraps++;
        cq = int'(e % (1 << COMB_W));
        checks++;
        if (comb_q !== COMB_W'(cq)) begin
          failures++;
          if (failures < 10) $display("FAIL M=%0d comb out %0d = %0d exp %0d", m, nc, comb_q, cq);
        end
        // half-band input: offset binary to two's complement, top 10 bits
        hs[nc] = (cq >> 3) - 512;
        n_dumps++;
        nc++;
      end
      if (y_valid) begin
        longint e;
        int n2;
        n2 = 2 * nh;
        e = 0;
        for (int j = 0; j < 51; j++) if (n2 - j >= 0) e += longint'(hh[j]) * longint'(hs[n2 - j]);
        if (n2 >= 25 && hs[n2 - 25] != 0) n_centre++;
        checks++;
        if (y !== HB_YW'(e)) begin
          failures++;
          if (failures < 10) $display("FAIL M=%0d y(%0d) = %0d exp %0d", m, nh, y, e);
        end
        // one final word per 2*M1 clocks (32 clocks = 16 ns at 2 GHz for M1 = 16)
        checks++;
        if (last_y >= 0 && c - last_y != 2 * m) begin
          failures++;
          $display("FAIL M=%0d output spacing %0d", m, c - last_y);
        end
        last_y = c;
        nh++;
        n_hb_out++;
      end
      @(negedge clk);
    end
    checks++;
    if (nh < n_out - 1) begin failures++; $display("FAIL M=%0d only %0d outputs", m, nh); end
    $display("M1=%0d: %0d comb outputs, %0d final outputs", m, nc, nh);
  endtask

  task automatic need(input string what, input int n);
    checks++;
    if (n == 0) begin failures++; $display("FAIL mechanism never exercised: %s", what); end
    else $display("%s: %0d", what, n);
  endtask

  initial begin
    foreach (hh[j]) hh[j] = 0;
    for (int k = 0; k < 13; k++) begin hh[2*k] = hev[k]; hh[50 - 2*k] = hev[k]; end
    hh[25] = 512;
    run_mode(1, 120);
    run_mode(0, 120);
    run_mode(3, 100);
    run_mode(7, 140);   // long enough for the bit counter to wrap
    need("mode switches", n_modes - 1);
    need("comb dumps", n_dumps);
    need("bit counter wrap-arounds", n_cnt_wraps);
    need("comb outputs beyond 13 bits (modulo)", n_comb_wraps);
    need("top register rotate clocks", n_rot);
    need("non-zero centre-tap terms", n_centre);
    need("final outputs", n_hb_out);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
