// tb_dynamic_range: measures the signal-to-noise-and-distortion ratio of the
// complete two-stage decimator in its main configuration (comb ratio 16,
// total 32).  A second-order sigma-delta modulator model encodes a sine of
// amplitude 0.5 of full scale placed on exactly 7 cycles per 256 output
// words; after the filters have settled, 256 output words are fitted with a
// sine of that frequency plus an offset by least squares, and the ratio of
// the fitted sine's power to the residual power is reported in dB, and,
// 6 dB higher, the same noise floor relative to a full-scale sine.  The
// result is limited mainly by the 10-bit coupling between the stages and by
// the modulator's shaped noise.  The check passes above 45 dB; the
// measured value is printed.
module tb_dynamic_range;
  import decim_pkg::*;
  localparam int M1     = 16;
  localparam int NOUT   = 256;
  localparam int SKIP   = 40;
  localparam int CYCLES = 7;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1, data = 0;
  logic [2:0] r = 3'd1;
  logic [COMB_W-1:0] comb_q;
  logic comb_valid, y_valid;
  logic signed [HB_YW-1:0] y;
  real ys [NOUT];
  int nout = 0;

  two_stage_decimator dut (.clk, .rst, .data, .r, .comb_q, .comb_valid, .y, .y_valid);

  always #5 clk = ~clk;

  always @(negedge clk) if (!rst && y_valid) begin
    if (nout >= SKIP && nout < SKIP + NOUT) ys[nout - SKIP] = real'(y);
    nout++;
  end

  initial begin
    real v1, v2, fb, u, w, pi;
    real sc, ss, dc, a, b, sig, res, snr;
    pi = 3.14159265358979;
    v1 = 0; v2 = 0; fb = 0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst = 0;
    for (int c = 0; nout < SKIP + NOUT; c++) begin
      u  = 0.5 * $sin(2.0 * pi * real'(CYCLES) * real'(c) / real'(NOUT * 2 * M1));
      v1 = v1 + u - fb;
      v2 = v2 + v1 - fb;
      data = (v2 >= 0.0);
      fb = data ? 1.0 : -1.0;
      @(negedge clk);
    end
    // least-squares fit (the frequency is coherent, so the sums decouple)
    dc = 0; sc = 0; ss = 0;
    for (int i = 0; i < NOUT; i++) begin
      w   = 2.0 * pi * real'(CYCLES) * real'(i) / real'(NOUT);
      dc += ys[i];
      sc += ys[i] * $cos(w);
      ss += ys[i] * $sin(w);
    end
    dc = dc / NOUT; a = 2.0 * sc / NOUT; b = 2.0 * ss / NOUT;
    sig = (a * a + b * b) / 2.0;
    res = 0;
    for (int i = 0; i < NOUT; i++) begin
      real e;
      w = 2.0 * pi * real'(CYCLES) * real'(i) / real'(NOUT);
      e = ys[i] - dc - a * $cos(w) - b * $sin(w);
      res += e * e;
    end
    res = res / NOUT;
    snr = 10.0 * $log10(sig / res);
    $display("sine amplitude %0.1f LSB of y, SINAD %0.1f dB over %0d output words", $sqrt(2.0 * sig), snr, NOUT);
    // dynamic range: full-scale sine power over the same noise floor
    $display("noise floor %0.1f dB below a full-scale sine", snr + 20.0 * $log10(2.0));
    checks++;
    if (snr < 45.0) begin failures++; $display("FAIL SINAD below 45 dB"); end
    // the amplitude must match: 0.5 full scale -> comb swing 0.5*2048 counts,
    // /8 at the coupling, *1024 in the filter (gain 1026/1024)
    checks++;
    if ($sqrt(2.0 * sig) < 0.9 * 0.5 * 2048.0 / 8.0 * 1024.0 ||
        $sqrt(2.0 * sig) > 1.1 * 0.5 * 2048.0 / 8.0 * 1024.0) begin
      failures++; $display("FAIL amplitude");
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
