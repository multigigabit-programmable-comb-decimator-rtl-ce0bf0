// tb_par_multiplier: the 11 x 11-bit signed product, compared with integer
// multiplication for all corner operands (most negative, -1, 0, 1, most
// positive) and 50000 random pairs.
module tb_par_multiplier;
  int checks = 0, failures = 0;
  logic signed [10:0] x, y;
  logic signed [21:0] p;

  par_multiplier #(.XW(11), .YW(11)) dut (.x, .y, .p);

  task automatic one(input int a, input int b);
    x = 11'(a); y = 11'(b);
    #1;
    checks++;
    if (int'(p) != int'(x) * int'(y)) begin
      failures++;
      if (failures < 10) $display("FAIL %0d * %0d = %0d", x, y, p);
    end
  endtask

  initial begin
    int corner [6] = '{-1024, -1023, -1, 0, 1, 1023};
    foreach (corner[i]) foreach (corner[j]) one(corner[i], corner[j]);
    for (int i = 0; i < 50000; i++) one(int'($urandom % 2048) - 1024, int'($urandom % 2048) - 1024);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000000;
    failures++;
    $display("watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
