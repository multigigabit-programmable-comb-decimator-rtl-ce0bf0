// tb_alt_carry_adder: checks the 13-bit adder against a + b + ci modulo 2^13 on
// corner cases (all carries rippling, zero, all ones) and random operands.
module tb_alt_carry_adder;
  localparam int unsigned W = 13;
  int checks = 0, failures = 0;
  logic [W-1:0] a, b, s;
  logic         ci;

  alt_carry_adder #(.WIDTH(W)) dut (.a, .b, .ci, .s);

  task automatic check_one(input logic [W-1:0] ta, input logic [W-1:0] tb_, input logic tci);
    logic [W-1:0] exp;
    a = ta; b = tb_; ci = tci;
    #1;
    exp = W'((32'(ta) + 32'(tb_) + 32'(tci)) % (1 << W));
    checks++;
    if (s !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %0d + %0d + %0d = %0d, expected %0d", ta, tb_, tci, s, exp);
    end
  endtask

  initial begin
    check_one('1, '0, 1'b1);
    check_one('1, 13'd1, 1'b0);
    check_one('1, '1, 1'b1);
    check_one('0, '0, 1'b0);
    check_one(13'h0AAA, 13'h1555, 1'b1);
    for (int i = 0; i < W; i++) check_one(W'(1) << i, (W'(1) << i) - 1'b1, 1'b1);
    for (int i = 0; i < 20000; i++) check_one(W'($urandom), W'($urandom), 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
