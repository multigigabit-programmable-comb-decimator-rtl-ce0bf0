// tb_acc_dump: random input words and dump strobes at random intervals
// of 4..70 clocks; at each dump the hand-over value must equal the sum
// (modulo 2^13) of exactly the inputs since the previous dump.
module tb_acc_dump;
  localparam int unsigned W = 13;
  int checks = 0, failures = 0, dumps = 0;
  logic clk = 0, rst = 1, dump = 0;
  logic [W-1:0] d = '0, sum;
  longint window = 0;

  acc_dump #(.WIDTH(W)) dut (.clk, .rst, .d, .dump, .sum);

  always #5 clk = ~clk;

  initial begin
    repeat (2) @(posedge clk);
    rst <= 0;
    @(negedge clk);
    for (int blk = 0; blk < 300; blk++) begin
      int len;
      len = 4 + int'($urandom % 67);
      for (int i = 0; i < len; i++) begin
        d    = W'($urandom);
        dump = (i == len - 1);
        if (dump) begin
          // sum holds everything up to the previous clock
          checks++;
          if (blk > 0 && sum !== W'(window)) begin
            failures++;
            if (failures < 10) $display("FAIL blk=%0d sum=%0d exp=%0d", blk, sum, W'(window));
          end
          dumps++;
          window = longint'(d);    // restart with the current input
        end else begin
          window += longint'(d);
        end
        @(posedge clk);
        @(negedge clk);
      end
    end
    $display("dumps=%0d", dumps);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
