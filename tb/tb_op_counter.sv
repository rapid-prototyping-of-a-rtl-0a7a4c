`timescale 1ns / 1ps
// Self-checking test of the operations counter: counts random numbers of
// pulses, checks the count, wrap-around of an 4-bit instance and reset.
module tb_op_counter;
  int checks = 0;
  int failures = 0;
  logic rst, tt;
  logic [15:0] count;
  logic [3:0] count4;
  int expected;

  op_counter dut (.rst(rst), .tot_test(tt), .count(count));
  op_counter #(.WIDTH(4)) dut4 (.rst(rst), .tot_test(tt), .count(count4));

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #100000 failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1'b0; tt = 1'b0; #1 rst = 1'b1; #2 rst = 1'b0; #1;
    expected = 0;
    check(count == 0 && count4 == 0, "cleared by reset");
    for (int r = 0; r < 10; r++) begin
      int n;
      n = 1 + int'($urandom % 20);
      repeat (n) begin tt = 1'b1; #1 tt = 1'b0; #1; end
      expected += n;
      check(count == 16'(expected), $sformatf("count %0d expected %0d", count, expected));
      check(count4 == 4'(expected), $sformatf("4-bit count %0d expected %0d", count4, expected % 16));
    end
    rst = 1'b1; #1 rst = 1'b0; #1;
    check(count == 0, "reset clears the count");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
