`timescale 1ns / 1ps
// Self-checking test of the accumulator: loads random words on pulses of
// acc_clk, holds between pulses while d changes, clears on reset.
module tb_accumulator;
  import st_alu_pkg::*;
  int checks = 0;
  int failures = 0;
  logic rst, acc_clk;
  word_t d, q, model;

  accumulator dut (.rst(rst), .acc_clk(acc_clk), .d(d), .q(q));

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
    rst = 1'b0; acc_clk = 1'b0; d = '0; #1 rst = 1'b1; #2 rst = 1'b0; #1;
    model = '0;
    check(q == 0, "reset value");
    for (int i = 0; i < 100; i++) begin
      d = word_t'($urandom); #1;
      acc_clk = 1'b1; model = d; #1;
      check(q == model, $sformatf("load %h got %h", model, q));
      d = ~d; #1;
      check(q == model, "holds while acc_clk high");
      acc_clk = 1'b0; #1;
      d = word_t'($urandom); #1;
      check(q == model, "holds between pulses");
    end
    rst = 1'b1; #1;
    check(q == 0, "reset clears");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
