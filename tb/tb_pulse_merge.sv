`timescale 1ns / 1ps
// Self-checking test of the pulse merge: random input words, the output must
// be high exactly when some input is high; every single-input pulse passes.
module tb_pulse_merge;
  int checks = 0;
  int failures = 0;
  logic [14:0] pulses;
  logic merged;

  pulse_merge dut (.pulses(pulses), .merged(merged));

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
    pulses = '0; #1;
    check(!merged, "all low");
    for (int k = 0; k < 15; k++) begin
      pulses = 15'(1 << k); #1;
      check(merged, $sformatf("input %0d alone passes", k));
      pulses = '0; #1;
      check(!merged, "returns low");
    end
    for (int i = 0; i < 200; i++) begin
      pulses = 15'($urandom) & 15'($urandom);
      #1;
      check(merged == (pulses != 0), $sformatf("pulses=%h merged=%b", pulses, merged));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
