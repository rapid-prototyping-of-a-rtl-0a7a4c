`timescale 1ns / 1ps
// Self-checking test of the delay line: for chains of 1, 3, 5, 10, 30, 50
// and 75 macros (the chain lengths of the delay characterisation)
// measures the input-to-output delay of both edges and checks it equals
// N_MACROS times the macro delay (1.01 ns by default).
module tb_delay_line;
  int checks = 0;
  int failures = 0;
  logic a;
  logic [6:0] y;
  localparam int N [7] = '{1, 3, 5, 10, 30, 50, 75};

  delay_line #(.N_MACROS(1))  u1  (.d_in(a), .d_out(y[0]));
  delay_line                  u3  (.d_in(a), .d_out(y[1]));
  delay_line #(.N_MACROS(5))  u5  (.d_in(a), .d_out(y[2]));
  delay_line #(.N_MACROS(10)) u10 (.d_in(a), .d_out(y[3]));
  delay_line #(.N_MACROS(30)) u30 (.d_in(a), .d_out(y[4]));
  delay_line #(.N_MACROS(50)) u50 (.d_in(a), .d_out(y[5]));
  delay_line #(.N_MACROS(75)) u75 (.d_in(a), .d_out(y[6]));


  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic bit near(realtime x, realtime z);
    return (x - z < 0.005) && (z - x < 0.005);
  endfunction

  initial begin
    #5000 failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    realtime t0;
    a = 1'b0;
    #20;
    for (int i = 0; i < 4; i++) begin
      t0 = $realtime;
      a = ~a;
      // chains are in increasing order of delay, so wait for each in turn
      for (int j = 0; j < 7; j++) begin
        wait (y[j] == a);
        check(near($realtime - t0, N[j] * 1.01),
              $sformatf("chain of %0d macros: %0.3f ns", N[j], $realtime - t0));
      end
      #100;
      check(y == {7{a}}, "all chains follow the input");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
