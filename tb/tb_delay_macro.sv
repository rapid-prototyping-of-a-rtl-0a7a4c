`timescale 1ns / 1ps
// Self-checking test of the delay macro model: measures the delay of rising
// and falling edges against LUT_NS + ROUTE_NS, for the default values and for
// a second set, and checks that a pulse shorter than the delay is swallowed.
module tb_delay_macro;
  int checks = 0;
  int failures = 0;
  logic a, ya, yb;
  realtime t0;

  delay_macro u_a (.s_in(a), .s_out(ya));
  delay_macro #(.LUT_NS(0.5), .ROUTE_NS(2.0)) u_b (.s_in(a), .s_out(yb));

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic bit near(realtime x, realtime y);
    return (x - y < 0.002) && (y - x < 0.002);
  endfunction

  initial begin
    #1000 failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a = 1'b0;
    #10;
    check(!ya && !yb, "outputs low at start");
    for (int i = 0; i < 4; i++) begin
      t0 = $realtime;
      a = ~a;
      wait (ya == a);
      check(near($realtime - t0, 1.01), $sformatf("default macro delay %0.3f", $realtime - t0));
      wait (yb == a);
      check(near($realtime - t0, 2.5), $sformatf("second macro delay %0.3f", $realtime - t0));
      #5;
    end
    // a 1 ns pulse passes the 1.01 ns macro? no: shorter than the delay
    a = 1'b1; #1.5 a = 1'b0;
    #0.2; check(!yb, "1.5 ns pulse swallowed by 2.5 ns macro");
    #5;  check(!yb, "still swallowed");
    a = 1'b1; #3 a = 1'b0;
    #0.1; check(yb, "3 ns pulse passes 2.5 ns macro");
    #5;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
