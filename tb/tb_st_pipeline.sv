`timescale 1ns / 1ps
// Self-checking test of the four-phase ST control pipeline.
//
// Sends waves through a 9-block chain (the ALU's size), with every train
// length 1..9, and a 25-block chain (the size used to characterise pipeline
// latency). For every wave it
// records the rising and falling time of each activation pulse and checks
// them against the expected timing of a Muller pipeline:
//   rise(k) = (k-1) * FWD * Tm,   fall(k) = rise(k) + (FWD + BACK) * Tm,
// with Tm the delay of one macro, measured from the rising request. It also
// checks the four-phase handshake order, that busy covers the whole train
// and falls (n*FWD + BACK)*Tm after the request, that each block of the
// train pulses exactly once per wave and no block beyond it pulses, and the
// latency between the first and the last pulse.
module tb_st_pipeline;
  localparam real TM  = 1.01;   // delay of one macro (ns)
  localparam int  FWD = 3;
  localparam int  BACK = 1;
  localparam int  N1 = 9;
  localparam int  N2 = 25;

  int checks = 0;
  int failures = 0;

  logic rst;
  logic req1, ack1, busy1;
  logic [N1:1] xi1;
  logic req2, ack2, busy2;
  logic [N2:1] xi2;

  logic [3:0] len1;
  st_pipeline #(.N_STAGES(N1)) dut1 (.rst(rst), .req(req1), .ack(ack1), .n_pulses(len1),
                                     .xi(xi1), .busy(busy1));
  st_pipeline #(.N_STAGES(N2), .FWD_MACROS(FWD), .BACK_MACROS(BACK)) dut2 (
    .rst(rst), .req(req2), .ack(ack2), .n_pulses(5'(N2)), .xi(xi2), .busy(busy2));

  // pulse timestamps of the 25-block chain (the 9-block chain uses the first 9)
  realtime t_rise [2][1:N2];
  realtime t_fall [2][1:N2];
  int      n_rise [2][1:N2];

  for (genvar k = 1; k <= N1; k++) begin : g_mon1
    always @(posedge xi1[k]) begin t_rise[0][k] = $realtime; n_rise[0][k]++; end
    always @(negedge xi1[k]) t_fall[0][k] = $realtime;
  end
  for (genvar k = 1; k <= N2; k++) begin : g_mon2
    always @(posedge xi2[k]) begin t_rise[1][k] = $realtime; n_rise[1][k]++; end
    always @(negedge xi2[k]) t_fall[1][k] = $realtime;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  function automatic bit near(realtime a, realtime b);
    return (a - b < 0.01) && (b - a < 0.01);
  endfunction

  task automatic clear_counts();
    for (int c = 0; c < 2; c++)
      for (int k = 1; k <= N2; k++) n_rise[c][k] = 0;
  endtask

  // one four-phase handshake on chain c, then wait for the wave to leave
  task automatic wave(input int c, input int n);
    realtime t0, t_idle;
    t0 = $realtime;
    if (c == 0) req1 = 1'b1; else req2 = 1'b1;
    if (c == 0) wait (ack1); else wait (ack2);
    check(near($realtime, t0), "ack rises with the first block");
    if (c == 0) req1 = 1'b0; else req2 = 1'b0;
    if (c == 0) wait (!ack1); else wait (!ack2);
    if (c == 0) wait (!busy1); else wait (!busy2);
    t_idle = $realtime;
    // a one-pulse train ends as soon as block 1 has acknowledged itself
    check(near(t_idle - t0, (n == 1 ? BACK : n * FWD + BACK) * TM),
          $sformatf("chain %0d train of %0d done after %0.3f", c, n, t_idle - t0));
    #(5 * TM);
    for (int k = n + 1; k <= (c == 0 ? N1 : N2); k++)
      check(n_rise[c][k] == 0, $sformatf("chain %0d block %0d beyond the train pulsed", c, k));
    for (int k = 1; k <= n; k++) begin
      check(n_rise[c][k] == 1, $sformatf("chain %0d block %0d pulsed %0d times", c, k, n_rise[c][k]));
      check(near(t_rise[c][k] - t0, (k - 1) * FWD * TM),
            $sformatf("chain %0d xi%0d rise at %0.3f", c, k, t_rise[c][k] - t0));
      check(near(t_fall[c][k] - t_rise[c][k], (n == 1 ? BACK : FWD + BACK) * TM),
            $sformatf("chain %0d xi%0d width %0.3f", c, k, t_fall[c][k] - t_rise[c][k]));
      if (k > 1)
        check(t_rise[c][k] < t_fall[c][k-1], $sformatf("chain %0d xi%0d overlaps xi%0d", c, k, k-1));
    end
    check(near(t_rise[c][n] - t_rise[c][1], (n - 1) * FWD * TM),
          $sformatf("chain %0d latency xi_u - xi_p = %0.3f", c, t_rise[c][n] - t_rise[c][1]));
  endtask

  initial begin
    #2000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1'b1; req1 = 1'b0; req2 = 1'b0; len1 = 4'(N1);
    #20 rst = 1'b0;
    #5;
    check(!busy1 && !busy2 && !ack1 && !ack2, "idle after reset");
    for (int w = 0; w < 3; w++) begin
      clear_counts();
      wave(0, N1);
    end
    // every train length, in random order
    for (int w = 0; w < 30; w++) begin
      len1 = 4'(1 + $urandom % N1);
      clear_counts();
      wave(0, int'(len1));
    end
    len1 = 4'(N1);
    clear_counts();
    wave(1, N2);
    $display("25-block latency xi_u - xi_p = %0.2f ns", t_rise[1][N2] - t_rise[1][1]);
    // reset in the middle of a wave clears every block
    req1 = 1'b1;
    #(3 * FWD * TM);
    rst = 1'b1;
    #1;
    check(xi1 == '0 && !busy1, "reset clears a wave in flight");
    req1 = 1'b0;
    #20 rst = 1'b0;
    #5;
    clear_counts();
    wave(0, N1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
