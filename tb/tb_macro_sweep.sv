`timescale 1ns / 1ps
// Delay sweep: the ALU built with 3, 5, 10, 15, 20, 30 and 40 delay macros
// in each forward link of its pipeline. For every build it runs one
// instruction of each operation type (ADD, PTO_SAL, ROT_D, MUL), checks the
// result, and measures the latency (request to done pulse) and the cycle
// time (request to busy low). Both must follow the pipeline's timing:
//   latency = (p-1) * F * Tm,   cycle = (n * F + 1) * Tm,
// with F the macros per link, Tm = 1.01 ns, p the done pulse and n the
// train length of the type. It prints latency and MIPS per type and build.
module tb_macro_sweep;
  import st_alu_pkg::*;
  localparam int  NB = 7;
  localparam int  FWD [NB] = '{3, 5, 10, 15, 20, 30, 40};
  localparam real TM = 1.01;
  localparam int  CODE [4] = '{2, 13, 3, 15};   // ADD, PTO_SAL, ROT_D, MUL
  localparam int  P [4]    = '{4, 2, 5, 9};     // done pulse = train length

  int checks = 0;
  int failures = 0;

  logic rst;
  logic [NB-1:0] req, ack, busy, tt;
  logic [4:0] sel;
  word_t din;
  word_t acc [NB];
  word_t port [NB];
  realtime t_tt [NB];

  for (genvar b = 0; b < NB; b++) begin : g_build
    logic [15:0] cnt;
    word_t xr, yr;
    st_alu_top #(.FWD_MACROS(FWD[b])) u_alu (
      .rst(rst), .req(req[b]), .ack(ack[b]), .busy(busy[b]), .sel(sel), .din(din),
      .acc(acc[b]), .port_out(port[b]), .x_reg(xr), .y_reg(yr), .tot_test(tt[b]), .op_count(cnt));
    always @(posedge tt[b]) t_tt[b] = $realtime;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic bit near(realtime a, realtime c);
    return (a - c < 0.01) && (c - a < 0.01);
  endfunction

  task automatic run(input int b, input int code, input word_t data, output realtime lat, output realtime cyc);
    realtime t0;
    sel = 5'(code); din = data;
    #1;
    t0 = $realtime;
    req[b] = 1'b1;
    wait (ack[b]);
    req[b] = 1'b0;
    wait (!ack[b]);
    wait (!busy[b]);
    cyc = $realtime - t0;
    lat = t_tt[b] - t0;
    #2;
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    realtime lat, cyc;
    req = '0; sel = '0; din = '0;
    rst = 1'b0; #1 rst = 1'b1; #20 rst = 1'b0; #5;
    $display("macros  type  latency(ns)  cycle(ns)  MIPS");
    for (int b = 0; b < NB; b++) begin
      run(b, 1, 16'h0123, lat, cyc);           // LDA
      check(acc[b] == 16'h0123, "LDA");
      for (int t = 0; t < 4; t++) begin
        run(b, CODE[t], 16'h0003, lat, cyc);
        check(near(lat, (P[t] - 1) * FWD[b] * TM),
              $sformatf("build %0d type %0d latency %0.2f", FWD[b], t + 1, lat));
        check(near(cyc, (P[t] * FWD[b] + 1) * TM),
              $sformatf("build %0d type %0d cycle %0.2f", FWD[b], t + 1, cyc));
        $display("%6d  %4d  %11.2f  %9.2f  %5.1f", FWD[b], t + 1, lat, cyc, 1000.0 / cyc);
      end
      // 0x0123 + 3 = 0x0126, port = 0x0126, rotate right -> 0x0093, times 3 -> 0x01B9
      check(port[b] == 16'h0126, $sformatf("build %0d port %h", FWD[b], port[b]));
      check(acc[b] == 16'h01B9, $sformatf("build %0d acc %h", FWD[b], acc[b]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
