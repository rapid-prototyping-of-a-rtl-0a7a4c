`timescale 1ns / 1ps
// Self-checking test of the asynchronous control. For each of the 15
// decoder lines (and for no line) it plays the pipeline's pulse train
// xi1..xi9 and counts, per output, the pulses seen. Expected, from the
// instruction table: the instruction's own multiplexer line and no other
// pulses once (I0 otherwise), the accumulator pulse comes once while that
// line is selected (never for the output port), the right register clock
// pulses once (and no other), and the total-test line pulses once, on
// pulse 4, 2, 5 or 9 according to the instruction's type, which is also
// the train length the control asks of the pipeline.
module tb_async_control;
  import st_alu_pkg::*;
  import alu_ref_pkg::*;
  int checks = 0;
  int failures = 0;
  logic [N_INSTR-1:0] deco;
  logic [N_XI:1] xi;
  logic [N_MUX-1:0] mux_sel;
  op_clks_t clks;
  logic acc_clk, tot_test;
  logic [3:0] n_pulses;

  async_control dut (.deco(deco), .xi(xi), .mux_sel(mux_sel), .clks(clks),
                     .acc_clk(acc_clk), .tot_test(tot_test), .n_pulses(n_pulses));

  // multiplexer line of each selection code 1..15 (0: none), from the table
  localparam int LINE [16] = '{0, 2, 1, 3, 4, 5, 6, 9, 8, 7, 10, 11, 12, 0, 14, 13};

  int n_line [N_MUX];
  int n_acc, n_acc_ok, n_tt, tt_at, cur;
  int n_clk [8];
  op_clks_t clks_q;

  for (genvar k = 0; k < N_MUX; k++) begin : g_mon
    always @(posedge mux_sel[k]) n_line[k]++;
  end
  always @(posedge acc_clk) begin
    n_acc++;
    if (LINE[cur] != 0 && mux_sel[LINE[cur]] && $onehot(mux_sel)) n_acc_ok++;
  end
  always @(posedge tot_test) begin n_tt++; tt_at = 0; for (int k = 1; k <= N_XI; k++) if (xi[k]) tt_at = k; end
  always @(clks) begin
    for (int b = 0; b < 8; b++) if (clks[b] && !clks_q[b]) n_clk[b]++;
    clks_q = clks;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  // bit of op_clks_t (MSB first in the struct) loaded by each code, -1 none
  function automatic int clk_bit(int code);
    case (code)
      3: return 7; 4: return 6; 6: return 5; 7: return 4;
      9: return 3; 10: return 2; 13: return 1; 15: return 0;
      default: return -1;
    endcase
  endfunction

  initial begin
    #100000 failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    clks_q = '0;
    for (int code = 0; code <= 15; code++) begin
      cur = code;
      xi = '0;
      deco = (code == 0) ? '0 : N_INSTR'(1) << (code - 1);
      #5;
      check(mux_sel == 15'h0001 && !acc_clk && !tot_test && clks == '0, "idle: only I0");
      check(int'(n_pulses) == (code == 0 ? 1 : ref_pulses(sel_e'(code))),
            $sformatf("code %0d train length %0d", code, n_pulses));
      for (int k = 0; k < N_MUX; k++) n_line[k] = 0;
      for (int b = 0; b < 8; b++) n_clk[b] = 0;
      n_acc = 0; n_acc_ok = 0; n_tt = 0; tt_at = 0;
      // train: xi_k high from 3k to 3k+4
      for (int t = 0; t < 3 * N_XI + 8; t++) begin
        for (int k = 1; k <= N_XI; k++) xi[k] = (t >= 3 * k) && (t < 3 * k + 4);
        #1;
      end
      for (int k = 1; k < N_MUX; k++)
        check(n_line[k] == ((code != 0 && LINE[code] == k) ? 1 : 0),
              $sformatf("code %0d line I%0d pulsed %0d", code, k, n_line[k]));
      check(n_acc == ((code == 0 || code == 13) ? 0 : 1), $sformatf("code %0d acc pulses %0d", code, n_acc));
      check(n_acc_ok == n_acc, $sformatf("code %0d select at acc edge", code));
      for (int b = 0; b < 8; b++)
        check(n_clk[b] == ((b == clk_bit(code)) ? 1 : 0), $sformatf("code %0d reg clk %0d pulsed %0d", code, b, n_clk[b]));
      check(n_tt == (code == 0 ? 0 : 1), $sformatf("code %0d total-test pulses %0d", code, n_tt));
      if (code != 0)
        check(tt_at == ref_pulses(sel_e'(code)), $sformatf("code %0d done on pulse %0d", code, tt_at));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
