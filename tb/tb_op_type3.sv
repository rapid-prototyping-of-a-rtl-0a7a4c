`timescale 1ns / 1ps
// Self-checking test of the type 3 operation control (5 pulses).
// Part 1 applies every combination of the pulses and the decoder line and
// compares the outputs with the block's specification (reg_clk = xi1, alui = xi2|xi3|xi4, acc_clk = xi3, p = xi5, all gated by
// the decoder line). Part 2 plays the pulse train the pipeline produces
// (staggered, overlapping pulses) and checks the order of events: each
// output pulses exactly once with the line active and never without it,
// and the multiplexer select, where there is one, is high at the rising
// edge of the accumulator pulse.
module tb_op_type3;
  int checks = 0;
  int failures = 0;
  logic deco;
  logic [5:1] xi;
  logic reg_clk, alui, acc_clk, p;
  int n_alui, n_acc, n_reg, n_p, n_acc_sel;

  op_type3 dut (.deco(deco), .xi(xi), .reg_clk(reg_clk), .alui(alui), .acc_clk(acc_clk), .p(p));

  always @(posedge alui)    n_alui++;
  always @(posedge acc_clk) begin n_acc++; if (alui) n_acc_sel++; end
  always @(posedge reg_clk) n_reg++;
  always @(posedge p)       n_p++;

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
    logic d, e_alui, e_acc, e_reg, e_p;
    logic [5:1] x;
    for (int v = 0; v < (1 << (5 + 1)); v++) begin
      {d, x} = (5 + 1)'(v);
      deco = d; xi = x;
      #1;
      e_alui = d & (x[2]|x[3]|x[4]); e_acc = d & x[3]; e_reg = d & x[1]; e_p = d & x[5];
      check({alui, acc_clk, reg_clk, p} == {e_alui, e_acc, e_reg, e_p},
            $sformatf("deco=%b xi=%b got %b%b%b%b", d, x, alui, acc_clk, reg_clk, p));
    end
    // pulse train: xi_k rises at 3k, falls at 3k+4
    for (int line = 0; line < 2; line++) begin
      xi = '0; deco = 1'(line);
      #10;
      n_alui = 0; n_acc = 0; n_reg = 0; n_p = 0; n_acc_sel = 0;
      for (int t = 0; t < 3 * 5 + 6; t++) begin
        for (int k = 1; k <= 5; k++) xi[k] = (t >= 3 * k) && (t < 3 * k + 4);
        #1;
      end
      check(n_reg == ((line == 1 && 3 != 1) ? 1 : 0), $sformatf("register pulses %0d", n_reg));
      check(n_alui == ((line == 1 && 3 != 2) ? 1 : 0), $sformatf("select pulses %0d", n_alui));
      check(n_acc == ((line == 1 && 3 != 2) ? 1 : 0), $sformatf("accumulator pulses %0d", n_acc));
      check(n_acc_sel == n_acc, "select high at the accumulator edge");
      check(n_p == line, $sformatf("done pulses %0d", n_p));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
