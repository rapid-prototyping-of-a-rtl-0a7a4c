`timescale 1ns / 1ps
// Self-checking test of the ALU operation block: random accumulator and
// input values; the combinational channels are compared directly with the
// reference model, the registered channels after a pulse on their register
// clock (and they must hold when acc and din change afterwards). Also the
// output port register and reset.
module tb_alu_operations;
  import st_alu_pkg::*;
  import alu_ref_pkg::*;
  int checks = 0;
  int failures = 0;
  logic rst;
  word_t acc, din, port_out, x_reg, y_reg;
  op_clks_t clks;
  word_t [N_MUX-1:0] chan;

  alu_operations dut (.rst(rst), .acc(acc), .din(din), .clks(clks), .chan(chan),
                      .port_out(port_out), .x_reg(x_reg), .y_reg(y_reg));

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #1000000 failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic pulse_all();
    clks = '1; #1; clks = '0; #1;
  endtask

  initial begin
    word_t a0, d0;
    rst = 1'b0; clks = '0; acc = 16'h1234; din = 16'h5678; #1 rst = 1'b1; #2;
    check(port_out == 0 && x_reg == 0 && y_reg == 0 && chan[I13_MUL] == 0, "registers reset");
    rst = 1'b0; #1;
    for (int i = 0; i < 300; i++) begin
      a0 = word_t'($urandom); d0 = word_t'($urandom);
      if (i % 10 == 1) d0 = a0;            // equal compare
      if (i % 10 == 2) d0 = 16'hFFFF;
      acc = a0; din = d0; #1;
      check(chan[I0_HOLD]   == a0, "I0");
      check(chan[I1_ADD]    == ref_acc(SEL_ADD,   a0, d0), $sformatf("ADD %h %h", a0, d0));
      check(chan[I2_LDA]    == ref_acc(SEL_LDA,   a0, d0), "LDA");
      check(chan[I5_COMPL]  == ref_acc(SEL_COMPL, a0, d0), "COMPL");
      check(chan[I8_INC]    == ref_acc(SEL_INC_A, a0, d0), "INC");
      check(chan[I11_AND]   == ref_acc(SEL_AND,   a0, d0), "AND");
      check(chan[I12_OR]    == ref_acc(SEL_OR,    a0, d0), "OR");
      check(chan[I14_RESTA] == ref_acc(SEL_RESTA, a0, d0), $sformatf("RESTA %h %h", a0, d0));
      pulse_all();
      acc = ~a0; din = ~d0; #1;   // registered channels must hold
      check(chan[I3_ROT_D]  == ref_acc(SEL_ROT_D, a0, d0), $sformatf("ROT_D %h -> %h", a0, chan[I3_ROT_D]));
      check(chan[I4_ROT_I]  == ref_acc(SEL_ROT_I, a0, d0), "ROT_I");
      check(chan[I6_DES_D]  == ref_acc(SEL_DES_D, a0, d0), "DES_D");
      check(chan[I7_COMP]   == ref_acc(SEL_COMP,  a0, d0), $sformatf("COMP %h %h -> %h", a0, d0, chan[I7_COMP]));
      check(chan[I9_LDA_X]  == d0 && x_reg == d0, "LDA,X");
      check(chan[I10_LDA_Y] == d0 && y_reg == d0, "LDA,Y");
      check(chan[I13_MUL]   == ref_acc(SEL_MUL,   a0, d0), $sformatf("MUL %h %h -> %h", a0, d0, chan[I13_MUL]));
      check(port_out == a0, "PTO_SAL");
    end
    // each register clock loads only its own register
    acc = 16'h8001; din = 16'h00F0; #1;
    clks = '0; clks.x_clk = 1'b1; #1; clks = '0; #1;
    check(x_reg == 16'h00F0 && chan[I3_ROT_D] != ref_acc(SEL_ROT_D, 16'h8001, 0), "x_clk loads X only");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
