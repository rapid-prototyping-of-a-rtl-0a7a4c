`timescale 1ns / 1ps
// Self-checking test of the ALU data path. The testbench plays the part of
// the asynchronous control: for each random instruction it pulses the
// instruction's register clock (if any), raises the instruction's
// multiplexer line, pulses the accumulator clock and drops the line again,
// in the order the operation controls use. The accumulator and the output
// port are compared with the reference model after every instruction.
module tb_st_alu;
  import st_alu_pkg::*;
  import alu_ref_pkg::*;
  int checks = 0;
  int failures = 0;
  logic rst, acc_clk;
  word_t din, acc, port_out, x_reg, y_reg;
  logic [N_MUX-1:0] mux_sel;
  op_clks_t clks;
  word_t model, port_model;
  localparam int LINE [16] = '{0, 2, 1, 3, 4, 5, 6, 9, 8, 7, 10, 11, 12, 0, 14, 13};

  st_alu dut (.rst(rst), .din(din), .mux_sel(mux_sel), .clks(clks), .acc_clk(acc_clk),
              .acc(acc), .port_out(port_out), .x_reg(x_reg), .y_reg(y_reg));

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic reg_pulse(int code);
    case (code)
      3: clks.rotd_clk = 1'b1;  4: clks.roti_clk = 1'b1; 6: clks.desd_clk = 1'b1;
      7: clks.x_clk = 1'b1;     9: clks.comp_clk = 1'b1; 10: clks.y_clk = 1'b1;
      13: clks.ps_clk = 1'b1;   15: clks.regbyc_clk = 1'b1;
      default: ;
    endcase
    #2 clks = '0; #1;
  endtask

  task automatic run(int code);
    reg_pulse(code);
    if (code != 13) begin
      mux_sel = N_MUX'(1) << LINE[code];
      #2 acc_clk = 1'b1;
      #2 acc_clk = 1'b0;
      #2 mux_sel = N_MUX'(1);
      #1;
    end
  endtask

  initial begin
    #1000000 failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1'b0; acc_clk = 1'b0; clks = '0; mux_sel = N_MUX'(1); din = '0;
    #1 rst = 1'b1;
    #3 rst = 1'b0; #1;
    model = '0; port_model = '0;
    check(acc == 0 && port_out == 0, "reset");
    for (int i = 0; i < 600; i++) begin
      int code;
      code = (i < 15) ? i + 1 : 1 + int'($urandom % 15);
      din = word_t'($urandom);
      if (code == 9 && i % 3 == 0) din = model;
      run(code);
      if (code == 13) port_model = model;
      model = ref_acc(sel_e'(code), model, din);
      check(acc == model, $sformatf("instr %0d code %0d acc=%h expected %h", i, code, acc, model));
      check(port_out == port_model, $sformatf("instr %0d port=%h expected %h", i, port_out, port_model));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
