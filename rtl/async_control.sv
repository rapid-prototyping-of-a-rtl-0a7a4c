`timescale 1ns / 1ps
// Asynchronous control: turns the pulse train of the ST pipeline into the
// selects and register pulses of the instruction chosen by the decoder.
//
// There is one operation control per decoder line. Its type (1..4) depends
// on the instruction (see st_alu_pkg::op_type_of) and fixes which of the
// pulses xi1..xi9 it uses; every control is gated by its decoder line, so
// only the selected instruction reacts. The outputs are:
//   mux_sel  one-hot lines I0..I14; each instruction drives its own line,
//            I0 (hold the accumulator) is active when no other line is,
//   clks     register pulses of the instructions that own a register,
//   acc_clk  the "acc" merge of the accumulator pulses,
//   tot_test the "test" merge of the instruction-done pulses,
//   n_pulses the number of pulses the selected instruction needs (4, 2, 5
//            or 9 by type; 1 when no instruction is selected), which sets
//            the length of the pipeline's pulse train.
// Purely combinational; all timing comes from the pipeline pulses.
module async_control
  import st_alu_pkg::*;
(
  input  logic [N_INSTR-1:0] deco,
  input  logic [N_XI:1]      xi,
  output logic [N_MUX-1:0]   mux_sel,
  output op_clks_t           clks,
  output logic               acc_clk,
  output logic               tot_test,
  output logic [3:0]         n_pulses
);
  logic [N_INSTR-1:0] alui, accp, regp, p;

  for (genvar i = 0; i < N_INSTR; i++) begin : g_op
    localparam op_type_e T = op_type_of(i);
    if (T == OP_TYPE1) begin : g_t1
      op_type1 u_op (.deco(deco[i]), .xi(xi[4:1]), .alui(alui[i]), .acc_clk(accp[i]), .p(p[i]));
      assign regp[i] = 1'b0;
    end else if (T == OP_TYPE2) begin : g_t2
      op_type2 u_op (.deco(deco[i]), .xi(xi[2:1]), .reg_clk(regp[i]), .p(p[i]));
      assign alui[i] = 1'b0;
      assign accp[i] = 1'b0;
    end else if (T == OP_TYPE3) begin : g_t3
      op_type3 u_op (.deco(deco[i]), .xi(xi[5:1]), .reg_clk(regp[i]), .alui(alui[i]),
                     .acc_clk(accp[i]), .p(p[i]));
    end else begin : g_t4
      op_type4 u_op (.deco(deco[i]), .xi(xi[9:1]), .reg_clk(regp[i]), .alui(alui[i]),
                     .acc_clk(accp[i]), .p(p[i]));
    end
  end

  // multiplexer lines I1..I14 from the instructions that own them
  always_comb begin
    mux_sel = '0;
    for (int i = 0; i < N_INSTR; i++)
      if (mux_line_of(i) != I0_HOLD) mux_sel[mux_line_of(i)] = alui[i];
    mux_sel[I0_HOLD] = ~|mux_sel;
  end

  always_comb begin
    clks            = '0;
    clks.rotd_clk   = regp[SEL_ROT_D   - 1];
    clks.roti_clk   = regp[SEL_ROT_I   - 1];
    clks.desd_clk   = regp[SEL_DES_D   - 1];
    clks.x_clk      = regp[SEL_LDA_X   - 1];
    clks.comp_clk   = regp[SEL_COMP    - 1];
    clks.y_clk      = regp[SEL_LDA_Y   - 1];
    clks.ps_clk     = regp[SEL_PTO_SAL - 1];
    clks.regbyc_clk = regp[SEL_MUL     - 1];
  end

  always_comb begin
    n_pulses = 4'd1;
    for (int i = 0; i < N_INSTR; i++)
      if (deco[i]) n_pulses = 4'(pulses_of(op_type_of(i)));
  end

  pulse_merge #(.N(N_INSTR)) u_acc  (.pulses(accp), .merged(acc_clk));
  pulse_merge #(.N(N_INSTR)) u_test (.pulses(p),    .merged(tot_test));
endmodule
