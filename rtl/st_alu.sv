`timescale 1ns / 1ps
// ALU data path: operation block, result multiplexer and accumulator, with
// the accumulator fed back as the first operand.
//
// The data path has no clock of its own. The asynchronous control supplies
// the one-hot multiplexer selects (mux_sel, I0..I14), the register pulses
// of the instructions that own a register (clks) and the accumulator pulse
// (acc_clk). An instruction's select must be stable around the rising edge
// of acc_clk, which the operation controls ensure. din must be held stable
// from the request until the instruction's pulse train has ended.
module st_alu
  import st_alu_pkg::*;
(
  input  logic             rst,
  input  word_t            din,
  input  logic [N_MUX-1:0] mux_sel,
  input  op_clks_t         clks,
  input  logic             acc_clk,
  output word_t            acc,
  output word_t            port_out,
  output word_t            x_reg,
  output word_t            y_reg
);
  word_t [N_MUX-1:0] chan;
  word_t             result;

  alu_operations u_ops (
    .rst     (rst),
    .acc     (acc),
    .din     (din),
    .clks    (clks),
    .chan    (chan),
    .port_out(port_out),
    .x_reg   (x_reg),
    .y_reg   (y_reg)
  );

  result_mux u_mux (
    .sel (mux_sel),
    .chan(chan),
    .y   (result)
  );

  accumulator u_acc (
    .rst    (rst),
    .acc_clk(acc_clk),
    .d      (result),
    .q      (acc)
  );
endmodule
