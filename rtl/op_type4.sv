`timescale 1ns / 1ps
// Operation control of type 4: nine activation pulses (xi1..xi9).
//
// Used by the multiplication. While the decoder line is active:
//   reg_clk = xi1          loads the operand registers B and C,
//   alui    = | xi2..xi9   selects the product on the multiplexer,
//   acc_clk = xi8          loads the accumulator,
//   p       = xi9          reports one executed instruction.
// The six pulses between the operand load and the accumulator edge give the
// combinational multiplier its time. The wiring follows the published
// schematic of this block; the gate functions (OR to merge, AND to gate with
// the decoder line) are this design's reading of it.
module op_type4 (
  input  logic       deco,
  input  logic [9:1] xi,
  output logic       reg_clk,
  output logic       alui,
  output logic       acc_clk,
  output logic       p
);
  logic merged;  // comp_0

  assign merged  = |xi[9:2];
  assign alui    = merged & deco;   // comp_1
  assign reg_clk = xi[1]  & deco;   // comp_2
  assign acc_clk = xi[8]  & deco;   // comp_3
  assign p       = xi[9]  & deco;   // comp_4
endmodule
