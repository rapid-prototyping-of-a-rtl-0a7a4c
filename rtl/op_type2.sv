`timescale 1ns / 1ps
// Operation control of type 2: two activation pulses (xi1, xi2).
//
// Used by the instruction that only loads a register and does not touch the
// accumulator (the output port). While the decoder line is active:
//   reg_clk = xi1  loads the instruction's register (rising edge),
//   p       = xi2  reports one executed instruction.
// The two outputs and the two pulses are those of the published block; the
// order (register first, count second) is this design's choice.
module op_type2 (
  input  logic       deco,
  input  logic [2:1] xi,
  output logic       reg_clk,
  output logic       p
);
  assign reg_clk = xi[1] & deco;
  assign p       = xi[2] & deco;
endmodule
