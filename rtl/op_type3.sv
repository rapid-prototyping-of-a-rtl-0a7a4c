`timescale 1ns / 1ps
// Operation control of type 3: five activation pulses (xi1..xi5).
//
// Used by the instructions that first capture their result in a register of
// their own, then pass it through the multiplexer to the accumulator. While
// the decoder line is active:
//   reg_clk = xi1              loads the instruction's register,
//   alui    = xi2 | xi3 | xi4  selects the instruction's multiplexer line,
//   acc_clk = xi3              loads the accumulator,
//   p       = xi5              reports one executed instruction.
// The outputs and the five pulses follow the published block; which pulse
// drives which output is this design's choice, patterned on the type 1 and
// type 4 blocks (register first, select around the accumulator edge, count
// last).
module op_type3 (
  input  logic       deco,
  input  logic [5:1] xi,
  output logic       reg_clk,
  output logic       alui,
  output logic       acc_clk,
  output logic       p
);
  logic merged;

  assign merged  = xi[2] | xi[3] | xi[4];
  assign reg_clk = xi[1] & deco;
  assign alui    = merged & deco;
  assign acc_clk = xi[3] & deco;
  assign p       = xi[5] & deco;
endmodule
