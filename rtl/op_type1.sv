`timescale 1ns / 1ps
// Operation control of type 1: four activation pulses (xi1..xi4).
//
// Used by the instructions whose result is purely combinational. While the
// decoder line is active:
//   alui    = xi1 | xi2 | xi3  selects the instruction's multiplexer line,
//   acc_clk = xi2              loads the accumulator (rising edge),
//   p       = xi4              reports one executed instruction.
// The select is raised one pulse before the accumulator edge and released
// one pulse after it, so the multiplexer output is stable at the edge.
// The wiring (which pulse feeds which output) follows the published
// schematic of this block; the gate functions (OR to merge pulses, AND to
// gate with the decoder line) are this design's reading of it.
module op_type1 (
  input  logic       deco,
  input  logic [4:1] xi,
  output logic       alui,
  output logic       acc_clk,
  output logic       p
);
  logic merged;  // comp_0: merged select pulses

  assign merged  = xi[1] | xi[2] | xi[3];
  assign alui    = merged & deco;   // comp_1
  assign acc_clk = xi[2]  & deco;   // comp_2
  assign p       = xi[4]  & deco;   // comp_3
endmodule
