`timescale 1ns / 1ps
// Pulse merge: combines the pulses of the operation controls into one line.
//
// Only the control of the selected instruction emits pulses, so an OR of all
// inputs passes them through unchanged. Two instances are used: the "test"
// merge gives the total-test line (one pulse per executed instruction), the
// "acc" merge gives the accumulator clock. Combinational, N inputs.
module pulse_merge #(
  parameter int unsigned N = 15
) (
  input  logic [N-1:0] pulses,
  output logic         merged
);
  assign merged = |pulses;
endmodule
