`timescale 1ns / 1ps
// Behavioural model of one delay macro: a single FPGA look-up table used as
// a buffer, placed and routed by hand so that its delay is fixed.
//
// Inside a chain only the look-up table and the route to the next macro are
// traversed; the input and output pad delays that appear when a single macro
// is measured from pin to pin belong to the test fixture, not to the macro.
// The model therefore delays its input by LUT_NS + ROUTE_NS.
// LUT_NS is the look-up table delay of the target device. ROUTE_NS is chosen
// so that one macro takes 1.01 ns, which makes a forward link of three macros
// equal to the 3.03 ns measured between the two controls of a two-element
// pipeline. Real routes vary from macro to macro; this model does not.
//
// Interface: s_in -> s_out, inertial delay (pulses shorter than the delay
// are swallowed, as a real gate would). Not synthesizable as a delay: a
// synthesis tool reduces it to a wire, and a real implementation must keep
// the look-up table by placement constraints.
module delay_macro #(
  parameter real LUT_NS   = 0.439,  // look-up table delay
  parameter real ROUTE_NS = 0.571   // route to the next element
) (
  input  logic s_in,
  output logic s_out
);
  assign #(LUT_NS + ROUTE_NS) s_out = s_in;
endmodule
