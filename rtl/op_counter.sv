`timescale 1ns / 1ps
// Operations counter: counts the pulses of the total-test line, that is the
// instructions executed since reset.
//
// The count advances on each rising edge of tot_test and wraps at 2**WIDTH.
// rst clears it asynchronously. The width is this design's choice.
module op_counter #(
  parameter int unsigned WIDTH = 16
) (
  input  logic             rst,
  input  logic             tot_test,
  output logic [WIDTH-1:0] count
);
  always_ff @(posedge tot_test or posedge rst) begin
    if (rst) count <= '0;
    else     count <= count + 1'b1;
  end
endmodule
