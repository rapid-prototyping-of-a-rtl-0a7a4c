`timescale 1ns / 1ps
// Accumulator: the 16-bit register that holds the ALU's result and feeds it
// back as the first operand of every operation.
//
// It loads d on the rising edge of acc_clk, the merged accumulator pulse of
// the asynchronous control; there is no free-running clock. rst clears it
// asynchronously (reset value 0 is this design's choice).
module accumulator
  import st_alu_pkg::*;
(
  input  logic  rst,
  input  logic  acc_clk,
  input  word_t d,
  output word_t q
);
  always_ff @(posedge acc_clk or posedge rst) begin
    if (rst) q <= '0;
    else     q <= d;
  end
endmodule
