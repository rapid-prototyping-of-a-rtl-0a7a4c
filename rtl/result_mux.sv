`timescale 1ns / 1ps
// Result multiplexer: 15 channels of 16 bits, selected one-hot by the lines
// I0..I14.
//
// Written as an AND-OR tree: each channel is gated by its select line and
// the gated channels are ORed. With exactly one line active this is a plain
// multiplexer; the asynchronous control guarantees that (I0 is active
// whenever no other line is). Combinational.
module result_mux
  import st_alu_pkg::*;
(
  input  logic [N_MUX-1:0]  sel,
  input  word_t [N_MUX-1:0] chan,
  output word_t             y
);
  always_comb begin
    y = '0;
    for (int k = 0; k < N_MUX; k++)
      y |= chan[k] & {WIDTH{sel[k]}};
  end
endmodule
