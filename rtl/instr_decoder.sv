`timescale 1ns / 1ps
// Instruction decoder: turns the 5-bit selection code into one of 15
// one-hot decoder lines.
//
// Line deco[k] (k = 0..14) is active for selection code k+1, so the lines
// read as the hexadecimal values 0001, 0002, ..., 4000 of the instruction
// table. Code 0 and codes 16..31 activate no line, and no operation then
// runs. Purely combinational; the code must be stable before a request is
// sent to the pipeline and until the pulse train has ended.
module instr_decoder
  import st_alu_pkg::*;
(
  input  logic [4:0]         sel,
  output logic [N_INSTR-1:0] deco
);
  always_comb begin
    deco = '0;
    for (int k = 0; k < N_INSTR; k++)
      if (sel == 5'(k + 1)) deco[k] = 1'b1;
  end
endmodule
