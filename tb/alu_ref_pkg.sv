`timescale 1ns / 1ps
// Reference model of the ALU instructions, for the testbenches.
// Written bit by bit and with loops (shift-and-add multiplication, rotation
// by index arithmetic) so that it does not share expressions with the RTL.
package alu_ref_pkg;
  import st_alu_pkg::*;

  // New accumulator value after instruction op (PTO_SAL leaves it unchanged).
  function automatic word_t ref_acc(sel_e op, word_t acc, word_t din);
    word_t r;
    r = acc;
    case (op)
      SEL_LDA, SEL_LDA_X, SEL_LDA_Y: r = din;
      SEL_ADD:   r = word_t'(int'(acc) + int'(din));
      SEL_RESTA: r = word_t'(int'(acc) - int'(din));
      SEL_INC_A: r = word_t'(int'(acc) + 1);
      SEL_COMPL: for (int i = 0; i < WIDTH; i++) r[i] = !acc[i];
      SEL_AND:   for (int i = 0; i < WIDTH; i++) r[i] = acc[i] && din[i];
      SEL_OR:    for (int i = 0; i < WIDTH; i++) r[i] = acc[i] || din[i];
      SEL_ROT_D: for (int i = 0; i < WIDTH; i++) r[i] = acc[(i + 1) % WIDTH];
      SEL_ROT_I: for (int i = 0; i < WIDTH; i++) r[i] = acc[(i + WIDTH - 1) % WIDTH];
      SEL_DES_D: begin
        for (int i = 0; i < WIDTH - 1; i++) r[i] = acc[i + 1];
        r[WIDTH-1] = 1'b0;
      end
      SEL_COMP: begin
        r = '0;
        if (int'(acc) < int'(din)) r[0] = 1'b1;
        else if (int'(acc) == int'(din)) r[1] = 1'b1;
        else r[2] = 1'b1;
      end
      SEL_MUL: begin
        r = '0;
        for (int i = 0; i < WIDTH; i++)
          if (din[i]) r = word_t'(int'(r) + (int'(acc) << i));
      end
      default: r = acc;
    endcase
    return r;
  endfunction

  // Number of activation pulses the instruction uses, and the pulse
  // (1-based) on which its done pulse comes.
  function automatic int ref_pulses(sel_e op);
    case (op)
      SEL_PTO_SAL: return 2;
      SEL_MUL:     return 9;
      SEL_ROT_D, SEL_ROT_I, SEL_DES_D, SEL_LDA_X, SEL_COMP, SEL_LDA_Y: return 5;
      default:     return 4;
    endcase
  endfunction
endpackage
