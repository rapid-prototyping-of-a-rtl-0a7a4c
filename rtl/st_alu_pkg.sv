`timescale 1ns / 1ps
// Shared types and constants of the self-timed (ST) ALU.
//
// The ALU works on 16-bit words and knows 15 instructions. Each instruction
// has a 5-bit selection code (1..15), a one-hot decoder line (deco bit
// code-1), a line of the result multiplexer (I1..I14, none for the output
// port instruction) and an operation type 1..4, which fixes how many
// activation pulses of the ST pipeline it consumes (4, 2, 5 or 9).
// The selection codes and multiplexer lines are those of the instruction
// table of the design; the instruction-to-type mapping is this design's
// reading of which instructions own an operation register (types 2, 3, 4)
// and which are purely combinational (type 1).
package st_alu_pkg;

  localparam int unsigned WIDTH    = 16;  // data path width
  localparam int unsigned N_INSTR  = 15;  // instructions, decoder lines
  localparam int unsigned N_MUX    = 15;  // multiplexer channels I0..I14
  localparam int unsigned N_XI     = 9;   // activation pulses of the longest type

  typedef logic [WIDTH-1:0] word_t;

  // 5-bit selection codes
  typedef enum logic [4:0] {
    SEL_NONE    = 5'd0,
    SEL_LDA     = 5'd1,   // ACC <- input
    SEL_ADD     = 5'd2,   // ACC <- ACC + input
    SEL_ROT_D   = 5'd3,   // ACC <- ACC rotated right by one
    SEL_ROT_I   = 5'd4,   // ACC <- ACC rotated left by one
    SEL_COMPL   = 5'd5,   // ACC <- ~ACC
    SEL_DES_D   = 5'd6,   // ACC <- ACC shifted right by one (logical)
    SEL_LDA_X   = 5'd7,   // X <- input, ACC <- X
    SEL_INC_A   = 5'd8,   // ACC <- ACC + 1
    SEL_COMP    = 5'd9,   // ACC <- compare flags of ACC against input
    SEL_LDA_Y   = 5'd10,  // Y <- input, ACC <- Y
    SEL_AND     = 5'd11,  // ACC <- ACC & input
    SEL_OR      = 5'd12,  // ACC <- ACC | input
    SEL_PTO_SAL = 5'd13,  // output port <- ACC
    SEL_RESTA   = 5'd14,  // ACC <- ACC - input
    SEL_MUL     = 5'd15   // ACC <- low half of ACC * input
  } sel_e;

  // Multiplexer lines. I0 carries the accumulator itself and is active
  // whenever no instruction drives a line.
  typedef enum logic [3:0] {
    I0_HOLD  = 4'd0,
    I1_ADD   = 4'd1,
    I2_LDA   = 4'd2,
    I3_ROT_D = 4'd3,
    I4_ROT_I = 4'd4,
    I5_COMPL = 4'd5,
    I6_DES_D = 4'd6,
    I7_COMP  = 4'd7,
    I8_INC   = 4'd8,
    I9_LDA_X = 4'd9,
    I10_LDA_Y = 4'd10,
    I11_AND  = 4'd11,
    I12_OR   = 4'd12,
    I13_MUL  = 4'd13,
    I14_RESTA = 4'd14
  } mux_line_e;

  typedef enum logic [1:0] {
    OP_TYPE1 = 2'd0,   // 4 pulses: select, accumulate, count
    OP_TYPE2 = 2'd1,   // 2 pulses: register, count
    OP_TYPE3 = 2'd2,   // 5 pulses: register, select, accumulate, count
    OP_TYPE4 = 2'd3    // 9 pulses: operand registers, select, accumulate, count
  } op_type_e;

  // Register clocks of the instructions that own an operation register.
  typedef struct packed {
    logic rotd_clk;    // ROT_D result register
    logic roti_clk;    // ROT_I result register
    logic desd_clk;    // DES_D result register
    logic x_clk;       // X register (LDA,X)
    logic comp_clk;    // compare flag register (COMP)
    logic y_clk;       // Y register (LDA,Y)
    logic ps_clk;      // output port register (PTO_SAL)
    logic regbyc_clk;  // multiplier operand registers B and C (MUL)
  } op_clks_t;

  // Compare flags written by COMP (bit positions of the result word).
  localparam int unsigned CMP_LT = 0;  // ACC <  input (unsigned)
  localparam int unsigned CMP_EQ = 1;  // ACC == input
  localparam int unsigned CMP_GT = 2;  // ACC >  input (unsigned)

  // Operation type of the instruction on decoder line idx (selection code idx+1).
  function automatic op_type_e op_type_of(int unsigned idx);
    case (sel_e'(5'(idx + 1)))
      SEL_ROT_D, SEL_ROT_I, SEL_DES_D, SEL_LDA_X, SEL_COMP, SEL_LDA_Y: return OP_TYPE3;
      SEL_PTO_SAL: return OP_TYPE2;
      SEL_MUL:     return OP_TYPE4;
      default:     return OP_TYPE1;
    endcase
  endfunction

  // Activation pulses an operation type needs.
  function automatic int unsigned pulses_of(op_type_e t);
    case (t)
      OP_TYPE1: return 4;
      OP_TYPE2: return 2;
      OP_TYPE3: return 5;
      default:  return 9;
    endcase
  endfunction

  // Multiplexer line driven by the instruction on decoder line idx.
  // PTO_SAL drives none and reports I0_HOLD.
  function automatic mux_line_e mux_line_of(int unsigned idx);
    case (sel_e'(5'(idx + 1)))
      SEL_LDA:   return I2_LDA;
      SEL_ADD:   return I1_ADD;
      SEL_ROT_D: return I3_ROT_D;
      SEL_ROT_I: return I4_ROT_I;
      SEL_COMPL: return I5_COMPL;
      SEL_DES_D: return I6_DES_D;
      SEL_LDA_X: return I9_LDA_X;
      SEL_INC_A: return I8_INC;
      SEL_COMP:  return I7_COMP;
      SEL_LDA_Y: return I10_LDA_Y;
      SEL_AND:   return I11_AND;
      SEL_OR:    return I12_OR;
      SEL_RESTA: return I14_RESTA;
      SEL_MUL:   return I13_MUL;
      default:   return I0_HOLD;
    endcase
  endfunction

endpackage
