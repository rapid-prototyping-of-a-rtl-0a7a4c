`timescale 1ns / 1ps
// Operation block of the ALU: computes every instruction's result from the
// accumulator (acc) and the external 16-bit input (din), and presents the
// results on the multiplexer channels I0..I14.
//
// Combinational channels (type 1 instructions):
//   I1 ADD acc+din, I2 LDA din, I5 COMPL ~acc, I8 INC acc+1,
//   I11 AND acc&din, I12 OR acc|din, I14 RESTA acc-din  (all modulo 2**16).
// Registered channels, each loaded on the rising edge of its own pulse from
// the asynchronous control (types 3 and 4):
//   I3 ROT_D  acc rotated right by one     (rotd_clk)
//   I4 ROT_I  acc rotated left by one      (roti_clk)
//   I6 DES_D  acc shifted right by one, 0 in at the top   (desd_clk)
//   I7 COMP   flags {GT, EQ, LT} of acc against din, unsigned (comp_clk)
//   I9 LDA,X  register X loaded with din   (x_clk)
//   I10 LDA,Y register Y loaded with din   (y_clk)
//   I13 MUL   low 16 bits of B*C, where B and C capture acc and din (regbyc_clk)
// I0 carries acc itself. The output port register (PTO_SAL) loads acc on
// ps_clk and drives port_out; it has no multiplexer channel.
// The instruction names, channels and which instructions own a register
// follow the instruction table of the design; the exact meaning of COMPL,
// COMP, LDA,X and LDA,Y and the flag encoding are this design's choice.
// All registers clear asynchronously on rst.
module alu_operations
  import st_alu_pkg::*;
(
  input  logic              rst,
  input  word_t             acc,
  input  word_t             din,
  input  op_clks_t          clks,
  output word_t [N_MUX-1:0] chan,
  output word_t             port_out,
  output word_t             x_reg,
  output word_t             y_reg
);
  word_t rotd_reg, roti_reg, desd_reg, comp_reg, b_reg, c_reg;
  word_t product;

  always_ff @(posedge clks.rotd_clk or posedge rst)
    if (rst) rotd_reg <= '0;
    else     rotd_reg <= {acc[0], acc[WIDTH-1:1]};

  always_ff @(posedge clks.roti_clk or posedge rst)
    if (rst) roti_reg <= '0;
    else     roti_reg <= {acc[WIDTH-2:0], acc[WIDTH-1]};

  always_ff @(posedge clks.desd_clk or posedge rst)
    if (rst) desd_reg <= '0;
    else     desd_reg <= {1'b0, acc[WIDTH-1:1]};

  always_ff @(posedge clks.comp_clk or posedge rst)
    if (rst) comp_reg <= '0;
    else begin
      comp_reg         <= '0;
      comp_reg[CMP_LT] <= acc <  din;
      comp_reg[CMP_EQ] <= acc == din;
      comp_reg[CMP_GT] <= acc >  din;
    end

  always_ff @(posedge clks.x_clk or posedge rst)
    if (rst) x_reg <= '0;
    else     x_reg <= din;

  always_ff @(posedge clks.y_clk or posedge rst)
    if (rst) y_reg <= '0;
    else     y_reg <= din;

  always_ff @(posedge clks.ps_clk or posedge rst)
    if (rst) port_out <= '0;
    else     port_out <= acc;

  always_ff @(posedge clks.regbyc_clk or posedge rst)
    if (rst) begin
      b_reg <= '0;
      c_reg <= '0;
    end else begin
      b_reg <= acc;
      c_reg <= din;
    end

  assign product = b_reg * c_reg;  // low half of the 32-bit product

  always_comb begin
    chan            = '0;
    chan[I0_HOLD]   = acc;
    chan[I1_ADD]    = acc + din;
    chan[I2_LDA]    = din;
    chan[I3_ROT_D]  = rotd_reg;
    chan[I4_ROT_I]  = roti_reg;
    chan[I5_COMPL]  = ~acc;
    chan[I6_DES_D]  = desd_reg;
    chan[I7_COMP]   = comp_reg;
    chan[I8_INC]    = acc + 1'b1;
    chan[I9_LDA_X]  = x_reg;
    chan[I10_LDA_Y] = y_reg;
    chan[I11_AND]   = acc & din;
    chan[I12_OR]    = acc | din;
    chan[I13_MUL]   = product;
    chan[I14_RESTA] = acc - din;
  end
endmodule
