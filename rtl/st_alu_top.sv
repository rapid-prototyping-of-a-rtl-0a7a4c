`timescale 1ns / 1ps
// Self-timed ALU, complete: instruction decoder, asynchronous control,
// four-phase ST pipeline, ALU data path and operations counter.
//
// There is no clock. An instruction runs on one four-phase handshake:
//   1. set sel (5-bit selection code) and din, wait until busy is low,
//   2. raise req, wait for ack high, lower req, wait for ack low,
//   3. the pipeline emits as many pulses as the instruction's type needs
//      (4, 2, 5 or 9; a single pulse for an unused code), and the operation
//      control of the selected instruction turns them into register loads,
//      a multiplexer select and an accumulator load,
//   4. tot_test pulses once when the instruction is done and op_count
//      advances; busy falls when the whole pulse train has passed.
// sel and din must stay stable until busy falls. Between requests nothing
// toggles, so the circuit draws no dynamic power.
// Timing (default macro delay 1.01 ns, 3 macros forward, 1 back): pulse k
// rises (k-1)*3.03 ns after req and lasts 4.04 ns; the accumulator loads at
// pulse 2 (type 1), 3 (type 3) or 8 (type 4); the done pulse comes at pulse
// 4, 2, 5 or 9; busy falls (pulses*3.03 + 1.01) ns after req, i.e. after
// 13.13, 7.07, 16.16 or 28.28 ns for types 1..4.
// rst is asynchronous and acts on its rising edge in the registers: drive
// it low, then high for at least 10 ns, then low, before the first request.
// The four blocks and their connections follow the published design; the
// busy output, the train length that follows the instruction type and the
// operand and flag conventions are this design's own.
module st_alu_top
  import st_alu_pkg::*;
#(
  parameter int unsigned FWD_MACROS  = 3,      // delay macros between controls
  parameter int unsigned BACK_MACROS = 1,      // delay macros in the feedback
  parameter real         LUT_NS      = 0.439,  // look-up table delay of a macro
  parameter real         ROUTE_NS    = 0.571   // route delay of a macro
) (
  input  logic         rst,
  input  logic         req,
  output logic         ack,
  output logic         busy,
  input  logic [4:0]   sel,
  input  word_t        din,
  output word_t        acc,
  output word_t        port_out,
  output word_t        x_reg,     // register of LDA,X
  output word_t        y_reg,     // register of LDA,Y
  output logic         tot_test,
  output logic [15:0]  op_count
);
  logic [N_INSTR-1:0] deco;
  logic [N_XI:1]      xi;
  logic [N_MUX-1:0]   mux_sel;
  op_clks_t           clks;
  logic               acc_clk;
  logic [3:0]         n_pulses;

  instr_decoder u_dec (.sel(sel), .deco(deco));

  st_pipeline #(
    .N_STAGES   (N_XI),
    .FWD_MACROS (FWD_MACROS),
    .BACK_MACROS(BACK_MACROS),
    .LUT_NS     (LUT_NS),
    .ROUTE_NS   (ROUTE_NS)
  ) u_pipe (
    .rst (rst),
    .req (req),
    .ack (ack),
    .n_pulses(n_pulses),
    .xi  (xi),
    .busy(busy)
  );

  async_control u_ctrl (
    .deco    (deco),
    .xi      (xi),
    .mux_sel (mux_sel),
    .clks    (clks),
    .acc_clk (acc_clk),
    .tot_test(tot_test),
    .n_pulses(n_pulses)
  );

  st_alu u_alu (
    .rst     (rst),
    .din     (din),
    .mux_sel (mux_sel),
    .clks    (clks),
    .acc_clk (acc_clk),
    .acc     (acc),
    .port_out(port_out),
    .x_reg   (x_reg),
    .y_reg   (y_reg)
  );

  op_counter #(.WIDTH(16)) u_cnt (.rst(rst), .tot_test(tot_test), .count(op_count));
endmodule
