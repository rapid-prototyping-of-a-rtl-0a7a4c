`timescale 1ns / 1ps
// Behavioural model of a delay made of N_MACROS delay macros in series.
//
// Delays in the self-timed pipeline are tuned by chaining macros: each one
// adds one look-up table level. The total delay is N_MACROS times the delay
// of one macro (fixed routes are assumed, so the growth is linear; measured
// chains grow less regularly because their routes differ).
//
// Interface: d_in -> d_out. N_MACROS must be at least 1.
module delay_line #(
  parameter int unsigned N_MACROS = 3,
  parameter real         LUT_NS   = 0.439,
  parameter real         ROUTE_NS = 0.571
) (
  input  logic d_in,
  output logic d_out
);
  logic [N_MACROS:0] tap;

  assign tap[0] = d_in;

  for (genvar i = 0; i < N_MACROS; i++) begin : g_macro
    delay_macro #(.LUT_NS(LUT_NS), .ROUTE_NS(ROUTE_NS)) u_macro (
      .s_in (tap[i]),
      .s_out(tap[i+1])
    );
  end

  assign d_out = tap[N_MACROS];
endmodule
