`timescale 1ns / 1ps
// Four-phase self-timed control pipeline (micropipeline control chain).
//
// N_STAGES control blocks are joined block by block: the output of block k
// reaches the request input of block k+1 through FWD_MACROS delay macros
// (the computation time between blocks), and the output of block k+1
// returns to the acknowledge input of block k through BACK_MACROS macros
// (the feedback delay). The last block acknowledges itself through
// BACK_MACROS macros. One four-phase handshake on req/ack therefore sends a
// single wave through the chain, and each block emits one pulse xi[k]:
//   xi[k] rises (k-1)*FWD_MACROS macro delays after req rises,
//   each pulse lasts (FWD_MACROS + BACK_MACROS) macro delays,
//   consecutive pulses overlap, so the train is gap-free.
// The number of delay macros used is (N_STAGES-1)*(FWD_MACROS+BACK_MACROS)
// for the links, plus BACK_MACROS for the terminating self-acknowledge.
//
// The train can be cut short: block n_pulses acts as the last block (it
// acknowledges itself and passes no request on), so only xi1..xi[n_pulses]
// pulse and the chain is free again after n_pulses*FWD_MACROS+BACK_MACROS
// macro delays. An instruction that needs fewer pulses thus finishes
// sooner. n_pulses = N_STAGES gives the full chain; 0 acts as 1. n_pulses
// must be stable from the request until busy falls. This length select is
// this design's choice; the chain itself follows the published structure.
//
// Interface (four-phase, return to zero): raise req, wait for ack high,
// lower req, wait for ack low. busy is high while any block is still high,
// that is while the wave is in flight; the chain is ready for a wave that
// must not overlap the previous one once busy is low. busy is this design's
// addition: it lets the user of the pulses wait for the whole train.
// rst clears all blocks asynchronously and must be held longer than the
// largest delay line.
module st_pipeline #(
  parameter int unsigned N_STAGES    = 9,   // control blocks
  parameter int unsigned FWD_MACROS  = 3,   // macros between blocks (forward)
  parameter int unsigned BACK_MACROS = 1,   // macros in the acknowledge path
  parameter real         LUT_NS      = 0.439,
  parameter real         ROUTE_NS    = 0.571
) (
  input  logic                rst,
  input  logic                req,
  output logic                ack,
  input  logic [$clog2(N_STAGES+1)-1:0] n_pulses,  // length of the train
  output logic [N_STAGES:1]   xi,     // activation pulses xi1..xiN
  output logic                busy
);
  logic [N_STAGES:1] req_in;  // request seen by each block
  logic [N_STAGES:1] ack_in;  // acknowledge seen by each block

  assign req_in[1] = req;

  for (genvar k = 1; k <= N_STAGES; k++) begin : g_stage
    st_control u_ctrl (
      .rst   (rst),
      .req_in(req_in[k]),
      .ack_in(ack_in[k]),
      .xi    (xi[k])
    );

    if (k < N_STAGES) begin : g_link
      logic pass;  // this block is not the last of the train
      logic back;  // acknowledge source: next block, or itself when last

      assign pass = 32'(n_pulses) > k;
      assign back = pass ? xi[k+1] : xi[k];

      delay_line #(.N_MACROS(FWD_MACROS), .LUT_NS(LUT_NS), .ROUTE_NS(ROUTE_NS)) u_fwd (
        .d_in (xi[k] & pass),
        .d_out(req_in[k+1])
      );
      delay_line #(.N_MACROS(BACK_MACROS), .LUT_NS(LUT_NS), .ROUTE_NS(ROUTE_NS)) u_back (
        .d_in (back),
        .d_out(ack_in[k])
      );
    end else begin : g_term
      // terminating block: acknowledges its own request
      delay_line #(.N_MACROS(BACK_MACROS), .LUT_NS(LUT_NS), .ROUTE_NS(ROUTE_NS)) u_loop (
        .d_in (xi[k]),
        .d_out(ack_in[k])
      );
    end
  end

  assign ack  = xi[1];
  assign busy = |xi;

endmodule
