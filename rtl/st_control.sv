`timescale 1ns / 1ps
// One control block of the four-phase self-timed pipeline.
//
// The block is a Muller C-element with one inverted input and a reset:
// its output xi copies req_in whenever req_in and ack_in differ, and holds
// otherwise. A rising request with no pending acknowledge raises xi; xi
// falls once the request has returned to zero and the next block has
// acknowledged. xi is at once the request to the next block, the
// acknowledge to the previous one and the activation pulse (latch enable)
// of its stage.
//
// The C-element is written as a level-sensitive latch, which is what it is;
// the latch warnings the tools give for it are intended. In a pipeline its
// output feeds back to its own inputs through the neighbouring blocks and
// the delay lines, so a linter that ignores the delays reports a circular
// combinational path there; that loop is the handshake itself and is
// intended too. rst clears the block asynchronously.
module st_control (
  input  logic rst,
  input  logic req_in,   // request from the previous block (after its delay)
  input  logic ack_in,   // acknowledge from the next block (after its delay)
  output logic xi        // state: request out, acknowledge out, activation pulse
);
  always_latch begin
    if (rst)
      xi = 1'b0;
    else if (req_in != ack_in)
      xi = req_in;
  end
endmodule
