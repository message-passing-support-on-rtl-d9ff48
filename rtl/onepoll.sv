// onepoll - OnePoll: one uncached read polls many receive queues at once.
//
// The read address carries a mask naming the queues to poll (bit i of the
// mask = queue i; bits 0..NE-1 are the Express/Tag-On receive queues,
// NE..NE+NB-1 the Basic receive queues). Among the polled, non-empty
// queues the one with the lowest bit number wins: Express queues outrank
// Basic ones and lower-numbered queues outrank higher ones (this priority
// order is this design's choice). The read returns:
//   - the winning Express queue's head entry, which is popped;
//   - for a Basic queue, a notice naming the queue with its producer and
//     consumer pointers (nes_pkg::basic_notice), nothing is popped;
//   - the Empty Express Message when no polled queue holds a message.
// Purely combinational: the caller applies pop_req/pop_q to the Express
// receive block in the same cycle as the read.
module onepoll
  import nes_pkg::*;
#(
  parameter int unsigned NE = NUM_EQ,
  parameter int unsigned NB = NUM_BQ
) (
  input  logic                     poll,
  input  logic [NE+NB-1:0]         mask,
  input  logic [NE-1:0]            e_nonempty,
  input  logic [NB-1:0]            b_nonempty,
  input  logic [NB-1:0][PTR_W-1:0] b_prod,
  input  logic [NB-1:0][PTR_W-1:0] b_cons,
  input  logic [63:0]              e_head,     // head entry of queue pop_q
  input  logic [63:0]              empty_msg,
  output logic                     pop_req,
  output logic [$clog2(NE)-1:0]    pop_q,
  output logic [63:0]              result,
  output logic                     hit_express,
  output logic                     hit_basic
);
  logic [NE+NB-1:0] ready;
  logic             found;
  int unsigned      win;

  assign ready = mask & {b_nonempty, e_nonempty};

  always_comb begin
    found = 1'b0;
    win   = 0;
    for (int i = int'(NE + NB) - 1; i >= 0; i--)
      if (ready[i]) begin found = 1'b1; win = i; end
  end

  // the queue choice never depends on e_head, so the pop index and the
  // result mux are kept in separate blocks
  assign hit_express = found && (win < NE);
  assign hit_basic   = found && (win >= NE);
  assign pop_q       = hit_express ? ($clog2(NE))'(win) : '0;
  assign pop_req     = poll && hit_express;

  always_comb begin
    if (hit_express)    result = e_head;
    else if (hit_basic) result = basic_notice(4'(win - NE), b_prod[win - NE], b_cons[win - NE]);
    else                result = empty_msg;
  end
endmodule
