// express_rx - Express / Tag-On receive queues with a FIFO pop interface.
//
// The NES keeps arriving Express messages (and the header part of Tag-On
// messages) as 64-bit entries, already reformatted for the processor: source
// id, tag, data word and, for Tag-On, where its data lies in the Tag-On
// buffer (layout in nes_pkg::erx_pack). Software never sees queue
// pointers: one uncached read of a queue's receive address pops the head
// entry. Reading an empty queue returns the Empty Express Message, a 64-bit
// value that system code can program.
//
// Interface: push (one entry per cycle, the caller checks full[q] first),
// pop (pop_req with pop_q; pop_data is combinational and the entry leaves
// the queue at the clock edge). nonempty[] feeds OnePoll. Entries are kept
// in registers, DEPTH per queue; the depth is this design's choice.
module express_rx
  import nes_pkg::*;
#(
  parameter int unsigned NQ    = NUM_EQ,
  parameter int unsigned DEPTH = 8,
  localparam int unsigned QW   = (NQ > 1) ? $clog2(NQ) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          push_valid,
  input  logic [QW-1:0] push_q,
  input  logic [63:0]   push_entry,
  output logic [NQ-1:0] full,
  output logic [NQ-1:0] nonempty,
  input  logic          pop_req,
  input  logic [QW-1:0] pop_q,
  output logic [63:0]   pop_data,
  output logic          pop_empty,
  input  logic          empty_we,
  input  logic [63:0]   empty_val,
  output logic [63:0]   empty_msg,
  output logic          ev_empty_read
);
  localparam int unsigned DW = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  logic [63:0] mem [NQ][DEPTH];
  logic [NQ-1:0][DW:0] wp, rp;

  always_comb
    for (int i = 0; i < int'(NQ); i++) begin
      nonempty[i] = (wp[i] != rp[i]);
      full[i]     = (wp[i] - rp[i]) == (DW+1)'(DEPTH);
    end

  assign pop_empty = !nonempty[pop_q];
  assign pop_data  = pop_empty ? empty_msg : mem[pop_q][rp[pop_q][DW-1:0]];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp            <= '0;
      rp            <= '0;
      empty_msg     <= EMPTY_MSG_RESET;
      ev_empty_read <= 1'b0;
      for (int q = 0; q < int'(NQ); q++)
        for (int d = 0; d < int'(DEPTH); d++) mem[q][d] <= '0;
    end else begin
      ev_empty_read <= pop_req && pop_empty;
      if (empty_we) empty_msg <= empty_val;
      if (push_valid && !full[push_q]) begin
        mem[push_q][wp[push_q][DW-1:0]] <= push_entry;
        wp[push_q] <= wp[push_q] + 1'b1;
      end
      if (pop_req && !pop_empty) rp[pop_q] <= rp[pop_q] + 1'b1;
    end
  end
endmodule
