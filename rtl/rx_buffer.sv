// rx_buffer - circular receive buffers in a message SRAM bank.
//
// One instance holds NQ queues, each a ring of fixed-size slots at a base
// address, with a producer pointer advanced by the NES and a consumer
// pointer written by software (explicit deallocation). It serves as the
// hardware Basic receive queues, as the buffer that takes the data part of
// arriving Tag-On messages, and as the miss queue that collects packets for
// non-resident queues for the service processor.
//
// The packet to store arrives as a word stream with the target queue on
// in_q (stable for the whole packet); word i is written to slot word i
// through the shared SRAM port, one word per grant (in_ready follows the
// grant). After the last word the producer pointer moves on and ev_enq
// pulses. The sender must check space[q] before it starts a packet; words
// beyond the slot size are discarded. Writing a queue's configuration (base,
// size in slots, reclaim flag) resets both pointers. Slot size and pointer
// widths are this design's choices.
//
// NES Reclaim on receive: for a queue configured with the reclaim flag, the
// cache lines of the slot about to be written are first flushed from the
// processor's cache, one rcl_req per line (req held until the one-cycle
// rcl_ack), so that a program never reads a stale cached copy of an old
// message; in_ready stays low meanwhile. Queues without the flag rely on
// the program flushing the lines itself, as in the architecture.
module rx_buffer
  import nes_pkg::*;
#(
  parameter int unsigned NQ   = NUM_BQ,
  parameter int unsigned SLOT = SLOT_WORDS,
  localparam int unsigned QW  = (NQ > 1) ? $clog2(NQ) : 1
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     cfg_we,
  input  logic [QW-1:0]            cfg_q,
  input  logic [SA_W-1:0]          cfg_base,
  input  logic [PTR_W-1:0]         cfg_size,
  input  logic                     cfg_reclaim,
  input  logic                     cons_we,
  input  logic [QW-1:0]            cons_q,
  input  logic [PTR_W-1:0]         cons_val,
  output logic [NQ-1:0][PTR_W-1:0] prod,
  output logic [NQ-1:0][PTR_W-1:0] cons,
  output logic [NQ-1:0]            space,
  input  logic                     in_valid,
  input  flit_t                    in_flit,
  input  logic [QW-1:0]            in_q,
  output logic                     in_ready,
  output logic                     sr_req,
  output logic                     sr_we,
  output logic [SA_W-1:0]          sr_addr,
  output logic [31:0]              sr_wdata,
  input  logic                     sr_gnt,
  output logic                     rcl_req,
  output logic [SA_W-1:0]          rcl_addr,
  input  logic                     rcl_ack,
  output logic                     ev_enq,
  output logic                     ev_reclaim
);
  localparam int unsigned NLINES = (SLOT + LINE_WORDS - 1) / LINE_WORDS;

  logic [NQ-1:0][SA_W-1:0]  base;
  logic [NQ-1:0][PTR_W-1:0] size;
  logic [5:0] widx;
  logic [NQ-1:0] rcl_en;
  logic [2:0] rline;      // next line of the slot to reclaim
  logic rcl_done;         // lines of the current slot already reclaimed
  logic need_rcl;
  logic [SA_W-1:0] slot_base;

  function automatic logic [PTR_W-1:0] nxt(input logic [PTR_W-1:0] p, input logic [PTR_W-1:0] sz);
    return (p + 1'b1 == sz) ? '0 : p + 1'b1;
  endfunction

  always_comb
    for (int i = 0; i < int'(NQ); i++) space[i] = (size[i] != '0) && (nxt(prod[i], size[i]) != cons[i]);

  logic in_slot;
  assign in_slot   = (int'(widx) < int'(SLOT));
  assign slot_base = base[in_q] + SA_W'(prod[in_q]) * SA_W'(SLOT);
  assign need_rcl  = in_valid && rcl_en[in_q] && !rcl_done;
  assign rcl_req   = need_rcl;
  assign rcl_addr  = slot_base + SA_W'(rline) * SA_W'(LINE_WORDS);
  assign sr_req    = in_valid && in_slot && !need_rcl;
  assign sr_we     = 1'b1;
  assign sr_addr   = slot_base + SA_W'(widx);
  assign sr_wdata  = in_flit.data;
  assign in_ready  = need_rcl ? 1'b0 : (in_slot ? sr_gnt : in_valid);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      base   <= '0;
      size   <= '0;
      prod   <= '0;
      cons   <= '0;
      widx   <= '0;
      rcl_en <= '0;
      rline  <= '0;
      rcl_done   <= 1'b0;
      ev_enq     <= 1'b0;
      ev_reclaim <= 1'b0;
    end else begin
      ev_enq     <= 1'b0;
      ev_reclaim <= 1'b0;
      if (need_rcl && rcl_ack) begin
        ev_reclaim <= 1'b1;
        if (int'(rline) == int'(NLINES) - 1) begin
          rline    <= '0;
          rcl_done <= 1'b1;
        end else begin
          rline <= rline + 1'b1;
        end
      end
      if (cons_we) cons[cons_q] <= cons_val;
      if (in_valid && in_ready) begin
        if (in_flit.last) begin
          widx        <= '0;
          rcl_done    <= 1'b0;
          prod[in_q]  <= nxt(prod[in_q], size[in_q]);
          ev_enq      <= 1'b1;
        end else if (in_slot) begin
          widx <= widx + 1'b1;
        end
      end
      if (cfg_we) begin
        base[cfg_q] <= cfg_base;
        size[cfg_q] <= cfg_size;
        rcl_en[cfg_q] <= cfg_reclaim;
        prod[cfg_q] <= '0;
        cons[cfg_q] <= '0;
      end
    end
  end
endmodule
