// express_tx - Express and Tag-On Message transmit engine.
//
// An Express message is composed and launched by one uncached store: the
// address carries the transmit queue, the logical destination and 5 tag
// bits, the store data a 32-bit word, so a message holds 37 bits of data.
// The bus decoder hands the decoded store to this block, which pushes it
// into the hardware FIFO of that transmit queue. A Tag-On message is the
// same store with more address bits naming an SRAM cache line and a count
// of 0..3 lines; those lines are appended to the packet straight from the
// message SRAM, so data already in the NES is not copied again.
//
// The engine serves the non-empty queues round robin: it pops an entry,
// translates the logical destination through the Destination Table (rows
// 0..NQ-1 belong to these queues) and sends header word 0, header word 1
// (source id), the data word and, for Tag-On, 8 words per line read through
// the shared SRAM port. Each queue exposes a producer and a consumer count
// (free running) so software can see the free space; a store to a full
// queue is dropped and raises ovf_flag for that queue until cleared. The
// FIFO depth (DEPTH entries, kept in registers) and the drop-on-full policy
// are this design's choices.
module express_tx
  import nes_pkg::*;
#(
  parameter int unsigned NQ    = NUM_EQ,
  parameter int unsigned DEPTH = 4
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // decoded Express / Tag-On store
  input  logic                     st_we,
  input  logic [$clog2(NQ)-1:0]    st_q,
  input  logic [LDEST_W-1:0]       st_ldest,
  input  logic [TAG_W-1:0]         st_tag,
  input  logic                     st_intr,
  input  logic                     st_tagon,
  input  logic [1:0]               st_lines,
  input  logic [SA_W-4:0]          st_line_addr,
  input  logic [31:0]              st_data,
  output logic [NQ-1:0][PTR_W-1:0] prod_cnt,
  output logic [NQ-1:0][PTR_W-1:0] cons_cnt,
  output logic [NQ-1:0]            ovf_flag,
  input  logic                     ovf_clr,
  // Destination Table lookup
  output logic [$clog2(NQ)-1:0]    dt_q,
  output logic [LDEST_W-1:0]       dt_ldest,
  input  dest_entry_t              dt_entry,
  // SRAM port (through the arbiter)
  output logic                     sr_req,
  output logic [SA_W-1:0]          sr_addr,
  input  logic                     sr_gnt,
  input  logic                     sr_rvalid,
  input  logic [31:0]              sr_rdata,
  // packet out
  output logic                     out_valid,
  output flit_t                    out_flit,
  input  logic                     out_ready,
  // events
  output logic                     ev_express,
  output logic                     ev_tagon,
  output logic                     ev_overflow
);
  localparam int unsigned QW = (NQ > 1) ? $clog2(NQ) : 1;
  localparam int unsigned DW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  typedef struct packed {
    logic              intr;
    logic              tagon;
    logic [1:0]        lines;
    logic [SA_W-4:0]   line_addr;
    logic [LDEST_W-1:0] ldest;
    logic [TAG_W-1:0]  tag;
    logic [31:0]       data;
  } etx_entry_t;

  typedef enum logic [2:0] {S_IDLE, S_HDR0, S_HDR1, S_DATA, S_RD, S_WD, S_OUT} state_e;
  state_e state;

  etx_entry_t fifo [NQ][DEPTH];
  etx_entry_t cur_e;
  logic [QW-1:0] cur, rr, pick;
  logic [NQ-1:0] nonempty, full;
  logic found;
  logic [4:0] idx, ndata;     // Tag-On data word index, number of data words
  logic [31:0] data_w;

  // index of the k-th candidate counted from the round-robin pointer
  function automatic int rot(input int k);
    return (int'(rr) + k) % int'(NQ);
  endfunction

  always_comb begin
    for (int i = 0; i < int'(NQ); i++) begin
      nonempty[i] = (prod_cnt[i] != cons_cnt[i]);
      full[i]     = ((prod_cnt[i] - cons_cnt[i]) == PTR_W'(DEPTH));
    end
    found = 1'b0;
    pick  = '0;
    for (int k = int'(NQ) - 1; k >= 0; k--) begin
      if (nonempty[rot(k)]) begin found = 1'b1; pick = QW'(rot(k)); end
    end
  end

  assign ndata    = {cur_e.lines, 3'b000};
  assign dt_q     = cur;
  assign dt_ldest = cur_e.ldest;

  hdr0_t h0;
  always_comb begin
    h0       = '0;
    h0.site  = dt_entry.site;
    h0.rxq   = dt_entry.rxq;
    h0.mtype = cur_e.tagon ? MT_TAGON : MT_EXPRESS;
    h0.intr  = cur_e.intr;
    h0.tag   = cur_e.tag;
    h0.len   = LEN_W'(ndata) + 1'b1;
  end

  assign sr_req  = (state == S_RD);
  assign sr_addr = {cur_e.line_addr, 3'b000} + SA_W'(idx);

  always_comb begin
    out_valid = 1'b1;
    out_flit  = '0;
    unique case (state)
      S_HDR0: out_flit.data = h0;
      S_HDR1: out_flit.data = 32'(dt_entry.src);
      S_DATA: begin out_flit.data = cur_e.data; out_flit.last = (ndata == 5'd0); end
      S_OUT:  begin out_flit.data = data_w; out_flit.last = (idx == ndata - 1'b1); end
      default: out_valid = 1'b0;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= S_IDLE;
      prod_cnt    <= '0;
      cons_cnt    <= '0;
      ovf_flag    <= '0;
      cur         <= '0;
      rr          <= '0;
      cur_e       <= '0;
      idx         <= '0;
      data_w      <= '0;
      ev_express  <= 1'b0;
      ev_tagon    <= 1'b0;
      ev_overflow <= 1'b0;
      for (int q = 0; q < int'(NQ); q++)
        for (int d = 0; d < int'(DEPTH); d++) fifo[q][d] <= '0;
    end else begin
      ev_express  <= 1'b0;
      ev_tagon    <= 1'b0;
      ev_overflow <= 1'b0;
      if (ovf_clr) ovf_flag <= '0;
      if (st_we) begin
        if (full[st_q]) begin
          ovf_flag[st_q] <= 1'b1;
          ev_overflow    <= 1'b1;
        end else begin
          fifo[st_q][DW'(prod_cnt[st_q])] <= '{intr: st_intr, tagon: st_tagon,
                                               lines: st_tagon ? st_lines : 2'b00,
                                               line_addr: st_line_addr, ldest: st_ldest,
                                               tag: st_tag, data: st_data};
          prod_cnt[st_q] <= prod_cnt[st_q] + 1'b1;
        end
      end

      unique case (state)
        S_IDLE: if (found) begin
          cur            <= pick;
          cur_e          <= fifo[pick][DW'(cons_cnt[pick])];
          cons_cnt[pick] <= cons_cnt[pick] + 1'b1;
          rr             <= (int'(pick) == int'(NQ) - 1) ? '0 : pick + 1'b1;
          state          <= S_HDR0;
        end
        S_HDR0: if (out_ready) state <= S_HDR1;
        S_HDR1: if (out_ready) state <= S_DATA;
        S_DATA: if (out_ready) begin
          idx <= '0;
          if (ndata == 5'd0) begin
            ev_express <= !cur_e.tagon;
            ev_tagon   <= cur_e.tagon;
            state      <= S_IDLE;
          end else begin
            state <= S_RD;
          end
        end
        S_RD: if (sr_gnt) state <= S_WD;
        S_WD: if (sr_rvalid) begin
          data_w <= sr_rdata;
          state  <= S_OUT;
        end
        S_OUT: if (out_ready) begin
          if (idx == ndata - 1'b1) begin
            ev_tagon <= 1'b1;
            state    <= S_IDLE;
          end else begin
            idx   <= idx + 1'b1;
            state <= S_RD;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
