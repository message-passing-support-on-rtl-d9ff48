// nes_core - Network Endpoint Subsystem (NES) core: the message passing
// interface between one SMP site's processor bus and the network.
//
// The NES gives user programs four ways to send and receive messages, each
// reached through its own memory-mapped region so that address translation
// alone decides who may use which queue:
//   - Basic messages: 4..22-word messages composed in cache-line slots of
//     the aSRAM, launched by an uncached producer-pointer store (basic_tx),
//     received into Basic receive queues in the aSRAM (rx_buffer);
//   - Express messages: 37 bits carried by a single uncached store
//     (express_tx), received as one 64-bit uncached load (express_rx);
//   - Tag-On messages: Express messages with up to three cache lines of
//     aSRAM data appended; at the receiver the data goes to a Tag-On buffer;
//   - DMA: block moves between the memories of two sites, set up by the
//     service processor (sP) and carried out by dma_engine.
// Destinations are logical: every transmit queue has a row in the
// Destination Table (dest_table) giving site, receive queue and source id.
// On receive, rx_dispatch looks a packet's queue up in the receive-queue
// cache tags (rxq_tag_table); packets for non-resident or full queues go to
// the miss queue in the sSRAM, which the sP services. OnePoll (onepoll)
// lets one load poll many receive queues.
//
// Ports. The application processor (aP) port and the service processor
// (sP) port are simple single-beat slaves: a one-cycle req with we, a byte
// address addr and 32-bit wdata; ack follows one cycle later with 64-bit
// rdata for reads. addr[31:28] selects the region (nes_pkg):
//   aP: 0 aSRAM word          1 queue pointers      2 Express send
//       3 Tag-On send         4 Express receive     5 OnePoll
//   sP: 0 sSRAM word          1 pointers            2 Express send
//       3 Tag-On send         6 configuration       7 DMA
// Express / Tag-On send address: [27:26] lines, [25:16] SRAM line,
// [15:13] transmit queue, [12:8] logical destination, [7:3] tag,
// [2] receiver interrupt; the store data is the 32-bit word. The sP has
// two transmit queues of its own (queue in [13]); its Tag-On data comes
// from the sSRAM and its logical destinations from a separate two-row
// table (configuration 9) that sP firmware maintains, e.g. to forward
// messages of non-resident transmit queues.
// Express receive load: [5:3] queue. OnePoll load: [18:3] queue mask.
// Pointer region (aP), word index addr[7:2]: 0..7 Basic transmit producer
// (write) / {prod,cons} (read); 8..15 Basic receive consumer (write) /
// {prod,cons}; 16 Tag-On buffer consumer; 24..31 Express transmit
// {ovf, prod, cons} (read). Pointer region (sP): index 0 miss queue
// consumer (write) / {prod, cons} (read); 8..9 sP Express transmit
// {ovf, prod, cons} (read).
// Configuration region (sP), addr[15:12]: 0 Destination Table ({row,
// ldest} in addr[10:2]), 1 receive tags (addr[5:2], data {valid, lq}),
// 2 Basic transmit queue (addr[4:2]: {reclaim, size, base}), 3 Basic receive
// queue (same layout), 4 Tag-On buffer, 5 miss queue, 6 Empty message (addr[2] selects
// the 32-bit half; writing the high half loads it), 7 interrupt enables
// (addr[2]=1: clear pending), 8 status (read) / overflow clear (write),
// 9 sP Destination Table ({row, ldest} in addr[7:2]).
// DMA region (sP), addr[4:2]: 0 destination address, 1 source address,
// 2 {site, source id}, 3 length (the write starts the transfer), 4 clear
// the received word count; reads return {busy, received word count}.
// The network link is a 32-bit valid/ready word stream each way; the
// reclaim port (req held until a one-cycle ack) asks the bus side to flush
// one cache line of the aSRAM's address space out of the processor's cache
// (write back if modified, then invalidate): for Basic transmit queues
// before a launch, so the data reaches the SRAM, and for Basic receive
// queues before a slot is refilled, so no stale copy stays cached;
// the DMA port is a memory master on the aP bus.
//
// The mechanisms and their queue counts follow the architecture; the 60X
// bus protocol, the sP processor and the Arctic routers are outside this
// block, and the address map and register layout are this design's own.
//
// Lint notes: the ev_* pulses of the sub-blocks are left unconnected here on
// purpose (they are observation points for simulation and for future event
// counters); the low two address bits are unused because all registers are
// word wide; rst_n also appears in the 'disable iff' of the bus-protocol
// assertions, which is why it shows up as used both synchronously and
// asynchronously.
module nes_core
  import nes_pkg::*;
#(
  parameter int unsigned ETX_DEPTH = 4,
  parameter int unsigned ERX_DEPTH = 8
) (
  input  logic        clk,
  input  logic        rst_n,
  // application processor bus
  input  logic        ap_req,
  input  logic        ap_we,
  input  logic [31:0] ap_addr,
  input  logic [31:0] ap_wdata,
  output logic        ap_ack,
  output logic [63:0] ap_rdata,
  // service processor bus
  input  logic        sp_req,
  input  logic        sp_we,
  input  logic [31:0] sp_addr,
  input  logic [31:0] sp_wdata,
  output logic        sp_ack,
  output logic [63:0] sp_rdata,
  // network link
  output logic        net_tx_valid,
  output flit_t       net_tx_flit,
  input  logic        net_tx_ready,
  input  logic        net_rx_valid,
  input  flit_t       net_rx_flit,
  output logic        net_rx_ready,
  // NES Reclaim: flush a cache line on the aP bus
  output logic        rcl_req,
  output logic [31:0] rcl_addr,
  input  logic        rcl_ack,
  // DMA memory master on the aP bus
  output logic        mem_req,
  output logic        mem_we,
  output logic [31:0] mem_addr,
  output logic [31:0] mem_wdata,
  input  logic        mem_ack,
  input  logic [31:0] mem_rdata,
  // interrupts
  output logic [NUM_EQ+NUM_BQ-1:0] irq_pend,
  output logic        irq
);
  localparam int unsigned NQT = NUM_EQ + NUM_BQ;

  // ------------------------------------------------------------------ decode
  logic [3:0] ap_rg, sp_rg;
  assign ap_rg = ap_addr[31:28];
  assign sp_rg = sp_addr[31:28];

  logic ap_sram, ap_ptr_w, ap_etx, ap_erx, ap_poll;
  assign ap_sram  = ap_req && ap_rg == RG_SRAM;
  assign ap_ptr_w = ap_req && ap_we && ap_rg == RG_PTR;
  assign ap_etx   = ap_req && ap_we && (ap_rg == RG_ETX || ap_rg == RG_TAGON);
  assign ap_erx   = ap_req && !ap_we && ap_rg == RG_ERX;
  assign ap_poll  = ap_req && !ap_we && ap_rg == RG_POLL;

  logic [5:0] ap_pidx;
  assign ap_pidx = ap_addr[7:2];

  logic sp_cfg_w;
  logic [3:0] sp_sub;
  assign sp_cfg_w = sp_req && sp_we && sp_rg == RG_CFG;
  assign sp_sub   = sp_addr[15:12];

  // signals used before the blocks that drive them
  logic brx_rcl_req, rcl_busy, rcl_own_rx, rcl_sel_rx, ev_brx_reclaim;
  logic [SA_W-1:0] brx_rcl_addr;
  logic sp_etx, sptx_valid, sptx_ready;
  flit_t sptx_flit;

  // ------------------------------------------------------------------ SRAMs
  logic [31:0] asram_a_rdata, ssram_a_rdata;
  logic        ab_en, ab_we, sb_en, sb_we;
  logic [SA_W-1:0] ab_addr, sb_addr;
  logic [31:0] ab_wdata, ab_rdata, sb_wdata, sb_rdata;

  msg_sram u_asram (
    .clk, .a_en(ap_sram), .a_we(ap_we), .a_addr(ap_addr[SA_W+1:2]), .a_wdata(ap_wdata),
    .a_rdata(asram_a_rdata),
    .b_en(ab_en), .b_we(ab_we), .b_addr(ab_addr), .b_wdata(ab_wdata), .b_rdata(ab_rdata));

  logic sp_sram;
  assign sp_sram = sp_req && sp_rg == RG_SRAM;
  msg_sram u_ssram (
    .clk, .a_en(sp_sram), .a_we(sp_we), .a_addr(sp_addr[SA_W+1:2]), .a_wdata(sp_wdata),
    .a_rdata(ssram_a_rdata),
    .b_en(sb_en), .b_we(sb_we), .b_addr(sb_addr), .b_wdata(sb_wdata), .b_rdata(sb_rdata));

  // aSRAM engine port: 0 Basic receive, 1 Tag-On buffer, 2 Basic send, 3 Express/Tag-On send
  logic [3:0]            ar_req, ar_we, ar_gnt, ar_rvalid;
  logic [3:0][SA_W-1:0]  ar_addr;
  logic [3:0][31:0]      ar_wdata;
  logic [31:0]           ar_rdata;
  sram_arb #(.N(4)) u_aarb (
    .clk, .rst_n, .req(ar_req), .we(ar_we), .addr(ar_addr), .wdata(ar_wdata),
    .gnt(ar_gnt), .rvalid(ar_rvalid), .rdata(ar_rdata),
    .m_en(ab_en), .m_we(ab_we), .m_addr(ab_addr), .m_wdata(ab_wdata), .m_rdata(ab_rdata));

  // sSRAM engine port: 0 miss queue, 1 sP Express/Tag-On send
  logic mq_sr_req, mq_sr_we, mq_sr_gnt;
  logic [SA_W-1:0] mq_sr_addr;
  logic [31:0] mq_sr_wdata;
  logic sptx_sr_req, sptx_sr_gnt, sptx_sr_rvalid;
  logic [SA_W-1:0] sptx_sr_addr;
  logic [31:0] sr_rdata;
  logic [1:0] sr_rvalid;
  sram_arb #(.N(2)) u_sarb (
    .clk, .rst_n, .req({sptx_sr_req, mq_sr_req}), .we({1'b0, mq_sr_we}),
    .addr({sptx_sr_addr, mq_sr_addr}), .wdata({32'd0, mq_sr_wdata}),
    .gnt({sptx_sr_gnt, mq_sr_gnt}), .rvalid(sr_rvalid), .rdata(sr_rdata),
    .m_en(sb_en), .m_we(sb_we), .m_addr(sb_addr), .m_wdata(sb_wdata), .m_rdata(sb_rdata));
  assign sptx_sr_rvalid = sr_rvalid[1];

  // ------------------------------------------------------------------ tables
  dest_entry_t dt0_entry, dt1_entry;
  logic [2:0]  btx_dt_q, etx_dt_q;
  logic [LDEST_W-1:0] btx_dt_ld, etx_dt_ld;
  dest_table u_dt (
    .clk, .rst_n,
    .wr_en(sp_cfg_w && sp_sub == 4'd0), .wr_row(sp_addr[10:7]), .wr_ldest(sp_addr[6:2]),
    .wr_entry(dest_entry_t'(sp_wdata[SITE_W+LQ_W+SRC_W-1:0])),
    .rd0_row({1'b1, btx_dt_q}), .rd0_ldest(btx_dt_ld), .rd0_entry(dt0_entry),
    .rd1_row({1'b0, etx_dt_q}), .rd1_ldest(etx_dt_ld), .rd1_entry(dt1_entry));

  logic [LQ_W-1:0] lk_lq;
  logic lk_basic, lk_hit;
  logic [3:0] lk_idx;
  rxq_tag_table u_tags (
    .clk, .rst_n,
    .wr_en(sp_cfg_w && sp_sub == 4'd1), .wr_idx(sp_addr[5:2]), .wr_valid(sp_wdata[LQ_W]),
    .wr_lq(sp_wdata[LQ_W-1:0]),
    .lk_lq, .lk_basic, .lk_hit, .lk_idx, .tag_valid());

  // ------------------------------------------------------------------ send side
  logic [NUM_BQ-1:0][PTR_W-1:0] btx_prod, btx_cons;
  logic btx_valid, btx_ready, btx_rcl_req;
  flit_t btx_flit;
  logic [SA_W-1:0] btx_rcl_addr;
  logic ev_launch, ev_reclaim;
  basic_tx u_btx (
    .clk, .rst_n,
    .cfg_we(sp_cfg_w && sp_sub == 4'd2), .cfg_q(sp_addr[4:2]), .cfg_base(sp_wdata[SA_W-1:0]),
    .cfg_size(sp_wdata[SA_W+PTR_W-1:SA_W]), .cfg_reclaim(sp_wdata[SA_W+PTR_W]),
    .prod_we(ap_ptr_w && ap_pidx < 6'd8), .prod_q(ap_pidx[2:0]), .prod_val(ap_wdata[PTR_W-1:0]),
    .prod(btx_prod), .cons(btx_cons),
    .dt_q(btx_dt_q), .dt_ldest(btx_dt_ld), .dt_entry(dt0_entry),
    .sr_req(ar_req[2]), .sr_addr(ar_addr[2]), .sr_gnt(ar_gnt[2]), .sr_rvalid(ar_rvalid[2]),
    .sr_rdata(ar_rdata),
    .rcl_req(btx_rcl_req), .rcl_addr(btx_rcl_addr), .rcl_ack(rcl_ack && !rcl_sel_rx),
    .out_valid(btx_valid), .out_flit(btx_flit), .out_ready(btx_ready),
    .ev_launch, .ev_reclaim);
  assign ar_we[2]    = 1'b0;
  assign ar_wdata[2] = '0;

  // The reclaim port is shared by the Basic transmit engine and the Basic
  // receive queues; whoever raised the request first keeps the port until
  // its acknowledge, then a waiting receive request goes first.
  assign rcl_sel_rx = rcl_busy ? rcl_own_rx : brx_rcl_req;
  assign rcl_req    = rcl_sel_rx ? brx_rcl_req : btx_rcl_req;
  assign rcl_addr   = {RG_SRAM, 26'(rcl_sel_rx ? brx_rcl_addr : btx_rcl_addr), 2'b00};
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rcl_busy   <= 1'b0;
      rcl_own_rx <= 1'b0;
    end else if (rcl_req && !rcl_ack) begin
      rcl_busy   <= 1'b1;
      rcl_own_rx <= rcl_sel_rx;
    end else if (rcl_ack) begin
      rcl_busy <= 1'b0;
    end
  end

  logic [NUM_EQ-1:0][PTR_W-1:0] etx_prod, etx_cons;
  logic [NUM_EQ-1:0] etx_ovf;
  logic etx_valid, etx_ready, ovf_clr;
  flit_t etx_flit;
  logic ev_etx_express, ev_etx_tagon, ev_etx_overflow;
  express_tx #(.DEPTH(ETX_DEPTH)) u_etx (
    .clk, .rst_n,
    .st_we(ap_etx), .st_q(ap_addr[15:13]), .st_ldest(ap_addr[12:8]), .st_tag(ap_addr[7:3]),
    .st_intr(ap_addr[2]), .st_tagon(ap_rg == RG_TAGON), .st_lines(ap_addr[27:26]),
    .st_line_addr(ap_addr[25:16]), .st_data(ap_wdata),
    .prod_cnt(etx_prod), .cons_cnt(etx_cons), .ovf_flag(etx_ovf), .ovf_clr,
    .dt_q(etx_dt_q), .dt_ldest(etx_dt_ld), .dt_entry(dt1_entry),
    .sr_req(ar_req[3]), .sr_addr(ar_addr[3]), .sr_gnt(ar_gnt[3]), .sr_rvalid(ar_rvalid[3]),
    .sr_rdata(ar_rdata),
    .out_valid(etx_valid), .out_flit(etx_flit), .out_ready(etx_ready),
    .ev_express(ev_etx_express), .ev_tagon(ev_etx_tagon), .ev_overflow(ev_etx_overflow));
  assign ar_we[3]    = 1'b0;
  assign ar_wdata[3] = '0;

  // DMA
  logic dtx_valid, dtx_ready, drx_valid, drx_ready, dma_busy, dma_done, dma_cmd, rx_clr;
  flit_t dtx_flit, drx_flit;
  logic [31:0] dma_dst, dma_src, dma_words;
  logic [SITE_W-1:0] dma_site;
  logic [SRC_W-1:0]  dma_srcid;
  logic ev_dma_pkt;
  dma_engine u_dma (
    .clk, .rst_n,
    .cmd_valid(dma_cmd), .cmd_ready(), .cmd_site(dma_site), .cmd_src(dma_srcid),
    .cmd_src_addr(dma_src), .cmd_dst_addr(dma_dst), .cmd_len(sp_wdata[15:0]),
    .tx_busy(dma_busy), .tx_done(dma_done),
    .out_valid(dtx_valid), .out_flit(dtx_flit), .out_ready(dtx_ready),
    .in_valid(drx_valid), .in_flit(drx_flit), .in_ready(drx_ready),
    .rx_words(dma_words), .rx_clr,
    .mem_req, .mem_we, .mem_addr, .mem_wdata, .mem_ack, .mem_rdata,
    .ev_packet(ev_dma_pkt));

  tx_arb #(.N(4)) u_txarb (
    .clk, .rst_n,
    .in_valid({sptx_valid, dtx_valid, etx_valid, btx_valid}),
    .in_flit({sptx_flit, dtx_flit, etx_flit, btx_flit}),
    .in_ready({sptx_ready, dtx_ready, etx_ready, btx_ready}),
    .out_valid(net_tx_valid), .out_flit(net_tx_flit), .out_ready(net_tx_ready));

  // ------------------------------------------------------------------ receive side
  logic [NUM_BQ-1:0] bb_space;
  logic [NUM_BQ-1:0][PTR_W-1:0] brx_prod, brx_cons;
  logic bb_valid, bb_ready;
  flit_t bb_flit;
  logic [2:0] bb_q;
  logic ev_brx_enq;
  rx_buffer #(.NQ(NUM_BQ), .SLOT(SLOT_WORDS)) u_brx (
    .clk, .rst_n,
    .cfg_we(sp_cfg_w && sp_sub == 4'd3), .cfg_q(sp_addr[4:2]), .cfg_base(sp_wdata[SA_W-1:0]),
    .cfg_size(sp_wdata[SA_W+PTR_W-1:SA_W]), .cfg_reclaim(sp_wdata[SA_W+PTR_W]),
    .cons_we(ap_ptr_w && ap_pidx >= 6'd8 && ap_pidx < 6'd16), .cons_q(ap_pidx[2:0]),
    .cons_val(ap_wdata[PTR_W-1:0]),
    .prod(brx_prod), .cons(brx_cons), .space(bb_space),
    .in_valid(bb_valid), .in_flit(bb_flit), .in_q(bb_q), .in_ready(bb_ready),
    .sr_req(ar_req[0]), .sr_we(ar_we[0]), .sr_addr(ar_addr[0]), .sr_wdata(ar_wdata[0]),
    .sr_gnt(ar_gnt[0]), .rcl_req(brx_rcl_req), .rcl_addr(brx_rcl_addr),
    .rcl_ack(rcl_ack && rcl_sel_rx), .ev_enq(ev_brx_enq), .ev_reclaim(ev_brx_reclaim));

  logic [0:0] tb_space;
  logic [0:0][PTR_W-1:0] tb_prod, tb_cons;
  logic tb_valid, tb_ready;
  flit_t tb_flit;
  rx_buffer #(.NQ(1), .SLOT(SLOT_WORDS)) u_tagbuf (
    .clk, .rst_n,
    .cfg_we(sp_cfg_w && sp_sub == 4'd4), .cfg_q(1'b0), .cfg_base(sp_wdata[SA_W-1:0]),
    .cfg_size(sp_wdata[SA_W+PTR_W-1:SA_W]), .cfg_reclaim(1'b0),
    .cons_we(ap_ptr_w && ap_pidx == 6'd16), .cons_q(1'b0), .cons_val(ap_wdata[PTR_W-1:0]),
    .prod(tb_prod), .cons(tb_cons), .space(tb_space),
    .in_valid(tb_valid), .in_flit(tb_flit), .in_q(1'b0), .in_ready(tb_ready),
    .sr_req(ar_req[1]), .sr_we(ar_we[1]), .sr_addr(ar_addr[1]), .sr_wdata(ar_wdata[1]),
    .sr_gnt(ar_gnt[1]), .rcl_req(), .rcl_addr(), .rcl_ack(1'b0), .ev_enq(), .ev_reclaim());

  logic [0:0] mq_space;
  logic [0:0][PTR_W-1:0] mq_prod, mq_cons;
  logic mq_valid, mq_ready;
  flit_t mq_flit;
  rx_buffer #(.NQ(1), .SLOT(32)) u_missq (
    .clk, .rst_n,
    .cfg_we(sp_cfg_w && sp_sub == 4'd5), .cfg_q(1'b0), .cfg_base(sp_wdata[SA_W-1:0]),
    .cfg_size(sp_wdata[SA_W+PTR_W-1:SA_W]), .cfg_reclaim(1'b0),
    .cons_we(sp_req && sp_we && sp_rg == RG_PTR), .cons_q(1'b0), .cons_val(sp_wdata[PTR_W-1:0]),
    .prod(mq_prod), .cons(mq_cons), .space(mq_space),
    .in_valid(mq_valid), .in_flit(mq_flit), .in_q(1'b0), .in_ready(mq_ready),
    .sr_req(mq_sr_req), .sr_we(mq_sr_we), .sr_addr(mq_sr_addr), .sr_wdata(mq_sr_wdata),
    .sr_gnt(mq_sr_gnt), .rcl_req(), .rcl_addr(), .rcl_ack(1'b0), .ev_enq(), .ev_reclaim());

  logic [NUM_EQ-1:0] erx_full, erx_nonempty;
  logic erx_push, erx_pop, erx_pop_empty, ev_empty_read;
  logic [2:0] erx_q, erx_pop_q, poll_q;
  logic [63:0] erx_entry, erx_pop_data, empty_msg;
  logic [31:0] empty_lo;
  logic [NQT-1:0] irq_en, irq_clr;
  logic ev_rx_basic, ev_rx_express, ev_rx_tagon, ev_rx_miss, ev_rx_dma, ev_rx_stall;

  rx_dispatch u_disp (
    .clk, .rst_n,
    .in_valid(net_rx_valid), .in_flit(net_rx_flit), .in_ready(net_rx_ready),
    .lk_lq, .lk_basic, .lk_hit, .lk_idx,
    .bb_space, .bb_valid, .bb_flit, .bb_q, .bb_ready,
    .erx_full, .erx_push, .erx_q, .erx_entry,
    .tb_space(tb_space[0]), .tb_prod(tb_prod[0]), .tb_valid, .tb_flit, .tb_ready,
    .mq_space(mq_space[0]), .mq_valid, .mq_flit, .mq_ready,
    .dma_valid(drx_valid), .dma_flit(drx_flit), .dma_ready(drx_ready),
    .irq_en, .irq_clr, .irq_pend,
    .ev_basic(ev_rx_basic), .ev_express(ev_rx_express), .ev_tagon(ev_rx_tagon),
    .ev_miss(ev_rx_miss), .ev_dma(ev_rx_dma), .ev_stall(ev_rx_stall));
  assign irq = |irq_pend;

  // OnePoll
  logic poll_pop, poll_hit_e, poll_hit_b;
  logic [63:0] poll_result;
  logic [NUM_BQ-1:0] b_nonempty;
  always_comb
    for (int i = 0; i < int'(NUM_BQ); i++) b_nonempty[i] = (brx_prod[i] != brx_cons[i]);

  onepoll u_poll (
    .poll(ap_poll), .mask(ap_addr[NQT+2:3]), .e_nonempty(erx_nonempty), .b_nonempty,
    .b_prod(brx_prod), .b_cons(brx_cons), .e_head(erx_pop_data), .empty_msg,
    .pop_req(poll_pop), .pop_q(poll_q), .result(poll_result),
    .hit_express(poll_hit_e), .hit_basic(poll_hit_b));

  assign erx_pop   = ap_erx || poll_pop;
  assign erx_pop_q = ap_poll ? poll_q : ap_addr[5:3];

  express_rx #(.DEPTH(ERX_DEPTH)) u_erx (
    .clk, .rst_n,
    .push_valid(erx_push), .push_q(erx_q), .push_entry(erx_entry), .full(erx_full),
    .nonempty(erx_nonempty),
    .pop_req(erx_pop), .pop_q(erx_pop_q), .pop_data(erx_pop_data), .pop_empty(erx_pop_empty),
    .empty_we(sp_cfg_w && sp_sub == 4'd6 && sp_addr[2]), .empty_val({sp_wdata, empty_lo}),
    .empty_msg, .ev_empty_read);

  // ------------------------------------------------------------------ sP registers
  logic [31:0] dma_dst_r, dma_src_r;
  logic [SITE_W+SRC_W-1:0] dma_ids_r;
  logic sp_dma_w;
  assign sp_dma_w  = sp_req && sp_we && sp_rg == RG_DMA;
  assign dma_cmd   = sp_dma_w && sp_addr[4:2] == 3'd3;
  assign dma_dst   = dma_dst_r;
  assign dma_src   = dma_src_r;
  // sP Express/Tag-On send: the sP's own two transmit queues, used among
  // other things to forward traffic of non-resident transmit queues. Same
  // address layout as the aP's (queue in addr[13]); Tag-On data comes from
  // the sSRAM; logical destinations are translated by a separate two-row
  // table that sP firmware maintains.
  logic [0:0] sptx_dt_q;
  logic [LDEST_W-1:0] sptx_dt_ld;
  dest_entry_t sptx_dt_entry, sptx_dt_unused;
  logic [1:0][PTR_W-1:0] sptx_prod, sptx_cons;
  logic [1:0] sptx_ovf;
  logic ev_sptx_express, ev_sptx_tagon, ev_sptx_overflow;
  assign sp_etx = sp_req && sp_we && (sp_rg == RG_ETX || sp_rg == RG_TAGON);
  dest_table #(.ROWS(2)) u_spdt (
    .clk, .rst_n,
    .wr_en(sp_cfg_w && sp_sub == 4'd9), .wr_row(sp_addr[7]), .wr_ldest(sp_addr[6:2]),
    .wr_entry(dest_entry_t'(sp_wdata[SITE_W+LQ_W+SRC_W-1:0])),
    .rd0_row(sptx_dt_q), .rd0_ldest(sptx_dt_ld), .rd0_entry(sptx_dt_entry),
    .rd1_row(1'b0), .rd1_ldest('0), .rd1_entry(sptx_dt_unused));
  express_tx #(.NQ(2), .DEPTH(ETX_DEPTH)) u_sptx (
    .clk, .rst_n,
    .st_we(sp_etx), .st_q(sp_addr[13]), .st_ldest(sp_addr[12:8]), .st_tag(sp_addr[7:3]),
    .st_intr(sp_addr[2]), .st_tagon(sp_rg == RG_TAGON), .st_lines(sp_addr[27:26]),
    .st_line_addr(sp_addr[25:16]), .st_data(sp_wdata),
    .prod_cnt(sptx_prod), .cons_cnt(sptx_cons), .ovf_flag(sptx_ovf), .ovf_clr,
    .dt_q(sptx_dt_q), .dt_ldest(sptx_dt_ld), .dt_entry(sptx_dt_entry),
    .sr_req(sptx_sr_req), .sr_addr(sptx_sr_addr), .sr_gnt(sptx_sr_gnt), .sr_rvalid(sptx_sr_rvalid),
    .sr_rdata(sr_rdata),
    .out_valid(sptx_valid), .out_flit(sptx_flit), .out_ready(sptx_ready),
    .ev_express(ev_sptx_express), .ev_tagon(ev_sptx_tagon), .ev_overflow(ev_sptx_overflow));

  assign dma_site  = dma_ids_r[SITE_W+SRC_W-1:SRC_W];
  assign dma_srcid = dma_ids_r[SRC_W-1:0];
  assign rx_clr    = sp_dma_w && sp_addr[4:2] == 3'd4;
  assign irq_clr   = (sp_cfg_w && sp_sub == 4'd7 && sp_addr[2]) ? sp_wdata[NQT-1:0] : '0;
  assign ovf_clr   = sp_cfg_w && sp_sub == 4'd8;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dma_dst_r <= '0;
      dma_src_r <= '0;
      dma_ids_r <= '0;
      empty_lo  <= '0;
      irq_en    <= '0;
    end else begin
      if (sp_dma_w && sp_addr[4:2] == 3'd0) dma_dst_r <= sp_wdata;
      if (sp_dma_w && sp_addr[4:2] == 3'd1) dma_src_r <= sp_wdata;
      if (sp_dma_w && sp_addr[4:2] == 3'd2) dma_ids_r <= sp_wdata[SITE_W+SRC_W-1:0];
      if (sp_cfg_w && sp_sub == 4'd6 && !sp_addr[2]) empty_lo <= sp_wdata;
      if (sp_cfg_w && sp_sub == 4'd7 && !sp_addr[2]) irq_en <= sp_wdata[NQT-1:0];
    end
  end

  // ------------------------------------------------------------------ read data
  // Everything except SRAM words is captured at the request; SRAM words come
  // from the SRAM output register in the acknowledge cycle.
  logic ap_rd_sram, sp_rd_sram;
  logic [63:0] ap_rq, sp_rq;

  function automatic logic [63:0] ptr_word(input logic [PTR_W-1:0] p, input logic [PTR_W-1:0] c);
    return 64'({p, c});
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ap_ack     <= 1'b0;
      sp_ack     <= 1'b0;
      ap_rd_sram <= 1'b0;
      sp_rd_sram <= 1'b0;
      ap_rq      <= '0;
      sp_rq      <= '0;
    end else begin
      ap_ack     <= ap_req;
      sp_ack     <= sp_req;
      ap_rd_sram <= ap_sram && !ap_we;
      sp_rd_sram <= sp_sram && !sp_we;
      if (ap_req && !ap_we) begin
        ap_rq <= '0;
        unique case (ap_rg)
          RG_PTR: begin
            if (ap_pidx < 6'd8)       ap_rq <= ptr_word(btx_prod[ap_pidx[2:0]], btx_cons[ap_pidx[2:0]]);
            else if (ap_pidx < 6'd16) ap_rq <= ptr_word(brx_prod[ap_pidx[2:0]], brx_cons[ap_pidx[2:0]]);
            else if (ap_pidx == 6'd16) ap_rq <= ptr_word(tb_prod[0], tb_cons[0]);
            else if (ap_pidx >= 6'd24)
              ap_rq <= 64'({etx_ovf[ap_pidx[2:0]], etx_prod[ap_pidx[2:0]], etx_cons[ap_pidx[2:0]]});
          end
          RG_ERX:  ap_rq <= erx_pop_data;
          RG_POLL: ap_rq <= poll_result;
          default: ;
        endcase
      end
      if (sp_req && !sp_we) begin
        sp_rq <= '0;
        unique case (sp_rg)
          RG_PTR: if (sp_addr[5]) sp_rq <= 64'({sptx_ovf[sp_addr[2]], sptx_prod[sp_addr[2]], sptx_cons[sp_addr[2]]});
                  else sp_rq <= ptr_word(mq_prod[0], mq_cons[0]);
          RG_CFG: if (sp_sub == 4'd8) sp_rq <= 64'({etx_ovf, irq_pend});
          RG_DMA: sp_rq <= {31'd0, dma_busy, dma_words};
          default: ;
        endcase
      end
    end
  end

  assign ap_rdata = ap_rd_sram ? 64'(asram_a_rdata) : ap_rq;
  assign sp_rdata = sp_rd_sram ? 64'(ssram_a_rdata) : sp_rq;

  // a bus master issues one request and waits for its acknowledge
  a_ap_single: assert property (@(posedge clk) disable iff (!rst_n) ap_req |=> !ap_req);
  a_sp_single: assert property (@(posedge clk) disable iff (!rst_n) sp_req |=> !sp_req);
endmodule
