// rx_dispatch - receive side of the NES: classifies every packet that
// arrives from the network and steers it to its queue.
//
// For each packet it reads the two header words, then:
//   - DMA packets go to the DMA engine (payload only);
//   - Basic, Express and Tag-On packets name a logical receive queue; the
//     receive-queue cache tags are searched for a resident hardware queue
//     of that class. If the queue is resident and has room (and, for
//     Tag-On data, the Tag-On buffer has room) the packet is delivered in
//     hardware: Basic packets are written into the queue's slot behind a
//     receive header word (source, length, interrupt flag); Express packets
//     become one 64-bit entry of the Express receive queue; Tag-On packets
//     are split, the data lines going to the Tag-On buffer and the header
//     part, pointing at that buffer slot, to the Express receive queue.
//   - otherwise the whole packet, headers included, is put into the miss
//     queue for the service processor. When the miss queue itself is full
//     the link is held (in_ready low) until the service processor frees a
//     slot.
// A delivered message sets its queue's interrupt-pending bit when the
// queue's interrupt enable is set or the sender asked for an interrupt.
// Streams use valid/ready; one word moves per handshake. Packet formats
// are in nes_pkg. The routing rules follow the architecture; the stream
// framing and the per-queue pending bits are this design's choices.
module rx_dispatch
  import nes_pkg::*;
#(
  parameter int unsigned NE = NUM_EQ,
  parameter int unsigned NB = NUM_BQ
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // from the network
  input  logic                     in_valid,
  input  flit_t                    in_flit,
  output logic                     in_ready,
  // receive-queue cache tags
  output logic [LQ_W-1:0]          lk_lq,
  output logic                     lk_basic,
  input  logic                     lk_hit,
  input  logic [$clog2(NE+NB)-1:0] lk_idx,
  // Basic receive buffers
  input  logic [NB-1:0]            bb_space,
  output logic                     bb_valid,
  output flit_t                    bb_flit,
  output logic [$clog2(NB)-1:0]    bb_q,
  input  logic                     bb_ready,
  // Express receive queues
  input  logic [NE-1:0]            erx_full,
  output logic                     erx_push,
  output logic [$clog2(NE)-1:0]    erx_q,
  output logic [63:0]              erx_entry,
  // Tag-On data buffer
  input  logic                     tb_space,
  input  logic [PTR_W-1:0]         tb_prod,
  output logic                     tb_valid,
  output flit_t                    tb_flit,
  input  logic                     tb_ready,
  // miss queue
  input  logic                     mq_space,
  output logic                     mq_valid,
  output flit_t                    mq_flit,
  input  logic                     mq_ready,
  // DMA engine
  output logic                     dma_valid,
  output flit_t                    dma_flit,
  input  logic                     dma_ready,
  // interrupts
  input  logic [NE+NB-1:0]         irq_en,
  input  logic [NE+NB-1:0]         irq_clr,
  output logic [NE+NB-1:0]         irq_pend,
  // events
  output logic                     ev_basic,
  output logic                     ev_express,
  output logic                     ev_tagon,
  output logic                     ev_miss,
  output logic                     ev_dma,
  output logic                     ev_stall
);
  localparam int unsigned IW = $clog2(NE + NB);

  typedef enum logic [3:0] {
    S_H0, S_H1, S_BHDR, S_MWAIT, S_MH0, S_MH1, S_EDATA, S_EPUSH, S_PASS
  } state_e;
  typedef enum logic [1:0] {D_BASIC, D_TAGON, D_MISS, D_DMA} dest_e;

  state_e state;
  dest_e  dest;
  hdr0_t  h0;
  logic [31:0] h1, edata;
  logic [IW-1:0] qidx;
  logic [PTR_W-1:0] tslot;
  logic deliver_ok;
  logic is_basic_q;

  assign lk_lq    = h0.rxq;
  assign lk_basic = (h0.mtype == MT_BASIC);
  assign is_basic_q = (int'(lk_idx) >= int'(NE));

  // routing decision, valid in S_H1
  always_comb begin
    deliver_ok = 1'b0;
    if (lk_hit) begin
      unique case (h0.mtype)
        MT_BASIC:   deliver_ok = bb_space[($clog2(NB))'(lk_idx - IW'(NE))];
        MT_EXPRESS: deliver_ok = !erx_full[lk_idx[$clog2(NE)-1:0]];
        MT_TAGON:   deliver_ok = !erx_full[lk_idx[$clog2(NE)-1:0]] && (tb_space || h0.len <= 5'd1);
        default:    deliver_ok = 1'b0;
      endcase
    end
  end

  // stream steering
  always_comb begin
    in_ready  = 1'b0;
    bb_valid  = 1'b0;
    bb_flit   = in_flit;
    bb_q      = ($clog2(NB))'(qidx - IW'(NE));
    tb_valid  = 1'b0;
    tb_flit   = in_flit;
    mq_valid  = 1'b0;
    mq_flit   = in_flit;
    dma_valid = 1'b0;
    dma_flit  = in_flit;
    unique case (state)
      S_H0, S_H1, S_EDATA: in_ready = 1'b1;
      S_BHDR: begin
        bb_valid = 1'b1;
        bb_flit  = '{last: 1'b0, data: brx_hdr(h1[SRC_W-1:0], h0.intr, h0.len)};
      end
      S_MH0: begin mq_valid = 1'b1; mq_flit = '{last: 1'b0, data: h0}; end
      S_MH1: begin mq_valid = 1'b1; mq_flit = '{last: (h0.len == 5'd0), data: h1}; end
      S_PASS: begin
        unique case (dest)
          D_BASIC: begin bb_valid  = in_valid; in_ready = bb_ready;  end
          D_TAGON: begin tb_valid  = in_valid; in_ready = tb_ready;  end
          D_MISS:  begin mq_valid  = in_valid; in_ready = mq_ready;  end
          D_DMA:   begin dma_valid = in_valid; in_ready = dma_ready; end
          default: ;
        endcase
      end
      default: ;
    endcase
  end

  assign erx_push  = (state == S_EPUSH);
  assign erx_q     = qidx[$clog2(NE)-1:0];
  assign erx_entry = erx_pack(h1[SRC_W-1:0], h0.mtype == MT_TAGON, h0.len[4:3],
                                   (h0.mtype == MT_TAGON) ? tslot : '0, h0.tag, edata);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_H0;
      dest       <= D_MISS;
      h0         <= '0;
      h1         <= '0;
      edata      <= '0;
      qidx       <= '0;
      tslot      <= '0;
      irq_pend   <= '0;
      ev_basic   <= 1'b0;
      ev_express <= 1'b0;
      ev_tagon   <= 1'b0;
      ev_miss    <= 1'b0;
      ev_dma     <= 1'b0;
      ev_stall   <= 1'b0;
    end else begin
      ev_basic   <= 1'b0;
      ev_express <= 1'b0;
      ev_tagon   <= 1'b0;
      ev_miss    <= 1'b0;
      ev_dma     <= 1'b0;
      ev_stall   <= 1'b0;
      irq_pend   <= irq_pend & ~irq_clr;
      unique case (state)
        S_H0: if (in_valid) begin
          h0    <= hdr0_t'(in_flit.data);
          state <= S_H1;
        end
        S_H1: if (in_valid) begin
          h1   <= in_flit.data;
          qidx <= lk_idx;
          tslot <= tb_prod;
          if (h0.mtype == MT_DMA) begin
            dest   <= D_DMA;
            ev_dma <= 1'b1;
            state  <= in_flit.last ? S_H0 : S_PASS;
          end else if (deliver_ok && (lk_basic == is_basic_q)) begin
            if (irq_en[lk_idx] || h0.intr) irq_pend[lk_idx] <= 1'b1;
            if (h0.mtype == MT_BASIC) begin
              dest     <= D_BASIC;
              ev_basic <= 1'b1;
              state    <= S_BHDR;
            end else begin
              dest  <= D_TAGON;
              state <= S_EDATA;
            end
          end else begin
            dest    <= D_MISS;
            ev_miss <= 1'b1;
            state   <= S_MWAIT;
          end
        end
        S_BHDR: if (bb_ready) state <= S_PASS;
        S_MWAIT: begin
          if (mq_space) state <= S_MH0;
          else          ev_stall <= 1'b1;
        end
        S_MH0: if (mq_ready) state <= S_MH1;
        S_MH1: if (mq_ready) state <= (h0.len == 5'd0) ? S_H0 : S_PASS;
        S_EDATA: if (in_valid) begin
          edata <= in_flit.data;
          state <= in_flit.last ? S_EPUSH : S_PASS;
        end
        S_EPUSH: begin
          ev_express <= (h0.mtype == MT_EXPRESS);
          ev_tagon   <= (h0.mtype == MT_TAGON);
          state      <= S_H0;
        end
        S_PASS: if (in_valid && in_ready && in_flit.last)
          state <= (dest == D_TAGON) ? S_EPUSH : S_H0;
        default: state <= S_H0;
      endcase
    end
  end
endmodule
