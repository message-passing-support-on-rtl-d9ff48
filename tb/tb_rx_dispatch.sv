// tb_rx_dispatch - sends random Basic, Express, Tag-On and DMA packets, to
// resident and non-resident queues, with queue space switched on and off,
// and checks where each packet goes and what arrives there: Basic receive
// header word and payload, the 64-bit Express entry, the Tag-On data and its
// buffer slot, the complete packet in the miss queue, the DMA payload. It
// also holds the miss queue full to see the link stall, and checks the
// interrupt-pending bits.
module tb_rx_dispatch;
  import nes_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid = 0, in_ready;
  flit_t in_flit = '0;
  logic [LQ_W-1:0] lk_lq;
  logic lk_basic, lk_hit;
  logic [3:0] lk_idx;
  logic [7:0] bb_space = '1, erx_full = '0;
  logic bb_valid, bb_ready, erx_push, tb_space = 1, tb_valid, tb_ready, mq_space = 1, mq_valid, mq_ready;
  logic dma_valid, dma_ready;
  flit_t bb_flit, tb_flit, mq_flit, dma_flit;
  logic [2:0] bb_q, erx_q;
  logic [63:0] erx_entry;
  logic [PTR_W-1:0] tb_prod = 8'd5;
  logic [15:0] irq_en = 16'h0003, irq_clr = '0, irq_pend;
  logic ev_basic, ev_express, ev_tagon, ev_miss, ev_dma, ev_stall;
  int checks = 0, failures = 0;
  int n_basic = 0, n_express = 0, n_tagon = 0, n_miss = 0, n_dma = 0, n_stall = 0;

  // resident queues: Express/Tag-On logical 100..107 -> 0..7, Basic 200..207 -> 8..15
  always_comb begin
    lk_hit = 1'b0; lk_idx = '0;
    if (!lk_basic && lk_lq >= 9'd100 && lk_lq < 9'd108) begin lk_hit = 1'b1; lk_idx = 4'(lk_lq - 9'd100); end
    if (lk_basic && lk_lq >= 9'd200 && lk_lq < 9'd208) begin lk_hit = 1'b1; lk_idx = 4'(8 + lk_lq - 9'd200); end
  end

  rx_dispatch dut (.*);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected word streams per sink
  logic [31:0] exp_bb [$], exp_tb [$], exp_mq [$], exp_dma [$];
  int exp_bbq [$];
  logic [63:0] exp_erx [$];
  int exp_erxq [$];

  always @(posedge clk) begin
    bb_ready  <= ($urandom_range(3) != 0);
    tb_ready  <= ($urandom_range(3) != 0);
    mq_ready  <= ($urandom_range(3) != 0);
    dma_ready <= ($urandom_range(3) != 0);
  end

  task automatic expect_word(inout logic [31:0] q [$], input logic [31:0] got, input string nm);
    checks++;
    if (q.size() == 0) begin failures++; $display("FAIL %s unexpected %h", nm, got); end
    else begin
      logic [31:0] e;
      e = q.pop_front();
      if (got !== e) begin failures++; $display("FAIL %s got %h exp %h", nm, got, e); end
    end
  endtask

  always @(posedge clk) if (rst_n) begin
    if (bb_valid && bb_ready) begin
      expect_word(exp_bb, bb_flit.data, "basic");
      if (exp_bbq.size() > 0 && int'(bb_q) != exp_bbq[0]) begin failures++; $display("FAIL basic queue %0d", bb_q); end
      if (bb_flit.last) void'(exp_bbq.pop_front());
    end
    if (tb_valid && tb_ready) expect_word(exp_tb, tb_flit.data, "tagon-data");
    if (mq_valid && mq_ready) expect_word(exp_mq, mq_flit.data, "miss");
    if (dma_valid && dma_ready) expect_word(exp_dma, dma_flit.data, "dma");
    if (erx_push) begin
      checks++;
      if (exp_erx.size() == 0 || erx_entry !== exp_erx[0] || int'(erx_q) != exp_erxq[0]) begin
        failures++; $display("FAIL erx %h q%0d", erx_entry, erx_q);
      end else begin void'(exp_erx.pop_front()); void'(exp_erxq.pop_front()); end
    end
    if (ev_basic) n_basic++;
    if (ev_express) n_express++;
    if (ev_tagon) n_tagon++;
    if (ev_miss) n_miss++;
    if (ev_dma) n_dma++;
    if (ev_stall) n_stall++;
  end

  task automatic send(input logic [31:0] w [$]);
    foreach (w[i]) begin
      @(negedge clk);
      in_valid = 1; in_flit.data = w[i]; in_flit.last = (i == w.size() - 1);
      #4;
      while (!in_ready) begin @(negedge clk); #4; end
    end
    @(negedge clk); in_valid = 0;
  endtask

  task automatic packet(input msg_type_e t, input int rxq, input int len, input logic intr);
    logic [31:0] w [$];
    hdr0_t h;
    logic [31:0] src;
    logic resident, room;
    int q;
    h = '0; h.site = 5'd3; h.rxq = 9'(rxq); h.mtype = t; h.intr = intr; h.tag = 5'($urandom); h.len = 5'(len);
    src = 32'($urandom_range(32767));
    w.push_back(32'(h)); w.push_back(src);
    for (int i = 0; i < len; i++) w.push_back($urandom);
    if (t == MT_DMA) begin
      for (int i = 2; i < w.size(); i++) exp_dma.push_back(w[i]);
    end else begin
      if (t == MT_BASIC) begin
        resident = (rxq >= 200 && rxq < 208); q = rxq - 200;
        room = resident && bb_space[q];
      end else begin
        resident = (rxq >= 100 && rxq < 108); q = rxq - 100;
        room = resident && !erx_full[q] && (t == MT_EXPRESS || len == 1 || tb_space);
      end
      if (!room) begin
        foreach (w[i]) exp_mq.push_back(w[i]);
      end else if (t == MT_BASIC) begin
        exp_bb.push_back({1'b0, src[14:0], intr, 2'b00, 5'(len), 8'h00});
        for (int i = 2; i < w.size(); i++) exp_bb.push_back(w[i]);
        exp_bbq.push_back(q);
      end else begin
        exp_erx.push_back({1'b0, src[14:0], t == MT_TAGON, 2'((len - 1) / 8), (t == MT_TAGON) ? tb_prod : 8'd0, h.tag, w[2]});
        exp_erxq.push_back(q);
        for (int i = 3; i < w.size(); i++) exp_tb.push_back(w[i]);
      end
    end
    send(w);
  endtask

  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    for (int m = 0; m < 300; m++) begin
      int k;
      bb_space = 8'($urandom) | 8'($urandom);
      erx_full = 8'($urandom) & 8'($urandom);
      tb_space = ($urandom_range(3) != 0);
      tb_prod  = 8'($urandom);
      k = $urandom_range(3);
      case (k)
        0: packet(MT_BASIC, ($urandom_range(4) == 0) ? 300 : 200 + $urandom_range(7), $urandom_range(4, 22), 1'($urandom));
        1: packet(MT_EXPRESS, ($urandom_range(4) == 0) ? 301 : 100 + $urandom_range(7), 1, 1'b0);
        2: packet(MT_TAGON, ($urandom_range(4) == 0) ? 302 : 100 + $urandom_range(7), 1 + 8 * $urandom_range(3), 1'b0);
        default: packet(MT_DMA, 0, $urandom_range(1, 9), 1'b0);
      endcase
      // wait until the packet has fully left before changing the space inputs
      while (exp_bb.size() + exp_tb.size() + exp_mq.size() + exp_dma.size() + exp_erx.size() != 0) @(negedge clk);
      repeat (2) @(negedge clk);
    end
    // miss queue full: the link must stall until space returns
    mq_space = 0;
    fork
      packet(MT_BASIC, 333, 4, 1'b0);
      begin repeat (30) @(negedge clk); mq_space = 1; end
    join
    while (exp_mq.size() != 0) @(negedge clk);
    // interrupts: Express queue 0 and 1 enabled; Basic queue 8 only by message flag
    checks++;
    if ((irq_pend & 16'h0003) == 0) begin failures++; $display("FAIL no irq pending"); end
    @(negedge clk); irq_clr = '1; @(negedge clk); irq_clr = '0;
    checks++;
    if (irq_pend !== 16'h0) begin failures++; $display("FAIL irq not cleared"); end
    bb_space = '1;
    packet(MT_BASIC, 203, 4, 1'b1);
    repeat (40) @(negedge clk);
    checks++;
    if (irq_pend !== 16'h0800) begin failures++; $display("FAIL per-message irq %h", irq_pend); end
    checks++;
    if (n_basic == 0 || n_express == 0 || n_tagon == 0 || n_miss == 0 || n_dma == 0 || n_stall < 20) begin
      failures++; $display("FAIL coverage");
    end
    $display("INFO basic=%0d express=%0d tagon=%0d miss=%0d dma=%0d stall_cycles=%0d", n_basic, n_express, n_tagon, n_miss, n_dma, n_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
