// tb_nes_core - end-to-end test of two NES cores (sites A and B) whose
// network links are wired back to back, each with a processor-bus memory
// model for DMA and a responder for Reclaim requests. Both cores use their
// default parameters.
//
// System code on each site's sP port sets up queues, the Destination Table
// and the receive tags; programs on the aP ports then use every mechanism:
// Basic messages (with software coherence and with NES Reclaim), Express
// and Tag-On messages, the Empty Express Message, OnePoll (Express,
// Basic-notice and empty answers), messages to a non-resident queue (miss
// queue), the link stall when the miss queue is full, an Express transmit
// queue overflow, the receiver interrupt, NES Reclaim on receive, Express
// and Tag-On sends by the service processor, and a DMA transfer. Every
// delivered word is compared with what was sent, and every mechanism must
// have happened at least once. The Express one-way time, store to
// receivable entry, is measured and must stay within the 70 cycles of the
// 2 us nearest-neighbour budget at a 35 MHz NES clock.
module tb_nes_core;
  import nes_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  // ---- per-site signals (index 0 = site A, 1 = site B)
  logic        ap_req [2], ap_we [2], ap_ack [2], sp_req [2], sp_we [2], sp_ack [2];
  logic [31:0] ap_addr [2], ap_wdata [2], sp_addr [2], sp_wdata [2];
  logic [63:0] ap_rdata [2], sp_rdata [2];
  logic        tx_valid [2], tx_ready [2], rx_valid [2], rx_ready [2];
  flit_t       tx_flit [2], rx_flit [2];
  logic        rcl_req [2], rcl_ack [2], mem_req [2], mem_we [2], mem_ack [2], irq [2];
  logic [31:0] rcl_addr [2], mem_addr [2], mem_wdata [2], mem_rdata [2];
  logic [15:0] irq_pend [2];

  // back-to-back link
  assign rx_valid[1] = tx_valid[0];
  assign rx_flit[1]  = tx_flit[0];
  assign tx_ready[0] = rx_ready[1];
  assign rx_valid[0] = tx_valid[1];
  assign rx_flit[0]  = tx_flit[1];
  assign tx_ready[1] = rx_ready[0];

  for (genvar n = 0; n < 2; n++) begin : g_site
    nes_core u_nes (
      .clk, .rst_n,
      .ap_req(ap_req[n]), .ap_we(ap_we[n]), .ap_addr(ap_addr[n]), .ap_wdata(ap_wdata[n]),
      .ap_ack(ap_ack[n]), .ap_rdata(ap_rdata[n]),
      .sp_req(sp_req[n]), .sp_we(sp_we[n]), .sp_addr(sp_addr[n]), .sp_wdata(sp_wdata[n]),
      .sp_ack(sp_ack[n]), .sp_rdata(sp_rdata[n]),
      .net_tx_valid(tx_valid[n]), .net_tx_flit(tx_flit[n]), .net_tx_ready(tx_ready[n]),
      .net_rx_valid(rx_valid[n]), .net_rx_flit(rx_flit[n]), .net_rx_ready(rx_ready[n]),
      .rcl_req(rcl_req[n]), .rcl_addr(rcl_addr[n]), .rcl_ack(rcl_ack[n]),
      .mem_req(mem_req[n]), .mem_we(mem_we[n]), .mem_addr(mem_addr[n]), .mem_wdata(mem_wdata[n]),
      .mem_ack(mem_ack[n]), .mem_rdata(mem_rdata[n]),
      .irq_pend(irq_pend[n]), .irq(irq[n]));

    // processor-bus memory model (DMA) and Reclaim responder
    logic [31:0] mem [4096];
    always @(posedge clk) begin
      mem_ack[n] <= 1'b0;
      if (mem_req[n] && !mem_ack[n] && $urandom_range(1) == 0) begin
        mem_ack[n] <= 1'b1;
        if (mem_we[n]) mem[mem_addr[n][11:0]] <= mem_wdata[n];
        else           mem_rdata[n] <= mem[mem_addr[n][11:0]];
      end
      rcl_ack[n] <= rcl_req[n] && !rcl_ack[n] && ($urandom_range(2) == 0);
    end
  end

  int checks = 0, failures = 0;
  // mechanism counters
  int n_basic_tx = 0, n_reclaim = 0, n_express = 0, n_tagon = 0, n_empty = 0, n_poll_e = 0;
  int n_rx_reclaim = 0, n_sp_send = 0, n_poll_b = 0, n_poll_none = 0, n_miss = 0, n_stall = 0, n_ovf = 0, n_irq = 0, n_dma_pkt = 0;

  always @(posedge clk) if (rst_n) begin
    if (g_site[0].u_nes.ev_launch) n_basic_tx++;
    if (g_site[0].u_nes.ev_reclaim) n_reclaim++;
    if (g_site[1].u_nes.ev_rx_express) n_express++;
    if (g_site[1].u_nes.ev_rx_tagon) n_tagon++;
    if (g_site[1].u_nes.ev_empty_read) n_empty++;
    if (g_site[1].u_nes.ev_rx_miss) n_miss++;
    if (g_site[1].u_nes.ev_rx_stall) n_stall++;
    if (g_site[0].u_nes.ev_etx_overflow) n_ovf++;
    if (g_site[0].u_nes.ev_dma_pkt) n_dma_pkt++;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- bus tasks
  task automatic ap_wr(input int n, input logic [31:0] a, input logic [31:0] d);
    @(negedge clk); ap_req[n] = 1; ap_we[n] = 1; ap_addr[n] = a; ap_wdata[n] = d;
    @(negedge clk); ap_req[n] = 0; ap_we[n] = 0;
  endtask
  task automatic ap_rd(input int n, input logic [31:0] a, output logic [63:0] d);
    @(negedge clk); ap_req[n] = 1; ap_we[n] = 0; ap_addr[n] = a;
    @(negedge clk); ap_req[n] = 0; d = ap_rdata[n];
  endtask
  task automatic sp_wr(input int n, input logic [31:0] a, input logic [31:0] d);
    @(negedge clk); sp_req[n] = 1; sp_we[n] = 1; sp_addr[n] = a; sp_wdata[n] = d;
    @(negedge clk); sp_req[n] = 0; sp_we[n] = 0;
  endtask
  task automatic sp_rd(input int n, input logic [31:0] a, output logic [63:0] d);
    @(negedge clk); sp_req[n] = 1; sp_we[n] = 0; sp_addr[n] = a;
    @(negedge clk); sp_req[n] = 0; d = sp_rdata[n];
  endtask
  task automatic chk(input logic [63:0] got, input logic [63:0] exp, input string what);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %h exp %h", what, got, exp); end
  endtask

  // ---- address helpers
  function automatic logic [31:0] a_sram(input int w); return {RG_SRAM, 26'(w), 2'b00}; endfunction
  function automatic logic [31:0] a_ptr(input int i); return {RG_PTR, 20'd0, 6'(i), 2'b00}; endfunction
  function automatic logic [31:0] a_cfg(input int sub, input int idx);
    return {RG_CFG, 12'd0, 4'(sub), 10'(idx), 2'b00};
  endfunction
  function automatic logic [31:0] a_dma(input int i); return {RG_DMA, 23'd0, 3'(i), 2'b00}; endfunction
  function automatic logic [31:0] a_etx(input logic tagon, input int lines, input int line, input int q,
                                        input int ld, input logic [4:0] tag, input logic intr);
    return {tagon ? RG_TAGON : RG_ETX, 2'(lines), 10'(line), 3'(q), 5'(ld), tag, intr, 2'b00};
  endfunction
  function automatic logic [31:0] qcfg(input int base, input int size, input logic rcl);
    return 32'({rcl, 8'(size), 13'(base)});
  endfunction

  // queue layout (both sites): Basic tx q0 at 0 (4 slots), q1 at 96 (4 slots, Reclaim);
  // Basic rx q0 at 1024 (4 slots); Tag-On buffer at 2048 (4 slots);
  // Tag-On source lines at 4096; miss queue at sSRAM 0 (2 slots)
  localparam int BTX0 = 0, BTX1 = 96, BRX0 = 1024, TBUF = 2048, TSRC = 4096;

  // receive-side Reclaim at site B: every line cleaned must be a line of a
  // Basic receive slot
  always @(posedge clk) if (rst_n && g_site[1].u_nes.rcl_sel_rx && rcl_req[1] && rcl_ack[1]) begin
    n_rx_reclaim++;
    checks++;
    if (!(rcl_addr[1] >= 32'(BRX0 * 4) && rcl_addr[1] < 32'((BRX0 + 4 * SLOT_WORDS) * 4) &&
          rcl_addr[1][4:0] == 5'd0)) begin
      failures++; $display("FAIL receive reclaim address %h", rcl_addr[1]);
    end
  end
  localparam int LQ_B = 37, LQ_E = 12, LQ_NR = 300;   // logical queue names at site B

  task automatic setup(input int n);
    sp_wr(n, a_cfg(2, 0), qcfg(BTX0, 4, 1'b0));
    sp_wr(n, a_cfg(2, 1), qcfg(BTX1, 4, 1'b1));
    sp_wr(n, a_cfg(3, 0), qcfg(BRX0, 4, 1'b1));   // receive with NES Reclaim
    sp_wr(n, a_cfg(4, 0), qcfg(TBUF, 4, 1'b0));
    sp_wr(n, a_cfg(5, 0), qcfg(0, 2, 1'b0));
    // receive tags: Express queue 0 caches logical queue LQ_E, Basic queue 0 caches LQ_B
    sp_wr(n, a_cfg(1, 0), 32'({1'b1, 9'(LQ_E)}));
    sp_wr(n, a_cfg(1, 8), 32'({1'b1, 9'(LQ_B)}));
    // Destination Table: Basic txq 0/1 (rows 8/9) and Express txq 0 (row 0)
    //   logical dest 2 -> <site 1, LQ_B, src 0x155>, dest 3 -> <site 1, LQ_NR, src 0x66>
    //   Express dest 1 -> <site 1, LQ_E, src 0x2AA>
    sp_wr(n, a_cfg(0, {4'd8, 5'd2}), 32'({5'd1, 9'(LQ_B), 15'h155}));
    sp_wr(n, a_cfg(0, {4'd9, 5'd2}), 32'({5'd1, 9'(LQ_B), 15'h155}));
    sp_wr(n, a_cfg(0, {4'd8, 5'd3}), 32'({5'd1, 9'(LQ_NR), 15'h066}));
    sp_wr(n, a_cfg(0, {4'd0, 5'd1}), 32'({5'd1, 9'(LQ_E), 15'h2AA}));
    sp_wr(n, a_cfg(0, {4'd0, 5'd3}), 32'({5'd1, 9'(LQ_NR), 15'h066}));
    // Empty Express Message
    sp_wr(n, a_cfg(6, 0), 32'h0000_E0E0);
    sp_wr(n, a_cfg(6, 1), 32'h8000_0E0E);
  endtask

  // Basic send from site A queue q, logical dest ld; returns the payload
  int sw_prod [2];
  task automatic basic_send(input int q, input int ld, input int len, input logic intr,
                            output logic [31:0] pl [$]);
    int base;
    logic [63:0] pc;
    base = (q == 0 ? BTX0 : BTX1) + sw_prod[q] * SLOT_WORDS;
    do ap_rd(0, a_ptr(q), pc); while (((sw_prod[q] + 1) % 4) == int'(pc[7:0]));   // space?
    pl.delete();
    ap_wr(0, a_sram(base), {16'd0, intr, 2'b00, 5'(len), 3'b000, 5'(ld)});
    for (int i = 1; i <= len; i++) begin
      logic [31:0] d;
      d = $urandom;
      pl.push_back(d);
      ap_wr(0, a_sram(base + i), d);
    end
    sw_prod[q] = (sw_prod[q] + 1) % 4;
    ap_wr(0, a_ptr(q), 32'(sw_prod[q]));   // launch
  endtask

  // Basic receive at site B queue 0: wait for a message, check it, free the slot
  int rx_cons = 0;
  task automatic basic_recv(input logic [31:0] pl [$], input logic [14:0] src, input logic intr);
    logic [63:0] pc, w;
    int base, tmo;
    tmo = 0;
    do begin ap_rd(1, a_ptr(8), pc); tmo++; end while (int'(pc[15:8]) == rx_cons && tmo < 2000);
    base = BRX0 + rx_cons * SLOT_WORDS;
    ap_rd(1, a_sram(base), w);
    chk(w[31:0], {1'b0, src, intr, 2'b00, 5'(pl.size()), 8'h00}, "basic rx header");
    foreach (pl[i]) begin
      ap_rd(1, a_sram(base + 1 + i), w);
      chk(w[31:0], pl[i], "basic rx payload");
    end
    rx_cons = (rx_cons + 1) % 4;
    ap_wr(1, a_ptr(8), 32'(rx_cons));
  endtask

  initial begin
    logic [31:0] pl [$];
    logic [63:0] r;
    for (int n = 0; n < 2; n++) begin
      ap_req[n] = 0; ap_we[n] = 0; ap_addr[n] = '0; ap_wdata[n] = '0;
      sp_req[n] = 0; sp_we[n] = 0; sp_addr[n] = '0; sp_wdata[n] = '0;
    end
    repeat (3) @(negedge clk); rst_n = 1;
    setup(0);
    setup(1);

    // ---- 1. Basic messages, software coherence (q0) and NES Reclaim (q1)
    for (int m = 0; m < 6; m++) begin
      basic_send(m % 2, 2, $urandom_range(BASIC_MIN, BASIC_MAX), 1'b0, pl);
      basic_recv(pl, 15'h155, 1'b0);
    end

    // ---- 2. Express message and its one-way time
    begin
      int t0, t1;
      logic [31:0] d;
      d = 32'hCAFE_0001;
      ap_wr(0, a_etx(1'b0, 0, 0, 0, 1, 5'h15, 1'b0), d);
      t0 = $time / 10;
      while (!g_site[1].u_nes.erx_nonempty[0]) @(negedge clk);
      t1 = $time / 10;
      $display("INFO Express store to receivable entry: %0d cycles", t1 - t0);
      checks++;
      if (t1 - t0 > 70) begin failures++; $display("FAIL Express latency %0d cycles", t1 - t0); end
      ap_rd(1, {RG_ERX, 22'd0, 3'd0, 3'b000}, r);
      chk(r, {1'b0, 15'h2AA, 1'b0, 2'b00, 8'd0, 5'h15, d}, "express entry");
    end

    // ---- 3. Empty Express Message
    ap_rd(1, {RG_ERX, 22'd0, 3'd0, 3'b000}, r);
    chk(r, 64'h8000_0E0E_0000_E0E0, "empty express message");

    // ---- 4. Tag-On: two cache lines from site A's aSRAM
    begin
      logic [31:0] lines [16];
      logic [63:0] pc;
      for (int i = 0; i < 16; i++) begin lines[i] = $urandom; ap_wr(0, a_sram(TSRC + i), lines[i]); end
      ap_wr(0, a_etx(1'b1, 2, TSRC / 8, 0, 1, 5'h07, 1'b0), 32'h0000_1000);
      do ap_rd(1, a_ptr(16), pc); while (pc[15:8] == pc[7:0]);
      ap_rd(1, {RG_ERX, 22'd0, 3'd0, 3'b000}, r);
      chk(r, {1'b0, 15'h2AA, 1'b1, 2'd2, 8'd0, 5'h07, 32'h0000_1000}, "tag-on entry");
      for (int i = 0; i < 16; i++) begin
        logic [63:0] w;
        ap_rd(1, a_sram(TBUF + i), w);
        chk(w[31:0], lines[i], "tag-on data");
      end
      ap_wr(1, a_ptr(16), 32'd1);   // free the Tag-On buffer slot
    end

    // ---- 4b. sP sending: site A's sP sends an Express message and a one-line
    //          Tag-On from its sSRAM through its own transmit queue 0
    begin
      logic [31:0] sl [8];
      logic [63:0] pc;
      sp_wr(0, a_cfg(9, {1'b0, 5'd4}), 32'({5'd1, 9'(LQ_E), 15'h3C3}));   // sP row 0, dest 4
      sp_wr(0, {RG_ETX, 2'd0, 10'd0, 3'd0, 5'd4, 5'h0A, 1'b0, 2'b00}, 32'h5050_0001);
      do begin ap_rd(1, {RG_ERX, 22'd0, 3'd0, 3'b000}, r); end while (r[63]);
      chk(r, {1'b0, 15'h3C3, 1'b0, 2'd0, 8'd0, 5'h0A, 32'h5050_0001}, "sP express entry");
      if (r[31:0] == 32'h5050_0001) n_sp_send++;
      for (int i = 0; i < 8; i++) begin sl[i] = $urandom; sp_wr(0, a_sram(2048 + i), sl[i]); end
      sp_wr(0, {RG_TAGON, 2'd1, 10'(2048 / 8), 3'd0, 5'd4, 5'h0B, 1'b0, 2'b00}, 32'h5050_0002);
      do ap_rd(1, a_ptr(16), pc); while (pc[15:8] == pc[7:0]);
      ap_rd(1, {RG_ERX, 22'd0, 3'd0, 3'b000}, r);
      chk(r, {1'b0, 15'h3C3, 1'b1, 2'd1, 8'd1, 5'h0B, 32'h5050_0002}, "sP tag-on entry");
      if (r[31:0] == 32'h5050_0002) n_sp_send++;
      for (int i = 0; i < 8; i++) begin
        logic [63:0] w;
        ap_rd(1, a_sram(TBUF + SLOT_WORDS + i), w);
        chk(w[31:0], sl[i], "sP tag-on data");
      end
      ap_wr(1, a_ptr(16), 32'd2);
      sp_rd(0, {RG_PTR, 20'd0, 6'd8, 2'b00}, pc);
      chk(pc[16:0], {1'b0, 8'd2, 8'd2}, "sP transmit queue pointers");
    end

    // ---- 5. OnePoll: Express, Basic notice, empty
    begin
      logic [31:0] d;
      d = 32'h0BAD_F00D;
      ap_wr(0, a_etx(1'b0, 0, 0, 0, 1, 5'h01, 1'b0), d);
      while (!g_site[1].u_nes.erx_nonempty[0]) @(negedge clk);
      ap_rd(1, {RG_POLL, 9'd0, 16'h0101, 3'b000}, r);
      chk(r, {1'b0, 15'h2AA, 1'b0, 2'b00, 8'd0, 5'h01, d}, "onepoll express");
      if (r[31:0] == d) n_poll_e++;
      basic_send(0, 2, 4, 1'b1, pl);        // per-message interrupt request
      while (g_site[1].u_nes.brx_prod[0] == g_site[1].u_nes.brx_cons[0]) @(negedge clk);
      repeat (5) @(negedge clk);
      ap_rd(1, {RG_POLL, 9'd0, 16'h0101, 3'b000}, r);
      chk(r[63:56], 8'h90, "onepoll basic notice");
      if (r[63:56] == 8'h90) n_poll_b++;
      checks++;
      if (!irq[1] || !irq_pend[1][8]) begin failures++; $display("FAIL receiver interrupt"); end
      else n_irq++;
      sp_wr(1, a_cfg(7, 1), 32'hFFFF);      // clear pending interrupts
      basic_recv(pl, 15'h155, 1'b1);
      ap_rd(1, {RG_POLL, 9'd0, 16'h0101, 3'b000}, r);
      chk(r, 64'h8000_0E0E_0000_E0E0, "onepoll empty");
      if (r == 64'h8000_0E0E_0000_E0E0) n_poll_none++;
    end

    // ---- 6. Non-resident queue: packet lands in site B's miss queue (sSRAM)
    begin
      logic [63:0] w, pc;
      basic_send(0, 3, 5, 1'b0, pl);
      do sp_rd(1, {RG_PTR, 28'd0}, pc); while (pc[15:8] == pc[7:0]);
      sp_rd(1, a_sram(0), w);
      chk(64'(w[26:18]), 64'(LQ_NR), "miss queue header rxq");
      chk(w[17:16], MT_BASIC, "miss queue header type");
      sp_rd(1, a_sram(1), w);
      chk(w[14:0], 15'h066, "miss queue source id");
      foreach (pl[i]) begin
        sp_rd(1, a_sram(2 + i), w);
        chk(w[31:0], pl[i], "miss queue payload");
      end
      // miss queue (2 slots, one usable) is now full: the next miss stalls the link,
      // and the Express queue behind it overflows
      ap_wr(0, a_etx(1'b0, 0, 0, 0, 3, 5'h02, 1'b0), 32'h1111_0000);
      repeat (30) @(negedge clk);
      for (int k = 0; k < 6; k++) ap_wr(0, a_etx(1'b0, 0, 0, 0, 1, 5'(k), 1'b0), 32'h2222_0000 + k);
      ap_rd(0, a_ptr(24), r);
      checks++;
      if (!r[16]) begin failures++; $display("FAIL Express overflow flag not set"); end
      sp_wr(1, {RG_PTR, 28'd0}, 32'd1);     // sP frees the miss slot: link resumes
      do sp_rd(1, {RG_PTR, 28'd0}, pc); while (pc[15:8] == 8'd1);
      sp_rd(1, a_sram(32 + 2), w);
      chk(w[31:0], 32'h1111_0000, "stalled miss packet data");
      // the Express message in flight was taken from the queue before the stall,
      // so the queue held four more; those four arrive in order, the rest were dropped
      for (int k = 0; k < 4; k++) begin
        int tmo;
        tmo = 0;
        do begin ap_rd(1, {RG_ERX, 22'd0, 3'd0, 3'b000}, r); tmo++; end
          while (r[63] && tmo < 500);
        chk(r[31:0], 32'h2222_0000 + k, "express after stall");
      end
      repeat (50) @(negedge clk);
      ap_rd(1, {RG_ERX, 22'd0, 3'd0, 3'b000}, r);
      chk(r, 64'h8000_0E0E_0000_E0E0, "dropped Express stores never arrive");
    end

    // ---- 7. DMA: 64 words (256 bytes) from site A memory to site B memory
    begin
      logic [63:0] st;
      for (int i = 0; i < 64; i++) g_site[0].mem[256 + i] = $urandom;
      for (int i = 0; i < 64; i++) g_site[1].mem[1024 + i] = '0;
      sp_wr(1, a_dma(4), 32'd0);
      sp_wr(0, a_dma(0), 32'd1024);
      sp_wr(0, a_dma(1), 32'd256);
      sp_wr(0, a_dma(2), 32'({5'd1, 15'h0077}));
      sp_wr(0, a_dma(3), 32'd64);
      do sp_rd(1, a_dma(0), st); while (st[31:0] != 32'd64);
      for (int i = 0; i < 64; i++) begin
        checks++;
        if (g_site[1].mem[1024 + i] !== g_site[0].mem[256 + i]) begin failures++; $display("FAIL dma word %0d", i); end
      end
    end

    repeat (20) @(negedge clk);
    $display("INFO basic_tx=%0d reclaim=%0d express=%0d tagon=%0d empty=%0d poll_e=%0d poll_b=%0d poll_none=%0d",
             n_basic_tx, n_reclaim, n_express, n_tagon, n_empty, n_poll_e, n_poll_b, n_poll_none);
    $display("INFO miss=%0d stall=%0d overflow=%0d irq=%0d dma_packets=%0d rx_reclaim=%0d sp_send=%0d",
             n_miss, n_stall, n_ovf, n_irq, n_dma_pkt, n_rx_reclaim, n_sp_send);
    checks++;
    if (n_basic_tx == 0 || n_reclaim == 0 || n_express == 0 || n_tagon == 0 || n_empty == 0 ||
        n_poll_e == 0 || n_poll_b == 0 || n_poll_none == 0 || n_miss == 0 || n_stall == 0 ||
        n_ovf == 0 || n_irq == 0 || n_dma_pkt != 8 || n_rx_reclaim == 0 || n_sp_send != 2) begin
      failures++; $display("FAIL a mechanism never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
