// tb_dma_engine - loops the engine's packets back into its own receive side
// (dropping the two header words, as the receive dispatcher does) over a
// memory model with random ack delays. Several transfers of different
// lengths must copy the source words to the destination exactly, in packets
// of at most 8 words with correct headers, leave the words around the
// destination untouched, and count the words received.
module tb_dma_engine;
  import nes_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic cmd_valid = 0, cmd_ready, tx_busy, tx_done, out_valid, out_ready = 0, in_valid = 0, in_ready, rx_clr = 0;
  logic [SITE_W-1:0] cmd_site = '0;
  logic [SRC_W-1:0] cmd_src = '0;
  logic [31:0] cmd_src_addr = '0, cmd_dst_addr = '0, rx_words;
  logic [15:0] cmd_len = '0;
  flit_t out_flit, in_flit = '0;
  logic mem_req, mem_we, mem_ack = 0, ev_packet;
  logic [31:0] mem_addr, mem_wdata, mem_rdata = '0;
  logic [31:0] mem [4096];
  int checks = 0, failures = 0, n_pkt = 0, n_done = 0;

  dma_engine dut (.*);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // memory model: ack after 0..2 extra cycles
  always @(posedge clk) begin
    mem_ack <= 1'b0;
    if (mem_req && !mem_ack && $urandom_range(2) == 0) begin
      mem_ack <= 1'b1;
      if (mem_we) mem[mem_addr[11:0]] <= mem_wdata;
      else        mem_rdata <= mem[mem_addr[11:0]];
    end
  end

  // loopback: headers checked and removed, payload queued for the receive side
  flit_t loopq [$];
  int wip = 0, plen = 0;
  always @(posedge clk) begin
    out_ready <= ($urandom_range(3) != 0);
    if (out_valid && out_ready) begin
      if (wip == 0) begin
        hdr0_t h;
        h = hdr0_t'(out_flit.data);
        plen = int'(h.len);
        checks++;
        if (h.mtype != MT_DMA || h.site != cmd_site || plen < 2 || plen > 9) begin
          failures++; $display("FAIL dma header %h", out_flit.data);
        end
      end else if (wip == 1) begin
        checks++;
        if (out_flit.data != 32'(cmd_src)) begin failures++; $display("FAIL src word"); end
      end else begin
        loopq.push_back(out_flit);
      end
      wip = out_flit.last ? 0 : wip + 1;
    end
    if (rst_n && ev_packet) n_pkt++;
    if (rst_n && tx_done) n_done++;
  end
  logic in_ready_q;
  always @(posedge clk) in_ready_q <= in_ready;
  always @(negedge clk) begin
    if (in_valid && in_ready_q) void'(loopq.pop_front());
    in_valid = (loopq.size() != 0);
    if (in_valid) in_flit = loopq[0];
  end

  task automatic xfer(input int src_a, input int dst_a, input int len);
    logic [31:0] guard_lo, guard_hi;
    int pk0;
    guard_lo = mem[dst_a - 1]; guard_hi = mem[dst_a + len];
    pk0 = n_pkt;
    @(negedge clk); rx_clr = 1; @(negedge clk); rx_clr = 0;
    while (!cmd_ready) @(negedge clk);
    cmd_valid = 1; cmd_site = 5'($urandom); cmd_src = 15'($urandom);
    cmd_src_addr = 32'(src_a); cmd_dst_addr = 32'(dst_a); cmd_len = 16'(len);
    @(negedge clk); cmd_valid = 0;
    while (tx_busy || loopq.size() != 0 || int'(rx_words) != len) @(negedge clk);
    repeat (5) @(negedge clk);
    for (int i = 0; i < len; i++) begin
      checks++;
      if (mem[dst_a + i] !== mem[src_a + i]) begin failures++; $display("FAIL word %0d of %0d", i, len); end
    end
    checks++;
    if (mem[dst_a - 1] !== guard_lo || mem[dst_a + len] !== guard_hi) begin failures++; $display("FAIL guard"); end
    checks++;
    if (n_pkt - pk0 != (len + 7) / 8) begin failures++; $display("FAIL packets %0d for %0d words", n_pkt - pk0, len); end
  endtask

  initial begin
    for (int i = 0; i < 4096; i++) mem[i] = $urandom;
    repeat (2) @(negedge clk); rst_n = 1;
    xfer(16, 2048, 64);    // 256 bytes, eight full packets
    xfer(100, 3000, 13);   // partial last packet
    xfer(500, 1500, 1);
    xfer(700, 2500, 37);
    checks++;
    if (n_done != 4) begin failures++; $display("FAIL done pulses %0d", n_done); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
