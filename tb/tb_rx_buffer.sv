// tb_rx_buffer - stores random packets into two receive queues, reads the
// slots back through the other SRAM port and compares, checks the producer
// advance and wrap, that space drops when a queue is full and returns after
// a consumer-pointer store, and that words past the slot end are dropped.
// Queue 1 uses NES Reclaim: before any word of a packet is written, each
// line of its slot must have been reclaimed, at the right address; queue 0
// must never reclaim. A responder acknowledges reclaims after random delays.
// Small sizes (2 queues, 16-word slots) keep the run short.
module tb_rx_buffer;
  import nes_pkg::*;
  localparam int NQ = 2, SLOT = 16;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic cfg_we = 0, cons_we = 0, in_valid = 0, in_ready, sr_req, sr_we, sr_gnt, sr_rvalid, ev_enq;
  logic [0:0] cfg_q = '0, cons_q = '0, in_q = '0;
  logic [SA_W-1:0] cfg_base = '0, sr_addr;
  logic [PTR_W-1:0] cfg_size = '0, cons_val = '0;
  logic [NQ-1:0][PTR_W-1:0] prod, cons;
  logic [NQ-1:0] space;
  flit_t in_flit = '0;
  logic [31:0] sr_wdata, sr_rdata;
  logic a_en = 0;
  logic [SA_W-1:0] a_addr = '0;
  logic [31:0] a_rdata;
  logic m_en, m_we;
  logic [SA_W-1:0] m_addr;
  logic [31:0] m_wdata, m_rdata;
  int checks = 0, failures = 0, n_enq = 0, n_rcl = 0, rcl_this = 0;
  logic cfg_reclaim = 0, rcl_req, rcl_ack = 0, ev_reclaim;
  logic [SA_W-1:0] rcl_addr;
  localparam int NL = SLOT / LINE_WORDS;
  int base_of [NQ] = '{100, 300};
  int size_of [NQ] = '{3, 5};

  rx_buffer #(.NQ(NQ), .SLOT(SLOT)) dut (.*);
  sram_arb #(.N(1)) arb (.clk, .rst_n, .req(sr_req), .we(sr_we), .addr(sr_addr), .wdata(sr_wdata),
                         .gnt(sr_gnt), .rvalid(sr_rvalid), .rdata(sr_rdata),
                         .m_en, .m_we, .m_addr, .m_wdata, .m_rdata);
  msg_sram mem (.clk, .a_en, .a_we(1'b0), .a_addr, .a_wdata('0), .a_rdata,
                .b_en(m_en), .b_we(m_we), .b_addr(m_addr), .b_wdata(m_wdata), .b_rdata(m_rdata));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && ev_enq) n_enq++;

  // reclaim responder and ordering checks
  always @(posedge clk) if (rst_n) begin
    if (rcl_req && rcl_ack) begin
      checks++; n_rcl++;
      if (in_q != 1'b1 || int'(rcl_addr) != base_of[1] + int'(prod[1]) * SLOT + rcl_this * LINE_WORDS) begin
        failures++; $display("FAIL reclaim q%0d addr %0d line %0d", in_q, rcl_addr, rcl_this);
      end
      rcl_this++;
    end
    if (sr_req && sr_gnt) begin
      checks++;
      if (rcl_this != ((in_q == 1'b1) ? NL : 0)) begin
        failures++; $display("FAIL write before reclaim q%0d (%0d lines)", in_q, rcl_this);
      end
    end
    if (in_valid && in_ready && in_flit.last) rcl_this = 0;
    rcl_ack <= rcl_req && !rcl_ack && ($urandom_range(2) == 0);
  end

  task automatic send(input int q, input logic [31:0] w [$]);
    foreach (w[i]) begin
      @(negedge clk);
      in_valid = 1; in_q = 1'(q); in_flit.data = w[i]; in_flit.last = (i == w.size() - 1);
      #4;
      while (!in_ready) begin @(negedge clk); #4; end
    end
    @(negedge clk); in_valid = 0;
  endtask

  task automatic rd(input int a, output logic [31:0] d);
    @(negedge clk); a_en = 1; a_addr = SA_W'(a);
    @(negedge clk); a_en = 0; d = a_rdata;
  endtask

  task automatic check_slot(input int q, input int slot, input logic [31:0] w [$]);
    logic [31:0] d;
    for (int i = 0; i < w.size() && i < SLOT; i++) begin
      rd(base_of[q] + slot * SLOT + i, d);
      checks++;
      if (d !== w[i]) begin failures++; $display("FAIL q%0d slot%0d w%0d got %h exp %h", q, slot, i, d, w[i]); end
    end
  endtask

  initial begin
    logic [31:0] w [$];
    repeat (2) @(negedge clk); rst_n = 1;
    checks++; if (space !== 2'b00) begin failures++; $display("FAIL space before config"); end
    for (int q = 0; q < NQ; q++) begin
      @(negedge clk); cfg_we = 1; cfg_q = 1'(q); cfg_base = SA_W'(base_of[q]); cfg_size = PTR_W'(size_of[q]);
      cfg_reclaim = (q == 1);
    end
    @(negedge clk); cfg_we = 0;
    // rounds: fill each queue, check, free, repeat (wraps)
    for (int r = 0; r < 4; r++) begin
      for (int q = 0; q < NQ; q++) begin
        int filled;
        filled = 0;
        while (space[q]) begin
          int slot;
          slot = int'(prod[q]);
          w.delete();
          for (int i = 0; i < $urandom_range(1, SLOT); i++) w.push_back($urandom);
          send(q, w);
          check_slot(q, slot, w);
          filled++;
        end
        checks++;
        if (filled != size_of[q] - 1 - ((r == 0) ? 0 : 0)) begin failures++; $display("FAIL filled %0d q%0d", filled, q); end
        // consume everything
        @(negedge clk); cons_we = 1; cons_q = 1'(q); cons_val = prod[q];
        @(negedge clk); cons_we = 0;
        checks++;
        if (!space[q]) begin failures++; $display("FAIL no space after free q%0d", q); end
      end
    end
    // overlong packet: words past SLOT are dropped, neighbour slot intact
    begin
      int slot;
      logic [31:0] w_prev, w_post;
      slot = int'(prod[1]);
      rd(base_of[1] + ((slot + 1) % size_of[1]) * SLOT, w_prev);
      w.delete();
      for (int i = 0; i < SLOT + 4; i++) w.push_back(32'hA000_0000 + 32'(i));
      send(1, w);
      check_slot(1, slot, w);
      rd(base_of[1] + ((slot + 1) % size_of[1]) * SLOT, w_post);
      checks++;
      if (w_post !== w_prev) begin failures++; $display("FAIL overrun into next slot"); end
    end
    checks++;
    if (n_enq != 4 * (2 + 4) + 1) begin failures++; $display("FAIL enq count %0d", n_enq); end
    checks++;
    if (n_rcl != NL * (4 * 4 + 1)) begin failures++; $display("FAIL reclaim count %0d", n_rcl); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
