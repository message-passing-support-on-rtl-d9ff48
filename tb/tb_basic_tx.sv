// tb_basic_tx - writes Basic messages into transmit slots of two queues
// (one of them in Reclaim mode), launches them by producer-pointer stores,
// and checks every packet (translated header, source id, payload), the
// consumer pointer advance, queue wrap-around, and the reclaim requests
// (three per message, at the slot's cache-line addresses).
module tb_basic_tx;
  import nes_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic cfg_we = 0, cfg_reclaim = 0, prod_we = 0;
  logic [2:0] cfg_q = '0, prod_q = '0, dt_q;
  logic [SA_W-1:0] cfg_base = '0, sr_addr, rcl_addr;
  logic [PTR_W-1:0] cfg_size = '0, prod_val = '0;
  logic [7:0][PTR_W-1:0] prod, cons;
  logic [LDEST_W-1:0] dt_ldest;
  dest_entry_t dt_entry;
  logic sr_req, sr_gnt, sr_rvalid, rcl_req, rcl_ack = 0, out_valid, out_ready = 0, ev_launch, ev_reclaim;
  logic [31:0] sr_rdata;
  flit_t out_flit;
  // SRAM backdoor (port A)
  logic a_en = 0, a_we = 0;
  logic [SA_W-1:0] a_addr = '0;
  logic [31:0] a_wdata = '0;
  logic m_en, m_we;
  logic [SA_W-1:0] m_addr;
  logic [31:0] m_wdata, m_rdata;
  int checks = 0, failures = 0, n_rcl = 0, n_launch = 0;

  // destination table model: a pure function of (queue, logical dest)
  function automatic dest_entry_t dt_model(input logic [2:0] q, input logic [4:0] d);
    return '{site: 5'(d + 3), rxq: 9'({q, d} ^ 9'h0A5), src: 15'({q, d, 7'h11})};
  endfunction
  assign dt_entry = dt_model(dt_q, dt_ldest);

  basic_tx dut (.*);
  sram_arb #(.N(1)) arb (.clk, .rst_n, .req(sr_req), .we(1'b0), .addr(sr_addr), .wdata('0),
                         .gnt(sr_gnt), .rvalid(sr_rvalid), .rdata(sr_rdata),
                         .m_en, .m_we, .m_addr, .m_wdata, .m_rdata);
  msg_sram mem (.clk, .a_en, .a_we, .a_addr, .a_wdata, .a_rdata(),
                .b_en(m_en), .b_we(m_we), .b_addr(m_addr), .b_wdata(m_wdata), .b_rdata(m_rdata));

  // expected packets, one FIFO per queue
  logic [31:0] expq [8][$];
  int exp_rcl [$];

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic sram_wr(input logic [SA_W-1:0] a, input logic [31:0] d);
    @(negedge clk); a_en = 1; a_we = 1; a_addr = a; a_wdata = d;
    @(negedge clk); a_en = 0; a_we = 0;
  endtask

  task automatic config_q(input int q, input int b, input int sz, input logic rcl);
    @(negedge clk); cfg_we = 1; cfg_q = 3'(q); cfg_base = SA_W'(b); cfg_size = PTR_W'(sz); cfg_reclaim = rcl;
    @(negedge clk); cfg_we = 0;
  endtask

  int sw_prod [8];
  int base_of [8], size_of [8];

  // compose one message in the next slot (waits for space) and launch it
  task automatic send(input int q, input int len, input logic [4:0] ld, input logic intr);
    int slot, a;
    dest_entry_t e;
    hdr0_t h;
    slot = sw_prod[q];
    while (((sw_prod[q] + 1) % size_of[q]) == int'(cons[q])) @(negedge clk);  // full
    a = base_of[q] + slot * SLOT_WORDS;
    sram_wr(SA_W'(a), {16'h0, intr, 2'b0, 5'(len), 3'b0, ld});
    e = dt_model(3'(q), ld);
    h = '0; h.site = e.site; h.rxq = e.rxq; h.mtype = MT_BASIC; h.intr = intr; h.len = 5'(len);
    expq[q].push_back(32'(h));
    expq[q].push_back(32'(e.src));
    for (int i = 1; i <= len; i++) begin
      logic [31:0] d;
      d = $urandom;
      sram_wr(SA_W'(a + i), d);
      expq[q].push_back(d);
    end
    if (size_of[q] == 3) for (int l = 0; l < 3; l++) exp_rcl.push_back(a + 8 * l);
    sw_prod[q] = (slot + 1) % size_of[q];
    @(negedge clk); prod_we = 1; prod_q = 3'(q); prod_val = PTR_W'(sw_prod[q]);
    @(negedge clk); prod_we = 0;
  endtask

  // reclaim responder: acks after a random delay, checks the address
  always @(posedge clk) begin
    if (rcl_req && !rcl_ack) begin
      repeat ($urandom_range(3)) @(posedge clk);
      checks++;
      if (exp_rcl.size() == 0 || int'(rcl_addr) != exp_rcl[0]) begin
        failures++; $display("FAIL reclaim addr %0d", rcl_addr);
      end else void'(exp_rcl.pop_front());
      rcl_ack <= 1;
      @(posedge clk) rcl_ack <= 0;
      n_rcl++;
    end
  end

  // packet sink with random back-pressure
  always @(posedge clk) out_ready <= ($urandom_range(3) != 0);
  logic [31:0] pkt [$];
  always @(posedge clk) begin
    if (out_valid && out_ready) begin
      pkt.push_back(out_flit.data);
      if (out_flit.last) begin
        int q;
        q = int'(pkt[1][14:12]);   // queue recovered from the source id
        checks++;
        if (expq[q].size() < pkt.size()) begin failures++; $display("FAIL unexpected packet q%0d", q); end
        else begin
          foreach (pkt[i]) begin
            logic [31:0] e;
            e = expq[q].pop_front();
            if (pkt[i] !== e) begin failures++; $display("FAIL q%0d word %0d got %h exp %h", q, i, pkt[i], e); end
          end
        end
        pkt.delete();
      end
    end
    if (rst_n && ev_launch) n_launch++;
  end

  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    base_of[0] = 0;   size_of[0] = 4;
    base_of[5] = 400; size_of[5] = 3;
    sw_prod[0] = 0; sw_prod[5] = 0;
    config_q(0, 0, 4, 1'b0);
    config_q(5, 400, 3, 1'b1);
    for (int m = 0; m < 12; m++) begin
      send(0, $urandom_range(4, 22), 5'($urandom), 1'($urandom));
      send(5, $urandom_range(4, 22), 5'($urandom), 1'b0);
    end
    // length outside the range is clamped to 22
    begin
      int a;
      while (((sw_prod[0] + 1) % 4) == int'(cons[0])) @(negedge clk);
      a = sw_prod[0] * SLOT_WORDS;
      sram_wr(SA_W'(a), {16'h0, 1'b0, 2'b0, 5'd30, 3'b0, 5'd2});
      begin
        dest_entry_t e; hdr0_t h;
        e = dt_model(3'd0, 5'd2);
        h = '0; h.site = e.site; h.rxq = e.rxq; h.mtype = MT_BASIC; h.len = 5'd22;
        expq[0].push_back(32'(h)); expq[0].push_back(32'(e.src));
      end
      for (int i = 1; i <= 22; i++) begin sram_wr(SA_W'(a + i), 32'(i * 7)); expq[0].push_back(32'(i * 7)); end
      sw_prod[0] = (sw_prod[0] + 1) % 4;
      @(negedge clk); prod_we = 1; prod_q = 3'd0; prod_val = PTR_W'(sw_prod[0]);
      @(negedge clk); prod_we = 0;
    end
    // drain
    while (cons[0] != prod[0] || cons[5] != prod[5]) @(negedge clk);
    repeat (20) @(negedge clk);
    checks++;
    if (expq[0].size() != 0 || expq[5].size() != 0) begin failures++; $display("FAIL leftover expected words"); end
    checks++;
    if (n_launch != 25 || n_rcl != 36) begin failures++; $display("FAIL launches %0d reclaims %0d", n_launch, n_rcl); end
    checks++;
    if (int'(cons[0]) != sw_prod[0] || int'(cons[5]) != sw_prod[5]) begin failures++; $display("FAIL consumer pointers"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
