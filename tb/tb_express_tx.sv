// tb_express_tx - issues random Express and Tag-On stores to several
// transmit queues and checks each packet: translated header with type, tag,
// interrupt and length, source id, the data word and the Tag-On lines read
// from SRAM. With the link stalled it overfills one queue and checks that
// the extra store is dropped, flagged and never sent.
module tb_express_tx;
  import nes_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic st_we = 0, st_intr = 0, st_tagon = 0, ovf_clr = 0;
  logic [2:0] st_q = '0, dt_q;
  logic [LDEST_W-1:0] st_ldest = '0, dt_ldest;
  logic [TAG_W-1:0] st_tag = '0;
  logic [1:0] st_lines = '0;
  logic [SA_W-4:0] st_line_addr = '0;
  logic [31:0] st_data = '0;
  logic [7:0][PTR_W-1:0] prod_cnt, cons_cnt;
  logic [7:0] ovf_flag;
  dest_entry_t dt_entry;
  logic sr_req, sr_gnt, sr_rvalid, out_valid, out_ready = 0, ev_express, ev_tagon, ev_overflow;
  logic [SA_W-1:0] sr_addr;
  logic [31:0] sr_rdata;
  flit_t out_flit;
  logic a_en = 0, a_we = 0;
  logic [SA_W-1:0] a_addr = '0;
  logic [31:0] a_wdata = '0;
  logic m_en, m_we;
  logic [SA_W-1:0] m_addr;
  logic [31:0] m_wdata, m_rdata;
  int checks = 0, failures = 0, n_exp = 0, n_tag = 0, n_ovf = 0;
  logic stall = 0;

  function automatic dest_entry_t dt_model(input logic [2:0] q, input logic [4:0] d);
    return '{site: 5'(d ^ 5'h0C), rxq: 9'({q, d} + 9'd77), src: 15'({q, d, 7'h2B})};
  endfunction
  function automatic logic [31:0] pat(input int a);
    return 32'(a) * 32'h9E37_79B9 + 32'h1234;
  endfunction
  assign dt_entry = dt_model(dt_q, dt_ldest);

  express_tx dut (.*);
  sram_arb #(.N(1)) arb (.clk, .rst_n, .req(sr_req), .we(1'b0), .addr(sr_addr), .wdata('0),
                         .gnt(sr_gnt), .rvalid(sr_rvalid), .rdata(sr_rdata),
                         .m_en, .m_we, .m_addr, .m_wdata, .m_rdata);
  msg_sram mem (.clk, .a_en, .a_we, .a_addr, .a_wdata, .a_rdata(),
                .b_en(m_en), .b_we(m_we), .b_addr(m_addr), .b_wdata(m_wdata), .b_rdata(m_rdata));

  logic [31:0] expq [8][$];

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic store(input int q, input logic tagon, input int lines, input logic [4:0] ld,
                       input logic [4:0] tag, input logic intr, input int laddr, input logic expect_sent);
    dest_entry_t e;
    hdr0_t h;
    @(negedge clk);
    st_we = 1; st_q = 3'(q); st_tagon = tagon; st_lines = 2'(lines); st_ldest = ld; st_tag = tag;
    st_intr = intr; st_line_addr = (SA_W-3)'(laddr); st_data = $urandom;
    if (expect_sent) begin
      e = dt_model(3'(q), ld);
      h = '0; h.site = e.site; h.rxq = e.rxq; h.mtype = tagon ? MT_TAGON : MT_EXPRESS;
      h.intr = intr; h.tag = tag; h.len = 5'(1 + (tagon ? 8 * lines : 0));
      expq[q].push_back(32'(h)); expq[q].push_back(32'(e.src)); expq[q].push_back(st_data);
      if (tagon) for (int i = 0; i < 8 * lines; i++) expq[q].push_back(pat(laddr * 8 + i));
    end
    @(negedge clk); st_we = 0;
  endtask

  task automatic drain();
    int left;
    do begin
      @(negedge clk);
      left = 0;
      for (int q = 0; q < 8; q++) left += expq[q].size();
    end while (left != 0 && !($time > 1900000));
  endtask

  always @(posedge clk) out_ready <= !stall && ($urandom_range(3) != 0);

  logic [31:0] pkt [$];
  always @(posedge clk) begin
    if (out_valid && out_ready) begin
      pkt.push_back(out_flit.data);
      if (out_flit.last) begin
        int q;
        q = int'(pkt[1][14:12]);
        checks++;
        if (expq[q].size() < pkt.size()) begin failures++; $display("FAIL unexpected packet q%0d", q); end
        else foreach (pkt[i]) begin
          logic [31:0] e;
          e = expq[q].pop_front();
          if (pkt[i] !== e) begin failures++; $display("FAIL q%0d word %0d got %h exp %h", q, i, pkt[i], e); end
        end
        pkt.delete();
      end
    end
    if (rst_n) begin
      if (ev_express) n_exp++;
      if (ev_tagon) n_tag++;
      if (ev_overflow) n_ovf++;
    end
  end

  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    for (int a = 0; a < 1024; a++) begin
      @(negedge clk); a_en = 1; a_we = 1; a_addr = SA_W'(a); a_wdata = pat(a);
    end
    @(negedge clk); a_en = 0; a_we = 0;
    for (int m = 0; m < 60; m++) begin
      int q;
      logic t;
      q = $urandom_range(7);
      t = ($urandom_range(2) == 0);
      while ((prod_cnt[q] - cons_cnt[q]) == 8'd4) @(negedge clk);
      store(q, t, $urandom_range(3), 5'($urandom), 5'($urandom), 1'($urandom), $urandom_range(120), 1'b1);
    end
    drain();
    // overflow: stall the link, fill queue 6 (4 entries + one in flight), then one more
    stall = 1;
    repeat (2) @(negedge clk);
    for (int m = 0; m < 5; m++) store(6, 1'b0, 0, 5'(m), 5'(m), 1'b0, 0, 1'b1);
    store(6, 1'b0, 0, 5'd31, 5'd31, 1'b0, 0, 1'b0);   // dropped
    checks++;
    if (ovf_flag !== 8'h40) begin failures++; $display("FAIL ovf_flag %b", ovf_flag); end
    @(negedge clk); ovf_clr = 1; @(negedge clk); ovf_clr = 0;
    checks++;
    if (ovf_flag !== 8'h00) begin failures++; $display("FAIL ovf_flag not cleared"); end
    stall = 0;
    drain();
    repeat (40) @(negedge clk);
    checks++;
    for (int q = 0; q < 8; q++) if (expq[q].size() != 0) begin failures++; $display("FAIL leftover q%0d", q); end
    checks++;
    if (n_exp + n_tag != 65 || n_ovf != 1) begin failures++; $display("FAIL counts %0d %0d %0d", n_exp, n_tag, n_ovf); end
    $display("INFO express=%0d tagon=%0d overflow=%0d", n_exp, n_tag, n_ovf);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
