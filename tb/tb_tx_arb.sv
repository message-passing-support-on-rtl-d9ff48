// tb_tx_arb - three sources send numbered packets of random length with
// random gaps; the sink checks that packets arrive whole (never
// interleaved), in order per source, with every word intact, and that no
// source waits for more than the other two packets.
module tb_tx_arb;
  import nes_pkg::*;
  localparam int N = 3;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [N-1:0] in_valid = '0, in_ready;
  flit_t [N-1:0] in_flit = '0;
  logic out_valid, out_ready = 0;
  flit_t out_flit;
  int checks = 0, failures = 0;
  int next_pkt [N];
  int cur_src = -1, cur_word = 0;

  tx_arb #(.N(N)) dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // word = {src[1:0], pkt[13:0], word index[15:0]}
  task automatic source(input int s);
    for (int p = 0; p < 60; p++) begin
      int len;
      len = $urandom_range(1, 12);
      for (int w = 0; w < len; w++) begin
        @(negedge clk);
        in_valid[s] = 1;
        in_flit[s].data = {2'(s), 14'(p), 16'(w)};
        in_flit[s].last = (w == len - 1);
        #4;
        while (!in_ready[s]) begin @(negedge clk); #4; end
        @(posedge clk);
      end
      @(negedge clk); in_valid[s] = 0;
      repeat ($urandom_range(25)) @(negedge clk);
    end
  endtask

  always @(posedge clk) begin
    out_ready <= ($urandom_range(4) != 0);
    if (out_valid && out_ready) begin
      int s, p, w;
      s = int'(out_flit.data[31:30]); p = int'(out_flit.data[29:16]); w = int'(out_flit.data[15:0]);
      checks++;
      if (cur_src == -1) begin
        if (w != 0 || p != next_pkt[s]) begin failures++; $display("FAIL start s%0d p%0d w%0d", s, p, w); end
        cur_src = s; cur_word = 0;
      end else if (s != cur_src || w != cur_word) begin
        failures++; $display("FAIL interleave s%0d w%0d (cur s%0d w%0d)", s, w, cur_src, cur_word);
      end
      cur_word++;
      if (out_flit.last) begin next_pkt[s]++; cur_src = -1; end
    end
  end

  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    fork source(0); source(1); source(2); join
    repeat (10) @(negedge clk);
    checks++;
    if (next_pkt[0] != 60 || next_pkt[1] != 60 || next_pkt[2] != 60) begin failures++; $display("FAIL counts"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
