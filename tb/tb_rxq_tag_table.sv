// tb_rxq_tag_table - loads receive-queue tags and checks hit/miss and the
// returned hardware queue for Express and Basic lookups, including the same
// logical name cached in both classes and invalidation.
module tb_rxq_tag_table;
  import nes_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic wr_en = 0, wr_valid = 0, lk_basic = 0, lk_hit;
  logic [3:0] wr_idx = '0, lk_idx;
  logic [8:0] wr_lq = '0, lk_lq = '0;
  logic [15:0] tag_valid;
  int checks = 0, failures = 0;
  logic [8:0] names [16];

  rxq_tag_table dut (.*);

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wr(input int i, input logic v, input logic [8:0] lq);
    @(negedge clk); wr_en = 1; wr_idx = 4'(i); wr_valid = v; wr_lq = lq;
    @(negedge clk); wr_en = 0;
  endtask

  task automatic look(input logic [8:0] lq, input logic basic, input logic exp_hit, input int exp_idx);
    lk_lq = lq; lk_basic = basic; #1;
    checks++;
    if (lk_hit !== exp_hit || (exp_hit && lk_idx !== 4'(exp_idx))) begin
      failures++;
      $display("FAIL lookup %0d basic=%0b hit=%0b idx=%0d exp %0b %0d", lq, basic, lk_hit, lk_idx, exp_hit, exp_idx);
    end
  endtask

  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    look(9'd0, 1'b0, 1'b0, 0);               // all invalid after reset
    for (int i = 0; i < 16; i++) begin names[i] = 9'(i * 31 + 5); wr(i, 1'b1, names[i]); end
    for (int i = 0; i < 16; i++) begin
      look(names[i], i >= 8, 1'b1, i);
      look(names[i], i < 8, 1'b0, 0);        // other class misses
    end
    look(9'd511, 1'b0, 1'b0, 0);
    look(names[12] ^ 9'h100, 1'b1, 1'b0, 0);  // differs only in the top bit
    // same logical name resident as Express queue 2 and Basic queue 13
    wr(13, 1'b1, names[2]);
    look(names[2], 1'b0, 1'b1, 2);
    look(names[2], 1'b1, 1'b1, 13);
    // invalidate Express 2
    wr(2, 1'b0, names[2]);
    look(names[2], 1'b0, 1'b0, 0);
    checks++; if (tag_valid !== 16'hFFFB) begin failures++; $display("FAIL tag_valid %h", tag_valid); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
