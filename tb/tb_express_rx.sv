// tb_express_rx - pushes and pops random entries on all queues against a
// reference model; checks FIFO order, full/nonempty flags, that a pop from
// an empty queue returns the programmed Empty Express Message (reset value
// first, then a value written by system code), and push and pop together.
module tb_express_rx;
  import nes_pkg::*;
  localparam int NQ = 8, DEPTH = 8;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic push_valid = 0, pop_req = 0, empty_we = 0, pop_empty, ev_empty_read;
  logic [2:0] push_q = '0, pop_q = '0;
  logic [63:0] push_entry = '0, empty_val = '0, pop_data, empty_msg;
  logic [NQ-1:0] full, nonempty;
  logic [63:0] model [NQ][$];
  logic [63:0] empty_model = EMPTY_MSG_RESET;
  int checks = 0, failures = 0, n_empty = 0;
  logic push_ok;

  express_rx dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && ev_empty_read) n_empty++;

  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    for (int c = 0; c < 3000; c++) begin
      @(negedge clk);
      push_valid = ($urandom_range(2) == 0);
      push_q = 3'($urandom); push_entry = {$urandom, $urandom};
      pop_req = ($urandom_range(2) == 0);
      pop_q = 3'($urandom);
      empty_we = (c == 1500);
      empty_val = 64'hFEED_0000_0000_BEEF;
      #1;
      for (int q = 0; q < NQ; q++) begin
        checks++;
        if (full[q] !== (model[q].size() == DEPTH) || nonempty[q] !== (model[q].size() != 0)) begin
          failures++; $display("FAIL flags q%0d", q);
        end
      end
      push_ok = push_valid && model[push_q].size() < DEPTH;
      if (pop_req) begin
        checks++;
        if (model[pop_q].size() == 0) begin
          if (pop_data !== empty_model || !pop_empty) begin failures++; $display("FAIL empty msg %h", pop_data); end
        end else begin
          logic [63:0] e;
          e = model[pop_q].pop_front();
          if (pop_data !== e) begin failures++; $display("FAIL pop q%0d %h exp %h", pop_q, pop_data, e); end
        end
      end
      if (push_ok) model[push_q].push_back(push_entry);
      if (empty_we) empty_model = empty_val;
    end
    @(negedge clk); push_valid = 0; pop_req = 0; empty_we = 0;
    @(negedge clk);
    checks++;
    if (n_empty == 0) begin failures++; $display("FAIL no empty reads"); end
    $display("INFO empty reads %0d", n_empty);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
