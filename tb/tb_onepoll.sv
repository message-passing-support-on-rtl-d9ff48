// tb_onepoll - random poll masks and queue states; an independent model
// picks the expected winner and the returned 64-bit value (Express head,
// Basic notice with pointers, or the Empty message) and whether a pop is
// requested. Each of the three outcomes must occur.
module tb_onepoll;
  import nes_pkg::*;
  localparam int NE = 8, NB = 8;
  logic poll = 0;
  logic [15:0] mask = '0;
  logic [7:0] e_nonempty = '0, b_nonempty = '0;
  logic [7:0][PTR_W-1:0] b_prod = '0, b_cons = '0;
  logic [63:0] e_head, empty_msg = 64'h8000_0000_0000_0001, result;
  logic pop_req, hit_express, hit_basic;
  logic [2:0] pop_q;
  logic [63:0] heads [8];
  int checks = 0, failures = 0, n_e = 0, n_b = 0, n_none = 0;

  assign e_head = heads[pop_q];
  onepoll dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 4000; t++) begin
      int win;
      logic [63:0] exp_r;
      poll = 1'($urandom);
      mask = 16'($urandom) & 16'($urandom);
      e_nonempty = 8'($urandom) & 8'($urandom);
      b_nonempty = 8'($urandom);
      for (int i = 0; i < 8; i++) begin
        heads[i] = {$urandom, $urandom};
        b_prod[i] = PTR_W'($urandom); b_cons[i] = PTR_W'($urandom);
      end
      #1;
      win = -1;
      for (int i = 0; i < 8 && win < 0; i++) if (mask[i] && e_nonempty[i]) win = i;
      for (int i = 0; i < 8 && win < 0; i++) if (mask[8 + i] && b_nonempty[i]) win = 8 + i;
      if (win < 0) begin exp_r = empty_msg; n_none++; end
      else if (win < 8) begin exp_r = heads[win]; n_e++; end
      else begin exp_r = {4'b1001, 4'(win - 8), 40'd0, b_prod[win - 8], b_cons[win - 8]}; n_b++; end
      checks++;
      if (result !== exp_r) begin failures++; $display("FAIL result win=%0d got %h exp %h", win, result, exp_r); end
      checks++;
      if (pop_req !== (poll && win >= 0 && win < 8) || (win >= 0 && win < 8 && pop_q !== 3'(win))) begin
        failures++; $display("FAIL pop win=%0d", win);
      end
    end
    checks++;
    if (n_e == 0 || n_b == 0 || n_none == 0) begin failures++; $display("FAIL coverage"); end
    $display("INFO express=%0d basic=%0d empty=%0d", n_e, n_b, n_none);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
