// tb_dest_table - fills the Destination Table with random entries, checks
// both lookup ports against a reference copy, then rewrites single entries
// and checks that neighbours keep their values.
module tb_dest_table;
  import nes_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic wr_en = 0;
  logic [3:0] wr_row = '0, rd0_row = '0, rd1_row = '0;
  logic [4:0] wr_ldest = '0, rd0_ldest = '0, rd1_ldest = '0;
  dest_entry_t wr_entry = '0, rd0_entry, rd1_entry;
  dest_entry_t ref_t [16][32];
  int checks = 0, failures = 0;

  dest_table dut (.*);

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic look(input int r0, input int d0, input int r1, input int d1);
    rd0_row = 4'(r0); rd0_ldest = 5'(d0); rd1_row = 4'(r1); rd1_ldest = 5'(d1);
    #1;
    checks += 2;
    if (rd0_entry !== ref_t[r0][d0]) begin failures++; $display("FAIL rd0 %0d %0d", r0, d0); end
    if (rd1_entry !== ref_t[r1][d1]) begin failures++; $display("FAIL rd1 %0d %0d", r1, d1); end
  endtask

  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    for (int r = 0; r < 16; r++) for (int d = 0; d < 32; d++) ref_t[r][d] = '0;
    look(3, 7, 15, 31);   // reset value
    for (int r = 0; r < 16; r++)
      for (int d = 0; d < 32; d++) begin
        @(negedge clk);
        wr_en = 1; wr_row = 4'(r); wr_ldest = 5'(d);
        wr_entry = dest_entry_t'($urandom);
        ref_t[r][d] = wr_entry;
      end
    @(negedge clk); wr_en = 0;
    for (int i = 0; i < 400; i++) look($urandom_range(15), $urandom_range(31), $urandom_range(15), $urandom_range(31));
    // overwrite one entry, check it and its neighbours
    @(negedge clk); wr_en = 1; wr_row = 4'd9; wr_ldest = 5'd4;
    wr_entry = '{site: 5'd17, rxq: 9'd300, src: 15'h1234}; ref_t[9][4] = wr_entry;
    @(negedge clk); wr_en = 0;
    look(9, 4, 9, 5);
    look(8, 4, 9, 3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
