// tb_msg_sram - self-checking test of the dual-ported SRAM: writes through
// each port, reads back through the other, checks the one-cycle read
// latency against a reference array.
module tb_msg_sram;
  localparam int AW = 6;
  logic clk = 0;
  always #5 clk = ~clk;
  logic a_en = 0, a_we = 0, b_en = 0, b_we = 0;
  logic [AW-1:0] a_addr = '0, b_addr = '0;
  logic [31:0] a_wdata = '0, b_wdata = '0, a_rdata, b_rdata;
  logic [31:0] ref_mem [2**AW];
  int checks = 0, failures = 0;

  msg_sram #(.AW(AW)) dut (.*);

  task automatic chk(input logic [31:0] got, input logic [31:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s got %h exp %h", what, got, exp);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // fill: even addresses through A, odd through B, same cycle
    for (int i = 0; i < 2**AW; i += 2) begin
      @(negedge clk);
      a_en = 1; a_we = 1; a_addr = AW'(i);   a_wdata = $urandom;
      b_en = 1; b_we = 1; b_addr = AW'(i+1); b_wdata = $urandom;
      ref_mem[i] = a_wdata; ref_mem[i+1] = b_wdata;
    end
    @(negedge clk); a_en = 0; a_we = 0; b_en = 0; b_we = 0;
    // read back crossed: A reads odd, B reads even
    for (int i = 0; i < 2**AW; i += 2) begin
      @(negedge clk);
      a_en = 1; a_addr = AW'(i+1);
      b_en = 1; b_addr = AW'(i);
      @(negedge clk);
      a_en = 0; b_en = 0;
      chk(a_rdata, ref_mem[i+1], "portA read");
      chk(b_rdata, ref_mem[i], "portB read");
    end
    // read data holds while the port is idle
    @(negedge clk); chk(a_rdata, ref_mem[2**AW-1], "portA hold");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
