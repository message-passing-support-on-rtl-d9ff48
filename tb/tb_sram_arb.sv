// tb_sram_arb - four clients hammer one SRAM port through the arbiter with
// random reads and writes to private address ranges; every read must
// return the client's last written value, every request must be granted
// within a bound, and the priority order is checked on a collision.
module tb_sram_arb;
  localparam int N = 4, AW = 8;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [N-1:0] req = '0, we = '0, gnt, rvalid;
  logic [N-1:0][AW-1:0] addr = '0;
  logic [N-1:0][31:0] wdata = '0;
  logic [31:0] rdata;
  logic m_en, m_we, m_en_d;
  logic [AW-1:0] m_addr;
  logic [31:0] m_wdata, m_rdata;
  int checks = 0, failures = 0;
  logic [31:0] shadow [2**AW];

  sram_arb #(.N(N), .AW(AW)) dut (.*);
  msg_sram #(.AW(AW)) mem (.clk, .a_en(1'b0), .a_we(1'b0), .a_addr('0), .a_wdata('0), .a_rdata(),
                           .b_en(m_en), .b_we(m_we), .b_addr(m_addr), .b_wdata(m_wdata), .b_rdata(m_rdata));

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic client(input int c);
    logic [AW-1:0] a;
    for (int k = 0; k < 200; k++) begin
      int waited;
      a = AW'({c[1:0], 6'($urandom_range(3))});
      @(negedge clk);
      req[c] = 1; we[c] = ($urandom_range(1) == 1); addr[c] = a; wdata[c] = $urandom;
      waited = 0;
      forever begin
        logic g;
        @(posedge clk); g = gnt[c];
        if (g) break;
        waited++;
      end
      #1 req[c] = 0;
      checks++;
      if (waited > N - 1) begin failures++; $display("FAIL client %0d waited %0d", c, waited); end
      if (we[c]) begin
        shadow[a] = wdata[c];
        @(negedge clk);
        checks++;
        if (rvalid[c]) begin failures++; $display("FAIL client %0d rvalid after write", c); end
      end else begin
        @(negedge clk);
        checks++;
        if (!rvalid[c] || rdata !== shadow[a]) begin
          failures++; $display("FAIL client %0d read %h got %h exp %h rv %b", c, a, rdata, shadow[a], rvalid[c]);
        end
      end
      repeat ($urandom_range(2)) @(negedge clk);
    end
  endtask

  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    // initialise the shared array through the arbiter, client 3
    for (int i = 0; i < 2**AW; i++) begin
      @(negedge clk); req[3] = 1; we[3] = 1; addr[3] = AW'(i); wdata[3] = 32'(i); shadow[i] = 32'(i);
    end
    @(negedge clk); req = '0; we = '0;
    // collision: clients 1 and 2 at once, 1 wins
    @(negedge clk); req = 4'b0110; #1;
    checks++; if (gnt !== 4'b0010) begin failures++; $display("FAIL priority %b", gnt); end
    @(negedge clk); req = '0;
    fork client(0); client(1); client(2); client(3); join
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
