// msg_sram - dual-ported message-queue SRAM bank (one instance is the
// aSRAM serving the application processor, another the sSRAM serving the
// service processor).
//
// Both ports are synchronous: a request (en) in one cycle returns the read
// word in the next cycle; a write (en & we) updates the array at the clock
// edge. Port A faces the processor bus, port B the NES message engines.
// The architecture only names two dual-ported banks; the size (8 K words of
// 32 bits) and the read-first behaviour on a same-address collision are
// this design's choices.
module msg_sram #(
  parameter int unsigned AW = nes_pkg::SA_W,
  parameter int unsigned DW = 32
) (
  input  logic          clk,
  input  logic          a_en,
  input  logic          a_we,
  input  logic [AW-1:0] a_addr,
  input  logic [DW-1:0] a_wdata,
  output logic [DW-1:0] a_rdata,
  input  logic          b_en,
  input  logic          b_we,
  input  logic [AW-1:0] b_addr,
  input  logic [DW-1:0] b_wdata,
  output logic [DW-1:0] b_rdata
);
  logic [DW-1:0] mem [2**AW];

  always_ff @(posedge clk) begin
    if (a_en) begin
      if (a_we) mem[a_addr] <= a_wdata;
      a_rdata <= mem[a_addr];
    end
  end

  always_ff @(posedge clk) begin
    if (b_en) begin
      if (b_we) mem[b_addr] <= b_wdata;
      b_rdata <= mem[b_addr];
    end
  end
endmodule
