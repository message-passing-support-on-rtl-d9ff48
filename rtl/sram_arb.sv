// sram_arb - shares the NES-side port of a message SRAM bank among the
// message engines (transmit engines reading messages, receive buffers
// writing them).
//
// Round robin: after reset client 0 has the highest priority, and after
// each grant the client following the one served gets it. A client raises
// req with we/addr/wdata and holds them until gnt; gnt is combinational in
// the same cycle. For a read, rvalid[i] pulses in the following cycle with
// the word on rdata. A requesting client waits at most N-1 accesses. The
// architecture leaves the SRAM port sharing open; this is the simplest
// scheme that works.
module sram_arb #(
  parameter int unsigned N  = 4,
  parameter int unsigned AW = nes_pkg::SA_W
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [N-1:0]         req,
  input  logic [N-1:0]         we,
  input  logic [N-1:0][AW-1:0] addr,
  input  logic [N-1:0][31:0]   wdata,
  output logic [N-1:0]         gnt,
  output logic [N-1:0]         rvalid,
  output logic [31:0]          rdata,
  // to the SRAM port
  output logic                 m_en,
  output logic                 m_we,
  output logic [AW-1:0]        m_addr,
  output logic [31:0]          m_wdata,
  input  logic [31:0]          m_rdata
);
  localparam int unsigned IW = (N > 1) ? $clog2(N) : 1;
  logic [IW-1:0] prio;   // client with the highest priority this cycle
  logic [IW-1:0] sel;

  // index of the k-th candidate counted from the round-robin pointer
  function automatic int rot(input int k);
    return (int'(prio) + k) % int'(N);
  endfunction

  always_comb begin
    gnt     = '0;
    sel     = '0;
    m_en    = 1'b0;
    m_we    = 1'b0;
    m_addr  = '0;
    m_wdata = '0;
    for (int k = int'(N) - 1; k >= 0; k--) begin
      if (req[rot(k)]) begin
        gnt     = '0;
        gnt[rot(k)] = 1'b1;
        sel     = IW'(rot(k));
        m_en    = 1'b1;
        m_we    = we[rot(k)];
        m_addr  = addr[rot(k)];
        m_wdata = wdata[rot(k)];
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rvalid <= '0;
      prio   <= '0;
    end else begin
      rvalid <= gnt & ~we;
      if (m_en) prio <= (int'(sel) == int'(N) - 1) ? '0 : sel + 1'b1;
    end
  end

  assign rdata = m_rdata;

  // at most one client is served per cycle
  a_onehot: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(gnt));
endmodule
