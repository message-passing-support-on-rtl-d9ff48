// tx_arb - merges the packet streams of the transmit engines (Basic,
// Express/Tag-On, DMA) onto the single network link.
//
// A packet is a run of 32-bit words closed by a word with last set. The
// arbiter picks a requesting input round robin at the first word of a
// packet and keeps it until that packet's last word has been accepted, so
// packets are never interleaved on the link. Both sides use valid/ready;
// the output is combinational from the selected input (no added latency).
// The architecture does not describe this multiplexing; round robin is the
// simplest fair choice.
module tx_arb
  import nes_pkg::*;
#(
  parameter int unsigned N = 3
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [N-1:0]  in_valid,
  input  flit_t [N-1:0] in_flit,
  output logic [N-1:0]  in_ready,
  output logic          out_valid,
  output flit_t         out_flit,
  input  logic          out_ready
);
  localparam int unsigned IW = (N > 1) ? $clog2(N) : 1;
  logic          locked;
  logic [IW-1:0] owner, rr, pick, sel;
  logic          found;

  // index of the k-th candidate counted from the round-robin pointer
  function automatic int rot(input int k);
    return (int'(rr) + k) % int'(N);
  endfunction

  always_comb begin
    found = 1'b0;
    pick  = '0;
    for (int k = int'(N) - 1; k >= 0; k--) begin
      if (in_valid[rot(k)]) begin found = 1'b1; pick = IW'(rot(k)); end
    end
    sel = locked ? owner : pick;
  end

  always_comb begin
    in_ready  = '0;
    out_valid = 1'b0;
    out_flit  = '0;
    if (locked || found) begin
      out_valid     = in_valid[sel];
      out_flit      = in_flit[sel];
      in_ready[sel] = out_ready;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      locked <= 1'b0;
      owner  <= '0;
      rr     <= '0;
    end else if (out_valid && out_ready) begin
      if (out_flit.last) begin
        locked <= 1'b0;
        rr     <= (int'(sel) == int'(N) - 1) ? '0 : sel + 1'b1;
      end else begin
        locked <= 1'b1;
        owner  <= sel;
      end
    end
  end
endmodule
