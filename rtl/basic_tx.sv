// basic_tx - Basic Message transmit engine for the hardware Basic transmit
// queues.
//
// Each queue is a circular buffer of fixed-size slots in the message SRAM;
// a program writes a message (header word, then 4..22 payload words) into
// the slot at its producer pointer and then writes the new producer pointer
// through an uncached store. That store is the launch signal: whenever a
// queue's producer differs from its consumer, this engine picks the queue
// (round robin), optionally reclaims the slot's cache lines from the
// processor (NES Reclaim mode: one flush request per cache line, each
// acknowledged by the bus side), reads the header, translates its logical
// destination through the Destination Table, sends the packet and then
// advances the consumer pointer, freeing the slot.
//
// Slot layout (own choice): SLOT words per slot (3 cache lines), word 0 the
// program's header (logical destination [4:0], payload length [12:8],
// receiver interrupt [15]), words 1..len the payload. A length outside
// 4..22 is clamped into that range. Queue size (slots) and base address are
// set per queue by system code; writing the configuration resets the
// queue's pointers. Packet out: header word 0, header word 1 (source id),
// payload; one word per handshake on a valid/ready stream, and an SRAM
// read through the shared port for each payload word.
module basic_tx
  import nes_pkg::*;
#(
  parameter int unsigned NQ   = NUM_BQ,
  parameter int unsigned SLOT = SLOT_WORDS
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // configuration (system code)
  input  logic                    cfg_we,
  input  logic [$clog2(NQ)-1:0]   cfg_q,
  input  logic [SA_W-1:0]         cfg_base,
  input  logic [PTR_W-1:0]        cfg_size,
  input  logic                    cfg_reclaim,
  // producer pointer store from the processor
  input  logic                    prod_we,
  input  logic [$clog2(NQ)-1:0]   prod_q,
  input  logic [PTR_W-1:0]        prod_val,
  output logic [NQ-1:0][PTR_W-1:0] prod,
  output logic [NQ-1:0][PTR_W-1:0] cons,
  // Destination Table lookup
  output logic [$clog2(NQ)-1:0]   dt_q,
  output logic [LDEST_W-1:0]      dt_ldest,
  input  dest_entry_t             dt_entry,
  // SRAM port (through the arbiter)
  output logic                    sr_req,
  output logic [SA_W-1:0]         sr_addr,
  input  logic                    sr_gnt,
  input  logic                    sr_rvalid,
  input  logic [31:0]             sr_rdata,
  // reclaim requests to the processor bus
  output logic                    rcl_req,
  output logic [SA_W-1:0]         rcl_addr,
  input  logic                    rcl_ack,
  // packet out
  output logic                    out_valid,
  output flit_t                   out_flit,
  input  logic                    out_ready,
  // events
  output logic                    ev_launch,
  output logic                    ev_reclaim
);
  localparam int unsigned QW = (NQ > 1) ? $clog2(NQ) : 1;

  typedef enum logic [3:0] {
    S_IDLE, S_RCL, S_RDH, S_WH, S_HDR0, S_HDR1, S_RD, S_WD, S_OUT
  } state_e;
  state_e state;

  logic [NQ-1:0][SA_W-1:0] base;
  logic [NQ-1:0][PTR_W-1:0] size;
  logic [NQ-1:0] reclaim;

  logic [QW-1:0]    cur, rr;
  logic [SA_W-1:0]  slot_addr;
  logic [31:0]      hdr_w, data_w;
  logic [LEN_W-1:0] len, idx;
  logic [1:0]       line;
  logic [NQ-1:0]    pending;
  logic             found;
  logic [QW-1:0]    pick;

  // index of the k-th candidate counted from the round-robin pointer
  function automatic int rot(input int k);
    return (int'(rr) + k) % int'(NQ);
  endfunction

  always_comb begin
    for (int i = 0; i < int'(NQ); i++) pending[i] = (prod[i] != cons[i]);
    found = 1'b0;
    pick  = '0;
    for (int k = int'(NQ) - 1; k >= 0; k--) begin
      if (pending[rot(k)]) begin found = 1'b1; pick = QW'(rot(k)); end
    end
  end

  function automatic logic [LEN_W-1:0] clamp_len(input logic [LEN_W-1:0] l);
    if (l < LEN_W'(BASIC_MIN)) return LEN_W'(BASIC_MIN);
    if (l > LEN_W'(BASIC_MAX)) return LEN_W'(BASIC_MAX);
    return l;
  endfunction

  hdr0_t h0;
  always_comb begin
    h0       = '0;
    h0.site  = dt_entry.site;
    h0.rxq   = dt_entry.rxq;
    h0.mtype = MT_BASIC;
    h0.intr  = btx_intr(hdr_w);
    h0.len   = len;
  end

  assign dt_q     = cur;
  assign dt_ldest = btx_ldest(hdr_w);

  always_comb begin
    sr_req  = 1'b0;
    sr_addr = slot_addr;
    if (state == S_RDH) sr_req = 1'b1;
    if (state == S_RD) begin
      sr_req  = 1'b1;
      sr_addr = slot_addr + SA_W'(idx);
    end
  end

  assign rcl_req  = (state == S_RCL);
  assign rcl_addr = slot_addr + SA_W'(line) * SA_W'(LINE_WORDS);

  always_comb begin
    out_valid = 1'b0;
    out_flit  = '0;
    unique case (state)
      S_HDR0: begin out_valid = 1'b1; out_flit.data = h0; end
      S_HDR1: begin out_valid = 1'b1; out_flit.data = 32'(dt_entry.src); end
      S_OUT:  begin out_valid = 1'b1; out_flit.data = data_w; out_flit.last = (idx == len); end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      base       <= '0;
      size       <= '0;
      reclaim    <= '0;
      prod       <= '0;
      cons       <= '0;
      cur        <= '0;
      rr         <= '0;
      slot_addr  <= '0;
      hdr_w      <= '0;
      data_w     <= '0;
      len        <= '0;
      idx        <= '0;
      line       <= '0;
      ev_launch  <= 1'b0;
      ev_reclaim <= 1'b0;
    end else begin
      ev_launch  <= 1'b0;
      ev_reclaim <= 1'b0;
      if (cfg_we) begin
        base[cfg_q]    <= cfg_base;
        size[cfg_q]    <= cfg_size;
        reclaim[cfg_q] <= cfg_reclaim;
        prod[cfg_q]    <= '0;
        cons[cfg_q]    <= '0;
      end
      if (prod_we && !cfg_we) prod[prod_q] <= prod_val;

      unique case (state)
        S_IDLE: if (found) begin
          cur       <= pick;
          rr        <= (int'(pick) == int'(NQ) - 1) ? '0 : pick + 1'b1;
          slot_addr <= base[pick] + SA_W'(cons[pick]) * SA_W'(SLOT);
          line      <= '0;
          state     <= reclaim[pick] ? S_RCL : S_RDH;
        end
        S_RCL: if (rcl_ack) begin
          ev_reclaim <= 1'b1;
          line       <= line + 1'b1;
          if (int'(line) == int'(TAGON_LINES) - 1) state <= S_RDH;
        end
        S_RDH: if (sr_gnt) state <= S_WH;
        S_WH: if (sr_rvalid) begin
          hdr_w <= sr_rdata;
          len   <= clamp_len(btx_len(sr_rdata));
          state <= S_HDR0;
        end
        S_HDR0: if (out_ready) state <= S_HDR1;
        S_HDR1: if (out_ready) begin
          idx   <= LEN_W'(1);
          state <= S_RD;
        end
        S_RD: if (sr_gnt) state <= S_WD;
        S_WD: if (sr_rvalid) begin
          data_w <= sr_rdata;
          state  <= S_OUT;
        end
        S_OUT: if (out_ready) begin
          if (idx == len) begin
            ev_launch <= 1'b1;
            cons[cur] <= (cons[cur] + 1'b1 == size[cur]) ? '0 : cons[cur] + 1'b1;
            state     <= S_IDLE;
          end else begin
            idx   <= idx + 1'b1;
            state <= S_RD;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
