// dma_engine - hardware half of the light-weight DMA facility.
//
// A DMA transfer is requested by a program through a message to the service
// processor; the service processors at both ends do name translation,
// protection checks and page management, and then program this engine with
// one command: destination site, source id, local source address,
// destination address at the remote site and length in words. The engine
// then does the rest in hardware: it reads the data from local memory over
// the processor bus, cuts it into DMA packets of up to PKT words, each led
// by the destination address of its first word, and sends them. At the
// receiving NES the packets are reassembled by writing each word at its
// address, and a word counter tells the service processor how much arrived.
//
// Interface: command write (cmd_valid/cmd_ready; accepted when idle),
// tx_busy and a tx_done pulse; packet stream out and in (valid/ready, last
// on the final word); one memory master port (req held until ack; for a
// read, rdata is valid with ack) shared by the two halves, receive side
// first so that the network is never blocked by the sender. Word
// addresses; PKT = 8 words (one cache line) is this design's choice.
module dma_engine
  import nes_pkg::*;
#(
  parameter int unsigned PKT = LINE_WORDS
) (
  input  logic              clk,
  input  logic              rst_n,
  // command from the service processor
  input  logic              cmd_valid,
  output logic              cmd_ready,
  input  logic [SITE_W-1:0] cmd_site,
  input  logic [SRC_W-1:0]  cmd_src,
  input  logic [31:0]       cmd_src_addr,
  input  logic [31:0]       cmd_dst_addr,
  input  logic [15:0]       cmd_len,
  output logic              tx_busy,
  output logic              tx_done,
  // packets out
  output logic              out_valid,
  output flit_t             out_flit,
  input  logic              out_ready,
  // packet payload in (from the receive dispatcher)
  input  logic              in_valid,
  input  flit_t             in_flit,
  output logic              in_ready,
  output logic [31:0]       rx_words,
  input  logic              rx_clr,
  // memory master port
  output logic              mem_req,
  output logic              mem_we,
  output logic [31:0]       mem_addr,
  output logic [31:0]       mem_wdata,
  input  logic              mem_ack,
  input  logic [31:0]       mem_rdata,
  output logic              ev_packet
);
  typedef enum logic [2:0] {T_IDLE, T_H0, T_H1, T_ADDR, T_RD, T_OUT} tstate_e;
  typedef enum logic {R_ADDR, R_WR} rstate_e;

  tstate_e tst;
  rstate_e rst;

  logic [SITE_W-1:0] site;
  logic [SRC_W-1:0]  src;
  logic [31:0] saddr, daddr, raddr, data_w;
  logic [15:0] left;          // words still to send
  logic [4:0]  chunk, idx;    // words in this packet, index within it

  // memory port sharing
  logic rx_want, tx_want, busy, own_rx, sel_rx;
  assign rx_want = (rst == R_WR) && in_valid;
  assign tx_want = (tst == T_RD);
  assign sel_rx  = busy ? own_rx : rx_want;
  assign mem_req = busy || rx_want || tx_want;
  assign mem_we  = sel_rx;
  assign mem_addr  = sel_rx ? raddr : saddr;
  assign mem_wdata = in_flit.data;

  assign cmd_ready = (tst == T_IDLE);
  assign tx_busy   = (tst != T_IDLE);
  assign in_ready  = (rst == R_ADDR) || (rst == R_WR && sel_rx && mem_ack);

  hdr0_t h0;
  always_comb begin
    h0       = '0;
    h0.site  = site;
    h0.mtype = MT_DMA;
    h0.len   = LEN_W'(chunk) + 1'b1;
  end

  always_comb begin
    out_valid = 1'b1;
    out_flit  = '0;
    unique case (tst)
      T_H0:   out_flit.data = h0;
      T_H1:   out_flit.data = 32'(src);
      T_ADDR: out_flit.data = daddr;
      T_OUT:  begin out_flit.data = data_w; out_flit.last = (idx == chunk - 1'b1); end
      default: out_valid = 1'b0;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tst       <= T_IDLE;
      rst       <= R_ADDR;
      site      <= '0;
      src       <= '0;
      saddr     <= '0;
      daddr     <= '0;
      raddr     <= '0;
      data_w    <= '0;
      left      <= '0;
      chunk     <= '0;
      idx       <= '0;
      busy      <= 1'b0;
      own_rx    <= 1'b0;
      rx_words  <= '0;
      tx_done   <= 1'b0;
      ev_packet <= 1'b0;
    end else begin
      tx_done   <= 1'b0;
      ev_packet <= 1'b0;
      // memory port ownership: held from the first request cycle to the ack
      if (mem_req && !mem_ack) begin
        busy   <= 1'b1;
        own_rx <= sel_rx;
      end else if (mem_ack) begin
        busy <= 1'b0;
      end

      // ---- send side ----
      unique case (tst)
        T_IDLE: if (cmd_valid) begin
          site  <= cmd_site;
          src   <= cmd_src;
          saddr <= cmd_src_addr;
          daddr <= cmd_dst_addr;
          left  <= cmd_len;
          chunk <= (cmd_len > 16'(PKT)) ? 5'(PKT) : 5'(cmd_len);
          tst   <= (cmd_len == 16'd0) ? T_IDLE : T_H0;
          tx_done <= (cmd_len == 16'd0);
        end
        T_H0:   if (out_ready) tst <= T_H1;
        T_H1:   if (out_ready) tst <= T_ADDR;
        T_ADDR: if (out_ready) begin idx <= '0; tst <= T_RD; end
        T_RD: if (mem_ack && !sel_rx) begin
          data_w <= mem_rdata;
          saddr  <= saddr + 1'b1;
          tst    <= T_OUT;
        end
        T_OUT: if (out_ready) begin
          if (idx == chunk - 1'b1) begin
            ev_packet <= 1'b1;
            left  <= left - 16'(chunk);
            daddr <= daddr + 32'(chunk);
            if (left == 16'(chunk)) begin
              tx_done <= 1'b1;
              tst     <= T_IDLE;
            end else begin
              chunk <= ((left - 16'(chunk)) > 16'(PKT)) ? 5'(PKT) : 5'(left - 16'(chunk));
              tst   <= T_H0;
            end
          end else begin
            idx <= idx + 1'b1;
            tst <= T_RD;
          end
        end
        default: tst <= T_IDLE;
      endcase

      // ---- receive side ----
      if (rx_clr) rx_words <= '0;
      unique case (rst)
        R_ADDR: if (in_valid) begin
          raddr <= in_flit.data;
          if (!in_flit.last) rst <= R_WR;
        end
        R_WR: if (in_valid && in_ready) begin
          raddr    <= raddr + 1'b1;
          rx_words <= rx_words + 1'b1;
          if (in_flit.last) rst <= R_ADDR;
        end
        default: rst <= R_ADDR;
      endcase
    end
  end
endmodule
