// nes_pkg - shared sizes, message formats and helper functions of the
// Network Endpoint Subsystem (NES) core.
//
// The NES offers four message mechanisms (Basic, Express, Tag-On, DMA) to a
// processor through memory-mapped regions, and carries them over a 32-bit
// word link towards the network. Numbers that come from the architecture:
// 8 Basic and 8 Express/Tag-On hardware queue pairs, 512 logical queues per
// site, 32-byte cache lines (PowerPC 604), Basic payloads of 4..22 words,
// Express messages of 5 tag bits plus a 32-bit word, and Tag-On data of up
// to three cache lines. The 32-site machine size, field layouts,
// slot sizes and the address map are this design's own choices and are
// listed where they are defined.
package nes_pkg;

  // ---- sizes of the architecture ------------------------------------------
  localparam int unsigned NUM_BQ       = 8;    // hardware Basic queue pairs
  localparam int unsigned NUM_EQ       = 8;    // hardware Express/Tag-On pairs
  localparam int unsigned NUM_LQ       = 512;  // logical queue pairs per site
  localparam int unsigned LINE_WORDS   = 8;    // 32-byte cache line
  localparam int unsigned BASIC_MIN    = 4;    // Basic payload, words
  localparam int unsigned BASIC_MAX    = 22;
  localparam int unsigned TAGON_LINES  = 3;    // Tag-On data, cache lines
  localparam int unsigned NUM_SITES    = 32;   // machine size (own choice)

  // ---- widths derived from the above / own choices -----------------------
  localparam int unsigned SITE_W  = 5;    // 32 sites
  localparam int unsigned LQ_W    = 9;    // 512 logical queues
  localparam int unsigned SRC_W   = 15;   // source identifier (own choice)
  localparam int unsigned LDEST_W = 5;    // logical destinations per TxQ (own)
  localparam int unsigned LEN_W   = 5;    // payload words in a packet
  localparam int unsigned TAG_W   = 5;    // Express tag bits
  localparam int unsigned SA_W    = 13;   // SRAM word address: 8 K words (own)
  localparam int unsigned PTR_W   = 8;    // queue pointer width (own)
  localparam int unsigned SLOT_WORDS = 24; // one message slot: 3 cache lines

  typedef enum logic [1:0] {
    MT_BASIC   = 2'd0,
    MT_EXPRESS = 2'd1,
    MT_TAGON   = 2'd2,
    MT_DMA     = 2'd3
  } msg_type_e;

  // Destination-table entry: physical site, physical receive queue name and
  // the source identifier the receiver sees.
  typedef struct packed {
    logic [SITE_W-1:0] site;
    logic [LQ_W-1:0]   rxq;
    logic [SRC_W-1:0]  src;
  } dest_entry_t;

  // Packet header word 0 (first word on the link).
  //   [31:27] destination site  [26:18] receive queue  [17:16] type
  //   [15] interrupt request    [14:10] tag            [9:5] payload words
  //   [4:0] zero
  // Header word 1 carries the source identifier in [14:0].
  typedef struct packed {
    logic [SITE_W-1:0] site;
    logic [LQ_W-1:0]   rxq;
    msg_type_e         mtype;
    logic              intr;
    logic [TAG_W-1:0]  tag;
    logic [LEN_W-1:0]  len;
    logic [4:0]        rsvd;
  } hdr0_t;

  // A word on the network link or an internal packet stream.
  typedef struct packed {
    logic        last;
    logic [31:0] data;
  } flit_t;

  // Header word a program writes as word 0 of a Basic transmit slot:
  //   [15] interrupt at receiver  [12:8] payload words  [4:0] logical dest
  function automatic logic [LDEST_W-1:0] btx_ldest(input logic [31:0] w);
    return w[LDEST_W-1:0];
  endfunction
  function automatic logic [LEN_W-1:0] btx_len(input logic [31:0] w);
    return w[12:8];
  endfunction
  function automatic logic btx_intr(input logic [31:0] w);
    return w[15];
  endfunction

  // Header word the NES writes as word 0 of a Basic receive slot:
  //   [30:16] source id  [15] interrupt  [12:8] payload words
  function automatic logic [31:0] brx_hdr(input logic [SRC_W-1:0] src,
                                          input logic intr,
                                          input logic [LEN_W-1:0] len);
    return {1'b0, src, intr, 2'b00, len, 8'h00};
  endfunction

  // 64-bit Express receive entry:
  //   [63] 0 = message   [62:48] source id   [47] Tag-On   [46:45] lines
  //   [44:37] Tag-On buffer slot  [36:32] tag  [31:0] data word
  function automatic logic [63:0] erx_pack(input logic [SRC_W-1:0] src,
                                            input logic tagon,
                                            input logic [1:0] lines,
                                            input logic [7:0] slot,
                                            input logic [TAG_W-1:0] tag,
                                            input logic [31:0] data);
    return {1'b0, src, tagon, lines, slot, tag, data};
  endfunction

  // OnePoll answer naming a non-empty Basic receive queue:
  //   [63:60] 4'b1001  [59:56] queue  [15:8] producer  [7:0] consumer
  function automatic logic [63:0] basic_notice(input logic [3:0] q,
                                               input logic [PTR_W-1:0] prod,
                                               input logic [PTR_W-1:0] cons);
    return {4'b1001, q, 40'd0, prod, cons};
  endfunction

  // Reset value of the programmable Empty Express Message.
  localparam logic [63:0] EMPTY_MSG_RESET = 64'h8000_0000_0000_0000;

  // ---- address map of the processor bus port (own choice) -----------------
  // Region in addr[31:28].
  localparam logic [3:0] RG_SRAM  = 4'h0; // message buffer SRAM, word access
  localparam logic [3:0] RG_PTR   = 4'h1; // queue pointers
  localparam logic [3:0] RG_ETX   = 4'h2; // Express send
  localparam logic [3:0] RG_TAGON = 4'h3; // Tag-On send
  localparam logic [3:0] RG_ERX   = 4'h4; // Express receive (pop)
  localparam logic [3:0] RG_POLL  = 4'h5; // OnePoll
  localparam logic [3:0] RG_CFG   = 4'h6; // system configuration (sP port)
  localparam logic [3:0] RG_DMA   = 4'h7; // DMA commands (sP port)

endpackage
