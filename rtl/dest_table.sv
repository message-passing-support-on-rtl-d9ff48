// dest_table - Destination Table of the NES transmit side.
//
// Every hardware transmit queue has a row; each row maps the logical
// destination named by a program to the physical <site, receive queue,
// source identifier> triple that goes into the packet header. System code
// fills the table, so a program can only reach the destinations it was
// given, and the receiver sees a source identifier chosen per destination.
// Rows 0..NUM_EQ-1 serve the Express/Tag-On transmit queues, the following
// NUM_BQ rows the Basic transmit queues (the architecture gives one table per
// transmit queue; the row order and the 32 logical destinations per queue
// are this design's choice).
//
// Interface: one synchronous write port for system code, two combinational
// lookup ports (Basic and Express transmit engines). Entries reset to zero.
module dest_table
  import nes_pkg::*;
#(
  parameter int unsigned ROWS = NUM_EQ + NUM_BQ,
  parameter int unsigned LDW  = LDEST_W
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     wr_en,
  input  logic [$clog2(ROWS)-1:0]  wr_row,
  input  logic [LDW-1:0]           wr_ldest,
  input  dest_entry_t              wr_entry,
  input  logic [$clog2(ROWS)-1:0]  rd0_row,
  input  logic [LDW-1:0]           rd0_ldest,
  output dest_entry_t              rd0_entry,
  input  logic [$clog2(ROWS)-1:0]  rd1_row,
  input  logic [LDW-1:0]           rd1_ldest,
  output dest_entry_t              rd1_entry
);
  dest_entry_t tbl [ROWS][2**LDW];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int r = 0; r < int'(ROWS); r++)
        for (int d = 0; d < 2**LDW; d++) tbl[r][d] <= '0;
    end else if (wr_en) begin
      tbl[wr_row][wr_ldest] <= wr_entry;
    end
  end

  assign rd0_entry = tbl[rd0_row][rd0_ldest];
  assign rd1_entry = tbl[rd1_row][rd1_ldest];
endmodule
