// sram_bank: one on-chip memory module of the routing table.
//
// 2^ROWS_LOG2 rows of SET_W bits; a row is one 4-way set of 41-bit CBM
// entries (164 bits), read or written whole, so all entries of a set come
// back in one access. Single port: one read or one write per cycle; a read
// returns its row on rdata in the next cycle (rdata holds until the next
// read). Eight such modules of 2^13 sets make the 2^16-set table. The sizes
// are the source design's; the one-cycle read timing is this
// implementation's. The contents are not reset: the top clears every row
// after reset.
//
// Interface: en, we, addr, wdata -> rdata.
module sram_bank #(
  parameter int unsigned ROWS_LOG2 = 13,
  parameter int unsigned SET_W     = 164
) (
  input  logic                 clk,
  input  logic                 en,
  input  logic                 we,
  input  logic [ROWS_LOG2-1:0] addr,
  input  logic [SET_W-1:0]     wdata,
  output logic [SET_W-1:0]     rdata
);
  logic [SET_W-1:0] mem [2**ROWS_LOG2];

  always_ff @(posedge clk) begin
    if (en) begin
      if (we) mem[addr] <= wdata;
      else    rdata     <= mem[addr];
    end
  end
endmodule
