// spill_tcam: the small spillover table for prefixes that find no room in
// their 4-way set.
//
// DEPTH slots of {valid, prefix, length, NHA}, held in registers and all
// compared in parallel, as a TCAM would: a slot matches an address when the
// first `len` bits agree; the longest matching slot wins. The same array
// also answers the update controller: the slot that holds an exact
// (prefix, length) pair, and the lowest free slot. Slots are cleared by
// reset. The source design only asks for "a small spillover TCAM (256
// entries or less)"; the register-and-comparator structure is this
// implementation's.
//
// Timing: all search outputs are combinational; a write (wr_en, wr_idx,
// wr_entry) takes effect at the next clock edge.
module spill_tcam
  import suse_pkg::*;
#(
  parameter int unsigned DEPTH = 256,
  localparam int unsigned IDX_W = $clog2(DEPTH)
) (
  input  logic              clk,
  input  logic              rst_n,
  // lookup
  input  logic [31:0]       key,
  output logic              hit,
  output logic [5:0]        len,
  output nha_t              nha,
  // exact search and free slot, for updates
  input  logic [31:0]       find_prefix,
  input  logic [5:0]        find_len,
  output logic              find_hit,
  output logic [IDX_W-1:0]  find_idx,
  output logic              free_ok,
  output logic [IDX_W-1:0]  free_idx,
  // write
  input  logic              wr_en,
  input  logic [IDX_W-1:0]  wr_idx,
  input  tcam_entry_t       wr_entry
);
  tcam_entry_t slot [DEPTH];

  function automatic logic [31:0] len_mask(input logic [5:0] l);
    return (l == 6'd0) ? 32'd0 : ~(32'hFFFF_FFFF >> l);
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < DEPTH; i++) slot[i] <= '0;
    end else if (wr_en) begin
      slot[wr_idx] <= wr_entry;
    end
  end

  always_comb begin
    hit = 1'b0;
    len = '0;
    nha = '0;
    find_hit = 1'b0;
    find_idx = '0;
    free_ok  = 1'b0;
    free_idx = '0;
    for (int i = DEPTH - 1; i >= 0; i--) begin
      if (slot[i].valid && ((slot[i].prefix ^ key) & len_mask(slot[i].len)) == 32'd0
          && (!hit || slot[i].len >= len)) begin
        hit = 1'b1;
        len = slot[i].len;
        nha = slot[i].nha;
      end
      if (slot[i].valid && slot[i].len == find_len
          && ((slot[i].prefix ^ find_prefix) & len_mask(find_len)) == 32'd0) begin
        find_hit = 1'b1;
        find_idx = IDX_W'(i);
      end
      if (!slot[i].valid) begin
        free_ok  = 1'b1;
        free_idx = IDX_W'(i);
      end
    end
  end
endmodule
