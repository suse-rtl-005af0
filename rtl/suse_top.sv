// suse_top: SUSE-CBM routing-table engine for IPv4 longest-prefix match.
//
// One set-associative hash table holds all prefixes. A prefix is rounded
// down to one of eight treads, divided (as a GF(2) polynomial) by the
// CRC-16 generator g(x); the 16-bit remainder r(x) selects one of 2^16 sets,
// and only the quotient q(x) is stored, with a length indicator, a bit-map of
// the round-off bits and an 8-bit next-hop address (NHA). The sets are spread
// over eight single-port memory modules (sram_bank, 2^13 x 164 bits) with a
// per-tread skew so that the eight probes of a lookup mostly hit different
// modules. Prefixes that do not fit in their set go to a spillover TCAM.
//
// Blocks: lookup_ctrl (lookups), update_ctrl (announce/withdraw), eight
// sram_bank modules, spill_tcam. After reset a clear sequencer writes every
// row of every module to the empty state (2^13 cycles); init_done then rises
// and requests are accepted. Lookups and updates share the memory ports and
// run one at a time; a waiting lookup goes before a waiting update.
// The architecture follows the source design; the clear sequencer and the
// lookup/update arbitration are this implementation's.
//
// Interface: lk_valid/lk_ready/lk_addr -> res_valid/res (hit, length, NHA,
// from_tcam, accesses); upd_valid/upd_ready/upd_op/upd_prefix/upd_len/upd_nha
// -> upd_done/upd_status.
// Reset is asynchronous for every flop. The assertion below is switched off
// during reset with "disable iff (!rst_n)", which samples rst_n on the
// clock; a lint tool may report rst_n as used both ways. That use is in the
// checker only, not in the logic.
module suse_top
  import suse_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  output logic        init_done,
  // lookups
  input  logic        lk_valid,
  output logic        lk_ready,
  input  logic [31:0] lk_addr,
  output logic        res_valid,
  output lk_result_t  res,
  // route updates
  input  logic        upd_valid,
  output logic        upd_ready,
  input  upd_op_t     upd_op,
  input  logic [31:0] upd_prefix,
  input  logic [5:0]  upd_len,
  input  nha_t        upd_nha,
  output logic        upd_done,
  output upd_status_t upd_status
);
  localparam int unsigned TIDX_W = $clog2(TCAM_DEPTH);

  logic [ROW_W-1:0] init_row;
  logic             lk_idle, upd_idle;

  // memory modules
  logic             b_en    [NMOD];
  logic             b_we    [NMOD];
  logic [ROW_W-1:0] b_addr  [NMOD];
  logic [SET_W-1:0] b_wdata [NMOD];
  logic [SET_W-1:0] b_rdata [NMOD];

  // lookup side
  logic [NMOD-1:0]  lk_rd_en;
  logic [ROW_W-1:0] lk_rd_row [NMOD];
  logic [31:0]      tcam_key;
  logic             tcam_hit;
  logic [5:0]       tcam_len;
  nha_t             tcam_nha;

  // update side
  logic             u_en, u_we;
  logic [MOD_W-1:0] u_mod;
  logic [ROW_W-1:0] u_row;
  logic [SET_W-1:0] u_wdata;
  logic [31:0]      t_find_prefix;
  logic [5:0]       t_find_len;
  logic             t_find_hit, t_free_ok, t_wr_en;
  logic [TIDX_W-1:0] t_find_idx, t_free_idx, t_wr_idx;
  tcam_entry_t      t_wr_entry;

  // ---- table clear after reset ----------------------------------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      init_row  <= '0;
      init_done <= 1'b0;
    end else if (!init_done) begin
      init_row <= init_row + 1'b1;
      if (init_row == '1) init_done <= 1'b1;
    end
  end

  // ---- memory-port multiplexing -----------------------------------------
  always_comb begin
    for (int m = 0; m < NMOD; m++) begin
      if (!init_done) begin
        b_en[m]    = 1'b1;
        b_we[m]    = 1'b1;
        b_addr[m]  = init_row;
        b_wdata[m] = '0;
      end else if (!upd_idle) begin
        b_en[m]    = u_en && (u_mod == MOD_W'(m));
        b_we[m]    = u_we;
        b_addr[m]  = u_row;
        b_wdata[m] = u_wdata;
      end else begin
        b_en[m]    = lk_rd_en[m];
        b_we[m]    = 1'b0;
        b_addr[m]  = lk_rd_row[m];
        b_wdata[m] = '0;
      end
    end
  end

  for (genvar m = 0; m < NMOD; m++) begin : g_bank
    sram_bank #(.ROWS_LOG2(ROW_W), .SET_W(SET_W)) u_bank (
      .clk, .en(b_en[m]), .we(b_we[m]), .addr(b_addr[m]),
      .wdata(b_wdata[m]), .rdata(b_rdata[m])
    );
  end

  lookup_ctrl u_lookup (
    .clk, .rst_n,
    .start_ok (init_done && upd_idle),
    .lk_valid, .lk_ready, .lk_addr,
    .idle     (lk_idle),
    .rd_en    (lk_rd_en),
    .rd_row   (lk_rd_row),
    .rd_data  (b_rdata),
    .tcam_key, .tcam_hit, .tcam_len, .tcam_nha,
    .res_valid, .res
  );

  update_ctrl #(.TCAM_IDX_W(TIDX_W)) u_update (
    .clk, .rst_n,
    .start_ok (init_done && lk_idle && !lk_valid),
    .upd_valid, .upd_ready, .upd_op, .upd_prefix, .upd_len, .upd_nha,
    .idle     (upd_idle),
    .upd_done, .upd_status,
    .mem_en   (u_en),
    .mem_we   (u_we),
    .mem_mod  (u_mod),
    .mem_row  (u_row),
    .mem_wdata(u_wdata),
    .rd_data  (b_rdata),
    .tcam_find_prefix(t_find_prefix),
    .tcam_find_len   (t_find_len),
    .tcam_find_hit   (t_find_hit),
    .tcam_find_idx   (t_find_idx),
    .tcam_free_ok    (t_free_ok),
    .tcam_free_idx   (t_free_idx),
    .tcam_wr_en      (t_wr_en),
    .tcam_wr_idx     (t_wr_idx),
    .tcam_wr_entry   (t_wr_entry)
  );

  spill_tcam #(.DEPTH(TCAM_DEPTH)) u_tcam (
    .clk, .rst_n,
    .key(tcam_key), .hit(tcam_hit), .len(tcam_len), .nha(tcam_nha),
    .find_prefix(t_find_prefix), .find_len(t_find_len),
    .find_hit(t_find_hit), .find_idx(t_find_idx),
    .free_ok(t_free_ok), .free_idx(t_free_idx),
    .wr_en(t_wr_en), .wr_idx(t_wr_idx), .wr_entry(t_wr_entry)
  );

  // lookups and updates never own the memory ports at the same time
  a_exclusive: assert property (@(posedge clk) disable iff (!rst_n)
    !(!lk_idle && !upd_idle));
endmodule
