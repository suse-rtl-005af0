// update_ctrl: incremental route announcement and withdrawal.
//
// An update hashes its prefix exactly as a lookup does, but only at the one
// tread its length rounds down to: r(x) (rem_hash) and q(x) (quot_div) of the
// first `tread` bits, then the (module, row) of the set (skew_map). The set
// is read, changed and written back:
//  - announce: if a field of the same length, q(x) and NHA exists, the
//    prefix's bit-map bit is set there (controlled bit-map aggregation: only
//    prefixes of one length share a field). Otherwise a free field of a
//    two-field entry (lengths <= 24), or an empty entry, takes it. If the set
//    is full the prefix goes to the spillover TCAM.
//  - withdraw: the prefix's bit-map bit is cleared; a field left with no bit
//    is freed, and an entry left with no field becomes empty. Other prefixes
//    sharing the field are kept, so no route is lost (lossless). Prefixes not
//    found in the set are looked for in the TCAM.
// The aggregation rules follow the source design; the order in which free
// places are tried, and reporting an already-present prefix as EXISTS without
// change, are this implementation's choices.
//
// Interface: upd_valid/upd_ready with upd_op, upd_prefix (left-aligned),
// upd_len (8..32), upd_nha; upd_done pulses with upd_status. One memory
// port (mem_en/mem_we/mem_mod/mem_row/mem_wdata, read data one cycle later
// on rd_data) and the TCAM's exact-search, free-slot and write ports.
// Timing: about 9 cycles per update (q(x), read, decide, write).
module update_ctrl
  import suse_pkg::*;
#(
  parameter int unsigned TCAM_IDX_W = 8
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  start_ok,
  input  logic                  upd_valid,
  output logic                  upd_ready,
  input  upd_op_t               upd_op,
  input  logic [31:0]           upd_prefix,
  input  logic [5:0]            upd_len,
  input  nha_t                  upd_nha,
  output logic                  idle,
  output logic                  upd_done,
  output upd_status_t           upd_status,
  // memory modules
  output logic                  mem_en,
  output logic                  mem_we,
  output logic [MOD_W-1:0]      mem_mod,
  output logic [ROW_W-1:0]      mem_row,
  output logic [SET_W-1:0]      mem_wdata,
  input  logic [SET_W-1:0]      rd_data [NMOD],
  // spillover TCAM
  output logic [31:0]           tcam_find_prefix,
  output logic [5:0]            tcam_find_len,
  input  logic                  tcam_find_hit,
  input  logic [TCAM_IDX_W-1:0] tcam_find_idx,
  input  logic                  tcam_free_ok,
  input  logic [TCAM_IDX_W-1:0] tcam_free_idx,
  output logic                  tcam_wr_en,
  output logic [TCAM_IDX_W-1:0] tcam_wr_idx,
  output tcam_entry_t           tcam_wr_entry
);
  typedef enum logic [2:0] {S_IDLE, S_CALC, S_READ, S_CAPT, S_DEC, S_WRITE} state_t;
  state_t state;

  upd_op_t          op_q;
  logic [31:0]      pfx_q;
  logic [5:0]       len_q, tread;
  nha_t             nha_q;
  logic [2:0]       tidx;
  logic [2:0]       roff;
  poly16_t          rem, quot, unused_rem;
  logic             qdone;
  logic [MOD_W-1:0] mod_id;
  logic [ROW_W-1:0] row;
  logic [SET_W-1:0] set_q, new_set;
  upd_status_t      dec_status;
  logic             dec_write, dec_tcam_wr;
  tcam_entry_t      dec_tcam_entry;
  logic [TCAM_IDX_W-1:0] dec_tcam_idx;
  logic             accept;
  logic             qdone_seen;  // quot_div has been started for this update

  assign upd_ready = (state == S_IDLE) && start_ok;
  assign accept    = upd_valid && upd_ready;
  assign idle      = (state == S_IDLE);

  always_comb begin
    tread = tread_of(len_q);
    tidx  = '0;
    for (int i = 0; i < NTREAD; i++)
      if (tread == 6'(TREAD[i])) tidx = 3'(i);
    roff  = roff_bits(pfx_q, tread, 2'(len_q - tread));
  end

  rem_hash u_rem (.key(pfx_q), .tread(tread), .rem(rem));
  quot_div #(.W(4)) u_quot (
    .clk, .rst_n, .start(state == S_CALC && !qdone_seen), .key(pfx_q), .len(tread),
    .done(qdone), .quot(quot), .rem(unused_rem)
  );
  logic [3:0] skew_sel;
  always_comb begin
    skew_sel = '0;
    for (int i = 0; i < NTREAD; i++)
      if (tidx == 3'(i)) skew_sel = 4'(SKEW[i]);
  end
  skew_map u_skew (.rem(rem), .skew(skew_sel), .mod_id(mod_id), .row(row));

  assign tcam_find_prefix = pfx_q;
  assign tcam_find_len    = len_q;

  // ---- decision on the captured set -----------------------------------
  always_comb begin
    cbm_field_t nf, f;
    cbm_entry_t e;
    logic       done_flag;
    logic [7:0] bit_sel;
    new_set        = set_q;
    dec_status     = ST_NOT_FOUND;
    dec_write      = 1'b0;
    dec_tcam_wr    = 1'b0;
    dec_tcam_idx   = tcam_free_idx;
    dec_tcam_entry = '{valid: 1'b1, prefix: pfx_q, len: len_q, nha: nha_q};
    done_flag      = 1'b0;
    bit_sel        = 8'h01 << roff;
    nf = '{valid: 1'b1, len: len_q, q: quot, bmap: bit_sel, nha: nha_q};

    if (op_q == OP_INSERT) begin
      // already present (table or TCAM)?
      for (int w = 0; w < WAYS; w++)
        for (int h = 0; h < 2; h++) begin
          f = decode_field(set_q[w*ENTRY_W +: ENTRY_W], h[0]);
          if (f.valid && f.len == len_q && f.q == quot && (f.bmap & bit_sel) != 0)
            done_flag = 1'b1;
        end
      if (done_flag || tcam_find_hit) begin
        dec_status = ST_EXISTS;
        done_flag  = 1'b1;
      end
      // 1) aggregate into a field of the same length, q(x) and NHA
      for (int w = 0; w < WAYS; w++)
        for (int h = 0; h < 2; h++) begin
          e = set_q[w*ENTRY_W +: ENTRY_W];
          f = decode_field(e, h[0]);
          if (!done_flag && f.valid && f.len == len_q && f.q == quot
              && f.nha == nha_q && len_q != 6'd24) begin
            f.bmap = f.bmap | bit_sel;
            if (e[40]) begin
              if (h == 0) e[39:20] = encode_half(f);
              else        e[19:0]  = encode_half(f);
            end else begin
              e = encode_long(f);
            end
            new_set[w*ENTRY_W +: ENTRY_W] = e;
            dec_status = ST_AGGREGATED;
            dec_write  = 1'b1;
            done_flag  = 1'b1;
          end
        end
      // 2) free field of a two-field entry
      if (len_q <= 6'd24)
        for (int w = 0; w < WAYS; w++)
          for (int h = 0; h < 2; h++) begin
            e = set_q[w*ENTRY_W +: ENTRY_W];
            f = decode_field(e, h[0]);
            if (!done_flag && e[40] && !f.valid) begin
              if (h == 0) e[39:20] = encode_half(nf);
              else        e[19:0]  = encode_half(nf);
              new_set[w*ENTRY_W +: ENTRY_W] = e;
              dec_status = ST_NEW_FIELD;
              dec_write  = 1'b1;
              done_flag  = 1'b1;
            end
          end
      // 3) empty entry
      for (int w = 0; w < WAYS; w++) begin
        e = set_q[w*ENTRY_W +: ENTRY_W];
        if (!done_flag && !e[40] && !decode_field(e, 1'b0).valid) begin
          new_set[w*ENTRY_W +: ENTRY_W] = (len_q <= 6'd24) ? {1'b1, encode_half(nf), 20'd0}
                                                           : encode_long(nf);
          dec_status = ST_NEW_ENTRY;
          dec_write  = 1'b1;
          done_flag  = 1'b1;
        end
      end
      // 4) spill to the TCAM
      if (!done_flag) begin
        dec_status  = tcam_free_ok ? ST_TCAM : ST_FULL;
        dec_tcam_wr = tcam_free_ok;
      end
    end else begin
      // withdraw
      for (int w = 0; w < WAYS; w++)
        for (int h = 0; h < 2; h++) begin
          e = set_q[w*ENTRY_W +: ENTRY_W];
          f = decode_field(e, h[0]);
          if (!done_flag && f.valid && f.len == len_q && f.q == quot
              && (f.bmap & bit_sel) != 0) begin
            f.bmap  = (len_q == 6'd24) ? 8'h00 : (f.bmap & ~bit_sel);
            f.valid = (f.bmap != 8'h00);
            if (e[40]) begin
              if (h == 0) e[39:20] = encode_half(f);
              else        e[19:0]  = encode_half(f);
              if (!decode_field(e, 1'b0).valid && !decode_field(e, 1'b1).valid) e = '0;
            end else begin
              e = encode_long(f);
            end
            new_set[w*ENTRY_W +: ENTRY_W] = e;
            dec_status = ST_DELETED;
            dec_write  = 1'b1;
            done_flag  = 1'b1;
          end
        end
      if (!done_flag && tcam_find_hit) begin
        dec_status     = ST_TCAM_DEL;
        dec_tcam_wr    = 1'b1;
        dec_tcam_idx   = tcam_find_idx;
        dec_tcam_entry = '0;
      end
    end
  end

  // ---- memory and TCAM ports ------------------------------------------
  assign mem_en        = (state == S_READ) || (state == S_WRITE);
  assign mem_we        = (state == S_WRITE);
  assign mem_mod       = mod_id;
  assign mem_row       = row;
  assign mem_wdata     = new_set;
  assign tcam_wr_en    = (state == S_DEC) && dec_tcam_wr;
  assign tcam_wr_idx   = dec_tcam_idx;
  assign tcam_wr_entry = dec_tcam_entry;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      op_q       <= OP_INSERT;
      pfx_q      <= '0;
      len_q      <= 6'd8;
      nha_q      <= '0;
      set_q      <= '0;
      upd_done   <= 1'b0;
      upd_status <= ST_NOT_FOUND;
      qdone_seen <= 1'b0;
    end else begin
      upd_done <= 1'b0;
      unique case (state)
        S_IDLE: if (accept) begin
          op_q       <= upd_op;
          // keep only the prefix's own bits
          pfx_q      <= upd_prefix & ((upd_len == 6'd0) ? 32'd0 : ~(32'hFFFF_FFFF >> upd_len));
          len_q      <= upd_len;
          nha_q      <= upd_nha;
          qdone_seen <= 1'b0;
          if (upd_len < 6'd8 || upd_len > 6'd32) begin
            upd_status <= ST_BAD_LEN;
            upd_done   <= 1'b1;
          end else begin
            state <= S_CALC;
          end
        end
        S_CALC: begin
          qdone_seen <= 1'b1;
          if (qdone_seen && qdone) state <= S_READ;
        end
        S_READ:  state <= S_CAPT;
        S_CAPT: begin
          set_q <= rd_data[mod_id];
          state <= S_DEC;
        end
        S_DEC: begin
          upd_status <= dec_status;
          if (dec_write) begin
            state <= S_WRITE;
          end else begin
            upd_done <= 1'b1;
            state    <= S_IDLE;
          end
        end
        S_WRITE: begin
          upd_done <= 1'b1;
          state    <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
