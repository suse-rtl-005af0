// update_ctrl_tb: a scripted sequence of announcements and withdrawals
// around one /16 (192.168) fills its set field by field: aggregation into a
// field of equal length and NHA, a free half of a two-field entry, an empty
// entry, spill to the TCAM when all eight fields are taken, duplicates,
// withdrawals that clear one bit-map bit, free a field and empty an entry,
// withdrawal from the TCAM and of an absent prefix. After every step the
// status is checked and the whole set, read from a behavioural memory, is
// compared with the expected words built with the reference encoders.
// Long (/27) and /24 prefixes and an illegal length are covered too.
module update_ctrl_tb;
  import suse_pkg::*;
  import suse_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  logic upd_valid = 0, upd_ready, idle, upd_done;
  upd_op_t op;
  logic [31:0] pfx;
  logic [5:0] len;
  nha_t nha;
  upd_status_t status;
  logic mem_en, mem_we;
  logic [2:0] mem_mod;
  logic [12:0] mem_row;
  logic [163:0] mem_wdata;
  logic [163:0] rd_data [8];
  logic [31:0] t_fp; logic [5:0] t_fl;
  logic t_fh, t_free_ok, t_wr_en;
  logic [7:0] t_fi, t_free_idx, t_wr_idx;
  tcam_entry_t t_wr_entry;
  logic t_hit; logic [5:0] t_len; nha_t t_nha;

  logic [163:0] mem [8][8192];
  logic [40:0] exp_e [4];
  int checks = 0, failures = 0, bm, lat, mset, rset;
  logic [15:0] q, r;

  always #5 clk = ~clk;

  update_ctrl #(.TCAM_IDX_W(8)) dut (.clk, .rst_n, .start_ok(1'b1), .upd_valid, .upd_ready,
    .upd_op(op), .upd_prefix(pfx), .upd_len(len), .upd_nha(nha), .idle, .upd_done,
    .upd_status(status), .mem_en, .mem_we, .mem_mod, .mem_row, .mem_wdata, .rd_data,
    .tcam_find_prefix(t_fp), .tcam_find_len(t_fl), .tcam_find_hit(t_fh), .tcam_find_idx(t_fi),
    .tcam_free_ok(t_free_ok), .tcam_free_idx(t_free_idx), .tcam_wr_en(t_wr_en),
    .tcam_wr_idx(t_wr_idx), .tcam_wr_entry(t_wr_entry));

  spill_tcam #(.DEPTH(256)) u_tcam (.clk, .rst_n, .key(32'd0), .hit(t_hit), .len(t_len),
    .nha(t_nha), .find_prefix(t_fp), .find_len(t_fl), .find_hit(t_fh), .find_idx(t_fi),
    .free_ok(t_free_ok), .free_idx(t_free_idx), .wr_en(t_wr_en), .wr_idx(t_wr_idx),
    .wr_entry(t_wr_entry));

  always_ff @(posedge clk)
    if (mem_en) begin
      if (mem_we) mem[mem_mod][mem_row] <= mem_wdata;
      else        rd_data[mem_mod] <= mem[mem_mod][mem_row];
    end

  task automatic upd(input upd_op_t o, input logic [31:0] p, input int l, input int n,
                     input upd_status_t exp_st);
    @(negedge clk);
    op = o; pfx = p; len = 6'(l); nha = 8'(n); upd_valid = 1;
    while (!upd_ready) @(negedge clk);
    @(negedge clk);
    upd_valid = 0;
    lat = 1;
    while (!upd_done) begin @(negedge clk); lat++; end
    checks++;
    if (status != exp_st) begin
      failures++;
      $display("FAIL %s %h/%0d status=%s expected=%s", o.name(), p, l, status.name(), exp_st.name());
    end
    checks++;
    if (lat > 12) begin failures++; $display("FAIL update took %0d cycles", lat); end
  endtask

  task automatic check_set(input string what);
    checks++;
    if (mem[mset][rset] != {exp_e[3], exp_e[2], exp_e[1], exp_e[0]}) begin
      failures++;
      $display("FAIL set after %s:\n  got %h\n  exp %h", what, mem[mset][rset],
               {exp_e[3], exp_e[2], exp_e[1], exp_e[0]});
    end
  endtask

  localparam logic [31:0] B = 32'hC0A8_0000;

  initial begin
    for (int a = 0; a < 8; a++) for (int b = 0; b < 8192; b++) mem[a][b] = '0;
    for (int w = 0; w < 4; w++) exp_e[w] = '0;
    ref_div(B, 16, q, r);
    ref_map(r, ref_skew(16), mset, rset);
    repeat (2) @(negedge clk);
    rst_n = 1;

    upd(OP_INSERT, B | 32'h0000, 18, 1, ST_NEW_ENTRY);
    exp_e[0] = ref_two(ref_half(18, 0, 8'b0001, 1), 0);                 check_set("new entry");
    upd(OP_INSERT, B | 32'h4000, 18, 1, ST_AGGREGATED);
    exp_e[0] = ref_two(ref_half(18, 0, 8'b0011, 1), 0);                 check_set("aggregate");
    upd(OP_INSERT, B | 32'h8000, 18, 2, ST_NEW_FIELD);
    exp_e[0] = ref_two(ref_half(18, 0, 8'b0011, 1), ref_half(18, 0, 8'b0100, 2)); check_set("field B");
    upd(OP_INSERT, B | 32'h0000, 19, 3, ST_NEW_ENTRY);
    exp_e[1] = ref_two(ref_half(19, 0, 8'h01, 3), 0);                    check_set("entry 1");
    upd(OP_INSERT, B | 32'h0000, 17, 4, ST_NEW_FIELD);
    exp_e[1] = ref_two(ref_half(19, 0, 8'h01, 3), ref_half(17, 0, 8'h01, 4)); check_set("entry 1 B");
    upd(OP_INSERT, B, 16, 5, ST_NEW_ENTRY);
    exp_e[2] = ref_two(ref_half(16, 0, 8'h01, 5), 0);                    check_set("entry 2");
    upd(OP_INSERT, B | 32'h2000, 19, 6, ST_NEW_FIELD);
    exp_e[2] = ref_two(ref_half(16, 0, 8'h01, 5), ref_half(19, 0, 8'h02, 6)); check_set("entry 2 B");
    upd(OP_INSERT, B | 32'h4000, 19, 7, ST_NEW_ENTRY);
    exp_e[3] = ref_two(ref_half(19, 0, 8'h04, 7), 0);                    check_set("entry 3");
    upd(OP_INSERT, B | 32'h6000, 19, 8, ST_NEW_FIELD);
    exp_e[3] = ref_two(ref_half(19, 0, 8'h04, 7), ref_half(19, 0, 8'h08, 8)); check_set("entry 3 B");
    upd(OP_INSERT, B | 32'h8000, 19, 9, ST_TCAM);                        check_set("spill");
    upd(OP_INSERT, B | 32'h4000, 18, 1, ST_EXISTS);                      check_set("dup table");
    upd(OP_INSERT, B | 32'h8000, 19, 9, ST_EXISTS);                      check_set("dup tcam");
    upd(OP_DELETE, B | 32'h0000, 18, 0, ST_DELETED);
    exp_e[0] = ref_two(ref_half(18, 0, 8'b0010, 1), ref_half(18, 0, 8'b0100, 2)); check_set("clear bit");
    upd(OP_DELETE, B | 32'h4000, 18, 0, ST_DELETED);
    exp_e[0] = ref_two(20'd0, ref_half(18, 0, 8'b0100, 2));              check_set("free field");
    upd(OP_DELETE, B | 32'h8000, 18, 0, ST_DELETED);
    exp_e[0] = '0;                                                       check_set("free entry");
    upd(OP_DELETE, B | 32'h8000, 19, 0, ST_TCAM_DEL);                    check_set("tcam del");
    upd(OP_DELETE, B | 32'h8000, 19, 0, ST_NOT_FOUND);                   check_set("absent");
    upd(OP_DELETE, B | 32'h0000, 20, 0, ST_NOT_FOUND);
    upd(OP_INSERT, B | 32'h8000, 17, 4, ST_AGGREGATED);
    exp_e[1] = ref_two(ref_half(19, 0, 8'h01, 3), ref_half(17, 0, 8'h03, 4)); check_set("agg 17");
    upd(OP_INSERT, B | 32'hC000, 18, 1, ST_NEW_ENTRY);
    exp_e[0] = ref_two(ref_half(18, 0, 8'b1000, 1), 0);                  check_set("reuse entry");

    // a /27 goes in a one-field entry at tread 25; its sibling aggregates
    begin
      logic [31:0] p27;
      int m2, r2;
      p27 = 32'h0A01_0260;
      ref_div(p27, 25, q, r);
      ref_map(r, ref_skew(25), m2, r2);
      upd(OP_INSERT, p27, 27, 10, ST_NEW_ENTRY);
      checks++;
      if (mem[m2][r2][40:0] != ref_long(27, q, 8'(1 << ref_roff(p27, 27)), 10)) begin
        failures++; $display("FAIL /27 entry %h", mem[m2][r2][40:0]);
      end
      upd(OP_INSERT, p27 ^ 32'h20, 27, 10, ST_AGGREGATED);
      checks++;
      if (mem[m2][r2][40:0] != ref_long(27, q, 8'((1 << ref_roff(p27, 27))
                                               | (1 << ref_roff(p27 ^ 32'h20, 27))), 10)) begin
        failures++; $display("FAIL /27 aggregate %h", mem[m2][r2][40:0]);
      end
      upd(OP_INSERT, p27 ^ 32'h40, 27, 11, ST_NEW_ENTRY);
      upd(OP_DELETE, p27, 27, 0, ST_DELETED);
      upd(OP_DELETE, p27 ^ 32'h20, 27, 0, ST_DELETED);
      checks++;
      if (mem[m2][r2][40:0] != '0) begin failures++; $display("FAIL /27 not emptied"); end
    end
    // a /24 has no bit-map
    begin
      int m3, r3;
      ref_div(32'h0B0C_0D00, 24, q, r);
      ref_map(r, ref_skew(24), m3, r3);
      upd(OP_INSERT, 32'h0B0C_0D00, 24, 11, ST_NEW_ENTRY);
      checks++;
      if (mem[m3][r3][40:0] != ref_two(ref_half(24, q, 8'h01, 11), 0)) begin
        failures++; $display("FAIL /24 entry %h", mem[m3][r3][40:0]);
      end
      upd(OP_INSERT, 32'h0B0C_0D00, 24, 12, ST_EXISTS);
      upd(OP_DELETE, 32'h0B0C_0D00, 24, 0, ST_DELETED);
      checks++;
      if (mem[m3][r3][40:0] != '0) begin failures++; $display("FAIL /24 not emptied"); end
    end
    upd(OP_INSERT, 32'h8000_0000, 5, 1, ST_BAD_LEN);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
