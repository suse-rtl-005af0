// suse_top_tb: end-to-end test of the full-size engine (8 modules of 2^13
// sets, 256-slot TCAM, all parameters at their defaults).
//
// After the 2^13-cycle table clear it announces a few thousand routes (many
// clustered under twelve /16s with up to six next hops, so that sets fill up
// and spill to the TCAM), withdraws some, and then runs lookups, all checked
// against a linear longest-prefix search over a route list kept by the
// testbench. Update statuses are checked against that list (EXISTS and
// NOT_FOUND exactly, the placement kinds as a class). Lookups and updates
// are also presented together and overlapping, to exercise the arbitration:
// a lookup presented with an update goes first, one presented during an
// update waits for it. Each mechanism is counted and must occur at least
// once: aggregation, new field, new entry, TCAM spill, duplicate, bit
// clear, TCAM withdrawal, absent withdrawal, multi-batch lookups, the
// one-batch best case, TCAM-supplied results, misses, long-prefix hits,
// lookups stalled by an update and updates stalled by a lookup.
module suse_top_tb;
  import suse_pkg::*;
  localparam int NR = 3000;

  logic clk = 0, rst_n = 0, init_done;
  logic lk_valid = 0, lk_ready, res_valid;
  logic [31:0] lk_addr;
  lk_result_t res;
  logic upd_valid = 0, upd_ready, upd_done;
  upd_op_t upd_op;
  logic [31:0] upd_prefix;
  logic [5:0] upd_len;
  nha_t upd_nha;
  upd_status_t upd_status;

  logic [31:0] r_pfx [NR];
  int r_len [NR];
  logic [7:0] r_nha [NR];
  bit r_on [NR], r_tcam [NR];
  int nr = 0;
  int checks = 0, failures = 0;
  int cnt_st [16];
  int cnt_multi = 0, cnt_one = 0, cnt_tcam_res = 0, cnt_miss = 0, cnt_long = 0;
  int cnt_lk_stall = 0, cnt_upd_stall = 0, sum_batches = 0, n_lookups = 0, max_batches = 0;

  always #5 clk = ~clk;

  suse_top dut (.clk, .rst_n, .init_done, .lk_valid, .lk_ready, .lk_addr, .res_valid, .res,
    .upd_valid, .upd_ready, .upd_op, .upd_prefix, .upd_len, .upd_nha, .upd_done, .upd_status);

  function automatic logic [31:0] msk(input int l);
    return (l == 0) ? 0 : ~(32'hFFFF_FFFF >> l);
  endfunction

  function automatic int find(input logic [31:0] p, input int l);
    for (int i = 0; i < nr; i++) if (r_len[i] == l && r_pfx[i] == (p & msk(l))) return i;
    return -1;
  endfunction

  // ---- updates -----------------------------------------------------------
  task automatic do_upd(input upd_op_t o, input logic [31:0] p, input int l, input int n);
    int i;
    bit present;
    upd_op = o; upd_prefix = p; upd_len = 6'(l); upd_nha = 8'(n);
    upd_valid = 1;
    #1;
    while (!upd_ready) begin
      if (lk_valid) cnt_upd_stall++;
      @(negedge clk); #1;
    end
    @(negedge clk);
    upd_valid = 0;
    while (!upd_done) @(negedge clk);
    cnt_st[upd_status]++;
    i = find(p, l);
    present = (i >= 0) && r_on[i];
    checks++;
    if (o == OP_INSERT) begin
      if (present ? (upd_status != ST_EXISTS)
                  : !(upd_status inside {ST_AGGREGATED, ST_NEW_FIELD, ST_NEW_ENTRY, ST_TCAM})) begin
        failures++;
        $display("FAIL insert %h/%0d present=%b status=%s", p, l, present, upd_status.name());
      end
      if (!present && upd_status != ST_FULL) begin
        if (i < 0) begin i = nr; nr++; end
        r_pfx[i] = p & msk(l); r_len[i] = l; r_nha[i] = 8'(n); r_on[i] = 1;
        r_tcam[i] = (upd_status == ST_TCAM);
      end
    end else begin
      if (present ? !(upd_status inside {ST_DELETED, ST_TCAM_DEL}) : (upd_status != ST_NOT_FOUND)
          || (present && ((upd_status == ST_TCAM_DEL) != r_tcam[i]))) begin
        failures++;
        $display("FAIL delete %h/%0d present=%b status=%s", p, l, present, upd_status.name());
      end
      if (present) r_on[i] = 0;
    end
  endtask

  // ---- lookups -----------------------------------------------------------
  task automatic do_lookup(input logic [31:0] a);
    int best;
    lk_addr = a; lk_valid = 1;
    #1;
    while (!lk_ready) begin
      if (init_done) cnt_lk_stall++;
      @(negedge clk); #1;
    end
    @(negedge clk);
    lk_valid = 0;
    while (!res_valid) @(negedge clk);
    // the expected answer is taken from the route list as it stands when the
    // result comes back: an update that the lookup waited for has finished
    // by then, one that waits for the lookup has not
    best = -1;
    for (int i = 0; i < nr; i++)
      if (r_on[i] && ((r_pfx[i] ^ a) & msk(r_len[i])) == 0 && (best < 0 || r_len[i] > r_len[best]))
        best = i;
    checks++;
    if (best < 0) begin
      cnt_miss++;
      if (res.hit) begin failures++; $display("FAIL false hit %h len=%0d", a, res.len); end
    end else begin
      if (r_tcam[best]) cnt_tcam_res++;
      if (r_len[best] > 24) cnt_long++;
      if (!res.hit || int'(res.len) != r_len[best] || res.nha != r_nha[best]
          || res.from_tcam != r_tcam[best]) begin
        failures++;
        $display("FAIL lookup %h hit=%b len=%0d/%0d nha=%h/%h tcam=%b/%b", a, res.hit, res.len,
                 r_len[best], res.nha, r_nha[best], res.from_tcam, r_tcam[best]);
      end
    end
    if (res.accesses > 1) cnt_multi++; else cnt_one++;
    sum_batches += int'(res.accesses);
    n_lookups++;
    if (int'(res.accesses) > max_batches) max_batches = int'(res.accesses);
  endtask

  function automatic logic [31:0] addr_under(input int i);
    return r_pfx[i] | ($urandom & ~msk(r_len[i]));
  endfunction

  initial begin
    logic [31:0] p;
    int l, i;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // a lookup presented during the table clear waits for it
    fork
      do_lookup(32'h0102_0304);
    join
    checks++;
    if (!init_done) begin failures++; $display("FAIL lookup served before clear"); end

    // clustered routes: under 24 /16s, lengths 16..19 with a few next hops
    for (int c = 0; c < 12; c++) begin
      p = {8'(10 + c), 8'($urandom), 16'h0};
      for (int k = 0; k < 40; k++)
        do_upd(OP_INSERT, p | ($urandom & 32'h0000_E000), $urandom_range(16, 19),
               $urandom_range(1, 6));
    end
    // scattered routes of every length
    for (int k = 0; k < 1500; k++) begin
      l = $urandom_range(8, 32);
      do_upd(OP_INSERT, $urandom, l, $urandom_range(0, 255));
    end
    // siblings of long prefixes, same next hop (aggregation in one-field entries)
    for (int k = 0; k < 100; k++) begin
      i = $urandom_range(0, nr - 1);
      if (r_len[i] >= 25)
        do_upd(OP_INSERT, r_pfx[i] ^ (32'h1 << (32 - r_len[i])), r_len[i], r_nha[i]);
    end
    // duplicates and withdrawals
    for (int k = 0; k < 50; k++) begin
      i = $urandom_range(0, nr - 1);
      do_upd(OP_INSERT, r_pfx[i], r_len[i], r_nha[i]);
    end
    for (int k = 0; k < 400; k++) begin
      i = $urandom_range(0, nr - 1);
      do_upd(OP_DELETE, r_pfx[i], r_len[i], 0);
    end
    for (int k = 0; k < nr; k++)
      if (r_tcam[k] && r_on[k] && k % 2 == 0) do_upd(OP_DELETE, r_pfx[k], r_len[k], 0);
    do_upd(OP_DELETE, 32'hFFFF_FFFF, 32, 0);

    // lookups
    for (int k = 0; k < 4000; k++) begin
      i = $urandom_range(0, nr - 1);
      do_lookup((k % 7 == 0) ? $urandom : addr_under(i));
    end
    for (int k = 0; k < nr; k++)
      if (r_tcam[k] && r_on[k]) do_lookup(addr_under(k));

    // lookup and update presented together: the lookup goes first
    for (int k = 0; k < 20; k++) begin
      i = $urandom_range(0, nr - 1);
      fork
        do_lookup(addr_under(i));
        do_upd(OP_INSERT, $urandom, $urandom_range(8, 32), 7);
      join
    end
    // lookup presented while an update is in progress: it waits
    for (int k = 0; k < 20; k++) begin
      i = $urandom_range(0, nr - 1);
      fork
        do_upd(OP_DELETE, r_pfx[i], r_len[i], 0);
        begin repeat (2) @(negedge clk); do_lookup(addr_under(i)); end
      join
    end

    $display("status counts: agg=%0d field=%0d entry=%0d tcam=%0d full=%0d exists=%0d del=%0d tcamdel=%0d notfound=%0d",
             cnt_st[ST_AGGREGATED], cnt_st[ST_NEW_FIELD], cnt_st[ST_NEW_ENTRY], cnt_st[ST_TCAM],
             cnt_st[ST_FULL], cnt_st[ST_EXISTS], cnt_st[ST_DELETED], cnt_st[ST_TCAM_DEL],
             cnt_st[ST_NOT_FOUND]);
    $display("lookups: multi_batch=%0d one_batch=%0d tcam=%0d miss=%0d long=%0d lk_stall=%0d upd_stall=%0d",
             cnt_multi, cnt_one, cnt_tcam_res, cnt_miss, cnt_long, cnt_lk_stall, cnt_upd_stall);
    $display("access batches per lookup: mean=%0.2f max=%0d over %0d lookups",
             real'(sum_batches) / real'(n_lookups), max_batches, n_lookups);
    foreach (cnt_st[s])
      if (s inside {ST_AGGREGATED, ST_NEW_FIELD, ST_NEW_ENTRY, ST_TCAM, ST_EXISTS, ST_DELETED,
                    ST_TCAM_DEL, ST_NOT_FOUND}) begin
        checks++;
        if (cnt_st[s] == 0) begin failures++; $display("FAIL status %0d never happened", s); end
      end
    checks += 7;
    if (cnt_multi == 0)    begin failures++; $display("FAIL no multi-batch lookup"); end
    if (cnt_one == 0)      begin failures++; $display("FAIL no one-batch lookup"); end
    if (cnt_tcam_res == 0) begin failures++; $display("FAIL no TCAM result"); end
    if (cnt_miss == 0)     begin failures++; $display("FAIL no miss"); end
    if (cnt_long == 0)     begin failures++; $display("FAIL no long-prefix hit"); end
    if (cnt_lk_stall == 0) begin failures++; $display("FAIL no stalled lookup"); end
    if (cnt_upd_stall == 0) begin failures++; $display("FAIL no stalled update"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
