// suse_table_tb: routing-table workload on the full-size engine (8 modules of
// 2^13 four-way sets, 256-slot TCAM, all parameters at their defaults).
//
// The routing tables the design is meant for are BGP tables of 150-170 K
// prefixes, most of them between /16 and /24, where prefixes under the same
// leading bits share a few next hops. No such table is shipped, so this bench
// generates one with that shape: NPFX distinct prefixes grouped under random
// /16 "networks", each network with its own small set of next hops. The
// length mix (about 55% /24, 25% /19../23, 13% /16../18, the rest shorter
// or longer) is this bench's choice, modelled on public BGP tables.
//
// Every announcement is checked for its status. How many prefixes overflow
// their four-way set is measured, not judged: FULL (set and TCAM both full,
// prefix not stored) is accepted once all TCAM slots are taken, and such a
// prefix is left out of the reference table. Then the lookup trace is
// built the way the source design's evaluation does it: pick a stored
// prefix at random and fill its host bits with random bits, so that the
// chosen prefix or a longer one is the longest match. Every lookup result (length, next hop, TCAM flag) is
// checked against a reference longest-prefix search over the announced
// routes. At the end the bench prints how many 41-bit entries the table
// took, how many prefixes spilled to the TCAM or were refused, and the
// mean, standard deviation and maximum number of memory-access batches per
// lookup; it fails if a batch count falls outside 1..8 or the latency is
// not max(B+3, 5) cycles.
module suse_table_tb;
  import suse_pkg::*;
  localparam int NPFX = 170000;  // prefixes announced (AS12654-sized)
  localparam int NLK  = 100000;  // lookups in the trace

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

  // reference table, keyed by {length, masked prefix}
  nha_t ref_nha [logic [37:0]];
  bit   ref_tcam [logic [37:0]];
  logic [31:0] l_pfx [NPFX];
  int          l_len [NPFX];
  int n = 0;
  int checks = 0, failures = 0;
  int cnt_st [16];
  int cnt_len [33];
  int sum_b = 0, sum_b2 = 0, max_b = 0, cnt_tcam_res = 0;
  longint cyc = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  suse_top dut (.clk, .rst_n, .init_done, .lk_valid, .lk_ready, .lk_addr, .res_valid, .res,
    .upd_valid, .upd_ready, .upd_op, .upd_prefix, .upd_len, .upd_nha, .upd_done, .upd_status);

  function automatic logic [31:0] msk(input int l);
    return (l == 0) ? 0 : ~(32'hFFFF_FFFF >> l);
  endfunction

  function automatic logic [37:0] key(input logic [31:0] p, input int l);
    return {6'(l), p & msk(l)};
  endfunction

  // prefix length drawn from a BGP-like mix
  function automatic int pick_len();
    int u;
    u = $urandom_range(0, 999);
    if (u < 550) return 24;
    if (u < 640) return 23;
    if (u < 730) return 22;
    if (u < 780) return 21;
    if (u < 830) return 20;
    if (u < 830 + 40) return 19;
    if (u < 900) return 18;
    if (u < 930) return 17;
    if (u < 960) return 16;
    if (u < 975) return $urandom_range(8, 15);
    return $urandom_range(25, 32);
  endfunction

  task automatic announce(input logic [31:0] p, input int l, input int h);
    upd_op = OP_INSERT; upd_prefix = p; upd_len = 6'(l); upd_nha = 8'(h);
    upd_valid = 1;
    #1;
    while (!upd_ready) begin @(negedge clk); #1; end
    @(negedge clk);
    upd_valid = 0;
    while (!upd_done) @(negedge clk);
    cnt_st[upd_status]++;
    checks++;
    // a set can overflow; FULL is right only once every TCAM slot is taken
    if (!(upd_status inside {ST_AGGREGATED, ST_NEW_FIELD, ST_NEW_ENTRY, ST_TCAM}
          || (upd_status == ST_FULL && cnt_st[ST_TCAM] == TCAM_DEPTH))) begin
      failures++;
      $display("FAIL announce %h/%0d status=%s", p, l, upd_status.name());
    end else if (upd_status != ST_FULL) begin
      ref_nha[key(p, l)]  = 8'(h);
      ref_tcam[key(p, l)] = (upd_status == ST_TCAM);
    end
  endtask

  task automatic lookup(input logic [31:0] a);
    longint t0;
    int b, best, lat;
    lk_addr = a; lk_valid = 1;
    #1;
    while (!lk_ready) begin @(negedge clk); #1; end
    t0 = cyc;
    @(negedge clk);
    lk_valid = 0;
    while (!res_valid) @(negedge clk);
    lat = int'(cyc - t0);
    best = -1;
    for (int l = 32; l >= 8 && best < 0; l--)
      if (ref_nha.exists(key(a, l))) best = l;
    checks++;
    if (best < 0 ? res.hit
                 : (!res.hit || int'(res.len) != best || res.nha != ref_nha[key(a, best)]
                    || res.from_tcam != ref_tcam[key(a, best)])) begin
      failures++;
      $display("FAIL lookup %h hit=%b len=%0d/%0d", a, res.hit, res.len, best);
    end
    if (best >= 0 && ref_tcam[key(a, best)]) cnt_tcam_res++;
    b = int'(res.accesses);
    checks++;
    if (b < 1 || b > 8 || lat != ((b + 3 > 5) ? b + 3 : 5)) begin
      failures++;
      $display("FAIL lookup %h batches=%0d latency=%0d", a, b, lat);
    end
    sum_b += b; sum_b2 += b * b;
    if (b > max_b) max_b = b;
  endtask

  initial begin
    logic [31:0] net, p;
    nha_t hops [4];
    int l, per, i;
    real mean;
    repeat (3) @(negedge clk);
    rst_n = 1;
    while (!init_done) @(negedge clk);

    // the table: networks of 1..64 prefixes, each with up to four next hops
    while (n < NPFX) begin
      net = {$urandom_range(1, 223), 24'h0} | ($urandom & 32'h00FF_0000);
      foreach (hops[k]) hops[k] = 8'($urandom);
      per = $urandom_range(1, 64);
      for (int k = 0; k < per && n < NPFX; k++) begin
        l = pick_len();
        p = (l <= 16) ? (net | ($urandom & 32'h00FF_0000)) : (net | ($urandom & 32'h0000_FFFF));
        p &= msk(l);
        if (ref_nha.exists(key(p, l))) continue;
        announce(p, l, hops[$urandom_range(0, 3)]);
        l_pfx[n] = p; l_len[n] = l; n++;
        cnt_len[l]++;
      end
    end

    // the trace: a random stored prefix, host bits random
    for (int k = 0; k < NLK; k++) begin
      i = $urandom_range(0, n - 1);
      lookup(l_pfx[i] | ($urandom & ~msk(l_len[i])));
    end

    mean = real'(sum_b) / real'(NLK);
    $display("table: %0d prefixes (/8-15 %0d, /16-19 %0d, /20-24 %0d, /25-32 %0d)", n,
             cnt_len[8] + cnt_len[9] + cnt_len[10] + cnt_len[11] + cnt_len[12] + cnt_len[13]
             + cnt_len[14] + cnt_len[15],
             cnt_len[16] + cnt_len[17] + cnt_len[18] + cnt_len[19],
             cnt_len[20] + cnt_len[21] + cnt_len[22] + cnt_len[23] + cnt_len[24],
             n - cnt_len[16] - cnt_len[17] - cnt_len[18] - cnt_len[19] - cnt_len[20]
             - cnt_len[21] - cnt_len[22] - cnt_len[23] - cnt_len[24] - cnt_len[8] - cnt_len[9]
             - cnt_len[10] - cnt_len[11] - cnt_len[12] - cnt_len[13] - cnt_len[14] - cnt_len[15]);
    $display("placement: aggregated=%0d new_field=%0d new_entry=%0d tcam=%0d full=%0d",
             cnt_st[ST_AGGREGATED], cnt_st[ST_NEW_FIELD], cnt_st[ST_NEW_ENTRY], cnt_st[ST_TCAM],
             cnt_st[ST_FULL]);
    $display("entries used: %0d of %0d (%0.1f prefixes per entry), TCAM slots used: %0d of %0d",
             cnt_st[ST_NEW_ENTRY], (1 << DEG) * WAYS,
             real'(n - cnt_st[ST_TCAM]) / real'(cnt_st[ST_NEW_ENTRY]), cnt_st[ST_TCAM], TCAM_DEPTH);
    $display("access batches per lookup: mean=%0.3f sd=%0.3f max=%0d over %0d lookups (%0d from TCAM)",
             mean, $sqrt(real'(sum_b2) / real'(NLK) - mean * mean), max_b, NLK, cnt_tcam_res);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
