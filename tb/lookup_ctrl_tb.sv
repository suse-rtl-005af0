// lookup_ctrl_tb: a table of random routes is written straight into
// behavioural memory modules (one-cycle read latency) using the reference
// hash, mapping and entry encoders; routes whose set is full go to a
// behavioural spillover TCAM. Random addresses under random routes are then
// looked up and compared with a linear longest-prefix search over the route
// list: hit, length, NHA, whether the TCAM supplied it, the number of
// access batches (the largest number of the eight probes that fall in one
// module) and the latency max(batches + 3, 5) cycles from acceptance to
// res_valid. It also checks that no module gets two reads in one cycle.
module lookup_ctrl_tb;
  import suse_pkg::*;
  import suse_ref_pkg::*;
  localparam int NR = 600;

  logic clk = 0, rst_n = 0;
  logic lk_valid = 0, lk_ready, idle, res_valid;
  logic [31:0] lk_addr;
  logic [7:0] rd_en;
  logic [12:0] rd_row [8];
  logic [163:0] rd_data [8];
  logic [31:0] tcam_key;
  logic tcam_hit;
  logic [5:0] tcam_len;
  nha_t tcam_nha;
  lk_result_t res;

  logic [163:0] mem [8][8192];
  int nfields [8][8192];
  logic [31:0] r_pfx [NR];
  int r_len [NR];
  logic [7:0] r_nha [NR];
  bit r_tcam [NR];
  int checks = 0, failures = 0, multi_batch = 0, tcam_used = 0, long_hits = 0;

  always #5 clk = ~clk;

  lookup_ctrl dut (.clk, .rst_n, .start_ok(1'b1), .lk_valid, .lk_ready, .lk_addr, .idle,
    .rd_en, .rd_row, .rd_data, .tcam_key, .tcam_hit, .tcam_len, .tcam_nha, .res_valid, .res);

  // behavioural memory modules
  always_ff @(posedge clk)
    for (int m = 0; m < 8; m++) if (rd_en[m]) rd_data[m] <= mem[m][rd_row[m]];

  function automatic logic [31:0] msk(input int l);
    return (l == 0) ? 0 : ~(32'hFFFF_FFFF >> l);
  endfunction

  // behavioural TCAM
  always_comb begin
    tcam_hit = 0; tcam_len = 0; tcam_nha = 0;
    for (int i = 0; i < NR; i++)
      if (r_tcam[i] && ((r_pfx[i] ^ tcam_key) & msk(r_len[i])) == 0
          && (!tcam_hit || 6'(r_len[i]) > tcam_len)) begin
        tcam_hit = 1; tcam_len = 6'(r_len[i]); tcam_nha = r_nha[i];
      end
  end

  initial begin
    logic [15:0] q, r;
    int m, row, t, bm, way, best, nb, load [8], lat;
    bit dup;
    for (int a = 0; a < 8; a++)
      for (int b = 0; b < 8192; b++) begin mem[a][b] = '0; nfields[a][b] = 0; end
    // routes: clustered under a few /8s so that nested prefixes exist
    for (int i = 0; i < NR; i++) begin
      do begin
        r_len[i] = $urandom_range(8, 32);
        r_pfx[i] = $urandom & msk(r_len[i]);
        r_pfx[i][31:24] = 8'($urandom_range(10, 13));
        if (i % 3 == 0) r_pfx[i][23:16] = 8'h80;
        dup = 0;
        for (int j = 0; j < i; j++) if (r_len[j] == r_len[i] && r_pfx[j] == r_pfx[i]) dup = 1;
      end while (dup);
      r_nha[i] = 8'($urandom);
      r_tcam[i] = 0;
      t = ref_tread(r_len[i]);
      ref_div(r_pfx[i], t, q, r);
      ref_map(r, ref_skew(t), m, row);
      bm = 1 << ref_roff(r_pfx[i], r_len[i]);
      // one field per route: a half of a two-field entry or a whole entry
      way = nfields[m][row];
      if (r_len[i] <= 24 && way < 8 && way % 2 == 1
          && mem[m][row][(way/2)*41 + 40] == 1'b1) begin
        mem[m][row][(way/2)*41 +: 20] = ref_half(r_len[i], q, 8'(bm), r_nha[i]);
        nfields[m][row] = way + 1;
      end else begin
        way = (way + 1) / 2 * 2;
        if (way >= 8) r_tcam[i] = 1;
        else if (r_len[i] <= 24) begin
          mem[m][row][(way/2)*41 +: 41] = ref_two(ref_half(r_len[i], q, 8'(bm), r_nha[i]), 20'd0);
          nfields[m][row] = way + 1;
        end else begin
          mem[m][row][(way/2)*41 +: 41] = ref_long(r_len[i], q, 8'(bm), r_nha[i]);
          nfields[m][row] = way + 2;
        end
      end
    end
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 1500; n++) begin
      int s;
      s = $urandom_range(0, NR - 1);
      lk_addr = r_pfx[s] | ($urandom & ~msk(r_len[s]));
      if (n % 5 == 0) lk_addr = $urandom;
      best = -1;
      for (int i = 0; i < NR; i++)
        if (((r_pfx[i] ^ lk_addr) & msk(r_len[i])) == 0 && (best < 0 || r_len[i] > r_len[best]))
          best = i;
      for (int k = 0; k < 8; k++) load[k] = 0;
      foreach (TREAD[k]) begin
        ref_div(lk_addr, TREAD[k], q, r);
        ref_map(r, ref_skew(TREAD[k]), m, row);
        load[m]++;
      end
      nb = 0;
      for (int k = 0; k < 8; k++) if (load[k] > nb) nb = load[k];
      @(negedge clk);
      lk_valid = 1;
      while (!lk_ready) @(negedge clk);
      @(negedge clk);
      lk_valid = 0;
      lat = 1;
      while (!res_valid) begin @(negedge clk); lat++; end
      checks += 3;
      if (best < 0) begin
        if (res.hit) begin failures++; $display("FAIL false hit %h", lk_addr); end
      end else if (!res.hit || int'(res.len) != r_len[best] || res.nha != r_nha[best]
                   || res.from_tcam != r_tcam[best]) begin
        failures++;
        $display("FAIL %h hit=%b len=%0d/%0d nha=%h/%h tcam=%b/%b", lk_addr, res.hit, res.len,
                 r_len[best], res.nha, r_nha[best], res.from_tcam, r_tcam[best]);
      end
      if (int'(res.accesses) != nb) begin
        failures++; $display("FAIL accesses %0d expected %0d", res.accesses, nb);
      end
      if (lat != ((nb + 3 > 5) ? nb + 3 : 5)) begin
        failures++; $display("FAIL latency %0d with %0d batches", lat, nb);
      end
      if (nb > 1) multi_batch++;
      if (best >= 0 && r_tcam[best]) tcam_used++;
      if (best >= 0 && r_len[best] > 24) long_hits++;
    end
    checks++;
    if (multi_batch == 0 || tcam_used == 0 || long_hits == 0) begin
      failures++;
      $display("FAIL a case never happened: multi_batch=%0d tcam=%0d long=%0d",
               multi_batch, tcam_used, long_hits);
    end
    $display("multi_batch=%0d tcam=%0d long=%0d", multi_batch, tcam_used, long_hits);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
