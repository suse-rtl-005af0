// spill_tcam_tb: fills a full-size (256-slot) TCAM with random prefixes,
// many nested under a few common leading bits, then checks longest-match
// lookups, exact search, free-slot reporting and slot clearing against a
// shadow list.
module spill_tcam_tb;
  import suse_pkg::*;
  localparam int D = 256;
  logic clk = 0, rst_n = 0;
  logic [31:0] key, find_prefix;
  logic [5:0]  len, find_len;
  logic        hit, find_hit, free_ok, wr_en = 0;
  nha_t        nha;
  logic [7:0]  find_idx, free_idx, wr_idx;
  tcam_entry_t wr_entry, shadow [D];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  spill_tcam #(.DEPTH(D)) dut (.clk, .rst_n, .key, .hit, .len, .nha, .find_prefix, .find_len,
    .find_hit, .find_idx, .free_ok, .free_idx, .wr_en, .wr_idx, .wr_entry);

  function automatic logic [31:0] msk(input int l);
    return (l == 0) ? 0 : ~(32'hFFFF_FFFF >> l);
  endfunction

  task automatic write(input int i, input tcam_entry_t e);
    @(negedge clk);
    wr_en = 1; wr_idx = 8'(i); wr_entry = e;
    @(negedge clk);
    wr_en = 0;
    shadow[i] = e;
  endtask

  task automatic check_lookup();
    bit eh; int el; logic [7:0] en;
    eh = 0; el = 0; en = 0;
    for (int i = 0; i < D; i++)
      if (shadow[i].valid && ((shadow[i].prefix ^ key) & msk(shadow[i].len)) == 0
          && (!eh || int'(shadow[i].len) > el)) begin
        eh = 1; el = shadow[i].len; en = shadow[i].nha;
      end
    #1;
    checks++;
    if (hit !== eh || (eh && (int'(len) != el || nha !== en))) begin
      failures++;
      $display("FAIL lookup %h hit=%b/%b len=%0d/%0d", key, hit, eh, len, el);
    end
  endtask

  initial begin
    tcam_entry_t e;
    int l;
    for (int i = 0; i < D; i++) shadow[i] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // free slot of an empty TCAM
    #1; checks++;
    if (!free_ok || free_idx != 0) begin failures++; $display("FAIL free on empty"); end
    for (int i = 0; i < D; i++) begin
      l = $urandom_range(8, 32);
      e.valid  = 1;
      e.prefix = $urandom & msk(l);
      if (i % 2 == 0) e.prefix[31:24] = 8'h0A;
      e.len    = 6'(l);
      e.nha    = 8'($urandom);
      write(i, e);
    end
    #1; checks++;
    if (free_ok) begin failures++; $display("FAIL full TCAM reports a free slot"); end
    for (int n = 0; n < 1500; n++) begin
      int s;
      do s = $urandom_range(0, D - 1); while (!shadow[s].valid);
      key = shadow[s].prefix | ($urandom & ~msk(shadow[s].len));
      check_lookup();
      find_prefix = shadow[s].prefix; find_len = shadow[s].len;
      #1; checks++;
      if (!find_hit || !shadow[find_idx].valid || shadow[find_idx].prefix != shadow[s].prefix
          || shadow[find_idx].len != shadow[s].len) begin
        failures++; $display("FAIL find %h/%0d", find_prefix, find_len);
      end
      if (n % 10 == 0) begin
        write(s, '0);
        #1; checks++;
        if (!free_ok || !(shadow[free_idx].valid == 0)) begin failures++; $display("FAIL free"); end
        find_prefix = 32'hFFFF_FFFF; find_len = 6'd3;
      end
    end
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
