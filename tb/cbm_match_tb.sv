// cbm_match_tb: random sets of four CBM entries, each built field by field
// from the entry specification, with fields that should match the probed
// address (same tread, same q(x), round-off bit set) mixed with decoys
// (other q(x), other tread, bit not set, empty fields). The expected result,
// the longest matching prefix and its NHA, is worked out from the list of
// placed fields, not from the encoded bits.
module cbm_match_tb;
  import suse_ref_pkg::*;
  logic [163:0] set_data;
  logic [5:0]   tread;
  logic [15:0]  quot;
  logic [31:0]  addr;
  logic         hit;
  logic [5:0]   len;
  logic [7:0]   nha;
  int checks = 0, failures = 0, hits = 0;

  cbm_match dut (.set_data, .tread, .quot, .addr, .hit, .len, .nha);

  localparam int TR [8] = '{8, 12, 16, 20, 22, 24, 25, 29};

  function automatic int qbits(input int t);
    return (t <= 16) ? 0 : t - 16;
  endfunction

  // one random field; returns its encoding pieces through outputs
  task automatic make_field(input bit is_long, output int flen, output logic [15:0] fq,
                            output logic [7:0] fbmap, output logic [7:0] fnha, output bit fvalid);
    int t, k;
    logic [15:0] qa, ra;
    flen  = is_long ? $urandom_range(25, 32) : $urandom_range(8, 24);
    t     = ref_tread(flen);
    k     = flen - t;
    ref_div(addr, t, qa, ra);
    fq    = ($urandom_range(0, 2) != 0) ? qa : 16'($urandom) & 16'((1 << qbits(t)) - 1);
    if (flen == 24) fbmap = 8'h01;
    else begin
      fbmap = 8'($urandom) & 8'((1 << (1 << k)) - 1);
      if ($urandom_range(0, 1) == 0) fbmap[ref_roff(addr, flen)] = 1'b1;
    end
    fvalid = (fbmap != 0) && ($urandom_range(0, 7) != 0);
    if (!fvalid) fbmap = 0;
    fnha  = 8'($urandom);
  endtask

  initial begin
    int flen [8];
    logic [15:0] fq [8];
    logic [7:0] fbmap [8], fnha [8];
    bit fvalid [8];
    bit exp_hit;
    int exp_len, t;
    logic [7:0] exp_nha;
    logic [15:0] qa, ra;
    logic [40:0] e;
    for (int n = 0; n < 4000; n++) begin
      addr = $urandom;
      if ($urandom_range(0, 3) == 0) addr[31:20] = 12'hC08;
      t = TR[$urandom_range(0, 7)];
      tread = 6'(t);
      ref_div(addr, t, qa, ra);
      quot = qa;
      for (int w = 0; w < 4; w++) begin
        bit lng;
        lng = ($urandom_range(0, 3) == 0);
        make_field(lng, flen[2*w], fq[2*w], fbmap[2*w], fnha[2*w], fvalid[2*w]);
        if (lng) begin
          fvalid[2*w+1] = 0;
          e = fvalid[2*w] ? ref_long(flen[2*w], fq[2*w], fbmap[2*w], fnha[2*w]) : 41'd0;
        end else begin
          make_field(0, flen[2*w+1], fq[2*w+1], fbmap[2*w+1], fnha[2*w+1], fvalid[2*w+1]);
          e = ref_two(fvalid[2*w]   ? ref_half(flen[2*w], fq[2*w], fbmap[2*w], fnha[2*w]) : 20'd0,
                      fvalid[2*w+1] ? ref_half(flen[2*w+1], fq[2*w+1], fbmap[2*w+1], fnha[2*w+1]) : 20'd0);
        end
        set_data[w*41 +: 41] = e;
      end
      exp_hit = 0; exp_len = 0; exp_nha = 0;
      for (int f = 0; f < 8; f++) begin
        if (fvalid[f] && ref_tread(flen[f]) == t && fq[f] == qa
            && fbmap[f][ref_roff(addr, flen[f])] && (!exp_hit || flen[f] > exp_len)) begin
          exp_hit = 1; exp_len = flen[f]; exp_nha = fnha[f];
        end
      end
      #1;
      checks++;
      if (exp_hit) hits++;
      if (hit !== exp_hit || (exp_hit && (int'(len) != exp_len || nha !== exp_nha))) begin
        failures++;
        $display("FAIL addr=%h t=%0d hit=%b/%b len=%0d/%0d nha=%h/%h", addr, t, hit, exp_hit,
                 len, exp_len, nha, exp_nha);
      end
    end
    checks++;
    if (hits < 200) begin failures++; $display("FAIL too few hits %0d", hits); end
    $display("hits=%0d", hits);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
