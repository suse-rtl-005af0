// suse_ref_pkg: reference models used by the testbenches.
//
// Polynomial division is done the textbook way, one dividend bit at a time
// from the top (independently of the remainder table and of the unrolled
// divider in the RTL), and the CBM entry layout is re-written here from its
// specification so that testbenches can build and check table contents.
package suse_ref_pkg;

  localparam logic [16:0] G = 17'h1_0175;

  // q(x), r(x) of the first `len` bits of `key` divided by g(x)
  function automatic void ref_div(input logic [31:0] key, input int len,
                                  output logic [15:0] q, output logic [15:0] r);
    logic [47:0] d;
    d = 48'(key >> (32 - len));
    q = '0;
    for (int i = len - 1; i >= 16; i--) begin
      if (d[i]) begin
        d = d ^ (48'(G) << (i - 16));
        q[i-16] = 1'b1;
      end
    end
    r = d[15:0];
  endfunction

  function automatic int ref_tread(input int len);
    if (len >= 29) return 29;
    if (len >= 25) return 25;
    if (len >= 24) return 24;
    if (len >= 22) return 22;
    if (len >= 20) return 20;
    if (len >= 16) return 16;
    if (len >= 12) return 12;
    return 8;
  endfunction

  function automatic int ref_skew(input int tread);
    case (tread)
      8: return 0;   12: return 1;  16: return 3;  20: return 2;
      22: return 4;  24: return 5;  25: return 6;  default: return 7;
    endcase
  endfunction

  function automatic void ref_map(input logic [15:0] r, input int skew,
                                  output int module_id, output int row);
    row = int'(r) / 8;
    if (skew == 0) module_id = int'(r) % 8;
    else           module_id = (int'(r) / 8 + int'(r) % 8 + skew - 1) % 8;
  endfunction

  // round-off bits of a prefix of length len (bits tread..len-1)
  function automatic int ref_roff(input logic [31:0] key, input int len);
    int t;
    t = ref_tread(len);
    if (len == t) return 0;
    return int'((key << t) >> (32 - (len - t)));
  endfunction

  // 20-bit field of a two-field entry
  function automatic logic [19:0] ref_half(input int len, input logic [15:0] q,
                                           input logic [7:0] bmap, input logic [7:0] nha);
    logic [3:0] ind;
    logic [7:0] d;
    if (len < 20)       begin ind = 4'(len - 8); d = bmap; end
    else if (len < 22)  begin ind = 4'd12; d = {2'(len - 20), bmap[1:0], q[3:0]}; end
    else if (len < 24)  begin ind = 4'(13 + len - 22); d = {bmap[1:0], q[5:0]}; end
    else                begin ind = 4'd15; d = q[7:0]; end
    return {ind, d, nha};
  endfunction

  function automatic logic [40:0] ref_two(input logic [19:0] a, input logic [19:0] b);
    return {1'b1, a, b};
  endfunction

  function automatic logic [40:0] ref_long(input int len, input logic [15:0] q,
                                           input logic [7:0] bmap, input logic [7:0] nha);
    return {1'b0, 4'd0, 4'(33 - len), bmap, q, nha};
  endfunction

endpackage
