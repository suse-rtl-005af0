// cbm_match: checks the four CBM entries of one set for a lookup at one tread.
//
// Every field of every entry is decoded (see the format in suse_pkg). A field
// matches when its prefix length rounds down to the tread being probed, its
// stored q(x) equals the address's q(x) at that tread, and the bit-map bit
// picked by the address's round-off bits (the length-minus-tread bits that
// follow the tread) is set; a length-24 field has no bit-map and matches on
// q(x) alone. Fields of other treads may share the set and never match, as
// their length indicator differs. Among matching fields the longest prefix
// wins. Combinational. The matching rule follows the source design; the bit
// layout is this implementation's.
//
// Interface: set_data[164], tread[5:0], quot[15:0], addr[31:0]
//            -> hit, len[5:0], nha[7:0].
module cbm_match
  import suse_pkg::*;
(
  input  logic [SET_W-1:0] set_data,
  input  logic [5:0]       tread,
  input  poly16_t          quot,
  input  logic [31:0]      addr,
  output logic             hit,
  output logic [5:0]       len,
  output nha_t             nha
);
  always_comb begin
    cbm_field_t f;
    logic [2:0] ro;
    hit = 1'b0;
    len = '0;
    nha = '0;
    for (int w = 0; w < WAYS; w++) begin
      for (int h = 0; h < 2; h++) begin
        f  = decode_field(set_data[w*ENTRY_W +: ENTRY_W], h[0]);
        ro = roff_bits(addr, tread, 2'(f.len - tread));
        if (f.valid && tread_of(f.len) == tread && f.q == quot
            && f.bmap[ro] && (!hit || f.len > len)) begin
          hit = 1'b1;
          len = f.len;
          nha = f.nha;
        end
      end
    end
  end
endmodule
