// rem_hash: one-step remainder r(x) of a prefix divided by g(x).
//
// The leading `tread` bits of `key` are read as a polynomial whose highest
// coefficient is key[31]. Because Rem(a(x)+b(x)) = Rem(a(x)) + Rem(b(x)), the
// remainder is the XOR of the precomputed remainders Rem(x^j) of every set
// bit j; the table of Rem(x^j), j = 0..31, is a set of constants built at
// elaboration from g(x). Purely combinational: one cycle in the surrounding
// logic. The method is the source design's; building the table with a
// constant function is this implementation's.
//
// Interface: key[31:0] (MSB first), tread (1..32), rem[15:0].
module rem_hash
  import suse_pkg::*;
(
  input  logic [31:0] key,
  input  logic [5:0]  tread,
  output poly16_t     rem
);
  logic [31:0] dividend;  // bit j = coefficient of x^j

  always_comb begin
    dividend = key >> (6'd32 - tread);
    rem = '0;
    for (int j = 0; j < 32; j++)
      if (dividend[j]) rem ^= rem_xn(j);
  end
endmodule
