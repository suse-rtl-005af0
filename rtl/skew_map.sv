// skew_map: places a set, named by its remainder r(x), in one of the 8
// memory modules.
//
// Row address = r / 8. Module ID = r mod 8 for skew 0, otherwise
// (r/8 + r mod 8 + skew - 1) mod 8. Each tread uses its own skew, so the
// eight sets probed by one lookup tend to fall in different modules; for a
// fixed tread the mapping is a bijection from r to (module, row). The
// equation is the source design's. Combinational.
//
// Interface: rem[15:0], skew[3:0] -> mod_id[2:0], row[12:0].
module skew_map
  import suse_pkg::*;
(
  input  poly16_t           rem,
  input  logic [3:0]        skew,
  output logic [MOD_W-1:0]  mod_id,
  output logic [ROW_W-1:0]  row
);
  always_comb begin
    row = rem[DEG-1:MOD_W];
    if (skew == 4'd0)
      mod_id = rem[MOD_W-1:0];
    else
      mod_id = MOD_W'(rem[DEG-1:MOD_W]) + rem[MOD_W-1:0] + MOD_W'(skew - 4'd1);
  end
endmodule
