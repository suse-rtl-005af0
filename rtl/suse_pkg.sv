// suse_pkg: constants, types and helper functions shared by the SUSE-CBM
// routing-table engine.
//
// The table is one set-associative hash table indexed by the remainder r(x)
// of a prefix divided by the CRC-16 generator g(x) = x^16+x^8+x^6+x^5+x^4+x^2+1;
// only the quotient q(x) is stored. Prefixes are rounded down to one of eight
// "treads" (8, 12, 16, 20, 22, 24, 25, 29) before hashing. The 2^16 sets are
// spread over 8 single-port memory modules of 2^13 sets each, and every set
// holds four 41-bit entries in the controlled bit-map (CBM) format.
//
// All of the above numbers follow the source design. The exact bit positions
// inside an entry, the skew degrees of treads 20..29 and the encoding of empty
// fields are choices of this implementation (see cbm_match.sv, skew_map.sv).
package suse_pkg;

  localparam int unsigned DEG        = 16;             // degree of g(x)
  localparam logic [16:0] GPOLY      = 17'h1_0175;     // x^16+x^8+x^6+x^5+x^4+x^2+1
  localparam int unsigned NTREAD     = 8;
  localparam int unsigned NMOD       = 8;              // memory modules
  localparam int unsigned MOD_W      = 3;
  localparam int unsigned ROW_W      = DEG - MOD_W;    // 13: 2^13 sets per module
  localparam int unsigned WAYS       = 4;
  localparam int unsigned ENTRY_W    = 41;
  localparam int unsigned SET_W      = WAYS * ENTRY_W; // 164
  localparam int unsigned NHA_W      = 8;
  localparam int unsigned TCAM_DEPTH = 256;

  // Treads in increasing order; index i is used throughout the design.
  localparam int unsigned TREAD [NTREAD] = '{8, 12, 16, 20, 22, 24, 25, 29};
  // Skew degree per tread (Sec. V mapping). 8/12/16 -> 0/1/3 as in the
  // source example; the rest are this implementation's choice.
  localparam int unsigned SKEW  [NTREAD] = '{0, 1, 3, 2, 4, 5, 6, 7};

  typedef logic [NHA_W-1:0] nha_t;
  typedef logic [DEG-1:0]   poly16_t;

  // Result of one lookup.
  typedef struct packed {
    logic       hit;
    logic [5:0] len;       // length of the longest matching prefix
    nha_t       nha;
    logic       from_tcam; // the match came from the spillover TCAM
    logic [3:0] accesses;  // memory-access batches spent (1..8)
  } lk_result_t;

  // One spillover-TCAM slot: a prefix (left-aligned) and its length.
  typedef struct packed {
    logic        valid;
    logic [31:0] prefix;
    logic [5:0]  len;
    nha_t        nha;
  } tcam_entry_t;

  typedef enum logic [1:0] {OP_INSERT = 2'd0, OP_DELETE = 2'd1} upd_op_t;

  typedef enum logic [3:0] {
    ST_AGGREGATED  = 4'd0, // bit set in an existing field (same length, q, NHA)
    ST_NEW_FIELD   = 4'd1, // free field of a two-field entry taken
    ST_NEW_ENTRY   = 4'd2, // empty entry taken
    ST_TCAM        = 4'd3, // set full: spilled to the TCAM
    ST_FULL        = 4'd4, // set and TCAM full: not stored
    ST_EXISTS      = 4'd5, // prefix already present: nothing changed
    ST_DELETED     = 4'd6, // withdrawn from the table
    ST_TCAM_DEL    = 4'd7, // withdrawn from the TCAM
    ST_NOT_FOUND   = 4'd8, // withdrawal of an absent prefix
    ST_BAD_LEN     = 4'd9  // length outside 8..32
  } upd_status_t;

  // Tread (round-down length) of a prefix length 8..32.
  function automatic logic [5:0] tread_of(input logic [5:0] len);
    logic [5:0] t;
    t = 6'd8;
    for (int i = 0; i < NTREAD; i++)
      if (len >= 6'(TREAD[i])) t = 6'(TREAD[i]);
    return t;
  endfunction

  // Remainder of x^n modulo g(x), n < 32 (the "remainder table").
  function automatic poly16_t rem_xn(input int unsigned n);
    logic [16:0] r;
    r = 17'd1;
    for (int unsigned k = 0; k < n; k++) begin
      r = r << 1;
      if (r[16]) r = r ^ GPOLY;
    end
    return r[15:0];
  endfunction

  // The first `nbits` bits after the first `t` bits of `key`, right-aligned
  // (the round-off bits of a prefix, nbits <= 3).
  function automatic logic [2:0] roff_bits(input logic [31:0] key,
                                           input logic [5:0] t,
                                           input logic [1:0] nbits);
    logic [2:0] top3;
    top3 = 3'((key << t) >> 29);
    return (nbits == 2'd0) ? 3'd0 : (top3 >> (2'd3 - nbits));
  endfunction

  // ---------------------------------------------------------------------
  // CBM entry format (41 bits). Field widths follow the source's Fig. 5;
  // the bit positions are this implementation's.
  //   e[40] = 1 : two fields, prefixes of length 8..24
  //       e[39:20] = field A, e[19:0] = field B, each {ind[3:0], data[7:0], nha[7:0]}
  //       ind 0..11 : length 8+ind, data = 8-bit bit-map (q(x) is 0)
  //       ind 12    : data = {00 -> len 20 | 01 -> len 21, 2b bit-map, 4b q(x)}
  //       ind 13,14 : length 22,23, data = {2b bit-map, 6b q(x)}
  //       ind 15    : length 24, data = 8b q(x) (no bit-map)
  //   e[40] = 0 : one field, prefixes of length 25..32
  //       e[39:36] = 0000, e[35:32] = length code (length = 33 - code,
  //       codes 1..8), e[31:24] = bit-map, e[23:8] = q(x) (13 or 9 bits
  //       used), e[7:0] = NHA.  Code 0 marks an empty entry.
  // A bit-map bit i stands for the prefix whose round-off bits (the bits
  // between the tread and the prefix length) equal i. A field whose
  // bit-map is all zero is empty; an all-zero entry is empty.
  // ---------------------------------------------------------------------
  typedef logic [ENTRY_W-1:0] cbm_entry_t;

  typedef struct packed {
    logic       valid;
    logic [5:0] len;
    poly16_t    q;
    logic [7:0] bmap;
    nha_t       nha;
  } cbm_field_t;

  function automatic cbm_field_t decode_half(input logic [19:0] h);
    cbm_field_t f;
    logic [3:0] ind;
    logic [7:0] d;
    ind = h[19:16];
    d   = h[15:8];
    f.nha = h[7:0];
    f.q   = '0;
    if (ind <= 4'd11) begin
      f.len  = 6'd8 + 6'(ind);
      f.bmap = d;
    end else if (ind == 4'd12) begin
      f.len  = d[6] ? 6'd21 : 6'd20;
      f.bmap = {6'd0, d[5:4]};
      f.q    = {12'd0, d[3:0]};
    end else if (ind != 4'd15) begin
      f.len  = (ind == 4'd13) ? 6'd22 : 6'd23;
      f.bmap = {6'd0, d[7:6]};
      f.q    = {10'd0, d[5:0]};
    end else begin
      f.len  = 6'd24;
      f.bmap = 8'h01;
      f.q    = {8'd0, d};
    end
    f.valid = (f.bmap != 8'h00);
    return f;
  endfunction

  // Field `idx` (0 = A, 1 = B) of an entry; a one-field entry has no B.
  function automatic cbm_field_t decode_field(input cbm_entry_t e, input logic idx);
    cbm_field_t f;
    if (e[40]) begin
      f = decode_half(idx ? e[19:0] : e[39:20]);
    end else begin
      f.len   = 6'd33 - 6'(e[35:32]);
      f.bmap  = e[31:24];
      f.q     = e[23:8];
      f.nha   = e[7:0];
      f.valid = !idx && (e[39:36] == 4'd0) && (e[35:32] != 4'd0)
                && (e[35:32] <= 4'd8) && (e[31:24] != 8'h00);
    end
    return f;
  endfunction

  // 20-bit half-entry for a prefix of length 8..24 (an invalid field
  // encodes as all zeros).
  function automatic logic [19:0] encode_half(input cbm_field_t f);
    logic [3:0] ind;
    logic [7:0] d;
    if (!f.valid) return 20'd0;
    if (f.len <= 6'd19) begin
      ind = 4'(f.len - 6'd8);
      d   = f.bmap;
    end else if (f.len <= 6'd21) begin
      ind = 4'd12;
      d   = {1'b0, f.len == 6'd21, f.bmap[1:0], f.q[3:0]};
    end else if (f.len <= 6'd23) begin
      ind = (f.len == 6'd22) ? 4'd13 : 4'd14;
      d   = {f.bmap[1:0], f.q[5:0]};
    end else begin
      ind = 4'd15;
      d   = f.q[7:0];
    end
    return {ind, d, f.nha};
  endfunction

  // One-field entry for a prefix of length 25..32 (invalid -> all zeros).
  function automatic cbm_entry_t encode_long(input cbm_field_t f);
    if (!f.valid) return '0;
    return {1'b0, 4'd0, 4'(6'd33 - f.len), f.bmap, f.q, f.nha};
  endfunction

endpackage
