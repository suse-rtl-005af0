// quot_div: long division of a prefix polynomial by g(x), W bits per cycle.
//
// The dividend is the leading `len` bits of `key` (key[31] is the highest
// coefficient). Its first 16 bits are loaded as the initial 16-bit window;
// every later bit is shifted in with one division step: the bit leaving the
// window is the next quotient bit and, when it is 1, g(x) is XORed into the
// window. W steps are unrolled per clock, as in the parallel form of the
// division recurrence Phi(i+1) = F.Phi(i) xor G.Phi(i)_0, so a 29-bit dividend
// (13 quotient bits) takes ceil(13/W) = 4 cycles at W = 4 and the serial LFSR
// is the case W = 1. W = 4 is this implementation's pick from the 2..4 range
// the source suggests.
//
// Interface: `start` (one cycle) loads key/len and already performs the
// first W steps; `done` is high max(1, ceil((len-16)/W)) clock edges after
// the start edge and stays high, with quot (right-aligned,
// len-16 bits) and rem (= r(x)) valid, until the next start. len <= 16
// gives q = 0 and r = the dividend itself.
module quot_div
  import suse_pkg::*;
#(
  parameter int unsigned W = 4
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic [31:0] key,
  input  logic [5:0]  len,
  output logic        done,
  output poly16_t     quot,
  output poly16_t     rem
);
  logic [31:0] rest;       // dividend bits still to shift in, MSB first
  logic [5:0]  left;       // number of those bits
  poly16_t     win, q;
  logic        busy;

  poly16_t     win_n, q_n;
  logic [31:0] rest_n;
  logic [5:0]  left_n;

  // initial state on start: the first min(len,16) bits form the window
  poly16_t     win_0;
  logic [31:0] rest_0;
  logic [5:0]  left_0;
  always_comb begin
    if (len <= 6'd16) begin
      win_0  = 16'(key >> (6'd32 - len));
      left_0 = 6'd0;
    end else begin
      win_0  = key[31:16];
      left_0 = len - 6'd16;
    end
    rest_0 = key << 16;
  end

  // W unrolled division steps, from the initial state in the start cycle
  always_comb begin
    win_n  = start ? win_0  : win;
    q_n    = start ? '0     : q;
    rest_n = start ? rest_0 : rest;
    left_n = start ? left_0 : left;
    for (int unsigned s = 0; s < W; s++) begin
      if (left_n != 6'd0) begin
        q_n    = {q_n[14:0], win_n[15]};
        win_n  = {win_n[14:0], rest_n[31]} ^ (win_n[15] ? GPOLY[15:0] : 16'h0);
        rest_n = rest_n << 1;
        left_n = left_n - 6'd1;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      win  <= '0;
      q    <= '0;
      rest <= '0;
      left <= '0;
      busy <= 1'b0;
      done <= 1'b0;
    end else if (start || busy) begin
      win  <= win_n;
      q    <= q_n;
      rest <= rest_n;
      left <= left_n;
      busy <= (left_n != 6'd0);
      done <= (left_n == 6'd0);
    end
  end

  assign quot = q;
  assign rem  = win;
endmodule
