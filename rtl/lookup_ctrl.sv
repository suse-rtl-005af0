// lookup_ctrl: longest-prefix-match lookup of one IPv4 address.
//
// For each of the eight treads t the address's first t bits are hashed in
// parallel: rem_hash gives r(x) at once, quot_div computes q(x) meanwhile,
// and skew_map turns r(x) into a (module, row) pair with the tread's skew.
// mem_scheduler then issues the eight set reads in batches, at most one per
// module per cycle, so conflicting reads go out in later batches. Each
// returned set is checked by cbm_match for a prefix of that tread with the
// same q(x) and a set bit-map bit; the longest of the eight matches and of
// the spillover TCAM's match (searched on the same address) is the result.
// This sequence follows the source design's lookup procedure; one lookup at
// a time (no pipelining) is this implementation's choice.
//
// Interface: lk_valid/lk_ready/lk_addr accept a lookup when start_ok is high;
// res_valid pulses for one cycle with res. rd_en/rd_row go to the memory
// modules, whose rd_data returns one cycle later. tcam_key drives the TCAM's
// search port (combinational answer on tcam_hit/len/nha).
// Timing: accept in cycle 0, batch k issued in cycle k (k = 1..8), result
// when the last set has arrived and q(x) is ready (W = 4: res_valid in
// cycle 5 when one batch suffices; B batches take max(B + 3, 5) cycles).
// Reset is asynchronous for every flop. The assertion below is switched off
// during reset with "disable iff (!rst_n)", which samples rst_n on the
// clock; a lint tool may report rst_n as used both ways. That use is in the
// checker only, not in the logic.
module lookup_ctrl
  import suse_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start_ok,
  input  logic              lk_valid,
  output logic              lk_ready,
  input  logic [31:0]       lk_addr,
  output logic              idle,
  // memory modules
  output logic [NMOD-1:0]   rd_en,
  output logic [ROW_W-1:0]  rd_row  [NMOD],
  input  logic [SET_W-1:0]  rd_data [NMOD],
  // spillover TCAM search
  output logic [31:0]       tcam_key,
  input  logic              tcam_hit,
  input  logic [5:0]        tcam_len,
  input  nha_t              tcam_nha,
  // result
  output logic              res_valid,
  output lk_result_t        res
);
  typedef enum logic [1:0] {S_IDLE, S_ISSUE, S_WAIT} state_t;
  state_t state;

  logic [31:0]        addr_q;
  logic [NTREAD-1:0]  pending, granted_d, grant;
  logic [3:0]         batches;
  logic [SET_W-1:0]   set_q   [NTREAD];
  poly16_t            rem     [NTREAD];
  poly16_t            quot    [NTREAD];
  logic [NTREAD-1:0]  qdone;
  logic [MOD_W-1:0]   mod_id  [NTREAD];
  logic [ROW_W-1:0]   row     [NTREAD];
  logic [NTREAD-1:0]  m_hit;
  logic [5:0]         m_len   [NTREAD];
  nha_t               m_nha   [NTREAD];
  logic               accept;

  assign lk_ready = (state == S_IDLE) && start_ok;
  assign accept   = lk_valid && lk_ready;
  assign idle     = (state == S_IDLE);
  assign tcam_key = addr_q;

  for (genvar i = 0; i < NTREAD; i++) begin : g_tread
    poly16_t unused_rem;
    rem_hash u_rem (.key(addr_q), .tread(6'(TREAD[i])), .rem(rem[i]));
    quot_div #(.W(4)) u_quot (
      .clk, .rst_n, .start(accept), .key(lk_addr), .len(6'(TREAD[i])),
      .done(qdone[i]), .quot(quot[i]), .rem(unused_rem)
    );
    skew_map u_skew (.rem(rem[i]), .skew(4'(SKEW[i])), .mod_id(mod_id[i]), .row(row[i]));
    cbm_match u_match (
      .set_data(set_q[i]), .tread(6'(TREAD[i])), .quot(quot[i]), .addr(addr_q),
      .hit(m_hit[i]), .len(m_len[i]), .nha(m_nha[i])
    );
  end

  mem_scheduler #(.NREQ(NTREAD)) u_sched (
    .pending(state == S_ISSUE ? pending : '0), .mod_id, .grant
  );

  // read requests of this cycle's batch
  always_comb begin
    rd_en = '0;
    for (int m = 0; m < NMOD; m++) rd_row[m] = '0;
    for (int i = 0; i < NTREAD; i++) begin
      if (grant[i]) begin
        rd_en[mod_id[i]]  = 1'b1;
        rd_row[mod_id[i]] = row[i];
      end
    end
  end

  // longest match over the eight treads and the TCAM
  lk_result_t best;
  always_comb begin
    best = '0;
    best.accesses = batches;
    for (int i = 0; i < NTREAD; i++) begin
      if (m_hit[i] && (!best.hit || m_len[i] > best.len)) begin
        best.hit = 1'b1;
        best.len = m_len[i];
        best.nha = m_nha[i];
      end
    end
    if (tcam_hit && (!best.hit || tcam_len > best.len)) begin
      best.hit       = 1'b1;
      best.len       = tcam_len;
      best.nha       = tcam_nha;
      best.from_tcam = 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      addr_q    <= '0;
      pending   <= '0;
      granted_d <= '0;
      batches   <= '0;
      res_valid <= 1'b0;
      res       <= '0;
      for (int i = 0; i < NTREAD; i++) set_q[i] <= '0;
    end else begin
      res_valid <= 1'b0;
      granted_d <= grant;
      for (int i = 0; i < NTREAD; i++)
        if (granted_d[i]) set_q[i] <= rd_data[mod_id[i]];
      unique case (state)
        S_IDLE: if (accept) begin
          addr_q  <= lk_addr;
          pending <= '1;
          batches <= '0;
          state   <= S_ISSUE;
        end
        S_ISSUE: begin
          pending <= pending & ~grant;
          batches <= batches + 4'd1;
          if ((pending & ~grant) == '0) state <= S_WAIT;
        end
        S_WAIT: if (granted_d == '0 && &qdone) begin
          res       <= best;
          res_valid <= 1'b1;
          state     <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // every pending access is eventually granted: the lowest pending one
  // always is
  a_progress: assert property (@(posedge clk) disable iff (!rst_n)
    (state == S_ISSUE) |-> (grant != '0));
endmodule
