// mem_scheduler: issues the per-tread table reads of one lookup in
// conflict-free batches.
//
// Each pending access names a memory module. In one cycle every module
// serves at most one access; among accesses to the same module the one with
// the lowest tread index goes first and the rest wait for a later batch. A
// lookup whose eight sets all fall in different modules takes one batch;
// the worst case (all in one module) takes eight. Batching is the source
// design's; the fixed priority is this implementation's. Combinational.
//
// Interface: pending[NREQ], mod_id[NREQ] -> grant[NREQ] (subset of pending).
module mem_scheduler
  import suse_pkg::*;
#(
  parameter int unsigned NREQ = 8
) (
  input  logic [NREQ-1:0]  pending,
  input  logic [MOD_W-1:0] mod_id [NREQ],
  output logic [NREQ-1:0]  grant
);
  logic [NMOD-1:0] busy;

  always_comb begin
    busy  = '0;
    grant = '0;
    for (int i = 0; i < NREQ; i++) begin
      if (pending[i] && !busy[mod_id[i]]) begin
        grant[i]         = 1'b1;
        busy[mod_id[i]]  = 1'b1;
      end
    end
  end
endmodule
