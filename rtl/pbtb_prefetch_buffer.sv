// pbtb_prefetch_buffer: small fully associative buffer of prefetched BTB
// entries, searched in parallel with the dedicated BTB.
//
// Entries unpacked from a temporal group are written here rather than into
// the BTB, so only branches the front end actually asks for reach the BTB.
// On a BTB miss that hits here, the entry is handed to the BTB's write port
// and removed from the buffer. The buffer is filled in FIFO order: a ring
// pointer names the next slot, and new entries overwrite the oldest ones
// whether or not those were used. The 64-entry size and FIFO filling follow
// the design; accepting a whole group (up to PUSH_W entries) in one cycle
// and skipping an entry whose branch is already buffered are this design's
// own choices.
//
// Interface and timing:
//   lookup  lk_pc -> lk_hit, lk_entry in the same cycle (combinational).
//   remove  rm_valid in the same cycle as a hit clears that slot at the
//           clock edge.
//   push    push_valid[i]/push_entry[i], i < PUSH_W, written at the clock
//           edge into consecutive ring slots; duplicates are skipped and
//           counted on push_dup. A slot being removed this cycle does not
//           count as a duplicate.
//   reset   rst_n low (synchronous) empties the buffer.
module pbtb_prefetch_buffer
  import pbtb_pkg::*;
#(
  parameter int unsigned ENTRIES = 64,
  parameter int unsigned PUSH_W  = GROUP_SIZE
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  pc_t                   lk_pc,
  output logic                  lk_hit,
  output br_entry_t             lk_entry,
  input  logic                  rm_valid,
  input  logic [PUSH_W-1:0]     push_valid,
  input  br_entry_t             push_entry [PUSH_W],
  output logic [$clog2(PUSH_W+1)-1:0] push_dup,
  output logic [$clog2(ENTRIES+1)-1:0] occupancy
);

  localparam int unsigned IDX_W = $clog2(ENTRIES);
  localparam int unsigned CNT_W = $clog2(PUSH_W + 1);

  initial assert ((1 << IDX_W) == ENTRIES && ENTRIES >= PUSH_W)
    else $fatal(1, "ENTRIES must be a power of two and at least PUSH_W");

  logic [ENTRIES-1:0] valid_q;
  br_entry_t          ent_q [ENTRIES];
  logic [IDX_W-1:0]   wp_q;

  // ---- lookup ----
  logic [IDX_W-1:0] hit_idx;
  always_comb begin
    lk_hit  = 1'b0;
    hit_idx = '0;
    for (int unsigned i = 0; i < ENTRIES; i++)
      if (!lk_hit && valid_q[i] && ent_q[i].pc == lk_pc) begin
        lk_hit  = 1'b1;
        hit_idx = IDX_W'(i);
      end
    lk_entry = ent_q[hit_idx];
  end

  // ---- push slot assignment ----
  logic [PUSH_W-1:0]  accept;
  logic [IDX_W-1:0]   slot [PUSH_W];
  logic [CNT_W-1:0]   n_acc;
  always_comb begin
    logic [CNT_W-1:0] dups;
    n_acc = '0;
    dups  = '0;
    for (int unsigned p = 0; p < PUSH_W; p++) begin
      logic dup;
      dup = 1'b0;
      for (int unsigned i = 0; i < ENTRIES; i++)
        if (valid_q[i] && ent_q[i].pc == push_entry[p].pc &&
            !(rm_valid && lk_hit && hit_idx == IDX_W'(i)))
          dup = 1'b1;
      for (int unsigned q = 0; q < p; q++)
        if (push_valid[q] && push_entry[q].pc == push_entry[p].pc) dup = 1'b1;
      accept[p] = push_valid[p] && !dup;
      slot[p]   = wp_q + IDX_W'(n_acc);
      if (accept[p]) n_acc = n_acc + 1'b1;
      if (push_valid[p] && dup) dups = dups + 1'b1;
    end
    push_dup = dups;
  end

  always_comb begin
    occupancy = '0;
    for (int unsigned i = 0; i < ENTRIES; i++) occupancy = occupancy + valid_q[i];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      valid_q <= '0;
      wp_q    <= '0;
    end else begin
      if (rm_valid && lk_hit) valid_q[hit_idx] <= 1'b0;
      for (int unsigned p = 0; p < PUSH_W; p++)
        if (accept[p]) begin
          valid_q[slot[p]] <= 1'b1;
          ent_q[slot[p]]   <= push_entry[p];
        end
      wp_q <= wp_q + IDX_W'(n_acc);
    end
  end

endmodule
