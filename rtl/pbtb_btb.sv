// pbtb_btb: the dedicated first-level branch target buffer.
//
// A conventional set-associative BTB, by default 1K entries in 4 ways (256
// sets). It is indexed with the low bits of the branch word address; each
// entry keeps the remaining address bits as a tag, a 2-bit branch type and
// the 30 low-order target bits (70 bits plus a valid bit), so a hit gives
// the full target by joining the branch's upper address bits to the stored
// target bits. Geometry and entry format follow the design; tree
// pseudo-LRU replacement (preferring an invalid way) is this design's own
// choice.
//
// Interface and timing:
//   lookup  lk_valid/lk_pc -> lk_hit, lk_btype, lk_target in the same cycle
//           (single-cycle, combinational read). A hit refreshes the set's
//           replacement state at the clock edge.
//   write   wr_valid/wr_entry, one per cycle, takes effect at the clock
//           edge. If the branch is present its entry is updated in place,
//           otherwise a victim way is replaced. The same port serves branch
//           feedback and installs from the prefetch buffer.
//   reset   rst_n low (synchronous) invalidates every entry.
module pbtb_btb
  import pbtb_pkg::*;
#(
  parameter int unsigned ENTRIES = 1024,
  parameter int unsigned WAYS    = 4
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      lk_valid,
  input  pc_t       lk_pc,
  output logic      lk_hit,
  output br_type_e  lk_btype,
  output pc_t       lk_target,
  input  logic      wr_valid,
  input  br_entry_t wr_entry
);

  localparam int unsigned SETS  = ENTRIES / WAYS;
  localparam int unsigned SET_W = (SETS > 1) ? $clog2(SETS) : 1;
  localparam int unsigned WAY_W = $clog2(WAYS);
  localparam int unsigned TAG_W = PC_W - $clog2(SETS);
  localparam int unsigned LRU_W = WAYS - 1;

  typedef logic [TAG_W-1:0] tag_t;
  typedef struct packed {
    tag_t     tag;
    br_type_e btype;
    tgt_t     tgt;
  } way_t;

  initial begin
    assert (WAYS >= 2 && (1 << WAY_W) == WAYS) else $fatal(1, "WAYS must be a power of two >= 2");
    assert ((1 << $clog2(SETS)) == SETS && SETS * WAYS == ENTRIES) else $fatal(1, "ENTRIES/WAYS must be a power of two");
  end

  logic [WAYS-1:0]  valid_q [SETS];
  way_t             data_q  [SETS][WAYS];
  logic [LRU_W-1:0] lru_q   [SETS];

  function automatic logic [SET_W-1:0] set_of(pc_t pc);
    return SET_W'(pc[$clog2(SETS)-1:0]);
  endfunction
  function automatic tag_t tag_of(pc_t pc);
    return pc[PC_W-1 -: TAG_W];
  endfunction

  // Tree pseudo-LRU: node n has children 2n+1 and 2n+2; a node bit of 0
  // points at the left subtree as the next victim.
  function automatic logic [WAY_W-1:0] lru_victim(logic [LRU_W-1:0] t);
    int unsigned node = 0;
    for (int unsigned l = 0; l < WAY_W; l++) node = 2 * node + 1 + int'(t[node]);
    return WAY_W'(node - LRU_W);
  endfunction
  function automatic logic [LRU_W-1:0] lru_touch(logic [LRU_W-1:0] t, logic [WAY_W-1:0] w);
    int unsigned node = 0;
    logic [LRU_W-1:0] r = t;
    for (int unsigned l = 0; l < WAY_W; l++) begin
      logic dir = w[WAY_W-1-l];
      r[node] = ~dir;            // point away from the way just used
      node = 2 * node + 1 + int'(dir);
    end
    return r;
  endfunction

  // ---- lookup ----
  logic [SET_W-1:0] lk_set;
  logic [WAY_W-1:0] lk_way;
  always_comb begin
    lk_set    = set_of(lk_pc);
    lk_hit    = 1'b0;
    lk_way    = '0;
    for (int unsigned w = 0; w < WAYS; w++)
      if (!lk_hit && valid_q[lk_set][w] && data_q[lk_set][w].tag == tag_of(lk_pc)) begin
        lk_hit = lk_valid;
        lk_way = WAY_W'(w);
      end
    lk_btype  = data_q[lk_set][lk_way].btype;
    lk_target = full_target(lk_pc, data_q[lk_set][lk_way].tgt);
  end

  // ---- write: update in place, else fill an invalid way, else the LRU way ----
  logic [SET_W-1:0] wr_set;
  logic [WAY_W-1:0] wr_way;
  always_comb begin
    logic found, free;
    logic [WAY_W-1:0] free_way;
    wr_set   = set_of(wr_entry.pc);
    found    = 1'b0;
    free     = 1'b0;
    free_way = '0;
    wr_way   = '0;
    for (int unsigned w = 0; w < WAYS; w++) begin
      if (!found && valid_q[wr_set][w] && data_q[wr_set][w].tag == tag_of(wr_entry.pc)) begin
        found  = 1'b1;
        wr_way = WAY_W'(w);
      end
      if (!free && !valid_q[wr_set][w]) begin
        free     = 1'b1;
        free_way = WAY_W'(w);
      end
    end
    if (!found) wr_way = free ? free_way : lru_victim(lru_q[wr_set]);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int unsigned s = 0; s < SETS; s++) begin
        valid_q[s] <= '0;
        lru_q[s]   <= '0;
      end
    end else begin
      if (lk_hit) lru_q[lk_set] <= lru_touch(lru_q[lk_set], lk_way);
      if (wr_valid) begin
        valid_q[wr_set][wr_way] <= 1'b1;
        data_q[wr_set][wr_way]  <= '{tag: tag_of(wr_entry.pc), btype: wr_entry.btype, tgt: wr_entry.tgt};
        lru_q[wr_set]           <= lru_touch((lk_hit && lk_set == wr_set) ? lru_touch(lru_q[wr_set], lk_way)
                                                                          : lru_q[wr_set], wr_way);
      end
    end
  end

endmodule
