// pbtb_pkg: types and constants shared by the Phantom-BTB blocks.
//
// Phantom-BTB keeps a conventional BTB and adds a virtual table of
// "temporal groups" that lives in ordinary L2 cache lines. Every table in
// the design stores the same branch entry: the branch address, a two-bit
// branch type and the 30 low-order bits of the target. With 48-bit virtual
// addresses and 4-byte instructions the branch address is a 46-bit word
// address, so one entry is 46 + 2 + 30 = 78 bits, and six of them fit in a
// 64-byte line (468 of 512 bits). These widths are the ones the design
// is sized for; the branch-type encoding and the packing order of a group
// inside the line are this design's own choices.
//
// All addresses here are word (instruction) addresses for branches and
// targets, and line addresses (physical address >> 6) towards the L2.
package pbtb_pkg;

  // Address geometry.
  localparam int unsigned VA_W        = 48;              // virtual address bits
  localparam int unsigned INSTR_SHIFT = 2;               // 4-byte instructions
  localparam int unsigned PC_W        = VA_W - INSTR_SHIFT;  // 46-bit word address
  localparam int unsigned PA_W        = 46;              // physical address bits
  localparam int unsigned LINE_BYTES  = 64;
  localparam int unsigned LINE_SHIFT  = $clog2(LINE_BYTES);
  localparam int unsigned LINE_ADDR_W = PA_W - LINE_SHIFT;   // 40-bit line address
  localparam int unsigned LINE_W      = LINE_BYTES * 8;      // 512-bit line

  // Branch entry.
  localparam int unsigned TGT_W   = 30;                  // low-order target bits
  localparam int unsigned TYPE_W  = 2;
  localparam int unsigned ENTRY_W = PC_W + TYPE_W + TGT_W;   // 78 bits

  // A temporal group is as many entries as fit in one L2 line: six.
  localparam int unsigned GROUP_SIZE = LINE_W / ENTRY_W;

  // A prefetch trigger is the aligned region of 32 instructions that holds
  // the branch.
  localparam int unsigned REGION_INSTRS = 32;
  localparam int unsigned REGION_SHIFT  = $clog2(REGION_INSTRS);

  typedef logic [PC_W-1:0]        pc_t;
  typedef logic [TGT_W-1:0]       tgt_t;
  typedef logic [LINE_ADDR_W-1:0] line_addr_t;
  typedef logic [LINE_W-1:0]      line_t;

  typedef enum logic [TYPE_W-1:0] {
    BR_COND = 2'd0,   // conditional direct branch
    BR_JUMP = 2'd1,   // unconditional direct branch
    BR_CALL = 2'd2,   // call
    BR_IND  = 2'd3    // return or other indirect branch
  } br_type_e;

  typedef struct packed {
    pc_t      pc;      // branch word address
    br_type_e btype;
    tgt_t     tgt;     // target word address, low 30 bits
  } br_entry_t;

  // Event pulses of one cycle, brought out of the top for performance
  // counters.
  typedef struct packed {
    logic btb_hit;          // lookup hit in the dedicated BTB
    logic btb_miss;         // lookup missed in the dedicated BTB
    logic pb_hit;           // BTB miss that hit in the prefetch buffer
    logic pb_install;       // prefetch-buffer entry moved into the BTB
    logic pb_install_defer; // move postponed: BTB write port busy
    logic pb_dup;           // prefetched entry already in the buffer, skipped
    logic group_formed;     // temporal group generator filled a group
    logic group_dropped;    // group not written (no index yet or port busy)
    logic pf_issue;         // virtual-table read sent to the L2
    logic pf_merge;         // trigger matched an outstanding read
    logic pf_drop;          // trigger dropped: MSHRs or request port busy
    logic pf_fill;          // temporal group arrived and was unpacked
    logic pf_empty;         // virtual-table read missed in the L2
    logic meta_evict_drop;  // L2 eviction of a metadata line dropped
  } pbtb_events_t;

  // Full predicted target: upper branch-address bits joined to the stored
  // low target bits (targets stay within the same 4 GB window).
  function automatic pc_t full_target(pc_t pc, tgt_t tgt);
    return {pc[PC_W-1:TGT_W], tgt};
  endfunction

  // Prefetch-trigger region number of a branch.
  function automatic pc_t trigger_region(pc_t pc);
    return pc >> REGION_SHIFT;
  endfunction

endpackage
