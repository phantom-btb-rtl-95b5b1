// pbtb_top: Phantom-BTB, a branch target buffer whose capacity is extended
// by a virtual table kept in the L2 cache.
//
// The front end looks up every branch in the dedicated BTB and, in
// parallel, in the prefetch buffer. A BTB hit predicts as usual. A BTB
// miss does three things: it triggers a virtual-table read for the
// temporal group linked to the branch's code region (prefetch engine); if
// the prefetch buffer holds the branch, the prediction comes from there
// and the entry moves into the BTB through its normal write port; and,
// once the branch resolves taken, branch feedback both allocates it in the
// BTB and appends it to the temporal group being built (temporal group
// generator), which is written to the L2 when it holds six branches. The
// L2 filter keeps virtual-table lines from ever leaving the chip. The
// block structure and this flow follow the design; the exact signals, the
// arbitration of the BTB write port and the reset value of the table's
// base address are this design's own choices.
//
// Interface and timing:
//   cfg_base_we/cfg_base  load the virtual table's base line address
//                         (reset value VT_BASE_RESET, the top VT_GROUPS
//                         lines of the physical space).
//   lk_valid/lk_pc -> pred_hit, pred_from_pb, pred_btype, pred_target
//                         same cycle (combinational lookup).
//   fb_valid/fb_taken/fb_btb_miss/fb_entry  resolved branch; fb_btb_miss
//                         says whether its lookup missed the dedicated BTB.
//                         A taken branch is written to the BTB; that write
//                         has priority, and a prefetch-buffer install in the
//                         same cycle is retried on the next lookup (the entry
//                         stays in the buffer).
//   vt_rd_*, vt_wr_*      virtual-table reads and writes towards the L2,
//                         valid/ready.
//   l2r_*, ev_*, req_*    L2 replies, evictions and request classification
//                         through the filter; l1_rsp_*, mem_rd_*, mem_wb_*
//                         are the filter's non-metadata outputs.
//   pb_occupancy          valid entries in the prefetch buffer.
//   events                one-cycle event pulses for counters.
module pbtb_top
  import pbtb_pkg::*;
#(
  parameter int unsigned BTB_ENTRIES = 1024,
  parameter int unsigned BTB_WAYS    = 4,
  parameter int unsigned PB_ENTRIES  = 64,
  parameter int unsigned VT_GROUPS   = 4096,
  parameter int unsigned MSHRS       = 16,
  parameter int unsigned L2_ID_W     = 8,
  parameter line_addr_t  VT_BASE_RESET = line_addr_t'((64'd1 << LINE_ADDR_W) - 64'(VT_GROUPS))
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               cfg_base_we,
  input  line_addr_t         cfg_base,
  // front-end lookup
  input  logic               lk_valid,
  input  pc_t                lk_pc,
  output logic               pred_hit,
  output logic               pred_from_pb,
  output br_type_e           pred_btype,
  output pc_t                pred_target,
  // branch feedback
  input  logic               fb_valid,
  input  logic               fb_taken,
  input  logic               fb_btb_miss,
  input  br_entry_t          fb_entry,
  // virtual-table traffic to the L2
  output logic               vt_rd_valid,
  input  logic               vt_rd_ready,
  output line_addr_t         vt_rd_addr,
  output logic [L2_ID_W-1:0] vt_rd_id,
  output logic               vt_wr_valid,
  input  logic               vt_wr_ready,
  output line_addr_t         vt_wr_addr,
  output line_t              vt_wr_data,
  // L2 side of the filter
  input  logic               l2r_valid,
  input  line_addr_t         l2r_addr,
  input  logic [L2_ID_W-1:0] l2r_id,
  input  logic               l2r_hit,
  input  line_t              l2r_data,
  output logic               l1_rsp_valid,
  output line_addr_t         l1_rsp_addr,
  output logic [L2_ID_W-1:0] l1_rsp_id,
  output line_t              l1_rsp_data,
  output logic               mem_rd_valid,
  output line_addr_t         mem_rd_addr,
  output logic [L2_ID_W-1:0] mem_rd_id,
  input  logic               ev_valid,
  input  line_addr_t         ev_addr,
  input  logic               ev_dirty,
  input  line_t              ev_data,
  output logic               mem_wb_valid,
  output line_addr_t         mem_wb_addr,
  output line_t              mem_wb_data,
  input  line_addr_t         req_addr,
  output logic               req_coh_bypass,
  output logic [$clog2(PB_ENTRIES+1)-1:0] pb_occupancy,
  output pbtb_events_t       events
);

  localparam int unsigned MID_W = $clog2(MSHRS);

  initial assert (L2_ID_W >= MID_W) else $fatal(1, "L2_ID_W too narrow for the MSHR id");

  line_addr_t vt_base_q;
  always_ff @(posedge clk) begin
    if (!rst_n)           vt_base_q <= VT_BASE_RESET;
    else if (cfg_base_we) vt_base_q <= cfg_base;
  end

  // ---- dedicated BTB and prefetch buffer, looked up in parallel ----
  logic      btb_hit;
  br_type_e  btb_btype;
  pc_t       btb_target;
  logic      pb_hit;
  br_entry_t pb_entry;
  logic      btb_wr_valid;
  br_entry_t btb_wr_entry;
  logic      fb_write, btb_miss, pb_use, install;
  logic [GROUP_SIZE-1:0]       push_valid;
  br_entry_t                   push_entry [GROUP_SIZE];
  logic [$clog2(GROUP_SIZE+1)-1:0] push_dup;

  assign fb_write     = fb_valid && fb_taken;
  assign btb_miss     = lk_valid && !btb_hit;
  assign pb_use       = btb_miss && pb_hit;
  assign install      = pb_use && !fb_write;
  assign btb_wr_valid = fb_write || install;
  assign btb_wr_entry = fb_write ? fb_entry : pb_entry;

  pbtb_btb #(.ENTRIES(BTB_ENTRIES), .WAYS(BTB_WAYS)) u_btb (
    .clk, .rst_n,
    .lk_valid, .lk_pc,
    .lk_hit(btb_hit), .lk_btype(btb_btype), .lk_target(btb_target),
    .wr_valid(btb_wr_valid), .wr_entry(btb_wr_entry)
  );

  pbtb_prefetch_buffer #(.ENTRIES(PB_ENTRIES), .PUSH_W(GROUP_SIZE)) u_pb (
    .clk, .rst_n,
    .lk_pc, .lk_hit(pb_hit), .lk_entry(pb_entry),
    .rm_valid(install),
    .push_valid, .push_entry, .push_dup,
    .occupancy(pb_occupancy)
  );

  assign pred_hit     = btb_hit || pb_use;
  assign pred_from_pb = pb_use;
  assign pred_btype   = btb_hit ? btb_btype : pb_entry.btype;
  assign pred_target  = btb_hit ? btb_target : full_target(lk_pc, pb_entry.tgt);

  // ---- temporal group generator ----
  logic group_formed, group_dropped;
  pbtb_tgg #(.VT_GROUPS(VT_GROUPS)) u_tgg (
    .clk, .rst_n, .vt_base(vt_base_q),
    .in_valid(fb_write && fb_btb_miss), .in_entry(fb_entry),
    .wr_valid(vt_wr_valid), .wr_ready(vt_wr_ready),
    .wr_addr(vt_wr_addr), .wr_data(vt_wr_data),
    .group_formed, .group_dropped
  );

  // ---- prefetch engine ----
  logic             pb_rsp_valid, pb_rsp_hit;
  logic [L2_ID_W-1:0] pb_rsp_id;
  line_t            pb_rsp_data;
  logic [MID_W-1:0] rd_id;
  logic pf_issue, pf_merge, pf_drop, pf_fill, pf_empty;

  pbtb_prefetch_engine #(.VT_GROUPS(VT_GROUPS), .MSHRS(MSHRS)) u_pe (
    .clk, .rst_n, .vt_base(vt_base_q),
    .trig_valid(btb_miss), .trig_pc(lk_pc),
    .rd_valid(vt_rd_valid), .rd_ready(vt_rd_ready), .rd_addr(vt_rd_addr), .rd_id,
    .rsp_valid(pb_rsp_valid), .rsp_id(pb_rsp_id[MID_W-1:0]), .rsp_hit(pb_rsp_hit),
    .rsp_data(pb_rsp_data),
    .push_valid, .push_entry,
    .pf_issue, .pf_merge, .pf_drop, .pf_fill, .pf_empty
  );
  assign vt_rd_id = L2_ID_W'(rd_id);

  // ---- L2 controller extension ----
  logic meta_evict_drop;
  pbtb_l2_filter #(.VT_GROUPS(VT_GROUPS), .ID_W(L2_ID_W)) u_filter (
    .clk, .rst_n, .vt_base(vt_base_q),
    .l2r_valid, .l2r_addr, .l2r_id, .l2r_hit, .l2r_data,
    .pb_rsp_valid, .pb_rsp_id, .pb_rsp_hit, .pb_rsp_data,
    .l1_rsp_valid, .l1_rsp_addr, .l1_rsp_id, .l1_rsp_data,
    .mem_rd_valid, .mem_rd_addr, .mem_rd_id,
    .ev_valid, .ev_addr, .ev_dirty, .ev_data,
    .mem_wb_valid, .mem_wb_addr, .mem_wb_data, .meta_evict_drop,
    .req_addr, .req_coh_bypass
  );

  always_comb begin
    events                  = '0;
    events.btb_hit          = lk_valid && btb_hit;
    events.btb_miss         = btb_miss;
    events.pb_hit           = pb_use;
    events.pb_install       = install;
    events.pb_install_defer = pb_use && fb_write;
    events.pb_dup           = push_dup != '0;
    events.group_formed     = group_formed;
    events.group_dropped    = group_dropped;
    events.pf_issue         = pf_issue;
    events.pf_merge         = pf_merge;
    events.pf_drop          = pf_drop;
    events.pf_fill          = pf_fill;
    events.pf_empty         = pf_empty;
    events.meta_evict_drop  = meta_evict_drop;
  end

endmodule
