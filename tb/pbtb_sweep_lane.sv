// pbtb_sweep_lane: one Phantom-BTB configuration for the configuration
// sweep testbench (testbench-only wrapper).
//
// Holds a pbtb_top with the given BTB_ENTRIES and VT_GROUPS, its own
// behavioural L2 (12-cycle latency, room for the whole table) and a plain
// BTB of the same size as the baseline. All lanes see the same lookup
// stream; each feeds its resolved branches back through its own 6-cycle
// delay line, with the "missed the dedicated BTB" flag taken from its own
// prediction. When count_en is high, lookups, Phantom-BTB hits, baseline
// hits and wrong predictions are counted.
module pbtb_sweep_lane
  import pbtb_pkg::*;
#(
  parameter int unsigned BTB_ENTRIES = 1024,
  parameter int unsigned VT_GROUPS   = 4096
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      lk_valid,
  input  br_entry_t lk_entry,   // the branch being looked up, with its true target
  input  logic      count_en,
  output int        n_lookups,
  output int        n_hits,
  output int        n_base_hits,
  output int        n_wrong
);
  localparam int FB_DELAY = 6;

  logic pred_hit, pred_from_pb; br_type_e pred_btype; pc_t pred_target;
  logic fb_valid, fb_btb_miss; br_entry_t fb_entry;
  logic vt_rd_valid, vt_rd_ready; line_addr_t vt_rd_addr; logic [7:0] vt_rd_id;
  logic vt_wr_valid, vt_wr_ready; line_addr_t vt_wr_addr; line_t vt_wr_data;
  logic l2r_valid, l2r_hit; line_addr_t l2r_addr; logic [7:0] l2r_id; line_t l2r_data;
  logic ev_valid, ev_dirty; line_addr_t ev_addr; line_t ev_data;
  pbtb_events_t events;

  pbtb_top #(.BTB_ENTRIES(BTB_ENTRIES), .VT_GROUPS(VT_GROUPS)) u_pbtb (
    .clk, .rst_n, .cfg_base_we(1'b0), .cfg_base('0),
    .lk_valid, .lk_pc(lk_entry.pc),
    .pred_hit, .pred_from_pb, .pred_btype, .pred_target,
    .fb_valid, .fb_taken(1'b1), .fb_btb_miss, .fb_entry,
    .vt_rd_valid, .vt_rd_ready, .vt_rd_addr, .vt_rd_id,
    .vt_wr_valid, .vt_wr_ready, .vt_wr_addr, .vt_wr_data,
    .l2r_valid, .l2r_addr, .l2r_id, .l2r_hit, .l2r_data,
    .l1_rsp_valid(), .l1_rsp_addr(), .l1_rsp_id(), .l1_rsp_data(),
    .mem_rd_valid(), .mem_rd_addr(), .mem_rd_id(),
    .ev_valid, .ev_addr, .ev_dirty, .ev_data,
    .mem_wb_valid(), .mem_wb_addr(), .mem_wb_data(),
    .req_addr('0), .req_coh_bypass(),
    .pb_occupancy(), .events
  );

  pbtb_l2_model #(.LATENCY(12), .CAP_LINES(2 * VT_GROUPS)) u_l2 (
    .clk, .rst_n, .stall(1'b0),
    .rd_valid(vt_rd_valid), .rd_ready(vt_rd_ready), .rd_addr(vt_rd_addr), .rd_id(vt_rd_id),
    .wr_valid(vt_wr_valid), .wr_ready(vt_wr_ready), .wr_addr(vt_wr_addr), .wr_data(vt_wr_data),
    .app_valid(1'b0), .app_addr('0), .app_id('0), .app_dirty(1'b0),
    .l2r_valid, .l2r_addr, .l2r_id, .l2r_hit, .l2r_data,
    .ev_valid, .ev_addr, .ev_dirty, .ev_data
  );

  logic base_hit; br_type_e base_btype; pc_t base_target;
  pbtb_btb #(.ENTRIES(BTB_ENTRIES)) u_baseline (
    .clk, .rst_n, .lk_valid, .lk_pc(lk_entry.pc),
    .lk_hit(base_hit), .lk_btype(base_btype), .lk_target(base_target),
    .wr_valid(fb_valid), .wr_entry(fb_entry)
  );

  // feedback delay line
  logic      d_v    [FB_DELAY];
  logic      d_miss [FB_DELAY];
  br_entry_t d_e    [FB_DELAY];
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < FB_DELAY; i++) d_v[i] <= 1'b0;
    end else begin
      d_v[0]    <= lk_valid;
      d_miss[0] <= !(pred_hit && !pred_from_pb);
      d_e[0]    <= lk_entry;
      for (int i = 1; i < FB_DELAY; i++) begin
        d_v[i] <= d_v[i-1]; d_miss[i] <= d_miss[i-1]; d_e[i] <= d_e[i-1];
      end
    end
  end
  assign fb_valid    = d_v[FB_DELAY-1];
  assign fb_btb_miss = d_miss[FB_DELAY-1];
  assign fb_entry    = d_e[FB_DELAY-1];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      n_lookups <= 0; n_hits <= 0; n_base_hits <= 0; n_wrong <= 0;
    end else if (lk_valid) begin
      if (pred_hit && (pred_target != full_target(lk_entry.pc, lk_entry.tgt) ||
                       pred_btype != lk_entry.btype))
        n_wrong <= n_wrong + 1;
      if (count_en) begin
        n_lookups   <= n_lookups + 1;
        n_hits      <= n_hits + int'(pred_hit);
        n_base_hits <= n_base_hits + int'(base_hit);
      end
    end
  end
endmodule
