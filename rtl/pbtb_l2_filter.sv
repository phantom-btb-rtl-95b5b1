// pbtb_l2_filter: the cache-controller extension that keeps branch
// metadata on chip.
//
// The L2 itself stores virtual-table lines exactly like data; only the
// controller around it needs to know about them. This block classifies
// line addresses by whether they fall in the virtual table's reserved
// physical range [vt_base, vt_base + VT_GROUPS) and:
//   * routes L2 replies for that range to the Phantom-BTB and all other
//     replies to the L1 side;
//   * turns an L2 miss on that range into a reply without data to the
//     Phantom-BTB, while a miss on any other address becomes a fill request
//     to off-chip memory;
//   * drops evictions of metadata lines, while dirty evictions of other
//     lines are written back off chip;
//   * flags requests to that range as bypassing coherence.
// What is done follows the design; the channel signals, the one-cycle
// registered timing and the absence of backpressure (all sinks are assumed
// always ready) are this design's own choices.
//
// Interface and timing:
//   l2r_*  L2 reply: valid, line address, requester id, hit (data present),
//          data. Routed to pb_rsp_*, l1_rsp_* or mem_rd_* one cycle later.
//   ev_*   L2 eviction: valid, line address, dirty, data. Forwarded to
//          mem_wb_* one cycle later, or dropped (meta_evict_drop pulse).
//   req_addr -> req_coh_bypass  combinational.
module pbtb_l2_filter
  import pbtb_pkg::*;
#(
  parameter int unsigned VT_GROUPS = 4096,
  parameter int unsigned ID_W      = 8
) (
  input  logic            clk,
  input  logic            rst_n,
  input  line_addr_t      vt_base,
  // L2 reply or miss notification
  input  logic            l2r_valid,
  input  line_addr_t      l2r_addr,
  input  logic [ID_W-1:0] l2r_id,
  input  logic            l2r_hit,
  input  line_t           l2r_data,
  // to the Phantom-BTB prefetch engine
  output logic            pb_rsp_valid,
  output logic [ID_W-1:0] pb_rsp_id,
  output logic            pb_rsp_hit,
  output line_t           pb_rsp_data,
  // to the L1 caches
  output logic            l1_rsp_valid,
  output line_addr_t      l1_rsp_addr,
  output logic [ID_W-1:0] l1_rsp_id,
  output line_t           l1_rsp_data,
  // off-chip fill request
  output logic            mem_rd_valid,
  output line_addr_t      mem_rd_addr,
  output logic [ID_W-1:0] mem_rd_id,
  // L2 eviction and off-chip write-back
  input  logic            ev_valid,
  input  line_addr_t      ev_addr,
  input  logic            ev_dirty,
  input  line_t           ev_data,
  output logic            mem_wb_valid,
  output line_addr_t      mem_wb_addr,
  output line_t           mem_wb_data,
  output logic            meta_evict_drop,
  // coherence bypass for requests entering the L2
  input  line_addr_t      req_addr,
  output logic            req_coh_bypass
);

  function automatic logic is_meta(line_addr_t a, line_addr_t base);
    line_addr_t off = a - base;
    return (a >= base) && (off < line_addr_t'(VT_GROUPS));
  endfunction

  logic r_meta, e_meta;
  assign r_meta         = is_meta(l2r_addr, vt_base);
  assign e_meta         = is_meta(ev_addr, vt_base);
  assign req_coh_bypass = is_meta(req_addr, vt_base);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      pb_rsp_valid    <= 1'b0;
      l1_rsp_valid    <= 1'b0;
      mem_rd_valid    <= 1'b0;
      mem_wb_valid    <= 1'b0;
      meta_evict_drop <= 1'b0;
    end else begin
      pb_rsp_valid    <= l2r_valid && r_meta;
      l1_rsp_valid    <= l2r_valid && !r_meta && l2r_hit;
      mem_rd_valid    <= l2r_valid && !r_meta && !l2r_hit;
      mem_wb_valid    <= ev_valid && !e_meta && ev_dirty;
      meta_evict_drop <= ev_valid && e_meta;
    end
  end

  // Payload registers carry no reset: they are only read under their valid.
  always_ff @(posedge clk) begin
    pb_rsp_id   <= l2r_id;
    pb_rsp_hit  <= l2r_hit;
    pb_rsp_data <= l2r_hit ? l2r_data : '0;   // an empty reply carries no data
    l1_rsp_addr <= l2r_addr;
    l1_rsp_id   <= l2r_id;
    l1_rsp_data <= l2r_data;
    mem_rd_addr <= l2r_addr;
    mem_rd_id   <= l2r_id;
    mem_wb_addr <= ev_addr;
    mem_wb_data <= ev_data;
  end

endmodule
