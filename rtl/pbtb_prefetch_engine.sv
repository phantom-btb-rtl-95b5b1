// pbtb_prefetch_engine: fetches temporal groups from the virtual table.
//
// Every branch that misses in the dedicated BTB is a prefetch trigger: its
// 32-instruction region selects a virtual-table index, and the engine reads
// the L2 line at vt_base+index. Outstanding reads are tracked by MSHRs
// (16 by default, each holding the 12-bit index); a trigger whose index is
// already outstanding is merged into it. When the line comes back the
// group is unpacked into its six branch entries, which are pushed into the
// prefetch buffer all at once. An L2 miss on the virtual table returns a
// reply without data, which only frees the MSHR. MSHR count and width, and
// the trigger and unpacking rules, follow the design.
//
// Own choices: index = low log2(VT_GROUPS) bits of the aligned region
// number; the request id is the MSHR number; a trigger that finds no free
// MSHR, or finds the request register still waiting for rd_ready, is
// dropped; the response channel is always accepted (no backpressure).
//
// Interface and timing:
//   trig_valid/trig_pc   one trigger per cycle.
//   rd_valid/rd_ready    read request (line address, MSHR id); rd_valid
//                        rises the cycle after the trigger, held until
//                        accepted.
//   rsp_valid/rsp_id/rsp_hit/rsp_data   reply; push_valid/push_entry follow
//                        one cycle later for a reply with data.
//   pf_issue, pf_merge, pf_drop, pf_fill, pf_empty   one-cycle event pulses.
module pbtb_prefetch_engine
  import pbtb_pkg::*;
#(
  parameter int unsigned VT_GROUPS = 4096,
  parameter int unsigned MSHRS     = 16,
  localparam int unsigned ID_W     = $clog2(MSHRS)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  line_addr_t            vt_base,
  input  logic                  trig_valid,
  input  pc_t                   trig_pc,
  output logic                  rd_valid,
  input  logic                  rd_ready,
  output line_addr_t            rd_addr,
  output logic [ID_W-1:0]       rd_id,
  input  logic                  rsp_valid,
  input  logic [ID_W-1:0]       rsp_id,
  input  logic                  rsp_hit,
  input  line_t                 rsp_data,
  output logic [GROUP_SIZE-1:0] push_valid,
  output br_entry_t             push_entry [GROUP_SIZE],
  output logic                  pf_issue,
  output logic                  pf_merge,
  output logic                  pf_drop,
  output logic                  pf_fill,
  output logic                  pf_empty
);

  localparam int unsigned IDX_W = $clog2(VT_GROUPS);
  typedef logic [IDX_W-1:0] idx_t;

  logic [MSHRS-1:0] mshr_valid_q;
  idx_t             mshr_idx_q [MSHRS];

  idx_t            trig_idx;
  logic            match, free;
  logic [ID_W-1:0] free_id;
  always_comb begin
    trig_idx = IDX_W'(trigger_region(trig_pc));
    match    = 1'b0;
    free     = 1'b0;
    free_id  = '0;
    for (int unsigned m = 0; m < MSHRS; m++) begin
      if (mshr_valid_q[m] && mshr_idx_q[m] == trig_idx) match = 1'b1;
      if (!free && !mshr_valid_q[m]) begin
        free    = 1'b1;
        free_id = ID_W'(m);
      end
    end
  end

  logic issue;
  assign issue = trig_valid && !match && free && (!rd_valid || rd_ready);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      mshr_valid_q <= '0;
      rd_valid     <= 1'b0;
      rd_addr      <= '0;
      rd_id        <= '0;
      push_valid   <= '0;
      pf_issue     <= 1'b0;
      pf_merge     <= 1'b0;
      pf_drop      <= 1'b0;
      pf_fill      <= 1'b0;
      pf_empty     <= 1'b0;
    end else begin
      pf_issue <= issue;
      pf_merge <= trig_valid && match;
      pf_drop  <= trig_valid && !match && !issue;
      pf_fill  <= rsp_valid && rsp_hit;
      pf_empty <= rsp_valid && !rsp_hit;

      if (rd_valid && rd_ready) rd_valid <= 1'b0;
      if (rsp_valid) mshr_valid_q[rsp_id] <= 1'b0;
      if (issue) begin
        mshr_valid_q[free_id] <= 1'b1;
        mshr_idx_q[free_id]   <= trig_idx;
        rd_valid              <= 1'b1;
        rd_addr               <= vt_base + line_addr_t'(trig_idx);
        rd_id                 <= free_id;
      end

      push_valid <= {GROUP_SIZE{rsp_valid && rsp_hit}};
      if (rsp_valid && rsp_hit)
        for (int unsigned k = 0; k < GROUP_SIZE; k++)
          push_entry[k] <= rsp_data[k*ENTRY_W +: ENTRY_W];
    end
  end

  // Read handshake: a request stays up, unchanged, until it is accepted.
  assert property (@(posedge clk) disable iff (!rst_n)
                   rd_valid && !rd_ready |=> rd_valid && $stable(rd_addr) && $stable(rd_id))
    else $error("read request changed before it was accepted");

  // A reply must belong to an outstanding read.
  assert property (@(posedge clk) disable iff (!rst_n) rsp_valid |-> mshr_valid_q[rsp_id])
    else $error("reply for idle MSHR %0d", rsp_id);

endmodule
