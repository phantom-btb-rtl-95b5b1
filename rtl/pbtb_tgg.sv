// pbtb_tgg: temporal group generator.
//
// Branches that missed in the dedicated BTB (reported by branch feedback,
// with their type and target) are collected in a six-entry table. When the
// sixth arrives the entries are packed into one 64-byte line, a temporal
// group, and written to the virtual table in the L2 like an evicted dirty
// line. The group is stored at the virtual-table index taken from the last
// branch of the previous group: that branch's 32-instruction region is the
// group's prefetch trigger. The last branch of the group just formed then
// sets the index for the next group. Six entries, the 78-bit entry format,
// the 12-bit index and the trigger rule follow the design.
//
// Own choices: the index is the low log2(VT_GROUPS) bits of the region
// number (aligned 32-instruction region); slot k of a group occupies line
// bits [78k +: 78] and bits 468..511 are zero; the first group after reset
// has no trigger and is not written; a group that completes while the
// previous write is still waiting for wr_ready is dropped (the table is
// only a hint, so losing a group is harmless).
//
// Interface and timing:
//   in_valid/in_entry  one missed branch per cycle.
//   wr_valid/wr_ready  write request to the L2: line address vt_base+index,
//                      512-bit data. Held until accepted. wr_valid rises the
//                      cycle after the sixth branch arrives.
//   group_formed, group_dropped  one-cycle event pulses.
module pbtb_tgg
  import pbtb_pkg::*;
#(
  parameter int unsigned VT_GROUPS = 4096
) (
  input  logic       clk,
  input  logic       rst_n,
  input  line_addr_t vt_base,
  input  logic       in_valid,
  input  br_entry_t  in_entry,
  output logic       wr_valid,
  input  logic       wr_ready,
  output line_addr_t wr_addr,
  output line_t      wr_data,
  output logic       group_formed,
  output logic       group_dropped
);

  localparam int unsigned IDX_W = $clog2(VT_GROUPS);
  localparam int unsigned CNT_W = $clog2(GROUP_SIZE);

  br_entry_t        ent_q [GROUP_SIZE-1];   // the sixth entry never needs storing
  logic [CNT_W-1:0] cnt_q;
  logic [IDX_W-1:0] idx_q;
  logic             idx_valid_q;

  logic  last;
  line_t packed_line;
  assign last = in_valid && cnt_q == CNT_W'(GROUP_SIZE - 1);

  always_comb begin
    packed_line = '0;
    for (int unsigned k = 0; k < GROUP_SIZE - 1; k++)
      packed_line[k*ENTRY_W +: ENTRY_W] = ent_q[k];
    packed_line[(GROUP_SIZE-1)*ENTRY_W +: ENTRY_W] = in_entry;
  end

  logic out_free;
  assign out_free = !wr_valid || wr_ready;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cnt_q         <= '0;
      idx_q         <= '0;
      idx_valid_q   <= 1'b0;
      wr_valid      <= 1'b0;
      wr_addr       <= '0;
      wr_data       <= '0;
      group_formed  <= 1'b0;
      group_dropped <= 1'b0;
    end else begin
      group_formed  <= last;
      group_dropped <= last && !(idx_valid_q && out_free);
      if (wr_valid && wr_ready) wr_valid <= 1'b0;
      if (in_valid) begin
        if (last) begin
          if (idx_valid_q && out_free) begin
            wr_valid <= 1'b1;
            wr_addr  <= vt_base + line_addr_t'(idx_q);
            wr_data  <= packed_line;
          end
          idx_q       <= IDX_W'(trigger_region(in_entry.pc));
          idx_valid_q <= 1'b1;
          cnt_q       <= '0;
        end else begin
          ent_q[cnt_q] <= in_entry;
          cnt_q        <= cnt_q + 1'b1;
        end
      end
    end
  end

  // Write handshake: a request stays up, unchanged, until it is accepted.
  assert property (@(posedge clk) disable iff (!rst_n)
                   wr_valid && !wr_ready |=> wr_valid && $stable(wr_addr) && $stable(wr_data))
    else $error("write request changed before it was accepted");

endmodule
