// tb_pbtb_top: end-to-end test of Phantom-BTB at its default size (1K-entry
// 4-way BTB, 64-entry prefetch buffer, 4K-group virtual table, 16 MSHRs).
//
// A synthetic program of NB = 3000 taken branches (about five per
// 32-instruction region, three times the dedicated BTB's capacity) is run
// around a loop for PASSES passes; on each pass every branch is skipped
// with 5% probability, so the path only partly repeats. One branch is
// looked up every 1 to 7 cycles and resolves 6 cycles later through the
// feedback port. The L2 is a behavioural model (12-cycle latency, 1200
// lines, FIFO eviction) that also serves a stream of application reads so
// that metadata lines get evicted. A plain 1K-entry BTB fed the same
// stream serves as the conventional baseline.
//
// Checked: every predicted target and type is the branch's true one;
// every virtual-table access falls in the configured range; the coherence
// bypass flag marks exactly the metadata requests; after the first pass
// Phantom-BTB predicts more branches than the baseline BTB. Each mechanism
// (BTB hit and miss, prefetch-buffer hit, install, deferred install,
// duplicate skip, group formed and dropped, prefetch issue, merge, drop,
// fill, empty reply, metadata eviction drop, L1 and off-chip routing,
// write-back, port stall) is counted and must occur at least once.
module tb_pbtb_top;
  import pbtb_pkg::*;

  localparam int NB = 3000, PASSES = 6, FB_DELAY = 6;
  localparam line_addr_t BASE = 40'hA0_0000_0000;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic cfg_base_we; line_addr_t cfg_base;
  logic lk_valid, pred_hit, pred_from_pb; pc_t lk_pc, pred_target; br_type_e pred_btype;
  logic fb_valid, fb_taken, fb_btb_miss; br_entry_t fb_entry;
  logic vt_rd_valid, vt_rd_ready; line_addr_t vt_rd_addr; logic [7:0] vt_rd_id;
  logic vt_wr_valid, vt_wr_ready; line_addr_t vt_wr_addr; line_t vt_wr_data;
  logic l2r_valid, l2r_hit; line_addr_t l2r_addr; logic [7:0] l2r_id; line_t l2r_data;
  logic l1_rsp_valid; line_addr_t l1_rsp_addr; logic [7:0] l1_rsp_id; line_t l1_rsp_data;
  logic mem_rd_valid; line_addr_t mem_rd_addr; logic [7:0] mem_rd_id;
  logic ev_valid, ev_dirty; line_addr_t ev_addr; line_t ev_data;
  logic mem_wb_valid; line_addr_t mem_wb_addr; line_t mem_wb_data;
  line_addr_t req_addr; logic req_coh_bypass;
  logic [6:0] pb_occupancy;
  pbtb_events_t events;

  pbtb_top dut (.*);

  logic stall, app_valid, app_dirty; line_addr_t app_addr; logic [7:0] app_id;
  pbtb_l2_model #(.LATENCY(12), .CAP_LINES(1200)) u_l2 (
    .clk, .rst_n, .stall,
    .rd_valid(vt_rd_valid), .rd_ready(vt_rd_ready), .rd_addr(vt_rd_addr), .rd_id(vt_rd_id),
    .wr_valid(vt_wr_valid), .wr_ready(vt_wr_ready), .wr_addr(vt_wr_addr), .wr_data(vt_wr_data),
    .app_valid, .app_addr, .app_id, .app_dirty,
    .l2r_valid, .l2r_addr, .l2r_id, .l2r_hit, .l2r_data,
    .ev_valid, .ev_addr, .ev_dirty, .ev_data
  );

  // conventional baseline: the same dedicated BTB without the virtual table
  logic base_hit; br_type_e base_btype; pc_t base_target;
  pbtb_btb u_baseline (
    .clk, .rst_n, .lk_valid, .lk_pc,
    .lk_hit(base_hit), .lk_btype(base_btype), .lk_target(base_target),
    .wr_valid(fb_valid && fb_taken), .wr_entry(fb_entry)
  );

  int checks = 0, failures = 0;
  task automatic check(string what, logic cond);
    checks++;
    if (!cond) begin failures++; if (failures < 20) $display("FAIL %s at %0t", what, $time); end
  endtask

  // the program
  function automatic pc_t br_pc(int i);
    return pc_t'(46'h0000_0040_0000 + 46'(i) * 46'd6 + 46'(i % 3));
  endfunction
  function automatic br_entry_t br_info(int i);
    br_entry_t e;
    e.pc    = br_pc(i);
    e.btype = br_type_e'((i * 7) % 4);
    e.tgt   = 30'(br_pc((i * 131 + 17) % NB)) ^ 30'(i << 20);
    return e;
  endfunction

  // event counters
  int c_btb_hit, c_btb_miss, c_pb_hit, c_install, c_defer, c_dup, c_formed, c_gdrop,
      c_issue, c_merge, c_pdrop, c_fill, c_empty, c_evdrop, c_l1, c_mem, c_wb, c_coh, c_stall;
  int hits_pbtb, hits_base, lookups_late;
  always_ff @(posedge clk) if (!rst_n) begin
    {c_btb_hit, c_btb_miss, c_pb_hit, c_install, c_defer, c_dup, c_formed, c_gdrop,
     c_issue, c_merge, c_pdrop, c_fill, c_empty, c_evdrop, c_l1, c_mem, c_wb, c_coh, c_stall} <= '0;
  end else begin
    c_coh      <= c_coh      + int'(req_coh_bypass);
    c_btb_hit  <= c_btb_hit  + int'(events.btb_hit);
    c_btb_miss <= c_btb_miss + int'(events.btb_miss);
    c_pb_hit   <= c_pb_hit   + int'(events.pb_hit);
    c_install  <= c_install  + int'(events.pb_install);
    c_defer    <= c_defer    + int'(events.pb_install_defer);
    c_dup      <= c_dup      + int'(events.pb_dup);
    c_formed   <= c_formed   + int'(events.group_formed);
    c_gdrop    <= c_gdrop    + int'(events.group_dropped);
    c_issue    <= c_issue    + int'(events.pf_issue);
    c_merge    <= c_merge    + int'(events.pf_merge);
    c_pdrop    <= c_pdrop    + int'(events.pf_drop);
    c_fill     <= c_fill     + int'(events.pf_fill);
    c_empty    <= c_empty    + int'(events.pf_empty);
    c_evdrop   <= c_evdrop   + int'(events.meta_evict_drop);
    c_l1       <= c_l1       + int'(l1_rsp_valid);
    c_mem      <= c_mem      + int'(mem_rd_valid);
    c_wb       <= c_wb       + int'(mem_wb_valid);
    c_stall    <= c_stall    + int'((vt_rd_valid && !vt_rd_ready) || (vt_wr_valid && !vt_wr_ready));
  end

  // virtual-table accesses stay inside the table; coherence bypass marks them
  always @(negedge clk) if (rst_n) begin
    if (vt_wr_valid) check("write in table", vt_wr_addr >= BASE && vt_wr_addr < BASE + 40'd4096);
    if (vt_rd_valid) check("read in table", vt_rd_addr >= BASE && vt_rd_addr < BASE + 40'd4096);
    check("coherence bypass", req_coh_bypass == (vt_rd_valid && vt_rd_ready));
  end
  assign req_addr = (vt_rd_valid && vt_rd_ready) ? vt_rd_addr : app_addr;

  // application traffic: one read every 8 cycles over 3000 data lines
  int cyc_n;
  always_ff @(posedge clk) begin
    if (!rst_n) cyc_n <= 0; else cyc_n <= cyc_n + 1;
  end
  always_comb begin
    app_valid = rst_n && (cyc_n % 8 == 3);
    app_addr  = 40'h00_0100_0000 + 40'((cyc_n * 2654435761) % 3000);
    app_id    = 8'hF0;
    app_dirty = (cyc_n % 16 == 3);
  end
  // VT port stalls: 40 cycles out of every 3000
  assign stall = (cyc_n % 3000) >= 2960;

  // feedback pipeline
  typedef struct { longint due; int idx; logic miss; } fb_t;
  fb_t fbq [$];
  longint now = 0;
  always @(posedge clk) now <= now + 1;

  initial begin
    repeat (400000) @(posedge clk);
    failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    hits_pbtb = 0; hits_base = 0; lookups_late = 0;
    cfg_base_we = 0; cfg_base = 0; lk_valid = 0; lk_pc = 0;
    fb_valid = 0; fb_taken = 0; fb_btb_miss = 0; fb_entry = '0;
    repeat (3) @(posedge clk); #1 rst_n = 1;
    cfg_base_we = 1; cfg_base = BASE; @(posedge clk); #1 cfg_base_we = 0;

    for (int pass = 0; pass < PASSES; pass++) begin
      int ph, pb0, pl;
      ph = 0; pb0 = 0; pl = 0;
      for (int i = 0; i < NB; i++) begin
        int gap;
        if ($urandom_range(0, 99) < 5) continue;
        gap = $urandom_range(1, 7);
        for (int g = 0; g < gap; g++) begin
          bit do_lk;
          do_lk = (g == gap - 1);
          lk_valid = do_lk; lk_pc = br_pc(i);
          fb_valid = 0;
          if (fbq.size() > 0 && fbq[0].due <= now) begin
            fb_t f;
            f = fbq.pop_front();
            fb_valid = 1; fb_taken = 1; fb_btb_miss = f.miss; fb_entry = br_info(f.idx);
          end
          #1;
          if (do_lk) begin
            br_entry_t e;
            e = br_info(i);
            if (pred_hit) begin
              check("target", pred_target == full_target(e.pc, e.tgt));
              check("type", pred_btype == e.btype);
            end
            if (pass > 0) begin
              pl++; ph += int'(pred_hit); pb0 += int'(base_hit);
            end
            fbq.push_back('{due: now + FB_DELAY, idx: i, miss: !(pred_hit && !pred_from_pb)});
          end
          @(posedge clk); #1;
          lk_valid = 0; fb_valid = 0;
        end
      end
      if (pass > 0) begin
        $display("pass %0d: lookups=%0d phantom-btb hits=%0d baseline hits=%0d", pass, pl, ph, pb0);
        hits_pbtb += ph; hits_base += pb0; lookups_late += pl;
      end
    end
    repeat (40) @(posedge clk);

    check("phantom-btb beats baseline", hits_pbtb > hits_base + lookups_late / 10);
    $display("events: btb_hit=%0d btb_miss=%0d pb_hit=%0d install=%0d defer=%0d dup=%0d",
             c_btb_hit, c_btb_miss, c_pb_hit, c_install, c_defer, c_dup);
    $display("events: formed=%0d gdrop=%0d issue=%0d merge=%0d pdrop=%0d fill=%0d empty=%0d",
             c_formed, c_gdrop, c_issue, c_merge, c_pdrop, c_fill, c_empty);
    $display("events: meta_evict_drop=%0d l1=%0d mem=%0d wb=%0d coh_bypass=%0d port_stall=%0d",
             c_evdrop, c_l1, c_mem, c_wb, c_coh, c_stall);
    check("seen: btb hit", c_btb_hit > 0);
    check("seen: btb miss", c_btb_miss > 0);
    check("seen: prefetch buffer hit", c_pb_hit > 0);
    check("seen: install", c_install > 0);
    check("seen: deferred install", c_defer > 0);
    check("seen: duplicate skipped", c_dup > 0);
    check("seen: group formed", c_formed > 0);
    check("seen: group dropped", c_gdrop > 0);
    check("seen: prefetch issued", c_issue > 0);
    check("seen: prefetch merged", c_merge > 0);
    check("seen: prefetch dropped", c_pdrop > 0);
    check("seen: group filled", c_fill > 0);
    check("seen: empty reply", c_empty > 0);
    check("seen: metadata eviction dropped", c_evdrop > 0);
    check("seen: l1 reply", c_l1 > 0);
    check("seen: off-chip fill", c_mem > 0);
    check("seen: write-back", c_wb > 0);
    check("seen: coherence bypass", c_coh > 0);
    check("seen: port stall", c_stall > 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
