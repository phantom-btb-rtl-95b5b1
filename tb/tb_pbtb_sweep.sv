// tb_pbtb_sweep: the virtual-table-size and dedicated-BTB-size
// configurations, run side by side on one branch stream.
//
// Five Phantom-BTB lanes: a 1K-entry BTB with 1K-, 2K- and 4K-group
// virtual tables, and 2K- and 4K-entry BTBs with a 4K-group table. Each has
// a same-sized plain BTB as its baseline. The stream is a synthetic program
// of 6000 taken branches (more than the largest BTB), looped five times with
// 5% of branches skipped at random in each pass; one lookup every 1 to 7
// cycles. Hits are counted from the second pass on.
//
// Checked: no lane ever predicts a wrong target or type; every lane
// predicts more branches than its baseline; a larger virtual table never
// does worse than a smaller one for the 1K-entry BTB.
module tb_pbtb_sweep;
  import pbtb_pkg::*;

  localparam int NB = 6000, PASSES = 5, L = 5;
  localparam int BTB [L] = '{1024, 1024, 1024, 2048, 4096};
  localparam int VT  [L] = '{1024, 2048, 4096, 4096, 4096};

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic lk_valid = 0, count_en = 0;
  br_entry_t lk_entry = '0;
  int n_lookups [L], n_hits [L], n_base [L], n_wrong [L];
  int checks = 0, failures = 0;

  for (genvar g = 0; g < L; g++) begin : g_lane
    pbtb_sweep_lane #(.BTB_ENTRIES(BTB[g]), .VT_GROUPS(VT[g])) u_lane (
      .clk, .rst_n, .lk_valid, .lk_entry, .count_en,
      .n_lookups(n_lookups[g]), .n_hits(n_hits[g]), .n_base_hits(n_base[g]), .n_wrong(n_wrong[g])
    );
  end

  task automatic check(string what, logic cond);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic br_entry_t br_info(int i);
    br_entry_t e;
    e.pc    = pc_t'(46'h0000_0100_0000 + 46'(i) * 46'd6 + 46'(i % 3));
    e.btype = br_type_e'((i * 5) % 4);
    e.tgt   = 30'(i * 40503 + 7);
    return e;
  endfunction

  initial begin
    repeat (400000) @(posedge clk);
    failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (3) @(posedge clk); #1 rst_n = 1;
    for (int pass = 0; pass < PASSES; pass++) begin
      count_en = (pass > 0);
      for (int i = 0; i < NB; i++) begin
        int gap;
        if ($urandom_range(0, 99) < 5) continue;
        gap = $urandom_range(1, 7);
        repeat (gap - 1) @(posedge clk);
        #1 lk_valid = 1; lk_entry = br_info(i);
        @(posedge clk); #1 lk_valid = 0;
      end
    end
    repeat (20) @(posedge clk);
    for (int g = 0; g < L; g++) begin
      $display("BTB %0d entries, table %0d groups: lookups=%0d phantom-btb hits=%0d (%0d%%) baseline hits=%0d",
               BTB[g], VT[g], n_lookups[g], n_hits[g], 100 * n_hits[g] / n_lookups[g], n_base[g]);
      check($sformatf("lane %0d predictions correct", g), n_wrong[g] == 0);
      check($sformatf("lane %0d beats its baseline", g), n_hits[g] > n_base[g]);
    end
    check("2K-group table not worse than 1K", n_hits[1] >= n_hits[0]);
    check("4K-group table not worse than 2K", n_hits[2] >= n_hits[1]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
