// tb_pbtb_prefetch_engine: self-checking test of the prefetch engine.
//
// Triggers come from a small set of code regions, so merges into
// outstanding reads are common, and the L2 side answers after at least 12
// cycles (the L2 latency of the evaluated system) with random extra delay,
// so all 16 MSHRs fill up and triggers are dropped. Some replies carry no
// data (a virtual-table miss in the L2). A cycle-level reference of the
// MSHRs and request register is compared with rd_valid, rd_addr, rd_id and
// the event pulses every cycle; every reply with data must appear on the
// push outputs, unpacked into six entries, exactly one cycle later.
module tb_pbtb_prefetch_engine;
  import pbtb_pkg::*;

  localparam int M = 16;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  line_addr_t vt_base = 40'h12_3456_0000;
  logic trig_valid, rd_valid, rd_ready, rsp_valid, rsp_hit;
  pc_t trig_pc;
  line_addr_t rd_addr;
  logic [3:0] rd_id, rsp_id;
  line_t rsp_data;
  logic [GROUP_SIZE-1:0] push_valid;
  br_entry_t push_entry [GROUP_SIZE];
  logic pf_issue, pf_merge, pf_drop, pf_fill, pf_empty;
  int checks = 0, failures = 0;

  pbtb_prefetch_engine dut (.*);

  task automatic check(string what, logic cond);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  function automatic line_t line_for(line_addr_t a);
    line_t l = '0;
    for (int k = 0; k < GROUP_SIZE; k++)
      l[k*ENTRY_W +: ENTRY_W] = {a[37:0], 8'(k), 2'(k), a[29:0] ^ 30'(k)};
    return l;
  endfunction

  // reference
  bit          mv [M];
  logic [11:0] mi [M];
  bit          rv;
  line_addr_t  ra;
  int          rid;
  bit e_issue, e_merge, e_drop, e_fill, e_empty;
  bit exp_push; line_t exp_line;
  // L2 side: accepted reads waiting for a reply
  int          age [M];
  line_addr_t  waddr [M];
  bit          waiting [M];
  int n_issue = 0, n_merge = 0, n_drop = 0, n_fill = 0, n_empty = 0;

  initial begin
    repeat (40000) @(posedge clk);
    failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int m = 0; m < M; m++) begin mv[m] = 0; waiting[m] = 0; end
    rv = 0; ra = 0; rid = 0; exp_push = 0;
    {e_issue, e_merge, e_drop, e_fill, e_empty} = '0;
    trig_valid = 0; trig_pc = 0; rd_ready = 0; rsp_valid = 0; rsp_id = 0; rsp_hit = 0; rsp_data = 0;
    repeat (3) @(posedge clk); #1 rst_n = 1;
    for (int cyc = 0; cyc < 20000; cyc++) begin
      logic [11:0] ti;
      bit match, free, issue;
      int fid, rsp_m;
      // stimulus
      trig_valid = $urandom_range(0, 1);
      trig_pc    = pc_t'({$urandom_range(0, 40), 5'($urandom)}) | (46'h3 << 40);
      rd_ready   = $urandom_range(0, 3) != 0;
      rsp_valid  = 0; rsp_m = -1;
      for (int m = 0; m < M; m++)
        if (rsp_m < 0 && waiting[m] && age[m] >= 12 && $urandom_range(0, 3) == 0) rsp_m = m;
      if (rsp_m >= 0) begin
        rsp_valid = 1; rsp_id = 4'(rsp_m); rsp_hit = $urandom_range(0, 4) != 0;
        rsp_data  = line_for(waddr[rsp_m]);
      end
      #1;
      // compare outputs with the reference
      check("rd_valid", rd_valid == rv);
      if (rv && rd_valid) begin
        check("rd_addr", rd_addr == ra);
        check("rd_id", rd_id == 4'(rid));
      end
      check("events", {pf_issue, pf_merge, pf_drop, pf_fill, pf_empty} ==
                      {e_issue, e_merge, e_drop, e_fill, e_empty});
      check("push_valid", push_valid == {GROUP_SIZE{exp_push}});
      if (exp_push)
        for (int k = 0; k < GROUP_SIZE; k++)
          check("push_entry", push_entry[k] == exp_line[k*ENTRY_W +: ENTRY_W]);
      // reference next state
      ti = trig_pc[16:5];
      match = 0; free = 0; fid = 0;
      for (int m = 0; m < M; m++) begin
        if (mv[m] && mi[m] == ti) match = 1;
        if (!free && !mv[m]) begin free = 1; fid = m; end
      end
      issue = trig_valid && !match && free && (!rv || rd_ready);
      e_issue = issue; e_merge = trig_valid && match; e_drop = trig_valid && !match && !issue;
      e_fill = rsp_valid && rsp_hit; e_empty = rsp_valid && !rsp_hit;
      n_issue += int'(e_issue); n_merge += int'(e_merge); n_drop += int'(e_drop);
      n_fill += int'(e_fill); n_empty += int'(e_empty);
      exp_push = rsp_valid && rsp_hit; exp_line = rsp_data;
      for (int m = 0; m < M; m++) if (waiting[m]) age[m]++;
      if (rv && rd_ready) begin waiting[rid] = 1; age[rid] = 0; waddr[rid] = ra; rv = 0; end
      if (rsp_valid) begin mv[rsp_m] = 0; waiting[rsp_m] = 0; end
      if (issue) begin mv[fid] = 1; mi[fid] = ti; rv = 1; ra = vt_base + 40'(ti); rid = fid; end
      @(posedge clk); #1;
    end
    check("scenario: issues", n_issue > 100);
    check("scenario: merges", n_merge > 100);
    check("scenario: drops (MSHRs full)", n_drop > 10);
    check("scenario: fills", n_fill > 100);
    check("scenario: empty replies", n_empty > 10);
    $display("issue=%0d merge=%0d drop=%0d fill=%0d empty=%0d", n_issue, n_merge, n_drop, n_fill, n_empty);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
