// tb_pbtb_tgg: self-checking test of the temporal group generator.
//
// Random missed branches arrive with random gaps; the write port is
// sometimes held busy for long stretches so that groups get dropped. A
// cycle-level reference in the testbench keeps the six-branch group, the
// trigger index of the previous group and the pending write, packs groups
// by explicit concatenation, and is compared with wr_valid, wr_addr and
// wr_data every cycle. It also checks that wr_valid rises exactly one
// cycle after the sixth branch, that the first group after reset is never
// written, and counts formed and dropped groups against the event pulses.
module tb_pbtb_tgg;
  import pbtb_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  line_addr_t vt_base = 40'hFF_FFFF_F000;
  logic in_valid, wr_valid, wr_ready, group_formed, group_dropped;
  br_entry_t in_entry;
  line_addr_t wr_addr;
  line_t wr_data;
  int checks = 0, failures = 0;

  pbtb_tgg dut (.*);

  task automatic check(string what, logic cond);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // reference state
  br_entry_t  g [6];
  int         n;
  logic [11:0] idx;
  bit         idx_ok;
  bit         o_v;
  line_addr_t o_a;
  line_t      o_d;
  int exp_formed = 0, exp_dropped = 0, got_formed = 0, got_dropped = 0, writes = 0;
  int busy = 0;

  initial begin
    repeat (40000) @(posedge clk);
    failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    n = 0; idx = 0; idx_ok = 0; o_v = 0; o_a = 0; o_d = 0;
    in_valid = 0; in_entry = '0; wr_ready = 1;
    repeat (3) @(posedge clk); #1 rst_n = 1;
    for (int cyc = 0; cyc < 20000; cyc++) begin
      bit last, free;
      if (busy > 0) busy--;
      else if ($urandom_range(0, 200) == 0) busy = $urandom_range(10, 60);
      wr_ready = (busy == 0) && ($urandom_range(0, 3) != 0);
      in_valid = $urandom_range(0, 2) != 0;
      in_entry.pc    = pc_t'({$urandom, $urandom});
      in_entry.btype = br_type_e'($urandom_range(0, 3));
      in_entry.tgt   = 30'($urandom);
      #1;
      check("wr_valid", wr_valid == o_v);
      if (o_v && wr_valid) begin
        check("wr_addr", wr_addr == o_a);
        check("wr_data", wr_data == o_d);
      end
      if (group_formed) got_formed++;
      if (group_dropped) got_dropped++;
      // reference next state
      free = !o_v || wr_ready;
      if (o_v && wr_ready) begin o_v = 0; writes++; end
      last = in_valid && n == 5;
      if (in_valid) begin
        g[n] = in_entry;
        if (last) begin
          exp_formed++;
          if (idx_ok && free) begin
            o_v = 1;
            o_a = vt_base + 40'(idx);
            o_d = {44'd0, g[5], g[4], g[3], g[2], g[1], g[0]};
          end else exp_dropped++;
          idx = in_entry.pc[16:5];
          idx_ok = 1;
          n = 0;
        end else n++;
      end
      // the reference output is compared after the edge: a written group
      // shows on wr_valid exactly one cycle after its sixth branch
      @(posedge clk); #1;
    end
    in_valid = 0;
    repeat (2) @(posedge clk);
    if (group_formed) got_formed++;
    if (group_dropped) got_dropped++;
    check("formed pulses", got_formed == exp_formed);
    check("dropped pulses", got_dropped == exp_dropped);
    check("scenario: some groups written", writes > 100);
    check("scenario: some groups dropped", exp_dropped > 1);
    $display("groups formed=%0d written=%0d dropped=%0d", exp_formed, writes, exp_dropped);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
