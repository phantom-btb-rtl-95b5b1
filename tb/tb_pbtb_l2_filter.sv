// tb_pbtb_l2_filter: self-checking test of the L2 metadata filter.
//
// Random L2 replies, misses and evictions are generated for addresses just
// below, inside, at both edges of, and just above the virtual table's
// range, and far away. For each one the expected routing is worked out
// from the range test written out here (base <= a < base + 4096) and
// checked one cycle later: metadata replies and misses go to the
// Phantom-BTB (misses without data), other hits go to the L1 side, other
// misses go off chip, metadata evictions are dropped and other dirty ones
// are written back. The coherence-bypass flag is checked in the same cycle.
module tb_pbtb_l2_filter;
  import pbtb_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  line_addr_t vt_base = 40'h00_8000_0000;
  logic l2r_valid, l2r_hit, pb_rsp_valid, pb_rsp_hit, l1_rsp_valid, mem_rd_valid;
  line_addr_t l2r_addr, l1_rsp_addr, mem_rd_addr, ev_addr, mem_wb_addr, req_addr;
  logic [7:0] l2r_id, pb_rsp_id, l1_rsp_id, mem_rd_id;
  line_t l2r_data, pb_rsp_data, l1_rsp_data, ev_data, mem_wb_data;
  logic ev_valid, ev_dirty, mem_wb_valid, meta_evict_drop, req_coh_bypass;
  int checks = 0, failures = 0;

  pbtb_l2_filter dut (.*);

  task automatic check(string what, logic cond);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  function automatic line_addr_t pick();
    case ($urandom_range(0, 5))
      0: return vt_base - 40'($urandom_range(1, 3));
      1: return vt_base + 40'($urandom_range(0, 4095));
      2: return vt_base;
      3: return vt_base + 40'd4095;
      4: return vt_base + 40'(4096 + $urandom_range(0, 3));
      default: return line_addr_t'({$urandom, $urandom});
    endcase
  endfunction
  function automatic bit meta(line_addr_t a);
    return a >= 40'h00_8000_0000 && a <= 40'h00_8000_0FFF;
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  int n_pb = 0, n_pb_empty = 0, n_l1 = 0, n_mem = 0, n_wb = 0, n_drop = 0;
  initial begin
    bit pr_v, pr_hit, pr_meta, pe_v, pe_dirty, pe_meta;
    line_addr_t pr_a, pe_a; logic [7:0] pr_id; line_t pr_d, pe_d;
    pr_v = 0; pe_v = 0;
    l2r_valid = 0; ev_valid = 0; l2r_addr = 0; ev_addr = 0; req_addr = 0;
    l2r_id = 0; l2r_hit = 0; l2r_data = 0; ev_dirty = 0; ev_data = 0;
    repeat (3) @(posedge clk); #1 rst_n = 1;
    for (int cyc = 0; cyc < 5000; cyc++) begin
      l2r_valid = $urandom_range(0, 1); l2r_addr = pick(); l2r_id = 8'($urandom);
      l2r_hit = $urandom_range(0, 1); l2r_data = {16{$urandom}};
      ev_valid = $urandom_range(0, 1); ev_addr = pick(); ev_dirty = $urandom_range(0, 1);
      ev_data = {16{$urandom}};
      req_addr = pick();
      #1;
      check("coherence bypass", req_coh_bypass == meta(req_addr));
      // outputs for last cycle's inputs
      check("pb_rsp_valid", pb_rsp_valid == (pr_v && pr_meta));
      check("l1_rsp_valid", l1_rsp_valid == (pr_v && !pr_meta && pr_hit));
      check("mem_rd_valid", mem_rd_valid == (pr_v && !pr_meta && !pr_hit));
      if (pb_rsp_valid) begin
        check("pb id/hit", pb_rsp_id == pr_id && pb_rsp_hit == pr_hit);
        check("pb data", pb_rsp_data == (pr_hit ? pr_d : '0));
        n_pb++; if (!pr_hit) n_pb_empty++;
      end
      if (l1_rsp_valid) begin
        check("l1 payload", l1_rsp_addr == pr_a && l1_rsp_id == pr_id && l1_rsp_data == pr_d); n_l1++;
      end
      if (mem_rd_valid) begin check("mem payload", mem_rd_addr == pr_a && mem_rd_id == pr_id); n_mem++; end
      check("mem_wb_valid", mem_wb_valid == (pe_v && !pe_meta && pe_dirty));
      check("meta_evict_drop", meta_evict_drop == (pe_v && pe_meta));
      if (mem_wb_valid) begin check("wb payload", mem_wb_addr == pe_a && mem_wb_data == pe_d); n_wb++; end
      if (meta_evict_drop) n_drop++;
      pr_v = l2r_valid; pr_hit = l2r_hit; pr_meta = meta(l2r_addr); pr_a = l2r_addr; pr_id = l2r_id; pr_d = l2r_data;
      pe_v = ev_valid; pe_dirty = ev_dirty; pe_meta = meta(ev_addr); pe_a = ev_addr; pe_d = ev_data;
      @(posedge clk); #1;
    end
    check("scenario: all routes used", n_pb > 50 && n_pb_empty > 20 && n_l1 > 50 && n_mem > 50 && n_wb > 50 && n_drop > 50);
    $display("pb=%0d (empty %0d) l1=%0d mem=%0d wb=%0d dropped=%0d", n_pb, n_pb_empty, n_l1, n_mem, n_wb, n_drop);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
