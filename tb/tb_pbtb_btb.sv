// tb_pbtb_btb: self-checking test of the dedicated BTB at its default size
// (1K entries, 4 ways).
//
// A reference model kept in the testbench (per-set valid/tag/target arrays
// and a 3-bit tree pseudo-LRU per set, coded separately from the RTL)
// follows every write and lookup. Directed steps check in-place update,
// fill of invalid ways and the pseudo-LRU victim; then a random mix of
// lookups and writes over branches that crowd a few sets compares hit,
// type and target on every lookup. Lookups are combinational: outputs are
// compared in the same cycle as the address is applied.
module tb_pbtb_btb;
  import pbtb_pkg::*;

  localparam int SETS = 256;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic lk_valid, lk_hit, wr_valid;
  pc_t lk_pc, lk_target;
  br_type_e lk_btype;
  br_entry_t wr_entry;
  int checks = 0, failures = 0;

  pbtb_btb dut (.*);

  // reference model
  logic        r_v   [SETS][4];
  logic [37:0] r_tag [SETS][4];
  logic [31:0] r_data[SETS][4];   // {type, tgt}
  logic [2:0]  r_lru [SETS];      // bit0 root (0: victim in ways 0/1), bit1 ways 0/1, bit2 ways 2/3

  function automatic int ref_victim(int s);
    if (r_lru[s][0] == 0) return r_lru[s][1] ? 1 : 0;
    else                  return r_lru[s][2] ? 3 : 2;
  endfunction
  task automatic ref_touch(int s, int w);
    if (w < 2) begin r_lru[s][0] = 1; r_lru[s][1] = (w == 0); end
    else       begin r_lru[s][0] = 0; r_lru[s][2] = (w == 2); end
  endtask
  function automatic int ref_find(pc_t pc);
    int s = int'(pc[7:0]);
    for (int w = 0; w < 4; w++) if (r_v[s][w] && r_tag[s][w] == pc[45:8]) return w;
    return -1;
  endfunction
  task automatic ref_write(br_entry_t e);
    int s = int'(e.pc[7:0]);
    int w = ref_find(e.pc);
    if (w < 0) begin
      for (int i = 3; i >= 0; i--) if (!r_v[s][i]) w = i;
      if (w < 0) w = ref_victim(s);
    end
    r_v[s][w] = 1; r_tag[s][w] = e.pc[45:8]; r_data[s][w] = {e.btype, e.tgt};
    ref_touch(s, w);
  endtask

  task automatic check(string what, logic cond);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // one cycle: optional lookup and optional write
  task automatic step(logic do_lk, pc_t pc, logic do_wr, br_entry_t e);
    int w;
    lk_valid = do_lk; lk_pc = pc; wr_valid = do_wr; wr_entry = e;
    #1;
    if (do_lk) begin
      w = ref_find(pc);
      check($sformatf("hit pc=%h", pc), lk_hit == (w >= 0));
      if (w >= 0 && lk_hit) begin
        check("target", lk_target == {pc[45:30], r_data[pc[7:0]][w][29:0]});
        check("type", lk_btype == br_type_e'(r_data[pc[7:0]][w][31:30]));
      end
    end
    @(posedge clk);
    if (do_lk && w >= 0) ref_touch(int'(pc[7:0]), w);
    if (do_wr) ref_write(e);
    #1;
    lk_valid = 0; wr_valid = 0;
  endtask

  function automatic br_entry_t mk(pc_t pc, logic [29:0] t);
    br_entry_t e; e.pc = pc; e.btype = br_type_e'(t[1:0]); e.tgt = t; return e;
  endfunction
  function automatic pc_t pc_of(int set, int tag);
    return {38'(tag), 8'(set)};
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    br_entry_t z = '0;
    for (int s = 0; s < SETS; s++) begin r_lru[s] = 0; for (int w = 0; w < 4; w++) r_v[s][w] = 0; end
    lk_valid = 0; wr_valid = 0; lk_pc = 0; wr_entry = 0;
    repeat (3) @(posedge clk); #1 rst_n = 1;
    // empty BTB misses
    step(1, pc_of(5, 1), 0, z);
    // fill set 5 with four branches, then update one in place
    for (int t = 1; t <= 4; t++) step(0, 0, 1, mk(pc_of(5, t), 30'(100 + t)));
    for (int t = 1; t <= 4; t++) step(1, pc_of(5, t), 0, z);
    step(0, 0, 1, mk(pc_of(5, 3), 30'h3ABCDEF));
    step(1, pc_of(5, 3), 0, z);
    // touch tag 1, then insert a fifth: the pseudo-LRU victim must go
    step(1, pc_of(5, 1), 0, z);
    step(0, 0, 1, mk(pc_of(5, 9), 30'd909));
    for (int t = 1; t <= 9; t++) step(1, pc_of(5, t), 0, z);
    // lookup and write in the same cycle
    step(1, pc_of(5, 9), 1, mk(pc_of(6, 2), 30'd77));
    step(1, pc_of(6, 2), 0, z);
    // upper address bits come from the branch itself
    step(0, 0, 1, mk({16'hBEEF, 30'h1234_5605}, 30'h2000_0001));
    step(1, {16'hBEEF, 30'h1234_5605}, 0, z);
    // random traffic crowding sets 0..7 with 12 tags each
    for (int i = 0; i < 6000; i++) begin
      pc_t pc = pc_of($urandom_range(0, 7), $urandom_range(1, 12));
      step($urandom_range(0, 2) != 0, pc, $urandom_range(0, 2) == 0,
           mk(pc_of($urandom_range(0, 7), $urandom_range(1, 12)), 30'($urandom)));
    end
    // reset clears all entries
    rst_n = 0; @(posedge clk); #1 rst_n = 1;
    for (int s = 0; s < SETS; s++) begin r_lru[s] = 0; for (int w = 0; w < 4; w++) r_v[s][w] = 0; end
    step(1, pc_of(5, 9), 0, z);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
