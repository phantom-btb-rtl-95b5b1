// tb_pbtb_prefetch_buffer: self-checking test of the 64-entry prefetch
// buffer.
//
// The reference model numbers every accepted entry in arrival order. An
// entry with sequence number s is still present when it has not been
// removed and fewer than 64 entries arrived after it (FIFO overwrite).
// Each cycle the testbench looks up a random branch, sometimes removes the
// hit, and pushes a random part of a six-entry group drawn from a small
// pool of branches (so duplicates and overwrites both happen). Hit, entry,
// duplicate count and occupancy are compared every cycle.
module tb_pbtb_prefetch_buffer;
  import pbtb_pkg::*;

  localparam int N = 64, PW = GROUP_SIZE, POOL = 150;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  pc_t lk_pc;
  logic lk_hit, rm_valid;
  br_entry_t lk_entry;
  logic [PW-1:0] push_valid;
  br_entry_t push_entry [PW];
  logic [$clog2(PW+1)-1:0] push_dup;
  logic [$clog2(N+1)-1:0] occupancy;
  int checks = 0, failures = 0;

  pbtb_prefetch_buffer dut (.*);

  // reference: per pool branch, its sequence number (-1 absent) and entry
  longint    seq_of [POOL];
  br_entry_t ent_of [POOL];
  longint    n_in;

  function automatic bit present(int p);
    return seq_of[p] >= 0 && n_in - seq_of[p] <= N;
  endfunction

  task automatic check(string what, logic cond);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  function automatic pc_t pool_pc(int p);
    return pc_t'(46'h1000 + 46'(p) * 46'd37);
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  int lk_p, pp [PW];
  int cnt_hit = 0, cnt_dup = 0, cnt_over = 0;
  initial begin
    for (int p = 0; p < POOL; p++) seq_of[p] = -1;
    n_in = 0;
    rm_valid = 0; push_valid = '0; lk_pc = 0;
    for (int k = 0; k < PW; k++) push_entry[k] = '0;
    repeat (3) @(posedge clk); #1 rst_n = 1;
    for (int cyc = 0; cyc < 8000; cyc++) begin
      int exp_dup, occ;
      bit hit_exp;
      bit pres [PW];
      lk_p  = $urandom_range(0, POOL - 1);
      lk_pc = pool_pc(lk_p);
      rm_valid = $urandom_range(0, 1);
      push_valid = (cyc % 3 == 0) ? PW'($urandom) : '0;
      for (int k = 0; k < PW; k++) begin
        pp[k] = $urandom_range(0, POOL - 1);
        push_entry[k].pc    = pool_pc(pp[k]);
        push_entry[k].btype = br_type_e'($urandom_range(0, 3));
        push_entry[k].tgt   = 30'($urandom);
      end
      #1;
      hit_exp = present(lk_p);
      check("hit", lk_hit == hit_exp);
      if (hit_exp && lk_hit) check("entry", lk_entry == ent_of[lk_p]);
      occ = 0;
      for (int p = 0; p < POOL; p++) if (present(p)) occ++;
      check("occupancy", occupancy == ($clog2(N+1))'(occ));
      if (hit_exp) cnt_hit++;
      // reference update in the order the hardware applies it
      if (rm_valid && hit_exp) seq_of[lk_p] = -1;
      // duplicates are judged against the buffer as it was before this
      // cycle's pushes, plus the earlier entries of the same group
      for (int k = 0; k < PW; k++) begin
        pres[k] = present(pp[k]);
        for (int j = 0; j < k; j++) if (push_valid[j] && pp[j] == pp[k]) pres[k] = 1;
      end
      exp_dup = 0;
      for (int k = 0; k < PW; k++) if (push_valid[k]) begin
        if (pres[k]) exp_dup++;
        else begin
          if (seq_of[pp[k]] >= 0) cnt_over++;
          seq_of[pp[k]] = n_in; ent_of[pp[k]] = push_entry[k]; n_in++;
        end
      end
      check("dup count", push_dup == ($clog2(PW+1))'(exp_dup));
      cnt_dup += exp_dup;
      @(posedge clk); #1;
    end
    check("scenario: hits seen", cnt_hit > 100);
    check("scenario: duplicates seen", cnt_dup > 100);
    $display("hits=%0d dups=%0d reinserted-after-overwrite=%0d", cnt_hit, cnt_dup, cnt_over);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
