// pbtb_l2_model: behavioural model of the shared L2 cache, for testbenches
// only (not synthesizable, not part of the design).
//
// It stores whole lines in an associative array, answers every read after
// a fixed LATENCY (12 cycles by default) and holds at most CAP_LINES lines,
// evicting the oldest-installed line when full (FIFO, a stand-in for the
// real cache's LRU). Reads come from the Phantom-BTB (virtual-table reads)
// and from an "application" port that stands for L1 miss traffic. A read
// that misses is answered with hit=0; an application miss then installs
// the line, as the off-chip fill would. A metadata miss installs nothing.
// Replies and evictions leave through one channel each, one per cycle, in
// order. Virtual-table writes install or overwrite a line as dirty.
// `stall` holds both PBTB request ports not ready.
module pbtb_l2_model
  import pbtb_pkg::*;
#(
  parameter int unsigned LATENCY   = 12,
  parameter int unsigned CAP_LINES = 2048
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       stall,
  input  logic       rd_valid,
  output logic       rd_ready,
  input  line_addr_t rd_addr,
  input  logic [7:0] rd_id,
  input  logic       wr_valid,
  output logic       wr_ready,
  input  line_addr_t wr_addr,
  input  line_t      wr_data,
  input  logic       app_valid,
  input  line_addr_t app_addr,
  input  logic [7:0] app_id,
  input  logic       app_dirty,
  output logic       l2r_valid,
  output line_addr_t l2r_addr,
  output logic [7:0] l2r_id,
  output logic       l2r_hit,
  output line_t      l2r_data,
  output logic       ev_valid,
  output line_addr_t ev_addr,
  output logic       ev_dirty,
  output line_t      ev_data
);

  typedef struct {
    longint     due;
    line_addr_t addr;
    logic [7:0] id;
    logic       hit;
    line_t      data;
  } rsp_t;
  typedef struct {
    line_addr_t addr;
    logic       dirty;
    line_t      data;
  } ev_t;

  line_t      mem   [line_addr_t];
  logic       dirty [line_addr_t];
  line_addr_t order [$];
  rsp_t       rq    [$];
  ev_t        eq    [$];
  longint     now;

  assign rd_ready = !stall;
  assign wr_ready = !stall;

  task automatic install(line_addr_t a, line_t d, logic dt);
    if (!mem.exists(a)) begin
      if (order.size() >= CAP_LINES) begin
        line_addr_t v;
        v = order.pop_front();
        eq.push_back('{addr: v, dirty: dirty[v], data: mem[v]});
        mem.delete(v);
        dirty.delete(v);
      end
      order.push_back(a);
      dirty[a] = dt;
    end else dirty[a] = dirty[a] | dt;
    mem[a] = d;
  endtask

  task automatic lookup(line_addr_t a, logic [7:0] id, bit fill);
    bit h;
    h = mem.exists(a);
    rq.push_back('{due: now + LATENCY, addr: a, id: id, hit: h, data: h ? mem[a] : '0});
    if (!h && fill) install(a, {16{a[31:0]}}, 1'b0);
  endtask

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      now       <= 0;
      l2r_valid <= 1'b0;
      ev_valid  <= 1'b0;
      rq.delete();
      eq.delete();
    end else begin
      now <= now + 1;
      if (wr_valid && wr_ready) install(wr_addr, wr_data, 1'b1);
      if (rd_valid && rd_ready) lookup(rd_addr, rd_id, 1'b0);
      if (app_valid) begin
        lookup(app_addr, app_id, 1'b1);
        if (app_dirty && mem.exists(app_addr)) dirty[app_addr] = 1'b1;
      end
      l2r_valid <= 1'b0;
      if (rq.size() > 0 && rq[0].due <= now) begin
        rsp_t r;
        r = rq.pop_front();
        l2r_valid <= 1'b1;
        l2r_addr  <= r.addr;
        l2r_id    <= r.id;
        l2r_hit   <= r.hit;
        l2r_data  <= r.data;
      end
      ev_valid <= 1'b0;
      if (eq.size() > 0) begin
        ev_t e;
        e = eq.pop_front();
        ev_valid <= 1'b1;
        ev_addr  <= e.addr;
        ev_dirty <= e.dirty;
        ev_data  <= e.data;
      end
    end
  end

endmodule
