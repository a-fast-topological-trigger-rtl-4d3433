// tb_l2_event_merger: three queues stand in for the L2 input FIFOs. Each
// event has a random subset of boards contributing fragments whose timestamps
// differ by up to 6 ticks (window 8) and which arrive at staggered times, one
// entry per 8 ticks. Sometimes a board also sends a fragment 50 ticks later,
// outside the window, or a board not in the event sends one 50 ticks later
// while the event is still open; either must become an event of its own. Every output
// event must carry exactly the expected pixels, a timestamp of one of its
// fragments, and a start before and an end after its pixels.
module tb_l2_event_merger;
  import trig_pkg::*;
  localparam int NR = 3;
  logic clk = 0, rst = 1;
  hit_entry_t head [NR];
  logic [NR-1:0] empty, pop;
  logic [15:0] window = 16'd8, timeout = 16'd64;
  logic ev_start, hit_valid, ev_end, busy;
  logic [31:0] ev_ts;
  logic [1:0] hit_region;
  logic [7:0] hit_addr;
  int checks = 0, failures = 0;
  hit_entry_t q [NR][$];

  l2_event_merger #(.NR(NR)) dut (.clk, .rst, .head, .empty, .pop, .window, .timeout,
    .ev_start, .ev_ts, .hit_valid, .hit_region, .hit_addr, .ev_end, .busy);
  always #5 clk = ~clk;

  always_comb
    for (int i = 0; i < NR; i++) begin
      empty[i] = (q[i].size() == 0);
      head[i]  = empty[i] ? '0 : q[i][0];
    end

  always @(posedge clk) begin
    logic [NR-1:0] p;
    p = pop & ~empty;
    #1;
    for (int i = 0; i < NR; i++) if (p[i]) void'(q[i].pop_front());
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected events: sorted pixel keys and allowed timestamps
  typedef struct { int keys[$]; int tss[$]; } exp_ev_t;
  exp_ev_t exp_q [$];
  int n_multi = 0, n_split = 0;

  // entries are scheduled for a tick and pushed by the block below
  typedef struct { int t; int region; hit_entry_t e; } sched_t;
  sched_t sched [$];
  int cur_keys [$];
  int cyc = 0;

  always @(negedge clk) begin
    cyc++;
    for (int i = 0; i < sched.size(); i++)
      if (sched[i].t == cyc) q[sched[i].region].push_back(sched[i].e);
  end

  task automatic feed(int region, logic [31:0] ts, int n, int delay);
    for (int i = 0; i < n; i++) begin
      cur_keys.push_back(region * 256 + region * 50 + i * 3 + 1);
      sched.push_back('{t: cyc + delay + 8 * i + 1, region: region,
                        e: '{ts: ts, addr: 8'(region * 50 + i * 3 + 1), last: (i == n - 1), empty: 1'b0}});
    end
    if (n == 0)
      sched.push_back('{t: cyc + delay + 1, region: region, e: '{ts: ts, addr: '0, last: 1'b1, empty: 1'b1}});
  endtask

  initial begin : stim
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int e = 0; e < 60; e++) begin
      exp_ev_t ev, sp;
      logic [31:0] base;
      int parts;
      ev.tss.delete(); sp.tss.delete();
      base = 32'(e * 1000 + 100);
      parts = 0;
      for (int r = 0; r < NR; r++) begin
        if (r == 0 || (!(e % 4 == 3 && r == 2) && $urandom_range(0, 2) != 0)) begin
          logic [31:0] ts;
          ts = base + 32'($urandom_range(0, 6));
          ev.tss.push_back(int'(ts));
          feed(r, ts, (e % 9 == 4 && r == 2) ? 0 : $urandom_range(1, 6), $urandom_range(0, 20));
          parts++;
        end
      end
      ev.keys = cur_keys; cur_keys.delete();
      if (parts > 1) n_multi++;
      exp_q.push_back(ev);
      if (e % 4 == 3) begin
        // out-of-window fragment arriving while the event is still open
        sp.tss.delete();
        sp.tss.push_back(int'(base) + 50);
        feed(2, base + 50, 2, 25);
        sp.keys = cur_keys; cur_keys.delete();
        exp_q.push_back(sp);
        n_split++;
      end
      if (e % 4 == 1) begin
        sp.tss.push_back(int'(base) + 50);
        feed(1, base + 50, 3, 150);
        sp.keys = cur_keys; cur_keys.delete();
        exp_q.push_back(sp);
        n_split++;
      end
      repeat (400) @(negedge clk);
    end
    repeat (200) @(negedge clk);
    checks++; if (exp_q.size() != 0) begin failures++; $display("FAIL %0d events missing", exp_q.size()); end
    checks++; if (n_multi == 0 || n_split == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // collect output
  int got [$];
  logic [31:0] got_ts;
  bit in_ev = 0;
  always @(posedge clk) begin
    #2;
    if (!rst) begin
      if (ev_start) begin
        checks++; if (in_ev) begin failures++; $display("FAIL nested start"); end
        in_ev = 1; got.delete(); got_ts = ev_ts;
      end
      if (hit_valid) begin
        checks++; if (!in_ev) begin failures++; $display("FAIL hit outside event"); end
        got.push_back(int'(hit_region) * 256 + int'(hit_addr));
      end
      if (ev_end) begin
        exp_ev_t ex;
        checks++;
        if (!in_ev) begin failures++; $display("FAIL end without start"); end
        in_ev = 0;
        if (exp_q.size() == 0) begin failures++; $display("FAIL unexpected event"); end
        else begin
          int k[$];
          bit ts_ok;
          ex = exp_q.pop_front();
          k = ex.keys;
          k.sort(); got.sort();
          checks++;
          if (k != got) begin failures++; $display("FAIL event ts %0d: %0d pixels, exp %0d", got_ts, got.size(), k.size()); end
          ts_ok = 0;
          foreach (ex.tss[i]) if (ex.tss[i] == int'(got_ts)) ts_ok = 1;
          checks++;
          if (!ts_ok) begin failures++; $display("FAIL event timestamp %0d", got_ts); end
        end
      end
    end
  end
endmodule
