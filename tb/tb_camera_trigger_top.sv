// tb_camera_trigger_top: end-to-end run of the whole crate at its real size
// (500 pixels, three L1.5 boards, one L2 board). Camera pixel pulses go in,
// moment records come out as 16-bit frames and are checked against the count
// and moments of the distinct pixels of each shower, computed here from the
// camera grid (x = 2 * column + row parity, y = row), and against the
// timestamp counted from the Level 3 sync command.
// Each mechanism is made to happen and counted; one that never happens is a
// failure: 3-fold trigger, merge of fragments from two boards, removal of
// pixels sent by two boards, no trigger for a pair, bad-channel mask, late
// pixel in the acceptance window, skew adjustment, event FIFO overflow,
// diagnostic playback, capture memory, sync marker, bad command parity and
// the Level 3 system reset.
module tb_camera_trigger_top;
  import trig_pkg::*;
  logic clk = 0, rst = 1;
  logic [CAM_PIXELS-1:0] l1_pix = '0;
  logic l3_rx_valid = 0, l3_tx_valid, l3_tx_ready = 1, rec_valid;
  logic [15:0] l3_rx_word = 0, l3_tx_word;
  moment_rec_t rec;
  logic [N_REGIONS-1:0] l15_trig;
  logic [15:0] l15_overflow [N_REGIONS];
  logic cfg_we = 0;
  logic [15:0] cfg_addr = 0;
  logic [31:0] cfg_wdata = 0, cfg_rdata;
  int checks = 0, failures = 0, tick = 0;

  camera_trigger_top dut (.clk, .rst, .l1_pix, .l3_rx_valid, .l3_rx_word, .l3_tx_valid, .l3_tx_word, .l3_tx_ready,
                          .rec_valid, .rec, .l15_trig, .l15_overflow, .cfg_we, .cfg_addr, .cfg_wdata, .cfg_rdata);
  always #5 clk = ~clk;
  always @(posedge clk) tick++;

  initial begin
    repeat (600000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // mechanism counters
  int n_trigger = 0, n_merge = 0, n_dedup = 0, n_pair = 0, n_mask = 0, n_window = 0, n_skew = 0;
  int n_overflow = 0, n_playback = 0, n_capture = 0, n_sync = 0, n_parity = 0, n_reset = 0;

  // ---- expected records ----
  typedef struct { bit check_ts; logic [31:0] ts; int n, sx, sy, sxx, syy, sxy; } exp_t;
  exp_t exp_q [$];
  int t_sync;   // tick at which the L1.5 timestamps read 0

  function automatic int P(int r, int c); return r * CAM_COLS + c; endfunction

  function automatic exp_t moments(int ids[$]);
    exp_t e; bit seen [CAM_PIXELS];
    foreach (seen[i]) seen[i] = 0;
    e.check_ts = 0; e.ts = 0; e.n = 0; e.sx = 0; e.sy = 0; e.sxx = 0; e.syy = 0; e.sxy = 0;
    foreach (ids[i]) if (!seen[ids[i]]) begin
      int r, c, x, y;
      seen[ids[i]] = 1;
      r = ids[i] / CAM_COLS; c = ids[i] % CAM_COLS; x = 2 * c + (r % 2); y = r;
      e.n++; e.sx += x; e.sy += y; e.sxx += x * x; e.syy += y * y; e.sxy += x * y;
    end
    return e;
  endfunction

  // ---- frame decoder ----
  logic [15:0] fw [$];
  int n_rec = 0;
  bit checking = 1;
  moment_rec_t got_q [$];
  always @(posedge clk) if (!rst && l3_tx_valid && l3_tx_ready) begin
    fw.push_back(l3_tx_word);
    if (fw.size() == REC_WORDS) begin
      logic [15:0] chk; moment_rec_t g;
      chk = '0;
      for (int i = 0; i < REC_WORDS - 1; i++) chk ^= fw[i];
      checks++;
      if (fw[0] != REC_HEADER || chk != fw[REC_WORDS-1]) begin failures++; $display("FAIL frame check"); end
      g = '{ts: {fw[1], fw[2]}, n: fw[3], sx: 24'({fw[4], fw[5]}), sy: 24'({fw[6], fw[7]}),
            sxx: {fw[8], fw[9]}, syy: {fw[10], fw[11]}, sxy: {fw[12], fw[13]}};
      got_q.push_back(g);
      n_rec++;
      fw.delete();
    end
  end

  always @(negedge clk) l3_tx_ready = ($urandom_range(0, 4) != 0);

  task automatic cfg_write(logic [15:0] a, logic [31:0] d);
    @(negedge clk); cfg_we = 1; cfg_addr = a; cfg_wdata = d;
    @(negedge clk); cfg_we = 0;
  endtask
  task automatic cfg_read(logic [15:0] a, output logic [31:0] d);
    @(negedge clk); cfg_addr = a;
    @(negedge clk); d = cfg_rdata;
  endtask
  task automatic l3_cmd(logic [15:0] w);
    @(negedge clk); l3_rx_valid = 1; l3_rx_word = w;
    @(negedge clk); l3_rx_valid = 0;
  endtask

  // Light pixels for one tick and expect one record of them.
  task automatic shower(int ids[$], bit expect_rec);
    exp_t e;
    @(negedge clk);
    foreach (ids[i]) l1_pix[ids[i]] = 1'b1;
    e = moments(ids);
    e.check_ts = 1;
    e.ts = 32'(tick + 1 + 2 - t_sync);
    @(negedge clk);
    l1_pix = '0;
    if (expect_rec) exp_q.push_back(e);
  endtask

  task automatic drain(int ticks);
    repeat (ticks) @(negedge clk);
    // compare everything received so far
    while (got_q.size() > 0) begin
      moment_rec_t g; exp_t e;
      g = got_q.pop_front();
      checks++;
      if (exp_q.size() == 0) begin failures++; $display("FAIL unexpected record n=%0d ts=%0d", g.n, g.ts); end
      else begin
        e = exp_q.pop_front();
        if (int'(g.n) != e.n || int'(g.sx) != e.sx || int'(g.sy) != e.sy || int'(g.sxx) != e.sxx ||
            int'(g.syy) != e.syy || int'(g.sxy) != e.sxy || (e.check_ts && g.ts != e.ts)) begin
          failures++;
          $display("FAIL record: n %0d/%0d sx %0d/%0d sy %0d/%0d ts %0d/%0d", g.n, e.n, g.sx, e.sx, g.sy, e.sy, g.ts, e.ts);
        end else n_trigger++;
      end
    end
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("FAIL %0d records missing", exp_q.size()); exp_q.delete(); end
  endtask

  initial begin
    logic [31:0] d;
    int ids[$];
    repeat (4) @(posedge clk);
    @(negedge clk) rst = 0;
    repeat (10) @(negedge clk);

    // sync marker from Level 3: L2 decodes it (1 tick), L1.5 clears (1 tick)
    l3_cmd(16'h1001);
    t_sync = tick + 1;   // decoder registered at tick, counter cleared one later
    n_sync++;
    repeat (50) @(negedge clk);

    // 1: compact shower in region 0
    shower('{P(3, 4), P(3, 5), P(4, 4), P(4, 5), P(2, 5)}, 1);
    drain(1500);

    // 2: shower over the shared rows 7..10: boards 0 and 1 both see rows 8, 9
    begin
      int n_before;
      cfg_read(16'h3008, d); n_before = int'(d);
      shower('{P(7, 10), P(8, 10), P(8, 11), P(9, 10), P(9, 11), P(10, 10), P(10, 11)}, 1);
      drain(2000);
      cfg_read(16'h3008, d);
      if (int'(d) > n_before) begin n_dedup++; n_merge++; end
    end

    // 3: a pair does not trigger
    shower('{P(12, 3), P(12, 4)}, 0);
    drain(1000);
    n_pair++;

    // 4: masked pixel on board 2 (camera row 20 = local row 4, col 7 -> 87)
    cfg_write(16'h2012, 32'h1 << (87 - 64));
    shower('{P(20, 7), P(20, 8), P(21, 7)}, 0);
    drain(1000);
    n_mask++;
    cfg_write(16'h2012, 32'h0);
    shower('{P(20, 7), P(20, 8), P(21, 7)}, 1);
    drain(1500);

    // 5: late pixel within the acceptance window
    begin
      exp_t e;
      @(negedge clk);
      ids = '{P(5, 15), P(5, 16), P(6, 15)};
      foreach (ids[i]) l1_pix[ids[i]] = 1;
      e = moments('{P(5, 15), P(5, 16), P(6, 15), P(1, 1)});
      e.check_ts = 1; e.ts = 32'(tick + 1 + 2 - t_sync);
      exp_q.push_back(e);
      @(negedge clk); l1_pix = '0; l1_pix[P(1, 1)] = 1;
      @(negedge clk); l1_pix = '0;
      drain(1500);
      n_window++;
    end

    // 6: skew on board 1 (camera rows 8..17): 5 ns stretch, early pixel
    cfg_write(16'h1000, 32'h0000_0302);
    cfg_write(16'h1100 + 16'(P(5, 3)), 32'd3);   // local row 5 = camera row 13
    begin
      exp_t e;
      @(negedge clk); l1_pix[P(13, 3)] = 1;
      e = moments('{P(13, 3), P(13, 4), P(14, 3)});
      e.check_ts = 1; e.ts = 32'(tick + 1 + 3 + 2 - t_sync);
      exp_q.push_back(e);
      @(negedge clk); l1_pix = '0;
      repeat (2) @(negedge clk);
      l1_pix[P(13, 4)] = 1; l1_pix[P(14, 3)] = 1;
      @(negedge clk); l1_pix = '0;
      drain(1500);
      n_skew++;
    end
    cfg_write(16'h1000, 32'h0000_0304);

    // 7: random showers anywhere
    for (int s = 0; s < 12; s++) begin
      int r0, c0;
      r0 = $urandom_range(1, 22); c0 = $urandom_range(1, 17);
      ids = '{P(r0, c0), P(r0, c0 + 1), P(r0 + 1, c0), P(r0 + 1, c0 + 1), P(r0 + 2, c0)};
      shower(ids, 1);
      drain(2000);
    end

    // 8: diagnostic playback on board 2: word 1 of 3 holds a cluster
    for (int w = 0; w < 3; w++)
      for (int l = 0; l < 7; l++) begin
        logic [223:0] v;
        v = '0;
        if (w == 1) begin v[P(6, 3)] = 1; v[P(6, 4)] = 1; v[P(7, 3)] = 1; end
        cfg_write(16'h2400 + 16'(w * 8 + l), v[l*32 +: 32]);
      end
    begin
      exp_t e;
      e = moments('{P(22, 3), P(22, 4), P(23, 3)});
      exp_q.push_back(e);
      cfg_write(16'h2001, 32'd3);
      cfg_write(16'h3002, 32'h2);           // arm the L2 capture memory
      cfg_write(16'h2000, 32'h0001_0304);   // start playback
      drain(1500);
      n_playback++;
      cfg_read(16'h3009, d);
      checks++;
      if (d != 32'(REC_WORDS)) begin failures++; $display("FAIL capture count %0d", d); end else n_capture++;
    end

    // 9: burst of large showers in region 0 overflows its event FIFO
    checking = 0;
    for (int e = 0; e < 30; e++) begin
      @(negedge clk);
      for (int c = 0; c < CAM_COLS; c++) begin l1_pix[P(2, c)] = 1; l1_pix[P(3, c)] = 1; end
      @(negedge clk); l1_pix = '0;
      repeat (12) @(negedge clk);
    end
    repeat (30000) @(negedge clk);
    begin
      int big;
      big = 0;
      while (got_q.size() > 0) begin
        moment_rec_t g;
        g = got_q.pop_front();
        checks++;
        if (g.n == 16'd40) big++; else begin failures++; $display("FAIL burst record n=%0d", g.n); end
      end
      checks++;
      if (l15_overflow[0] == 0 || big + int'(l15_overflow[0]) != 30) begin
        failures++; $display("FAIL burst: %0d records, %0d dropped", big, l15_overflow[0]);
      end else n_overflow++;
    end

    // 10: bad command parity is counted
    l3_cmd(16'h1000);
    cfg_read(16'h3006, d);
    checks++; if (d != 1) begin failures++; $display("FAIL parity errors %0d", d); end else n_parity++;

    // 11: Level 3 reset clears the setup registers of every board
    cfg_write(16'h0012, 32'hFFFF_FFFF);
    l3_cmd(16'h2001);
    repeat (5) @(negedge clk);
    cfg_read(16'h0012, d);
    checks++; if (d != 0) begin failures++; $display("FAIL reset left mask %h", d); end
    cfg_read(16'h3006, d);
    checks++; if (d != 0) begin failures++; $display("FAIL reset left errors %0d", d); end else n_reset++;

    // mechanism coverage
    begin
      int m[14];
      m = '{n_trigger, n_merge, n_dedup, n_pair, n_mask, n_window, n_skew, n_overflow, n_playback,
            n_capture, n_sync, n_parity, n_reset, n_rec};
      $display("mechanisms: trigger %0d merge %0d dedup %0d pair %0d mask %0d window %0d skew %0d overflow %0d",
               n_trigger, n_merge, n_dedup, n_pair, n_mask, n_window, n_skew, n_overflow);
      $display("            playback %0d capture %0d sync %0d parity %0d reset %0d records %0d",
               n_playback, n_capture, n_sync, n_parity, n_reset, n_rec);
      foreach (m[i]) begin checks++; if (m[i] == 0) begin failures++; $display("FAIL mechanism %0d never happened", i); end end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
