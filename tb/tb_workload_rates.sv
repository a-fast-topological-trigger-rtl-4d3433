// tb_workload_rates: the full crate (500 pixels, three L1.5 boards, one L2
// board, all at their default sizes) under the rates the trigger is meant for.
//
// Part 1, event rate at the default merge timeout: 48 compact three-pixel
//   showers seen by one L1.5 board only, one every 40 ticks (100 ns, a 10 MHz
//   event rate). Every record must come out with the right count, moments and
//   timestamp, nothing may be dropped, and the spacing of the records is
//   measured. A fragment from a single board keeps the merger waiting for the
//   other boards until its timeout runs out, so the spacing is expected to be
//   about the timeout (64 ticks) plus the few ticks of draining the fragment.
// Part 2, the same 48 showers with the timeout set to 16 ticks through the
//   setup bus. The ribbon cable is then the bottleneck: 2 timestamp words and
//   3 addresses at 20 ns each, 100 ns per event, so the crate must keep up with
//   10 MHz: records spaced by 40 ticks on average and nothing dropped.
// Part 3, night-sky background: every one of the 500 pixels fires at random
//   with a mean rate of 10 MHz (probability 1/40 per 2.5 ns tick) for 2000
//   ticks, with 5 ns one-shots. The coincidence then fires far more often than
//   the links can carry, so event FIFOs overflow. Every record that comes out
//   must still be a well-formed frame with at least three pixels and moments
//   that a set of pixels can have (n * sum x^2 >= (sum x)^2, the same for y).
//   Afterwards the crate must have drained and must again deliver the exact
//   record of a known shower.
// The rates and the expected spacing come from the trigger's design targets;
// the shower shapes, the part lengths and the bounds are this test's choices.
module tb_workload_rates;
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

  localparam int N_EV   = 48;
  localparam int PERIOD = 40;    // ticks between showers: 100 ns = 10 MHz

  camera_trigger_top dut (.clk, .rst, .l1_pix, .l3_rx_valid, .l3_rx_word, .l3_tx_valid, .l3_tx_word, .l3_tx_ready,
                          .rec_valid, .rec, .l15_trig, .l15_overflow, .cfg_we, .cfg_addr, .cfg_wdata, .cfg_rdata);
  always #5 clk = ~clk;
  always @(posedge clk) tick++;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef struct { logic [31:0] ts; int n, sx, sy, sxx, syy, sxy; } exp_t;
  exp_t exp_q [$];
  int t_sync;

  function automatic int P(int r, int c); return r * CAM_COLS + c; endfunction

  function automatic exp_t moments(int ids[$]);
    exp_t e;
    e.ts = 0; e.n = 0; e.sx = 0; e.sy = 0; e.sxx = 0; e.syy = 0; e.sxy = 0;
    foreach (ids[i]) begin
      int r, c, x, y;
      r = ids[i] / CAM_COLS; c = ids[i] % CAM_COLS; x = 2 * c + (r % 2); y = r;
      e.n++; e.sx += x; e.sy += y; e.sxx += x * x; e.syy += y * y; e.sxy += x * y;
    end
    return e;
  endfunction

  // ---- frame decoder and record timing ----
  logic [15:0] fw [$];
  moment_rec_t got_q [$];
  int n_frames = 0, n_recv = 0, t_first = 0, t_last = 0;
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
      n_frames++;
      fw.delete();
    end
  end
  always @(negedge clk) if (!rst && rec_valid) begin
    if (n_recv == 0) t_first = tick;
    t_last = tick;
    n_recv++;
  end

  task automatic cfg_write(logic [15:0] a, logic [31:0] d);
    @(negedge clk); cfg_we = 1; cfg_addr = a; cfg_wdata = d;
    @(negedge clk); cfg_we = 0;
  endtask
  task automatic cfg_read(logic [15:0] a, output logic [31:0] d);
    @(negedge clk); cfg_addr = a;
    @(negedge clk); d = cfg_rdata;
  endtask

  // Light a row of three touching pixels for one tick; `gap` ticks follow.
  task automatic shower3(int r, int c, int gap);
    exp_t e;
    int ids[$];
    ids = '{P(r, c), P(r, c + 1), P(r, c + 2)};
    @(negedge clk);
    foreach (ids[i]) l1_pix[ids[i]] = 1'b1;
    e = moments(ids);
    e.ts = 32'(tick + 1 + 2 - t_sync);
    exp_q.push_back(e);
    @(negedge clk);
    l1_pix = '0;
    repeat (gap - 2) @(negedge clk);
  endtask

  task automatic compare_all();
    while (got_q.size() > 0) begin
      moment_rec_t g; exp_t e;
      g = got_q.pop_front();
      checks++;
      if (exp_q.size() == 0) begin failures++; $display("FAIL unexpected record n=%0d ts=%0d", g.n, g.ts); end
      else begin
        e = exp_q.pop_front();
        if (int'(g.n) != e.n || int'(g.sx) != e.sx || int'(g.sy) != e.sy || int'(g.sxx) != e.sxx ||
            int'(g.syy) != e.syy || int'(g.sxy) != e.sxy || g.ts != e.ts) begin
          failures++;
          $display("FAIL record: n %0d/%0d sx %0d/%0d sy %0d/%0d ts %0d/%0d", g.n, e.n, g.sx, e.sx, g.sy, e.sy, g.ts, e.ts);
        end
      end
    end
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("FAIL %0d records missing", exp_q.size()); exp_q.delete(); end
  endtask

  // Wait until no record has appeared for `quiet` ticks.
  task automatic wait_quiet(int quiet);
    int last_n, still;
    last_n = n_frames; still = 0;
    while (still < quiet) begin
      @(negedge clk);
      if (n_frames != last_n || l3_tx_valid) begin last_n = n_frames; still = 0; end
      else still++;
    end
  endtask

  // One run of N_EV single-board showers; returns the mean record spacing x10.
  task automatic rate_run(string name, output int spacing10, output int worst_lat);
    logic [31:0] d;
    int ov0, ov1, lat;
    int inj_t [$];
    ov0 = int'(l15_overflow[0]);
    n_recv = 0;
    for (int e = 0; e < N_EV; e++) begin
      inj_t.push_back(tick + 1);
      shower3(2 + (e % 4), 1 + (e % 15), PERIOD);   // rows 2..5: board 0 only
    end
    wait_quiet(400);
    ov1 = int'(l15_overflow[0]);
    checks++;
    if (n_recv != N_EV) begin failures++; $display("FAIL %s: %0d of %0d records", name, n_recv, N_EV); end
    spacing10 = (n_recv > 1) ? (10 * (t_last - t_first)) / (n_recv - 1) : 0;
    lat = t_last - inj_t[inj_t.size() - 1];
    worst_lat = lat;
    checks++;
    if (ov1 != ov0) begin failures++; $display("FAIL %s: %0d events dropped at L1.5", name, ov1 - ov0); end
    cfg_read(16'h3005, d);
    checks++;
    if (d != 0) begin failures++; $display("FAIL %s: %0d hit entries dropped at L2", name, d); end
    compare_all();
    $display("%s: %0d showers every %0d ticks -> %0d records, spacing %0d.%0d ticks (%0d kHz), last latency %0d ticks",
             name, N_EV, PERIOD, n_recv, spacing10 / 10, spacing10 % 10,
             (spacing10 > 0) ? 4000000 / spacing10 : 0, lat);
  endtask

  initial begin
    logic [31:0] d;
    int sp_a, sp_b, lat_a, lat_b;
    int noise_recs, noise_trig, rec_before;
    repeat (4) @(posedge clk);
    @(negedge clk) rst = 0;
    repeat (10) @(negedge clk);
    @(negedge clk); l3_rx_valid = 1; l3_rx_word = 16'h1001;   // SYNC, even parity
    @(negedge clk); l3_rx_valid = 0;
    t_sync = tick + 1;
    repeat (50) @(negedge clk);

    // ---- part 1: default timeout ----
    cfg_read(16'h3001, d);
    checks++;
    if (d != 64) begin failures++; $display("FAIL default timeout %0d", d); end
    rate_run("default timeout", sp_a, lat_a);
    checks++;
    // spacing = timeout + draining 3 entries + a few ticks of hand-over
    if (sp_a < 640 || sp_a > 800) begin failures++; $display("FAIL spacing %0d/10 outside 64..80", sp_a); end

    // ---- part 2: short timeout, link-limited ----
    cfg_write(16'h3001, 32'd16);
    rate_run("timeout 16", sp_b, lat_b);
    checks++;
    if (sp_b > 10 * PERIOD + 5) begin failures++; $display("FAIL 10 MHz not sustained: spacing %0d/10", sp_b); end
    checks++;
    if (lat_b > 200) begin failures++; $display("FAIL latency %0d ticks", lat_b); end
    cfg_write(16'h3001, 32'd64);

    // ---- part 3: night-sky background on all pixels ----
    for (int b = 0; b < N_REGIONS; b++) cfg_write(16'(b << 12), 32'h0000_0302);  // window 3, width 2 (5 ns)
    repeat (20) @(negedge clk);
    rec_before = n_frames;
    noise_trig = 0;
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      for (int p = 0; p < CAM_PIXELS; p++) l1_pix[p] = ($urandom_range(0, 39) == 0);
      if (|l15_trig) noise_trig++;
    end
    @(negedge clk) l1_pix = '0;
    wait_quiet(3000);
    noise_recs = n_frames - rec_before;
    cfg_read(16'h3005, d);
    begin
      int bad;
      longint max_x, max_y, max_n;
      bad = 0; max_x = 64'(2 * CAM_COLS - 1); max_y = 64'(CAM_ROWS) - 1; max_n = 64'(CAM_PIXELS);
      while (got_q.size() > 0) begin
        moment_rec_t g;
        longint n, sx, sy, sxx, syy;
        g = got_q.pop_front();
        n = longint'(g.n); sx = longint'(g.sx); sy = longint'(g.sy);
        sxx = longint'(g.sxx); syy = longint'(g.syy);
        checks++;
        if ((d == 0 && n < 3) || n > max_n || n * sxx < sx * sx || n * syy < sy * sy ||
            sx > n * max_x || sy > n * max_y) begin
          bad++; failures++;
          $display("FAIL noise record n=%0d sx=%0d sy=%0d sxx=%0d syy=%0d", g.n, g.sx, g.sy, g.sxx, g.syy);
        end
      end
      $display("night sky: %0d trigger ticks, %0d records, L1.5 drops %0d/%0d/%0d, L2 entry drops %0d, bad %0d",
               noise_trig, noise_recs, l15_overflow[0], l15_overflow[1], l15_overflow[2], d, bad);
    end
    checks++;
    if (noise_trig == 0 || noise_recs == 0) begin failures++; $display("FAIL noise produced no events"); end
    checks++;
    if (l15_overflow[0] + l15_overflow[1] + l15_overflow[2] == 0) begin
      failures++; $display("FAIL expected event FIFO overflow under 10 MHz noise");
    end
    exp_q.delete();

    // recovery: one known shower in band 2 only (rows 18..23)
    for (int b = 0; b < N_REGIONS; b++) cfg_write(16'(b << 12), 32'h0000_0304);
    repeat (20) @(negedge clk);
    shower3(20, 6, 10);
    wait_quiet(400);
    compare_all();

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
