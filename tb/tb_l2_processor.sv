// tb_l2_processor: the Level 2 board fed with ribbon-cable words for three
// boards. Random events put pixels on one to three boards, often including
// pixels of the rows two boards share (sent by both). Each record sent
// towards Level 3 is decoded from its 16-bit frame and compared with the
// count and moments computed here from the distinct camera pixels (x = 2 *
// column + row parity, y = row). Also checked: Level 3 SYNC gives pps_out,
// a bad-parity command is counted, RESET gives sys_reset, link words replayed
// from the diagnostic memory build an event, the capture memory holds the
// frames, and back-pressure on the Level 3 side loses nothing.
module tb_l2_processor;
  import trig_pkg::*;
  localparam int NR = 3;
  logic clk = 0, rst = 1, link_ce;
  link_word_t link_in [NR];
  logic l3_rx_valid = 0;
  logic [15:0] l3_rx_word = 0;
  logic l3_tx_valid, l3_tx_ready = 1;
  logic [15:0] l3_tx_word;
  logic pps_out, sys_reset, rec_valid;
  moment_rec_t rec;
  logic cfg_we = 0;
  logic [11:0] cfg_addr = 0;
  logic [31:0] cfg_wdata = 0, cfg_rdata;
  logic [2:0] cnt = 0;
  int checks = 0, failures = 0;

  l2_processor dut (.clk, .rst, .link_ce, .link_in, .l3_rx_valid, .l3_rx_word, .l3_tx_valid, .l3_tx_word,
                    .l3_tx_ready, .pps_out, .sys_reset, .rec_valid, .rec, .cfg_we, .cfg_addr, .cfg_wdata, .cfg_rdata);
  always #5 clk = ~clk;
  always_ff @(posedge clk) cnt <= rst ? 3'd0 : cnt + 1'b1;
  assign link_ce = (cnt == 3'd7);

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- link word sources ----
  link_word_t wq [NR][$];
  always @(negedge clk) begin
    for (int r = 0; r < NR; r++) begin
      link_in[r] = '0;
      if (cnt == 3'd0 && !rst && wq[r].size() > 0) link_in[r] = wq[r].pop_front();
    end
  end

  function automatic link_word_t lw(link_type_e t, bit last, logic [15:0] p);
    return '{valid: 1'b1, typ: t, last: last, payload: p};
  endfunction

  // ---- expected records ----
  typedef struct { logic [31:0] ts; longint n, sx, sy, sxx, syy, sxy; } exp_t;
  exp_t exp_q [$];

  function automatic exp_t moments(logic [31:0] ts, int ids[$]);
    exp_t e; bit seen [500];
    e.ts = ts; e.n = 0; e.sx = 0; e.sy = 0; e.sxx = 0; e.syy = 0; e.sxy = 0;
    foreach (seen[i]) seen[i] = 0;
    foreach (ids[i]) if (!seen[ids[i]]) begin
      int r, c, x, y;
      seen[ids[i]] = 1;
      r = ids[i] / 20; c = ids[i] % 20; x = 2 * c + (r % 2); y = r;
      e.n++; e.sx += x; e.sy += y; e.sxx += x * x; e.syy += y * y; e.sxy += x * y;
    end
    return e;
  endfunction

  int n_dup_events = 0, n_multi = 0;

  // send one event: per board a sorted list of local addresses
  task automatic send_event(logic [31:0] ts, int addrs[NR][$]);
    int ids[$];
    for (int r = 0; r < NR; r++) if (addrs[r].size() > 0) begin
      wq[r].push_back(lw(LT_TS_HI, 0, ts[31:16]));
      wq[r].push_back(lw(LT_TS_LO, 0, ts[15:0]));
      foreach (addrs[r][i]) begin
        wq[r].push_back(lw(LT_ADDR, i == addrs[r].size() - 1, 16'(addrs[r][i])));
        ids.push_back((8 * r + addrs[r][i] / 20) * 20 + addrs[r][i] % 20);
      end
    end
    exp_q.push_back(moments(ts, ids));
  endtask

  // ---- frame decoder ----
  logic [15:0] fw [$];
  int n_rec = 0;
  always @(posedge clk) if (!rst && l3_tx_valid && l3_tx_ready) begin
    fw.push_back(l3_tx_word);
    if (fw.size() == 15) begin
      logic [15:0] chk; exp_t e;
      chk = '0;
      for (int i = 0; i < 14; i++) chk ^= fw[i];
      checks++;
      if (fw[0] != 16'hA55A || chk != fw[14]) begin failures++; $display("FAIL frame header/check"); end
      if (exp_q.size() == 0) begin failures++; $display("FAIL unexpected record"); end
      else begin
        e = exp_q.pop_front();
        checks++;
        if ({fw[1], fw[2]} != e.ts || 64'(fw[3]) != e.n || 64'({fw[4], fw[5]}) != e.sx || 64'({fw[6], fw[7]}) != e.sy ||
            64'({fw[8], fw[9]}) != e.sxx || 64'({fw[10], fw[11]}) != e.syy || 64'({fw[12], fw[13]}) != e.sxy) begin
          failures++;
          $display("FAIL record ts %0d: n %0d/%0d sx %0d/%0d sy %0d/%0d", {fw[1], fw[2]}, fw[3], e.n, {fw[4], fw[5]}, e.sx, {fw[6], fw[7]}, e.sy);
        end
      end
      n_rec++;
      fw.delete();
    end
  end

  always @(negedge clk) l3_tx_ready = ($urandom_range(0, 3) != 0);

  task automatic cfg_write(logic [11:0] a, logic [31:0] d);
    @(negedge clk); cfg_we = 1; cfg_addr = a; cfg_wdata = d;
    @(negedge clk); cfg_we = 0;
  endtask
  task automatic cfg_read(logic [11:0] a, output logic [31:0] d);
    @(negedge clk); cfg_addr = a;
    @(negedge clk); d = cfg_rdata;
  endtask

  int seen_pps = 0, seen_reset = 0;
  always @(negedge clk) begin
    if (pps_out) seen_pps++;
    if (sys_reset) seen_reset++;
  end

  initial begin
    logic [31:0] d;
    int addrs [NR][$];
    for (int r = 0; r < NR; r++) link_in[r] = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    cfg_write(12'h002, 32'h2);   // arm capture
    for (int e = 0; e < 40; e++) begin
      int nb;
      for (int r = 0; r < NR; r++) addrs[r].delete();
      nb = 0;
      for (int r = 0; r < NR; r++) begin
        if (r == e % 3 || $urandom_range(0, 1) == 0) begin
          bit used [200];
          int n;
          foreach (used[i]) used[i] = 0;
          n = $urandom_range(1, 8);
          // shared rows: region r rows 8,9 = region r+1 rows 0,1
          if (r < NR - 1 && e % 2 == 0) begin
            int a; a = 160 + $urandom_range(0, 39);
            if (r + 1 < NR) begin
              used[a] = 1; addrs[r].push_back(a);
              addrs[r + 1].push_back(a - 160);
              n_dup_events++;
            end
          end
          for (int i = 0; i < n; i++) begin
            int a; a = $urandom_range(0, (r == 2) ? 179 : 199);
            if (!used[a]) begin used[a] = 1; addrs[r].push_back(a); end
          end
          nb++;
        end
      end
      for (int r = 0; r < NR; r++) begin
        int tmp[$]; bit s2 [200];
        tmp.delete();
        foreach (s2[i]) s2[i] = 0;
        foreach (addrs[r][i]) if (!s2[addrs[r][i]]) begin s2[addrs[r][i]] = 1; tmp.push_back(addrs[r][i]); end
        tmp.sort(); addrs[r] = tmp;
      end
      if (nb > 1) n_multi++;
      send_event(32'(5000 + e * 3000), addrs);
      repeat (1200) @(negedge clk);
    end
    // Level 3 commands
    @(negedge clk); l3_rx_valid = 1; l3_rx_word = 16'h1001; @(negedge clk); l3_rx_valid = 0;  // SYNC, parity good
    @(negedge clk); l3_rx_valid = 1; l3_rx_word = 16'h1000; @(negedge clk); l3_rx_valid = 0;  // SYNC, parity bad
    repeat (3) @(negedge clk);
    checks++; if (seen_pps != 1) begin failures++; $display("FAIL pps %0d", seen_pps); end
    cfg_read(12'h006, d);
    checks++; if (d != 1) begin failures++; $display("FAIL command errors %0d", d); end
    // playback: one event of board 1, three pixels
    begin
      link_word_t pw [5];
      int ids[$];
      pw[0] = lw(LT_TS_HI, 0, 16'h0001); pw[1] = lw(LT_TS_LO, 0, 16'h2345);
      pw[2] = lw(LT_ADDR, 0, 16'd21); pw[3] = lw(LT_ADDR, 0, 16'd22); pw[4] = lw(LT_ADDR, 1, 16'd41);
      for (int w = 0; w < 5; w++) begin
        logic [59:0] v;
        v = '0; v[20 +: 20] = pw[w];
        cfg_write(12'h400 + 12'(2 * w), v[31:0]);
        cfg_write(12'h401 + 12'(2 * w), 32'(v[59:32]));
      end
      ids = '{(8 + 1) * 20 + 1, (8 + 1) * 20 + 2, (8 + 2) * 20 + 1};
      exp_q.push_back(moments(32'h0001_2345, ids));
      cfg_write(12'h003, 32'd5);
      cfg_write(12'h002, 32'h1);
      repeat (1500) @(negedge clk);
    end
    checks++; if (exp_q.size() != 0) begin failures++; $display("FAIL %0d records missing", exp_q.size()); end
    checks++; if (n_rec != 41 || n_dup_events == 0 || n_multi == 0) begin failures++; $display("FAIL %0d records", n_rec); end
    cfg_read(12'h009, d);
    checks++; if (d != 256) begin failures++; $display("FAIL capture count %0d", d); end
    cfg_read(12'h800, d);
    checks++; if (d != 32'hA55A) begin failures++; $display("FAIL captured word %h", d); end
    cfg_read(12'h008, d);
    checks++; if (d == 0) begin failures++; $display("FAIL no duplicate removed"); end
    // all drained: input FIFOs, record FIFO and moment pipeline idle
    for (int i = 0; i < 3; i++) begin
      cfg_read(12'(12'h00A + i), d);
      checks++; if (d != 0) begin failures++; $display("FAIL input FIFO %0d holds %0d", i, d); end
    end
    cfg_read(12'h00F, d);
    checks++; if (d != 0) begin failures++; $display("FAIL L2 status %h after drain", d); end
    // reset command
    @(negedge clk); l3_rx_valid = 1; l3_rx_word = 16'h2001; @(negedge clk); l3_rx_valid = 0;  // RESET
    repeat (3) @(negedge clk);
    checks++; if (seen_reset != 1) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
