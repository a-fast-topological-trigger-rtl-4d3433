// tb_moment_accumulator: random events of random camera pixels, some sent
// twice (as pixels of shared rows are), and checks N, sum X, sum Y, sum X^2,
// sum Y^2, sum XY and the timestamp of each record against sums computed here
// over the distinct pixels. The record must appear three ticks after ev_end.
// Every third event starts on the tick after the previous one ended.
module tb_moment_accumulator;
  import trig_pkg::*;
  logic clk = 0, rst = 1;
  logic ev_start = 0, hit_valid = 0, ev_end = 0;
  logic [31:0] ev_ts = 0;
  logic [8:0] cam_id = 0;
  logic [7:0] x = 0, y = 0;
  logic rec_valid;
  moment_rec_t rec;
  logic [15:0] dup_count;
  int checks = 0, failures = 0, dups = 0;

  moment_accumulator dut (.clk, .rst, .ev_start, .ev_ts, .hit_valid, .cam_id, .x, .y, .ev_end, .rec_valid, .rec, .dup_count);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int e = 0; e < 200; e++) begin
      bit seen [500];
      longint n, sx, sy, sxx, syy, sxy;
      int npix, lat;
      logic [31:0] ts;
      foreach (seen[i]) seen[i] = 0;
      n = 0; sx = 0; sy = 0; sxx = 0; syy = 0; sxy = 0;
      ts = $urandom;
      ev_start = 1; ev_ts = ts; @(negedge clk); ev_start = 0; ev_ts = 0;
      npix = $urandom_range(0, 60);
      for (int i = 0; i < npix; i++) begin
        int id, r, c;
        id = (i > 0 && $urandom_range(0, 4) == 0) ? int'(cam_id) : $urandom_range(0, 499);
        r = id / 20; c = id % 20;
        hit_valid = 1; cam_id = 9'(id); x = 8'(2 * c + (r % 2)); y = 8'(r);
        if (seen[id]) dups++;
        else begin
          seen[id] = 1;
          n++; sx += x; sy += y; sxx += x * x; syy += y * y; sxy += x * y;
        end
        @(negedge clk);
        hit_valid = 0;
        if ($urandom_range(0, 3) == 0) @(negedge clk);
      end
      ev_end = 1; @(negedge clk); ev_end = 0;
      if (e % 3 == 0) begin
        // back to back: next event starts now, record of this one checked later
        ev_start = 1; @(negedge clk); ev_start = 0;
        lat = 2;
        while (!rec_valid && lat < 20) begin @(negedge clk); lat++; end
        checks += 2;
        if (lat != 3) begin failures++; $display("FAIL latency %0d", lat); end
      end else begin
        lat = 1;
        while (!rec_valid && lat < 20) begin @(negedge clk); lat++; end
        checks += 2;
        if (lat != 3) begin failures++; $display("FAIL latency %0d", lat); end
      end
      if (rec.n != 16'(n) || rec.sx != 24'(sx) || rec.sy != 24'(sy) || rec.sxx != 32'(sxx) ||
          rec.syy != 32'(syy) || rec.sxy != 32'(sxy) || rec.ts != ts) begin
        failures++;
        $display("FAIL event %0d: n %0d/%0d sx %0d/%0d sxx %0d/%0d", e, rec.n, n, rec.sx, sx, rec.sxx, sxx);
      end
    end
    checks++; if (int'(dup_count) != dups || dups == 0) begin failures++; $display("FAIL dups %0d/%0d", dup_count, dups); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
