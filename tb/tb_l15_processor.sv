// tb_l15_processor: one Level 1.5 board at full size (10 x 20 pixels).
// Decodes the ribbon-cable output into events and checks, in turn:
//  - a 3-pixel cluster gives one event with exactly those addresses and the
//    timestamp of the tick two clocks after the input (input register,
//    one-shot, coincidence), counted from the sync marker;
//  - two touching pixels, or three pixels in a row-less scatter, give nothing;
//  - a masked pixel cannot complete a cluster;
//  - a pixel arriving one tick after the cluster is in the event (acceptance
//    window), one arriving well after is not;
//  - with 5 ns stretching, pulses 3 ticks apart only coincide once the early
//    pixel is delayed by 3 ticks (skew adjustment);
//  - a cluster loaded into the diagnostic playback memory triggers;
//  - a burst of large events overflows the event FIFO and every event is
//    either sent or counted as dropped;
//  - the capture memory holds the link words sent after arming.
module tb_l15_processor;
  import trig_pkg::*;
  localparam int R = 10, C = 20, N = R * C;
  logic clk = 0, rst = 1, pps = 0, link_ce;
  logic [N-1:0] l1_in = '0;
  link_word_t link_word;
  logic trig_out;
  logic [15:0] overflow_count;
  logic cfg_we = 0;
  logic [11:0] cfg_addr = 0;
  logic [31:0] cfg_wdata = 0, cfg_rdata;
  logic [2:0] cnt = 0;
  int checks = 0, failures = 0;
  int tick = 0;

  l15_processor dut (.clk, .rst, .pps, .link_ce, .l1_in, .link_word, .trig_out, .overflow_count,
                     .cfg_we, .cfg_addr, .cfg_wdata, .cfg_rdata);
  always #5 clk = ~clk;
  always_ff @(posedge clk) cnt <= rst ? 3'd0 : cnt + 1'b1;
  assign link_ce = (cnt == 3'd7);
  always @(posedge clk) tick++;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- link decoder ----
  typedef struct { logic [31:0] ts; int addrs[$]; } ev_t;
  ev_t evs [$];
  ev_t cur;
  int n_words = 0;
  always @(posedge clk) if (!rst && link_word.valid) begin
    n_words++;
    case (link_word.typ)
      LT_TS_HI: begin cur.addrs.delete(); cur.ts[31:16] = link_word.payload; end
      LT_TS_LO: begin cur.ts[15:0] = link_word.payload; if (link_word.last) evs.push_back(cur); end
      LT_ADDR:  begin cur.addrs.push_back(int'(link_word.payload)); if (link_word.last) evs.push_back(cur); end
      default: ;
    endcase
  end

  function automatic int P(int r, int c); return r * C + c; endfunction

  task automatic cfg_write(logic [11:0] a, logic [31:0] d);
    @(negedge clk); cfg_we = 1; cfg_addr = a; cfg_wdata = d;
    @(negedge clk); cfg_we = 0;
  endtask

  task automatic cfg_read(logic [11:0] a, output logic [31:0] d);
    @(negedge clk); cfg_addr = a;
    @(negedge clk); d = cfg_rdata;
  endtask

  // drive a set of pixels high for one tick
  task automatic pulse(int pix[$]);
    @(negedge clk);
    foreach (pix[i]) l1_in[pix[i]] = 1'b1;
    @(negedge clk);
    l1_in = '0;
  endtask

  task automatic settle(); repeat (600) @(negedge clk); endtask

  task automatic expect_event(string what, int pix[$]);
    int e[$];
    checks++;
    if (evs.size() != 1) begin failures++; $display("FAIL %s: %0d events", what, evs.size()); end
    else begin
      e = pix; e.sort();
      if (evs[0].addrs != e) begin failures++; $display("FAIL %s: %0d addresses, expected %0d", what, evs[0].addrs.size(), e.size()); end
    end
    evs.delete();
  endtask

  task automatic expect_none(string what);
    checks++;
    if (evs.size() != 0) begin failures++; $display("FAIL %s: %0d events", what, evs.size()); end
    evs.delete();
  endtask

  initial begin
    int t_pps, t_in;
    logic [31:0] d;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    // sync marker, then a cluster at a known tick
    @(negedge clk) pps = 1; t_pps = tick + 1; @(negedge clk) pps = 0;
    repeat (37) @(negedge clk);
    t_in = tick + 2;  // rising edge sampling the pulse (pulse waits one tick)
    pulse('{P(4, 5), P(4, 6), P(5, 5)});
    settle();
    checks++;
    if (evs.size() == 1 && evs[0].ts != 32'(t_in + 2 - t_pps)) begin
      failures++; $display("FAIL timestamp %0d expected %0d", evs[0].ts, t_in + 2 - t_pps);
    end
    expect_event("cluster", '{P(4, 5), P(4, 6), P(5, 5)});

    pulse('{P(2, 2), P(2, 3)});
    settle();
    expect_none("pair");
    pulse('{P(1, 1), P(1, 3), P(3, 1)});
    settle();
    expect_none("scatter");

    // mask pixel (4,6) = 86: lane 2 bit 22
    cfg_write(12'h012, 32'h1 << (P(4, 6) - 64));
    pulse('{P(4, 5), P(4, 6), P(5, 5)});
    settle();
    expect_none("masked");
    cfg_write(12'h012, 32'h0);

    // acceptance window (3 ticks): a late pixel joins, a much later one not
    @(negedge clk);
    l1_in[P(7, 10)] = 1; l1_in[P(7, 11)] = 1; l1_in[P(8, 10)] = 1;
    @(negedge clk);
    l1_in = '0; l1_in[P(0, 18)] = 1;
    @(negedge clk);
    l1_in = '0;
    repeat (6) @(negedge clk);
    l1_in[P(0, 0)] = 1;
    @(negedge clk);
    l1_in = '0;
    settle();
    expect_event("window", '{P(7, 10), P(7, 11), P(8, 10), P(0, 18)});

    // skew: 5 ns stretch, early pixel 3 ticks ahead
    cfg_write(12'h000, 32'h0000_0302);
    @(negedge clk); l1_in[P(6, 2)] = 1; @(negedge clk); l1_in = '0;
    repeat (2) @(negedge clk);
    l1_in[P(6, 3)] = 1; l1_in[P(7, 2)] = 1; @(negedge clk); l1_in = '0;
    settle();
    expect_none("skewed, not adjusted");
    cfg_write(12'h100 + 12'(P(6, 2)), 32'd3);
    @(negedge clk); l1_in[P(6, 2)] = 1; @(negedge clk); l1_in = '0;
    repeat (2) @(negedge clk);
    l1_in[P(6, 3)] = 1; l1_in[P(7, 2)] = 1; @(negedge clk); l1_in = '0;
    settle();
    expect_event("skew adjusted", '{P(6, 2), P(6, 3), P(7, 2)});
    cfg_write(12'h100 + 12'(P(6, 2)), 32'd0);
    cfg_write(12'h000, 32'h0000_0304);

    // diagnostic playback: word 2 of 4 holds a cluster at (9,17),(9,18),(8,17)
    for (int w = 0; w < 4; w++)
      for (int l = 0; l < 7; l++) begin
        logic [223:0] v;
        v = '0;
        if (w == 2) begin v[P(9, 17)] = 1; v[P(9, 18)] = 1; v[P(8, 17)] = 1; end
        cfg_write(12'h400 + 12'(w * 8 + l), v[l*32 +: 32]);
      end
    cfg_write(12'h001, 32'd4);
    cfg_write(12'h000, 32'h0001_0304);
    settle();
    expect_event("playback", '{P(9, 17), P(9, 18), P(8, 17)});

    // capture memory + FIFO overflow: 30 large events 12 ticks apart
    cfg_write(12'h000, 32'h0002_0304);
    begin
      int n_ev;
      for (int e = 0; e < 30; e++) begin
        @(negedge clk);
        for (int c = 0; c < C; c++) begin l1_in[P(2, c)] = 1; l1_in[P(3, c)] = 1; end
        @(negedge clk); l1_in = '0;
        repeat (10) @(negedge clk);
      end
      repeat (20000) @(negedge clk);
      n_ev = evs.size();
      checks++;
      if (overflow_count == 0 || n_ev + int'(overflow_count) != 30) begin
        failures++; $display("FAIL overflow: %0d sent, %0d dropped", n_ev, overflow_count);
      end
      checks++;
      if (n_ev < 16) begin failures++; $display("FAIL only %0d events sent", n_ev); end
      foreach (evs[i]) begin checks++; if (evs[i].addrs.size() != 40) failures++; end
      cfg_read(12'h003, d);
      checks++;
      if (int'(d) != 256) begin failures++; $display("FAIL capture count %0d", d); end
      cfg_read(12'h800, d);
      checks++;
      if (d[19:0] != {1'b1, LT_TS_HI, 1'b0, evs[0].ts[31:16]}) begin failures++; $display("FAIL captured word %h", d); end
      cfg_read(12'h002, d);
      checks++; if (d[15:0] != overflow_count) failures++;
      cfg_read(12'h004, d);   // all sent: FIFO empty, encoder idle
      checks++; if (d != 0) begin failures++; $display("FAIL status %h after drain", d); end
      evs.delete();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
