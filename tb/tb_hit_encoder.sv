// tb_hit_encoder: feeds random events (pattern, timestamp) from a queue
// that stands in for the event FIFO and decodes the ribbon-cable words. Each
// event must give timestamp high, timestamp low and then every set pixel
// address in increasing order with `last` on the final word, and words must
// be exactly one 50 MHz period (8 ticks) apart within an event.
module tb_hit_encoder;
  import trig_pkg::*;
  localparam int N = 24;
  logic clk = 0, rst = 1, link_ce;
  logic ev_empty, ev_pop, busy;
  logic [N-1:0] ev_pattern;
  logic [31:0] ev_ts;
  link_word_t link_word;
  int checks = 0, failures = 0;
  logic [2:0] cnt = 0;
  logic [N-1:0] pats [$];
  logic [31:0] tss [$];

  hit_encoder #(.N(N)) dut (.clk, .rst, .link_ce, .ev_empty, .ev_pattern, .ev_ts, .ev_pop, .link_word, .busy);
  always #5 clk = ~clk;
  always_ff @(posedge clk) cnt <= rst ? 3'd0 : cnt + 1'b1;
  assign link_ce = (cnt == 3'd7);
  assign ev_empty = (pats.size() == 0);
  assign ev_pattern = ev_empty ? '0 : pats[0];
  assign ev_ts = ev_empty ? '0 : tss[0];

  always @(posedge clk) begin
    bit p;
    p = ev_pop && !ev_empty;
    #1;
    if (p) begin void'(pats.pop_front()); void'(tss.pop_front()); end
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected word stream
  link_word_t exp_q [$];
  initial begin : gen
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int e = 0; e < 60; e++) begin
      logic [N-1:0] p; logic [31:0] ts; int last_i;
      p = (e % 10 == 0) ? '0 : (N'($urandom) & N'($urandom));
      ts = $urandom;
      last_i = -1;
      for (int i = 0; i < N; i++) if (p[i]) last_i = i;
      exp_q.push_back('{valid: 1'b1, typ: LT_TS_HI, last: 1'b0, payload: ts[31:16]});
      exp_q.push_back('{valid: 1'b1, typ: LT_TS_LO, last: (p == 0), payload: ts[15:0]});
      for (int i = 0; i < N; i++) if (p[i])
        exp_q.push_back('{valid: 1'b1, typ: LT_ADDR, last: (i == last_i), payload: 16'(i)});
      pats.push_back(p); tss.push_back(ts);
      repeat ($urandom_range(0, 60)) @(negedge clk);
    end
  end

  int words = 0, last_t = -1, t = 0;
  bit in_event = 0;
  always @(posedge clk) begin
    t++;
    if (!rst && link_word.valid) begin
      link_word_t e;
      checks++;
      if (exp_q.size() == 0) begin failures++; $display("FAIL extra word"); end
      else begin
        e = exp_q.pop_front();
        if (link_word != e) begin failures++; if (failures < 10) $display("FAIL word %h exp %h", link_word, e); end
      end
      if (in_event) begin checks++; if (t - last_t != 8) begin failures++; $display("FAIL spacing %0d", t - last_t); end end
      in_event = !link_word.last;
      last_t = t;
      words++;
    end
  end

  initial begin
    wait (rst == 0);
    wait (words > 0 && exp_q.size() == 0 && pats.size() == 0 && !busy);
    repeat (40) @(posedge clk);
    checks++; if (exp_q.size() != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
