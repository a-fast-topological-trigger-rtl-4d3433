// tb_l2_link_rx: sends encoded events (timestamp words then addresses, some
// without addresses) with random gaps and checks the hit entries: one per
// address with the full timestamp and `last` on the final one, or a single
// `empty` entry for an event without addresses, one tick after the word.
module tb_l2_link_rx;
  import trig_pkg::*;
  logic clk = 0, rst = 1;
  link_word_t link_word;
  logic ent_valid;
  hit_entry_t ent;
  hit_entry_t exp_q [$];
  int checks = 0, failures = 0;

  l2_link_rx dut (.clk, .rst, .link_word, .ent_valid, .ent);
  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    #1;
    if (!rst && ent_valid) begin
      checks++;
      if (exp_q.size() == 0) begin failures++; $display("FAIL extra entry"); end
      else begin
        hit_entry_t e;
        e = exp_q.pop_front();
        if (ent != e) begin failures++; if (failures < 10) $display("FAIL entry %h exp %h", ent, e); end
      end
    end
  end

  task automatic send(link_word_t w);
    link_word = w;
    @(negedge clk);
    link_word = '0;
    repeat ($urandom_range(0, 3)) @(negedge clk);
  endtask

  initial begin
    link_word = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int e = 0; e < 200; e++) begin
      logic [31:0] ts; int n;
      ts = $urandom;
      n = (e % 7 == 0) ? 0 : $urandom_range(1, 12);
      if (n == 0) exp_q.push_back('{ts: ts, addr: '0, last: 1'b1, empty: 1'b1});
      send('{valid: 1'b1, typ: LT_TS_HI, last: 1'b0, payload: ts[31:16]});
      send('{valid: 1'b1, typ: LT_TS_LO, last: (n == 0), payload: ts[15:0]});
      for (int i = 0; i < n; i++) begin
        logic [7:0] a;
        a = 8'($urandom_range(0, 199));
        exp_q.push_back('{ts: ts, addr: a, last: (i == n - 1), empty: 1'b0});
        send('{valid: 1'b1, typ: LT_ADDR, last: (i == n - 1), payload: 16'(a)});
      end
    end
    repeat (5) @(negedge clk);
    checks++; if (exp_q.size() != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
