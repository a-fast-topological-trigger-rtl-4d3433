// tb_l2_record_framer: random records, random back-pressure on tx_ready;
// checks every frame word (header, timestamp, count, the five moments high
// word first, XOR check word) and that no record is taken while a frame is
// being sent. With tx_ready always high a frame takes 15 ticks.
module tb_l2_record_framer;
  import trig_pkg::*;
  logic clk = 0, rst = 1;
  logic rec_valid = 0, rec_ready, tx_valid, tx_ready = 1;
  moment_rec_t rec;
  logic [15:0] tx_word;
  logic [15:0] exp_q [$];
  int checks = 0, failures = 0;

  l2_record_framer dut (.clk, .rst, .rec_valid, .rec, .rec_ready, .tx_valid, .tx_word, .tx_ready);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (!rst && tx_valid && tx_ready) begin
      checks++;
      if (exp_q.size() == 0) begin failures++; $display("FAIL extra word"); end
      else begin
        logic [15:0] e;
        e = exp_q.pop_front();
        if (tx_word != e) begin failures++; if (failures < 10) $display("FAIL word %h exp %h", tx_word, e); end
      end
    end
  end

  initial begin
    rec = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int e = 0; e < 100; e++) begin
      logic [15:0] w [15];
      logic [15:0] chk;
      int t0, dt;
      rec = '{ts: $urandom, n: 16'($urandom), sx: 24'($urandom), sy: 24'($urandom),
              sxx: $urandom, syy: $urandom, sxy: $urandom};
      w[0] = 16'hA55A; w[1] = rec.ts[31:16]; w[2] = rec.ts[15:0]; w[3] = rec.n;
      w[4] = 16'(32'(rec.sx) >> 16); w[5] = rec.sx[15:0];
      w[6] = 16'(32'(rec.sy) >> 16); w[7] = rec.sy[15:0];
      w[8] = rec.sxx[31:16]; w[9] = rec.sxx[15:0]; w[10] = rec.syy[31:16]; w[11] = rec.syy[15:0];
      w[12] = rec.sxy[31:16]; w[13] = rec.sxy[15:0];
      chk = '0;
      for (int i = 0; i < 14; i++) chk ^= w[i];
      w[14] = chk;
      for (int i = 0; i < 15; i++) exp_q.push_back(w[i]);
      while (!rec_ready) @(negedge clk);
      rec_valid = 1; @(negedge clk); rec_valid = 0;
      t0 = 0;
      while (tx_valid) begin
        tx_ready = (e < 50) ? 1'b1 : ($urandom_range(0, 2) != 0);
        checks++;
        if (rec_ready) begin failures++; $display("FAIL ready while busy"); end
        @(negedge clk); t0++;
      end
      tx_ready = 1;
      if (e < 50) begin checks++; if (t0 != 15) begin failures++; $display("FAIL frame took %0d", t0); end end
    end
    repeat (3) @(negedge clk);
    checks++; if (exp_q.size() != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
