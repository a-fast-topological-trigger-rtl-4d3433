// tb_sync_fifo: random pushes and pops against a queue model; checks the head
// word, empty, full and level every tick, including writes when full.
module tb_sync_fifo;
  localparam int W = 16, D = 8;
  logic clk = 0, rst = 1, wr_en = 0, rd_en = 0;
  logic [W-1:0] wr_data = '0, rd_data;
  logic full, empty;
  logic [3:0] level;
  int checks = 0, failures = 0, fulls = 0;
  logic [W-1:0] q [$];

  sync_fifo #(.WIDTH(W), .DEPTH(D)) dut (.clk, .rst, .wr_en, .wr_data, .full, .rd_en, .rd_data, .empty, .level);
  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int t = 0; t < 5000; t++) begin
      int bias;
      bias = ((t / 500) % 2) ? 70 : 30;
      wr_en = ($urandom_range(0, 99) < bias);
      rd_en = ($urandom_range(0, 99) < 100 - bias);
      wr_data = W'($urandom);
      #1;
      checks += 3;
      if (empty != (q.size() == 0)) failures++;
      if (full != (q.size() == D)) failures++;
      if (int'(level) != q.size()) failures++;
      if (full) fulls++;
      if (q.size() > 0) begin checks++; if (rd_data != q[0]) begin failures++; if (failures < 10) $display("FAIL head %h exp %h", rd_data, q[0]); end end
      begin
        bit was_full, was_empty;
        was_full = (q.size() == D);
        was_empty = (q.size() == 0);
        @(posedge clk);
        if (rd_en && !was_empty) void'(q.pop_front());
        if (wr_en && !was_full) q.push_back(wr_data);
      end
      @(negedge clk);
    end
    checks++; if (fulls == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
