// tb_timestamp_counter: the counter must advance by one per tick and read 0
// on the tick after the sync marker.
module tb_timestamp_counter;
  logic clk = 0, rst = 1, pps = 0;
  logic [31:0] ts;
  int checks = 0, failures = 0;
  longint expv;

  timestamp_counter #(.W(32)) dut (.clk, .rst, .pps, .ts);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 0;
    expv = 0;
    checks++; if (ts != 0) failures++;
    for (int t = 0; t < 1000; t++) begin
      pps = ($urandom_range(0, 99) == 0);
      @(posedge clk); #1;
      expv = pps ? 0 : expv + 1;
      checks++;
      if (ts != 32'(expv)) begin failures++; if (failures < 10) $display("FAIL t=%0d ts=%0d exp=%0d", t, ts, expv); end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
