// tb_diag_capture: nothing is stored before arming; after arming, valid
// words are stored in order until the memory is full, and read back through
// rd_addr; re-arming starts again at address 0.
module tb_diag_capture;
  localparam int W = 20, D = 16;
  logic clk = 0, rst = 1, arm = 0, din_valid = 0;
  logic [W-1:0] din = 0, rd_data;
  logic [3:0] rd_addr = 0;
  logic [4:0] count;
  logic [W-1:0] sent [$];
  int checks = 0, failures = 0;

  diag_capture #(.WIDTH(W), .DEPTH(D)) dut (.clk, .rst, .arm, .din_valid, .din, .rd_addr, .rd_data, .count);
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
    repeat (5) begin din_valid = 1; din = W'($urandom); @(negedge clk); end
    din_valid = 0;
    checks++; if (count != 0) failures++;
    for (int run = 0; run < 2; run++) begin
      int n;
      n = (run == 0) ? 9 : 25;
      sent.delete();
      arm = 1; @(negedge clk); arm = 0;
      for (int i = 0; i < 3 * n; i++) begin
        din_valid = ($urandom_range(0, 2) == 0);
        din = W'($urandom);
        if (din_valid && sent.size() < n) begin
          if (sent.size() < D) sent.push_back(din);
        end else din_valid = 0;
        @(negedge clk);
      end
      din_valid = 0;
      @(negedge clk);
      checks++;
      if (int'(count) != sent.size()) begin failures++; $display("FAIL count %0d exp %0d", count, sent.size()); end
      for (int a = 0; a < sent.size(); a++) begin
        rd_addr = 4'(a); #1;
        checks++;
        if (rd_data != sent[a]) begin failures++; $display("FAIL word %0d", a); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
