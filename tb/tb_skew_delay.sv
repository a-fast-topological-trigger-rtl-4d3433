// tb_skew_delay: checks the per-pixel delay taps. Random inputs and random
// delays per pixel; each output must equal its input from `delay` ticks
// earlier (0 = same tick).
module tb_skew_delay;
  localparam int N = 6;
  logic clk = 0, rst = 1;
  logic [N-1:0] din, dout;
  logic [2:0] delay [N];
  logic [N-1:0] hist [8];
  int checks = 0, failures = 0;

  skew_delay #(.N(N), .MAXD(8)) dut (.clk, .rst, .din, .delay, .dout);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    din = '0;
    for (int i = 0; i < N; i++) delay[i] = 3'(i);
    for (int k = 0; k < 8; k++) hist[k] = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int t = 0; t < 2000; t++) begin
      if (t % 300 == 299) for (int i = 0; i < N; i++) delay[i] = 3'($urandom_range(0, 7));
      din = N'($urandom);
      for (int k = 7; k > 0; k--) hist[k] = hist[k-1];
      hist[0] = din;
      #1;
      for (int i = 0; i < N; i++) begin
        checks++;
        if (dout[i] != hist[delay[i]][i]) begin
          failures++;
          if (failures < 10) $display("FAIL t=%0d pixel %0d delay %0d", t, i, delay[i]);
        end
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
