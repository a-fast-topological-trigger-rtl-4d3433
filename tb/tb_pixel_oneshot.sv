// tb_pixel_oneshot: checks the per-pixel one-shot against a cycle model.
// Random Level 1 pulses and random widths; every tick the stretched output is
// compared with a reference that tracks edges and remaining length per pixel.
// A directed pass checks that a single edge gives exactly `width` high ticks
// starting one tick after the edge.
module tb_pixel_oneshot;
  localparam int N = 8;
  logic clk = 0, rst = 1;
  logic [4:0] width;
  logic [N-1:0] din, dout;
  int checks = 0, failures = 0;

  pixel_oneshot #(.N(N), .WBITS(5)) dut (.clk, .rst, .width, .din, .dout);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int rem [N];
  logic [N-1:0] prev;

  initial begin
    din = '0; width = 5'd4;
    repeat (3) @(posedge clk);
    rst = 0;
    for (int i = 0; i < N; i++) rem[i] = 0;
    prev = '0;
    // directed: one edge, count the high ticks
    for (int w = 2; w <= 16; w += 7) begin
      int high, first;
      width = 5'(w);
      @(negedge clk) din[0] = 1'b1;
      @(negedge clk) din[0] = 1'b0;
      high = 0; first = -1;
      for (int t = 0; t < 30; t++) begin
        if (dout[0]) begin high++; if (first < 0) first = t; end
        @(negedge clk);
      end
      checks++;
      if (high != w || first != 0) begin
        failures++;
        $display("FAIL width %0d: high %0d ticks, first at %0d", w, high, first);
      end
    end
    // random
    rst = 1; @(negedge clk); rst = 0;
    prev = '0;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      if (t % 500 == 0) width = 5'($urandom_range(0, 16));
      din = N'($urandom) & N'($urandom);
      @(posedge clk);
      for (int i = 0; i < N; i++) begin
        if (din[i] && !prev[i]) rem[i] = (width == 0) ? 1 : int'(width);
        else if (rem[i] > 0) rem[i]--;
      end
      prev = din;
      #1;
      for (int i = 0; i < N; i++) begin
        checks++;
        if (dout[i] != (rem[i] > 0)) begin
          failures++;
          if (failures < 10) $display("FAIL t=%0d pixel %0d: got %0b", t, i, dout[i]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
