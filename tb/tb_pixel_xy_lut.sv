// tb_pixel_xy_lut: every (region, address) is looked up and compared with the
// camera layout: region k covers camera rows 8k..8k+9, address a is local row
// a/20, column a%20; x = 2*column + (row odd), y = row; rows past 24, the
// fourth region code and addresses past 199 read invalid. Latency one tick.
// Also checks that pixels in the shared rows map to the same camera pixel
// from both regions.
module tb_pixel_xy_lut;
  logic clk = 0;
  logic [1:0] region;
  logic [7:0] addr;
  logic valid;
  logic [8:0] cam_id;
  logic [7:0] x, y;
  int checks = 0, failures = 0, shared = 0;

  pixel_xy_lut dut (.clk, .region, .addr, .valid, .cam_id, .x, .y);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 4; k++)
      for (int a = 0; a < 256; a++) begin
        int row, col; bit v;
        row = 8 * k + a / 20;
        col = a % 20;
        v = (k < 3) && (a < 200) && (row < 25);
        @(negedge clk);
        region = 2'(k); addr = 8'(a);
        @(posedge clk); #1;
        checks++;
        if (valid != v) begin failures++; $display("FAIL valid k=%0d a=%0d", k, a); end
        else if (v) begin
          checks++;
          if (int'(cam_id) != row * 20 + col || int'(x) != 2 * col + (row % 2) || int'(y) != row) begin
            failures++; $display("FAIL k=%0d a=%0d id=%0d x=%0d y=%0d", k, a, cam_id, x, y);
          end
          if (k > 0 && a < 40) shared++;
        end
      end
    checks++; if (shared != 80) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
