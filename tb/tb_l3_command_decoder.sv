// tb_l3_command_decoder: random command words, half with a flipped parity
// bit; SYNC and RESET must pulse one tick after a good word, bad words and
// unknown opcodes must only raise the error count, CLEAR_ERR must clear it.
module tb_l3_command_decoder;
  logic clk = 0, rst = 1, rx_valid = 0;
  logic [15:0] rx_word = 0;
  logic pps, sys_reset;
  logic [15:0] err_count;
  int checks = 0, failures = 0, errs = 0, n_sync = 0, n_reset = 0, n_bad = 0;

  l3_command_decoder dut (.clk, .rst, .rx_valid, .rx_word, .pps, .sys_reset, .err_count);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int i = 0; i < 2000; i++) begin
      logic [15:0] w; bit good; bit exp_sync, exp_reset;
      w = {4'($urandom_range(0, 5)), 11'($urandom), 1'b0};
      w[0] = ^w[15:1];
      good = ($urandom_range(0, 1) == 0);
      if (!good) begin w[0] = ~w[0]; n_bad++; end
      rx_valid = ($urandom_range(0, 3) != 0);
      rx_word = w;
      exp_sync = rx_valid && good && w[15:12] == 4'h1;
      exp_reset = rx_valid && good && w[15:12] == 4'h2;
      if (rx_valid) begin
        if (!good) errs++;
        else if (w[15:12] == 4'h3) errs = 0;
        else if (w[15:12] != 4'h1 && w[15:12] != 4'h2) errs++;
      end
      @(posedge clk); #1;
      checks += 3;
      if (pps != exp_sync) failures++;
      if (sys_reset != exp_reset) failures++;
      if (int'(err_count) != errs) begin failures++; if (failures < 10) $display("FAIL errors %0d exp %0d", err_count, errs); end
      if (exp_sync) n_sync++;
      if (exp_reset) n_reset++;
      @(negedge clk);
    end
    checks++; if (n_sync == 0 || n_reset == 0 || n_bad == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
