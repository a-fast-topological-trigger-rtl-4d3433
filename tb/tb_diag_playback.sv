// tb_diag_playback: loads random patterns lane by lane, starts a replay and
// checks that words 0..length-1 come out in order, one per step, with
// `active` high for exactly `length` steps and zero output otherwise.
module tb_diag_playback;
  localparam int W = 70, D = 16;
  logic clk = 0, rst = 1, wr_en = 0, start = 0, step = 0, active;
  logic [3:0] wr_addr = 0;
  logic [1:0] wr_lane = 0;
  logic [31:0] wr_data = 0;
  logic [4:0] length = 0;
  logic [W-1:0] dout;
  logic [W-1:0] ref_mem [D];
  int checks = 0, failures = 0;

  diag_playback #(.WIDTH(W), .DEPTH(D)) dut (.clk, .rst, .wr_en, .wr_addr, .wr_lane, .wr_data, .start, .length, .step, .active, .dout);
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
    for (int w = 0; w < D; w++) begin
      logic [95:0] v;
      v = {$urandom, $urandom, $urandom};
      ref_mem[w] = v[W-1:0];
      for (int l = 0; l < 3; l++) begin
        wr_en = 1; wr_addr = 4'(w); wr_lane = 2'(l); wr_data = v[l*32 +: 32];
        @(negedge clk);
      end
    end
    wr_en = 0;
    for (int run = 0; run < 4; run++) begin
      int got;
      length = 5'($urandom_range(1, D));
      start = 1; @(negedge clk); start = 0;
      got = 0;
      for (int t = 0; t < 3 * D; t++) begin
        step = ($urandom_range(0, 1) == 1);
        if (!active) step = 1;
        @(posedge clk); #1;
        if (step && got < int'(length)) begin
          checks += 2;
          if (!active) begin failures++; $display("FAIL word %0d shown while inactive", got); end
          if (dout != ref_mem[got]) begin failures++; $display("FAIL run %0d word %0d", run, got); end
          got++;
        end else begin
          checks++;
          if (dout != '0) begin failures++; $display("FAIL nonzero idle output"); end
        end
        @(negedge clk);
      end
      checks++; if (got != int'(length) || active) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
