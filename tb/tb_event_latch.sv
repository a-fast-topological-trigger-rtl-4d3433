// tb_event_latch: checks the acceptance window. An event starts on a rising
// edge of the trigger. For random triggers, pixels
// and window lengths, the event must carry the OR of the pixels over the
// trigger tick and the following window-1 ticks, the timestamp of the trigger
// tick, and come out exactly `window` ticks after the trigger tick.
module tb_event_latch;
  localparam int N = 12;
  logic clk = 0, rst = 1, trig = 0;
  logic [N-1:0] pix = '0;
  logic [31:0] ts = 0;
  logic [3:0] window = 4'd3;
  logic ev_valid;
  logic [N-1:0] ev_pattern;
  logic [31:0] ev_ts;
  int checks = 0, failures = 0, events = 0;

  event_latch #(.N(N), .WBITS(4), .TSW(32)) dut (.clk, .rst, .trig, .pix, .ts, .window, .ev_valid, .ev_pattern, .ev_ts);
  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference
  bit tq = 0;
  bit open = 0; int left = 0; logic [N-1:0] acc; logic [31:0] ts0; int due = -1;
  logic [N-1:0] exp_pat; logic [31:0] exp_ts; int t;

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 0;
    for (t = 0; t < 5000; t++) begin
      if (t % 400 == 0) window = 4'($urandom_range(0, 15));
      trig = ($urandom_range(0, 5) == 0);
      pix  = N'($urandom) & N'($urandom) & N'($urandom);
      ts   = $urandom;
      // model of this tick
      if (!open) begin
        if (trig && !tq) begin
          ts0 = ts;
          if (window <= 1) begin due = t + 1; exp_pat = pix; exp_ts = ts; end
          else begin open = 1; acc = pix; left = int'(window) - 1; end
        end
      end else begin
        acc |= pix; left--;
        if (left == 0) begin open = 0; due = t + 1; exp_pat = acc; exp_ts = ts0; end
      end
      tq = trig;
      @(posedge clk); #1;
      checks++;
      if (ev_valid != (due == t + 1)) begin
        failures++; if (failures < 10) $display("FAIL t=%0d valid=%0b", t, ev_valid);
      end else if (ev_valid) begin
        events++;
        checks++;
        if (ev_pattern != exp_pat || ev_ts != exp_ts) begin
          failures++; if (failures < 10) $display("FAIL t=%0d pattern %h exp %h", t, ev_pattern, exp_pat);
        end
      end
      @(negedge clk);
    end
    checks++; if (events < 50) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
