// timestamp_counter: event timestamp of an L1.5 board.
//
// A W-bit counter of clock ticks (2.5 ns at 400 MHz) that the once-per-second
// sync marker clears, so all boards of the system share one time base. One
// second is 4e8 ticks, well inside 32 bits. ts reads 0 on the tick after pps
// or rst. Counting clock ticks and the clear timing are this design's choices.
module timestamp_counter #(
  parameter int W = 32
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         pps,
  output logic [W-1:0] ts
);
  always_ff @(posedge clk) begin
    if (rst || pps) ts <= '0;
    else            ts <= ts + 1'b1;
  end
endmodule
