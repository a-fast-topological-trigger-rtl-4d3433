// skew_delay: per-pixel programmable delay that lines up Level 1 signals whose
// backplane traces differ in length.
//
// Each pixel passes through a shift register of MAXD-1 stages; delay[i]
// selects the tap, 0 being the undelayed input (combinational bypass). Delays
// are whole clock ticks (2.5 ns at 400 MHz): sub-tick alignment, which needs
// the FPGA's input-delay primitives, is not modelled. The tick resolution and
// the 0..7 range are this design's choices.
module skew_delay #(
  parameter int N     = 200,
  parameter int MAXD  = 8,
  parameter int DBITS = $clog2(MAXD)
) (
  input  logic             clk,
  input  logic             rst,
  input  logic [N-1:0]     din,
  input  logic [DBITS-1:0] delay [N],
  output logic [N-1:0]     dout
);
  logic [MAXD-2:0] sr [N];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < N; i++) sr[i] <= '0;
    end else begin
      for (int i = 0; i < N; i++) sr[i] <= {sr[i][MAXD-3:0], din[i]};
    end
  end

  always_comb
    for (int i = 0; i < N; i++)
      dout[i] = (delay[i] == '0) ? din[i] : sr[i][delay[i] - 1'b1];

endmodule
