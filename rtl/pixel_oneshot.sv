// pixel_oneshot: a retriggerable one-shot per pixel that stretches each Level 1
// pulse to a programmable width before the coincidence logic.
//
// A rising edge on din[i] loads the pixel's down-counter with `width`; dout[i]
// is high while the counter is non-zero, so the output pulse starts one clock
// after the edge and lasts `width` clocks. At a 400 MHz clock a width of 2..16
// spans 5..40 ns, close to the 4..40 ns range of the trigger this models;
// the whole-tick resolution, retriggering on a new edge and treating width 0
// as 1 are this design's choices.
module pixel_oneshot #(
  parameter int N     = 200,
  parameter int WBITS = 5
) (
  input  logic             clk,
  input  logic             rst,
  input  logic [WBITS-1:0] width,
  input  logic [N-1:0]     din,
  output logic [N-1:0]     dout
);
  logic [N-1:0]     prev;
  logic [WBITS-1:0] cnt [N];
  logic [WBITS-1:0] load;

  assign load = (width == '0) ? WBITS'(1) : width;

  always_ff @(posedge clk) begin
    if (rst) begin
      prev <= '0;
      for (int i = 0; i < N; i++) cnt[i] <= '0;
    end else begin
      prev <= din;
      for (int i = 0; i < N; i++) begin
        if (din[i] && !prev[i]) cnt[i] <= load;
        else if (cnt[i] != '0)  cnt[i] <= cnt[i] - 1'b1;
      end
    end
  end

  always_comb
    for (int i = 0; i < N; i++) dout[i] = (cnt[i] != '0);

endmodule
