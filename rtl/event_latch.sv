// event_latch: acceptance window after a coincidence.
//
// An event starts on a rising edge of trig (a new coincidence): the stretched
// pulses keep the coincidence high for several ticks, and without the edge
// rule one cluster would start a second event after the first window. When
// trig rises while no window is open, the block opens a window of
// `window` ticks (the trigger tick included, 0 taken as 1), ORs the pixel
// pattern of every tick in it and keeps the timestamp of the trigger tick.
// Pixels that turn on a little later than the coincidence therefore still
// belong to the event. When the window closes, ev_valid pulses for one tick
// with the pattern and timestamp. Triggers inside an open window belong to the
// same event. Latching the pattern over following ticks follows the trigger
// this models; the edge rule and counting convention are this design's
// choices.
module event_latch #(
  parameter int N     = 200,
  parameter int WBITS = 4,
  parameter int TSW   = 32
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             trig,
  input  logic [N-1:0]     pix,
  input  logic [TSW-1:0]   ts,
  input  logic [WBITS-1:0] window,
  output logic             ev_valid,
  output logic [N-1:0]     ev_pattern,
  output logic [TSW-1:0]   ev_ts
);
  logic             open;
  logic [WBITS-1:0] left;
  logic [N-1:0]     acc;
  logic             trig_q;
  logic             start;

  assign start = trig && !trig_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      open       <= 1'b0;
      trig_q     <= 1'b0;
      left       <= '0;
      acc        <= '0;
      ev_valid   <= 1'b0;
      ev_pattern <= '0;
      ev_ts      <= '0;
    end else begin
      ev_valid <= 1'b0;
      trig_q   <= trig;
      if (!open) begin
        if (start) begin
          ev_ts <= ts;
          if (window <= WBITS'(1)) begin
            ev_valid   <= 1'b1;
            ev_pattern <= pix;
          end else begin
            open <= 1'b1;
            acc  <= pix;
            left <= window - WBITS'(2);
          end
        end
      end else begin
        acc <= acc | pix;
        if (left == '0) begin
          open       <= 1'b0;
          ev_valid   <= 1'b1;
          ev_pattern <= acc | pix;
        end else begin
          left <= left - 1'b1;
        end
      end
    end
  end
endmodule
