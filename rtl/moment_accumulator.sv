// moment_accumulator: pixel count and image moments of one event.
//
// Between ev_start and ev_end it takes one hit pixel per tick (camera number
// and X-Y coordinates) and accumulates N, sum X, sum Y, sum X^2, sum Y^2 and
// sum XY, the quantities from which the image centroid (distance r, angle
// phi) and its width follow. A per-event bitmap of camera pixels drops a pixel
// that arrives twice, which happens for pixels in the rows two regions share.
// Pipeline: tick 1 checks the bitmap and registers the hit, tick 2 forms the
// products, tick 3 adds them. ev_start and ev_end travel down the same
// pipeline, so a new event may start on the tick after ev_end; rec_valid
// pulses with the finished record three ticks after ev_end. ev_start, hits
// and ev_end must come on different ticks (the merger guarantees it). The set of moments follows
// the trigger this models; the duplicate removal and sum widths are this
// design's choices.
module moment_accumulator
  import trig_pkg::*;
#(
  parameter int NPIX = CAM_PIXELS
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                ev_start,
  input  logic [TS_W-1:0]     ev_ts,
  input  logic                hit_valid,
  input  logic [CAM_ID_W-1:0] cam_id,
  input  logic [COORD_W-1:0]  x,
  input  logic [COORD_W-1:0]  y,
  input  logic                ev_end,
  output logic                rec_valid,
  output moment_rec_t         rec,
  output logic [15:0]         dup_count
);
  logic [NPIX-1:0] seen;
  logic            dup;

  // Stage 1: duplicate check. Start, end and timestamp travel with the hits
  // so that an event may start on the tick after the previous one ended.
  logic               v1, s1, e1;
  logic [TS_W-1:0]    ts1;
  logic [COORD_W-1:0] x1, y1;
  // Stage 2: products.
  logic               v2, s2, e2;
  logic [TS_W-1:0]    ts2;
  logic [2*COORD_W-1:0] xx2, yy2, xy2;
  logic [COORD_W-1:0] x2, y2;
  // Stage 3: sums.
  logic [TS_W-1:0] ts_r;
  logic [15:0]     n;
  logic [23:0]     sx, sy;
  logic [31:0]     sxx, syy, sxy;

  assign dup = (int'(cam_id) < NPIX) ? seen[cam_id] : 1'b1;

  always_ff @(posedge clk) begin
    if (rst) begin
      seen      <= '0;
      v1        <= 1'b0;
      s1        <= 1'b0;
      e1        <= 1'b0;
      ts1       <= '0;
      x1        <= '0;
      y1        <= '0;
      v2        <= 1'b0;
      s2        <= 1'b0;
      e2        <= 1'b0;
      ts2       <= '0;
      x2        <= '0;
      y2        <= '0;
      xx2       <= '0;
      yy2       <= '0;
      xy2       <= '0;
      ts_r      <= '0;
      n         <= '0;
      sx        <= '0;
      sy        <= '0;
      sxx       <= '0;
      syy       <= '0;
      sxy       <= '0;
      rec_valid <= 1'b0;
      rec       <= '0;
      dup_count <= '0;
    end else begin
      // stage 1
      v1  <= hit_valid && !dup && !ev_start;
      s1  <= ev_start;
      e1  <= ev_end;
      ts1 <= ev_ts;
      x1  <= x;
      y1  <= y;
      if (ev_start) seen <= '0;
      else if (hit_valid && !dup) seen[cam_id] <= 1'b1;
      if (hit_valid && dup && !ev_start) dup_count <= dup_count + 1'b1;
      // stage 2
      v2  <= v1;
      s2  <= s1;
      e2  <= e1;
      ts2 <= ts1;
      x2  <= x1;
      y2  <= y1;
      xx2 <= x1 * x1;
      yy2 <= y1 * y1;
      xy2 <= x1 * y1;
      // stage 3
      if (s2) begin
        ts_r <= ts2;
        n    <= '0;
        sx   <= '0;
        sy   <= '0;
        sxx  <= '0;
        syy  <= '0;
        sxy  <= '0;
      end else if (v2) begin
        n   <= n + 1'b1;
        sx  <= sx + 24'(x2);
        sy  <= sy + 24'(y2);
        sxx <= sxx + 32'(xx2);
        syy <= syy + 32'(yy2);
        sxy <= sxy + 32'(xy2);
      end
      // result: ev_end never shares a tick with a hit or a start
      rec_valid <= e2;
      if (e2)
        rec <= '{ts: ts_r, n: n, sx: sx, sy: sy, sxx: sxx, syy: syy, sxy: sxy};
    end
  end
endmodule
