// l2_event_merger: timestamp sorting and event building in the L2 board.
//
// Each input FIFO holds one board's hit entries in time order. When idle, the
// merger takes the oldest timestamp among the non-empty FIFO heads as the
// event reference, pulses ev_start with it and starts a wait timer. It then
// drains, one entry per tick, the fragment of every board whose head
// timestamp lies within `window` ticks of the reference (either side), at most
// one fragment per board, emitting each pixel as {region, address}. The timer
// runs only while no fragment is being drained; when it expires, or every
// board has delivered, ev_end pulses. A fragment that is older or later than
// the window stays queued and starts its own event. Outputs are registered.
// Sorting by timestamp and collecting pixels within a programmable range
// follow the trigger this models; the head merge, the one-fragment rule and
// the wait timer are this design's choices.
module l2_event_merger
  import trig_pkg::*;
#(
  parameter int NR = N_REGIONS
) (
  input  logic              clk,
  input  logic              rst,
  input  hit_entry_t        head  [NR],
  input  logic [NR-1:0]     empty,
  output logic [NR-1:0]     pop,
  input  logic [15:0]       window,
  input  logic [15:0]       timeout,
  output logic              ev_start,
  output logic [TS_W-1:0]   ev_ts,
  output logic              hit_valid,
  output logic [1:0]        hit_region,
  output logic [ADDR_W-1:0] hit_addr,
  output logic              ev_end,
  output logic              busy
);
  typedef enum logic [1:0] {S_IDLE, S_COLLECT} state_e;

  state_e          st;
  logic [TS_W-1:0] ref_ts;
  logic [15:0]     timer;
  logic [NR-1:0]   done;
  logic            draining;
  logic [1:0]      cur;

  // Oldest head among the non-empty FIFOs.
  logic            any_head;
  logic [TS_W-1:0] min_ts;
  always_comb begin
    any_head = 1'b0;
    min_ts   = '0;
    for (int i = 0; i < NR; i++)
      if (!empty[i] && (!any_head || head[i].ts < min_ts)) begin
        any_head = 1'b1;
        min_ts   = head[i].ts;
      end
  end

  // First board whose head belongs to the current event.
  logic       elig_any;
  logic [1:0] elig;
  always_comb begin
    logic [TS_W-1:0] d;
    elig_any = 1'b0;
    elig     = '0;
    for (int i = NR - 1; i >= 0; i--) begin
      d = (head[i].ts >= ref_ts) ? head[i].ts - ref_ts : ref_ts - head[i].ts;
      if (!empty[i] && !done[i] && d <= TS_W'(window)) begin
        elig_any = 1'b1;
        elig     = 2'(i);
      end
    end
  end

  logic [1:0] src;
  logic       take;
  assign src  = draining ? cur : elig;
  assign take = (st == S_COLLECT) && (draining ? !empty[cur] : elig_any);

  always_comb begin
    pop = '0;
    if (take) pop[src] = 1'b1;
  end

  assign busy = (st != S_IDLE);

  always_ff @(posedge clk) begin
    if (rst) begin
      st         <= S_IDLE;
      ref_ts     <= '0;
      timer      <= '0;
      done       <= '0;
      draining   <= 1'b0;
      cur        <= '0;
      ev_start   <= 1'b0;
      ev_ts      <= '0;
      hit_valid  <= 1'b0;
      hit_region <= '0;
      hit_addr   <= '0;
      ev_end     <= 1'b0;
    end else begin
      ev_start  <= 1'b0;
      hit_valid <= 1'b0;
      ev_end    <= 1'b0;
      case (st)
        S_IDLE: if (any_head) begin
          ref_ts   <= min_ts;
          ev_start <= 1'b1;
          ev_ts    <= min_ts;
          timer    <= timeout;
          done     <= '0;
          draining <= 1'b0;
          st       <= S_COLLECT;
        end
        S_COLLECT: begin
          if (take) begin
            hit_valid  <= !head[src].empty;
            hit_region <= src;
            hit_addr   <= head[src].addr;
            if (head[src].last) begin
              draining  <= 1'b0;
              done[src] <= 1'b1;
            end else begin
              draining <= 1'b1;
              cur      <= src;
            end
          end else if (!draining) begin
            if (timer == '0 || done == {NR{1'b1}}) begin
              ev_end <= 1'b1;
              st     <= S_IDLE;
            end else begin
              timer <= timer - 1'b1;
            end
          end
        end
        default: st <= S_IDLE;
      endcase
    end
  end
endmodule
