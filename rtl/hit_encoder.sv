// hit_encoder: turns buffered events into the L1.5 -> L2 ribbon-cable stream.
//
// When the event FIFO is not empty and the encoder is idle, ev_pop takes the
// event (pattern and timestamp). Then, on each link_ce tick (the 50 MHz word
// rate, one tick in eight of the 400 MHz clock), one 20-bit link word goes out:
// timestamp bits 31:16, timestamp bits 15:0, then the local address of each
// set pixel, lowest address first, the final word flagged `last`. An event
// without pixels ends at the second timestamp word. link_word.valid is high
// for exactly the tick after link_ce. Converting set bits to addresses and
// sending them with the timestamp at 50 MHz follows the trigger this models;
// the word format is this design's own.
module hit_encoder
  import trig_pkg::*;
#(
  parameter int N = REG_PIX
) (
  input  logic            clk,
  input  logic            rst,
  input  logic            link_ce,
  input  logic            ev_empty,
  input  logic [N-1:0]    ev_pattern,
  input  logic [TS_W-1:0] ev_ts,
  output logic            ev_pop,
  output link_word_t      link_word,
  output logic            busy
);
  typedef enum logic [1:0] {S_IDLE, S_TS_HI, S_TS_LO, S_ADDR} state_e;

  state_e          st;
  logic [N-1:0]    pat;
  logic [TS_W-1:0] ts_r;
  logic [ADDR_W-1:0] low_idx;
  logic [N-1:0]    pat_clr;

  // Lowest set bit of the remaining pattern.
  always_comb begin
    low_idx = '0;
    for (int i = N - 1; i >= 0; i--)
      if (pat[i]) low_idx = ADDR_W'(i);
    pat_clr = pat;
    pat_clr[low_idx] = 1'b0;
  end

  assign ev_pop = (st == S_IDLE) && !ev_empty;
  assign busy   = (st != S_IDLE);

  always_ff @(posedge clk) begin
    if (rst) begin
      st        <= S_IDLE;
      pat       <= '0;
      ts_r      <= '0;
      link_word <= '0;
    end else begin
      link_word.valid <= 1'b0;
      case (st)
        S_IDLE: begin
          if (!ev_empty) begin
            pat  <= ev_pattern;
            ts_r <= ev_ts;
            st   <= S_TS_HI;
          end
        end
        S_TS_HI: if (link_ce) begin
          link_word <= '{valid: 1'b1, typ: LT_TS_HI, last: 1'b0, payload: ts_r[31:16]};
          st        <= S_TS_LO;
        end
        S_TS_LO: if (link_ce) begin
          link_word <= '{valid: 1'b1, typ: LT_TS_LO, last: (pat == '0), payload: ts_r[15:0]};
          st        <= (pat == '0) ? S_IDLE : S_ADDR;
        end
        S_ADDR: if (link_ce) begin
          link_word <= '{valid: 1'b1, typ: LT_ADDR, last: (pat_clr == '0), payload: 16'(low_idx)};
          pat       <= pat_clr;
          if (pat_clr == '0) st <= S_IDLE;
        end
        default: st <= S_IDLE;
      endcase
    end
  end
endmodule
