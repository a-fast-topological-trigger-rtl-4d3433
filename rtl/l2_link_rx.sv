// l2_link_rx: receiver for one L1.5 -> L2 ribbon cable.
//
// It rebuilds the 32-bit timestamp from the two timestamp words and turns every
// address word into one hit_entry_t {timestamp, address, last, empty} for the
// board's input FIFO, one tick after the word arrives. An event that carried no
// address becomes a single entry flagged `empty` so that the merger still sees
// the fragment end. The entry format is this design's own.
module l2_link_rx
  import trig_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  link_word_t link_word,
  output logic       ent_valid,
  output hit_entry_t ent
);
  logic [15:0]     ts_hi;
  logic [TS_W-1:0] ts;

  always_ff @(posedge clk) begin
    if (rst) begin
      ts_hi     <= '0;
      ts        <= '0;
      ent_valid <= 1'b0;
      ent       <= '0;
    end else begin
      ent_valid <= 1'b0;
      if (link_word.valid) begin
        case (link_word.typ)
          LT_TS_HI: ts_hi <= link_word.payload;
          LT_TS_LO: begin
            ts <= {ts_hi, link_word.payload};
            if (link_word.last) begin
              ent_valid <= 1'b1;
              ent       <= '{ts: {ts_hi, link_word.payload}, addr: '0, last: 1'b1, empty: 1'b1};
            end
          end
          LT_ADDR: begin
            ent_valid <= 1'b1;
            ent       <= '{ts: ts, addr: link_word.payload[ADDR_W-1:0], last: link_word.last, empty: 1'b0};
          end
          default: ;
        endcase
      end
    end
  end
endmodule
