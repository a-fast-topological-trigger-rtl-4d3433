// l2_record_framer: packs a moment record into a frame for the link to
// Level 3.
//
// A frame is REC_WORDS 16-bit words: header 0xA55A, timestamp (high, low),
// pixel count, then sum X, sum Y, sum X^2, sum Y^2 and sum XY as 32-bit values
// (high word first), and finally the XOR of all previous words as a check
// word. rec_ready is high while idle; tx_valid/tx_ready is a standard
// valid-ready handshake, one word per accepted tick. The frame layout is this
// design's own; the fields are the timestamp and moments the trigger sends.
module l2_record_framer
  import trig_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic        rec_valid,
  input  moment_rec_t rec,
  output logic        rec_ready,
  output logic        tx_valid,
  output logic [15:0] tx_word,
  input  logic        tx_ready
);
  moment_rec_t r;
  logic [3:0]  idx;
  logic [15:0] words [REC_WORDS];
  logic [15:0] chk;

  always_comb begin
    logic [31:0] sx32, sy32;
    sx32      = 32'(r.sx);
    sy32      = 32'(r.sy);
    words[0]  = REC_HEADER;
    words[1]  = r.ts[31:16];
    words[2]  = r.ts[15:0];
    words[3]  = r.n;
    words[4]  = sx32[31:16];
    words[5]  = sx32[15:0];
    words[6]  = sy32[31:16];
    words[7]  = sy32[15:0];
    words[8]  = r.sxx[31:16];
    words[9]  = r.sxx[15:0];
    words[10] = r.syy[31:16];
    words[11] = r.syy[15:0];
    words[12] = r.sxy[31:16];
    words[13] = r.sxy[15:0];
    chk = '0;
    for (int i = 0; i < REC_WORDS - 1; i++) chk ^= words[i];
    words[14] = chk;
  end

  assign rec_ready = !tx_valid;
  assign tx_word   = words[idx];

  always_ff @(posedge clk) begin
    if (rst) begin
      r        <= '0;
      idx      <= '0;
      tx_valid <= 1'b0;
    end else if (!tx_valid) begin
      if (rec_valid) begin
        r        <= rec;
        idx      <= '0;
        tx_valid <= 1'b1;
      end
    end else if (tx_ready) begin
      if (idx == 4'(REC_WORDS - 1)) tx_valid <= 1'b0;
      else                          idx <= idx + 1'b1;
    end
  end

  // A word on offer stays on offer until it is taken.
  property p_hold;
    @(posedge clk) disable iff (rst) tx_valid && !tx_ready |=> tx_valid && $stable(tx_word);
  endproperty
  a_hold: assert property (p_hold);
endmodule
