// diag_playback: diagnostic pattern generator that stands in for a board's
// real inputs.
//
// The pattern memory (DEPTH words of WIDTH bits) is written over the setup bus
// in 32-bit lanes: wr_addr picks the word, wr_lane the 32-bit slice. A start
// pulse replays words 0..length-1, one word per tick on which `step` is high,
// and `active` is high from the tick after the start pulse until the last
// word has been shown, so a user can select dout while `active` is high;
// dout is zero whenever no word is being shown. In the L1.5 board the words
// are pixel patterns replayed at the 400 MHz clock; in the L2 board they are
// link words replayed at the 50 MHz word rate. Memory size, lane loading and
// single-pass replay are this design's choices.
module diag_playback #(
  parameter int WIDTH = 200,
  parameter int DEPTH = 64,
  parameter int LANES = (WIDTH + 31) / 32,
  parameter int AW    = $clog2(DEPTH),
  parameter int LW    = (LANES > 1) ? $clog2(LANES) : 1
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             wr_en,
  input  logic [AW-1:0]    wr_addr,
  input  logic [LW-1:0]    wr_lane,
  input  logic [31:0]      wr_data,
  input  logic             start,
  input  logic [AW:0]      length,
  input  logic             step,
  output logic             active,
  output logic [WIDTH-1:0] dout
);
  logic [LANES*32-1:0] mem [DEPTH];
  logic [AW:0]         ptr;
  logic                running;

  always_ff @(posedge clk) begin
    if (wr_en && int'(wr_lane) < LANES) mem[wr_addr][wr_lane*32 +: 32] <= wr_data;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      running <= 1'b0;
      active  <= 1'b0;
      ptr     <= '0;
      dout    <= '0;
    end else if (start) begin
      running <= (length != '0);
      active  <= running;
      ptr     <= '0;
      dout    <= '0;
    end else if (running) begin
      active <= 1'b1;
      if (step) begin
        dout <= mem[ptr[AW-1:0]][WIDTH-1:0];
        ptr  <= ptr + 1'b1;
        if (ptr + 1'b1 == length) running <= 1'b0;
      end else begin
        dout <= '0;
      end
    end else begin
      active <= 1'b0;
      dout   <= '0;
    end
  end
endmodule
