// l15_processor: Level 1.5 board for one camera region.
//
// Data path, all on the 400 MHz clock:
//   l1_in -> input register -> (diagnostic playback replaces it when active)
//   -> skew_delay (per-pixel tick delay) -> bad-channel mask
//   -> pixel_oneshot (stretch to the programmed width)
//   -> coincidence_7cell (3 neighbouring pixels in a 7-pixel cell, 1 tick)
//   -> event_latch (acceptance window, 32-bit timestamp)
//   -> event FIFO -> hit_encoder -> 20-bit ribbon-cable word every link_ce.
// The stretched pattern is delayed one tick so that it lines up with the
// registered coincidence. An event that finds the FIFO full is dropped and
// counted. The outgoing link words can be recorded in a diagnostic memory.
//
// Setup bus (word addresses; writes take effect on the next tick, reads
// return cfg_rdata one tick after cfg_addr):
//   0x000 ctrl    [4:0] one-shot width (ticks), [11:8] acceptance window
//                 (ticks), bit 16 write-1 starts playback, bit 17 write-1 arms
//                 the capture memory
//   0x001 playback length (words)
//   0x002 read: dropped events;   0x003 read: captured words
//   0x004 read: bit 31 encoder busy, low bits events waiting in the FIFO
//   0x010+k mask lane k (pixels 32k..32k+31, 1 = masked)
//   0x100+p skew delay of pixel p (3 bits)
//   0x400+8w+l playback word w, 32-bit lane l
//   0x800+a read captured word a
// The per-cell coincidence vector is kept as a named signal for probing but
// only its OR (the board trigger) leaves the board.
// The processing chain follows the Level 1.5 board this models; the register
// map, reset values (width 4 ticks = 10 ns, window 3 ticks), memory sizes and
// the single clock for core and link are this design's choices.
module l15_processor
  import trig_pkg::*;
#(
  parameter int ROWS        = REG_ROWS,
  parameter int COLS        = CAM_COLS,
  parameter int FIFO_DEPTH  = 16,
  parameter int DIAG_DEPTH  = 64,
  parameter int CAP_DEPTH   = 256
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 pps,
  input  logic                 link_ce,
  input  logic [ROWS*COLS-1:0] l1_in,
  output link_word_t           link_word,
  output logic                 trig_out,
  output logic [15:0]          overflow_count,
  input  logic                 cfg_we,
  input  logic [11:0]          cfg_addr,
  input  logic [31:0]          cfg_wdata,
  output logic [31:0]          cfg_rdata
);
  localparam int N      = ROWS * COLS;
  localparam int LANES  = (N + 31) / 32;
  localparam int DAW    = $clog2(DIAG_DEPTH);
  localparam int CAW    = $clog2(CAP_DEPTH);
  localparam int EVW    = N + TS_W;

  // ---------------- setup registers ----------------
  logic [4:0]          os_width;
  logic [3:0]          acc_window;
  logic [DAW:0]        diag_len;
  logic [LANES*32-1:0] mask_r;
  logic [2:0]          skew [N];
  logic                diag_start, cap_arm;

  always_ff @(posedge clk) begin
    if (rst) begin
      os_width   <= 5'd4;
      acc_window <= 4'd3;
      diag_len   <= '0;
      mask_r     <= '0;
      for (int i = 0; i < N; i++) skew[i] <= '0;
      diag_start <= 1'b0;
      cap_arm    <= 1'b0;
    end else begin
      diag_start <= 1'b0;
      cap_arm    <= 1'b0;
      if (cfg_we) begin
        if (cfg_addr == 12'h000) begin
          os_width   <= cfg_wdata[4:0];
          acc_window <= cfg_wdata[11:8];
          diag_start <= cfg_wdata[16];
          cap_arm    <= cfg_wdata[17];
        end
        if (cfg_addr == 12'h001) diag_len <= cfg_wdata[DAW:0];
        if (cfg_addr[11:4] == 8'h01 && int'(cfg_addr[3:0]) < LANES)
          mask_r[cfg_addr[3:0]*32 +: 32] <= cfg_wdata;
        if (cfg_addr[11:8] == 4'h1 && int'(cfg_addr[7:0]) < N)
          skew[cfg_addr[7:0]] <= cfg_wdata[2:0];
      end
    end
  end

  // ---------------- pixel path ----------------
  logic [N-1:0] l1_reg, diag_pix, src, dly, masked, stretched, stretched_d;
  logic         diag_active;
  logic [N-1:0] cells;
  logic         trig;
  logic [TS_W-1:0] ts;

  always_ff @(posedge clk) begin
    if (rst) l1_reg <= '0;
    else     l1_reg <= l1_in;
  end

  diag_playback #(.WIDTH(N), .DEPTH(DIAG_DEPTH)) u_play (
    .clk, .rst,
    .wr_en   (cfg_we && cfg_addr[11:9] == 3'b010),
    .wr_addr (cfg_addr[3+:DAW]),
    .wr_lane (cfg_addr[2:0]),
    .wr_data (cfg_wdata),
    .start   (diag_start),
    .length  (diag_len),
    .step    (1'b1),
    .active  (diag_active),
    .dout    (diag_pix)
  );

  assign src = diag_active ? diag_pix : l1_reg;

  skew_delay #(.N(N), .MAXD(8)) u_skew (
    .clk, .rst, .din(src), .delay(skew), .dout(dly)
  );

  assign masked = dly & ~mask_r[N-1:0];

  pixel_oneshot #(.N(N), .WBITS(5)) u_os (
    .clk, .rst, .width(os_width), .din(masked), .dout(stretched)
  );

  coincidence_7cell #(.ROWS(ROWS), .COLS(COLS)) u_coin (
    .clk, .rst, .pix(stretched), .cells(cells), .trig(trig)
  );

  always_ff @(posedge clk) begin
    if (rst) stretched_d <= '0;
    else     stretched_d <= stretched;
  end

  assign trig_out = trig;

  timestamp_counter #(.W(TS_W)) u_ts (.clk, .rst, .pps, .ts);

  logic            ev_valid;
  logic [N-1:0]    ev_pattern;
  logic [TS_W-1:0] ev_ts;

  event_latch #(.N(N), .WBITS(4), .TSW(TS_W)) u_latch (
    .clk, .rst, .trig, .pix(stretched_d), .ts, .window(acc_window),
    .ev_valid, .ev_pattern, .ev_ts
  );

  // ---------------- event FIFO and link ----------------
  logic           fifo_full, fifo_empty, fifo_pop;
  logic [EVW-1:0] fifo_head;
  logic [$clog2(FIFO_DEPTH):0] fifo_level;

  sync_fifo #(.WIDTH(EVW), .DEPTH(FIFO_DEPTH)) u_evfifo (
    .clk, .rst,
    .wr_en(ev_valid), .wr_data({ev_ts, ev_pattern}), .full(fifo_full),
    .rd_en(fifo_pop), .rd_data(fifo_head), .empty(fifo_empty), .level(fifo_level)
  );

  always_ff @(posedge clk) begin
    if (rst)                        overflow_count <= '0;
    else if (ev_valid && fifo_full) overflow_count <= overflow_count + 1'b1;
  end

  logic enc_busy;
  hit_encoder #(.N(N)) u_enc (
    .clk, .rst, .link_ce,
    .ev_empty(fifo_empty), .ev_pattern(fifo_head[N-1:0]), .ev_ts(fifo_head[EVW-1:N]),
    .ev_pop(fifo_pop), .link_word, .busy(enc_busy)
  );

  // ---------------- diagnostic capture ----------------
  logic [31:0] cap_data;
  logic [CAW:0] cap_count;
  diag_capture #(.WIDTH(32), .DEPTH(CAP_DEPTH)) u_cap (
    .clk, .rst, .arm(cap_arm),
    .din_valid(link_word.valid), .din(32'(link_word)),
    .rd_addr(cfg_addr[CAW-1:0]), .rd_data(cap_data), .count(cap_count)
  );

  // ---------------- setup bus read ----------------
  always_ff @(posedge clk) begin
    if (rst) cfg_rdata <= '0;
    else begin
      cfg_rdata <= '0;
      if (cfg_addr == 12'h000)      cfg_rdata <= {14'd0, 2'b00, 4'd0, acc_window, 3'd0, os_width};
      else if (cfg_addr == 12'h001) cfg_rdata <= 32'(diag_len);
      else if (cfg_addr == 12'h002) cfg_rdata <= 32'(overflow_count);
      else if (cfg_addr == 12'h003) cfg_rdata <= 32'(cap_count);
      else if (cfg_addr == 12'h004) cfg_rdata <= {enc_busy, 31'(fifo_level)};
      else if (cfg_addr[11:4] == 8'h01 && int'(cfg_addr[3:0]) < LANES)
        cfg_rdata <= mask_r[cfg_addr[3:0]*32 +: 32];
      else if (cfg_addr[11:8] == 4'h1 && int'(cfg_addr[7:0]) < N)
        cfg_rdata <= 32'(skew[cfg_addr[7:0]]);
      else if (cfg_addr[11] == 1'b1)
        cfg_rdata <= cap_data;
    end
  end
endmodule
