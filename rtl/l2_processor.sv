// l2_processor: Level 2 board of one telescope crate.
//
// Data path:
//   3 ribbon-cable inputs (or diagnostic playback of link words)
//   -> l2_link_rx per board -> input FIFO per board (hit entries)
//   -> l2_event_merger (oldest timestamp first, fragments within `window`)
//   -> pixel_xy_lut (region, address -> camera pixel, X, Y; 1 tick)
//   -> moment_accumulator (N, sum X, Y, X^2, Y^2, XY; duplicates dropped)
//   -> record FIFO -> l2_record_framer -> 16-bit words towards Level 3.
// Command words from Level 3 are decoded into the once-per-second marker
// (pps_out, fanned out to the L1.5 boards) and a system reset. Outgoing record
// words can be recorded in a diagnostic memory. An entry or record that finds
// its FIFO full is dropped and counted.
//
// Setup bus (word addresses; reads return one tick after cfg_addr):
//   0x000 merge window (ticks)     0x001 merge wait timeout (ticks)
//   0x002 ctrl: bit 0 write-1 starts playback, bit 1 write-1 arms capture
//   0x003 playback length          0x004 read: dropped records
//   0x005 read: dropped hit entries 0x006 read: Level 3 command errors
//   0x007 read: records sent       0x008 read: duplicate pixels removed
//   0x009 read: captured record words
//   0x00A+i read: entries waiting in input FIFO i
//   0x00F read: bit 31 moment pipeline busy, low bits records waiting
//   0x400+2w+l playback word w, 32-bit lane l; a word is the three 20-bit
//              link words {board 2, board 1, board 0}, lane 0 = bits 31:0
//   0x800+a read captured record word a
// The chain follows the Level 2 board this models; the register map, reset
// values (window 8 ticks, timeout 64 ticks), FIFO sizes and running on the
// L1.5 clock are this design's choices.
module l2_processor
  import trig_pkg::*;
#(
  parameter int NR             = N_REGIONS,
  parameter int IN_FIFO_DEPTH  = 256,
  parameter int REC_FIFO_DEPTH = 16,
  parameter int DIAG_DEPTH     = 64,
  parameter int CAP_DEPTH      = 256
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          link_ce,
  input  link_word_t    link_in [NR],
  input  logic          l3_rx_valid,
  input  logic [15:0]   l3_rx_word,
  output logic          l3_tx_valid,
  output logic [15:0]   l3_tx_word,
  input  logic          l3_tx_ready,
  output logic          pps_out,
  output logic          sys_reset,
  output logic          rec_valid,
  output moment_rec_t   rec,
  input  logic          cfg_we,
  input  logic [11:0]   cfg_addr,
  input  logic [31:0]   cfg_wdata,
  output logic [31:0]   cfg_rdata
);
  localparam int LW   = $bits(link_word_t);
  localparam int DAW  = $clog2(DIAG_DEPTH);
  localparam int CAW  = $clog2(CAP_DEPTH);
  localparam int EW   = $bits(hit_entry_t);
  localparam int RW   = $bits(moment_rec_t);

  // ---------------- setup registers ----------------
  logic [15:0]  window, timeout;
  logic [DAW:0] diag_len;
  logic         diag_start, cap_arm;

  always_ff @(posedge clk) begin
    if (rst) begin
      window     <= 16'd8;
      timeout    <= 16'd64;
      diag_len   <= '0;
      diag_start <= 1'b0;
      cap_arm    <= 1'b0;
    end else begin
      diag_start <= 1'b0;
      cap_arm    <= 1'b0;
      if (cfg_we) begin
        case (cfg_addr)
          12'h000: window   <= cfg_wdata[15:0];
          12'h001: timeout  <= cfg_wdata[15:0];
          12'h002: begin diag_start <= cfg_wdata[0]; cap_arm <= cfg_wdata[1]; end
          12'h003: diag_len <= cfg_wdata[DAW:0];
          default: ;
        endcase
      end
    end
  end

  // ---------------- input selection ----------------
  logic [NR*LW-1:0] diag_words;
  logic             diag_active;
  link_word_t       link_sel [NR];

  diag_playback #(.WIDTH(NR*LW), .DEPTH(DIAG_DEPTH)) u_play (
    .clk, .rst,
    .wr_en   (cfg_we && cfg_addr[11:9] == 3'b010),
    .wr_addr (cfg_addr[1+:DAW]),
    .wr_lane (cfg_addr[0]),
    .wr_data (cfg_wdata),
    .start   (diag_start),
    .length  (diag_len),
    .step    (link_ce),
    .active  (diag_active),
    .dout    (diag_words)
  );

  always_comb
    for (int i = 0; i < NR; i++)
      link_sel[i] = diag_active ? link_word_t'(diag_words[i*LW +: LW]) : link_in[i];

  // ---------------- receivers and input FIFOs ----------------
  hit_entry_t    heads [NR];
  logic [NR-1:0] in_empty, in_full, in_pop, in_push;
  logic [15:0]   in_drop;

  logic [$clog2(IN_FIFO_DEPTH):0] in_level [NR];

  for (genvar i = 0; i < NR; i++) begin : g_in
    hit_entry_t ent;
    logic       ent_valid;
    logic [EW-1:0] head_bits;

    l2_link_rx u_rx (.clk, .rst, .link_word(link_sel[i]), .ent_valid, .ent);

    assign in_push[i] = ent_valid;

    sync_fifo #(.WIDTH(EW), .DEPTH(IN_FIFO_DEPTH)) u_fifo (
      .clk, .rst,
      .wr_en(ent_valid), .wr_data(ent), .full(in_full[i]),
      .rd_en(in_pop[i]), .rd_data(head_bits), .empty(in_empty[i]), .level(in_level[i])
    );
    assign heads[i] = hit_entry_t'(head_bits);
  end

  always_ff @(posedge clk) begin
    if (rst)                         in_drop <= '0;
    else if ((in_push & in_full) != '0) in_drop <= in_drop + 1'b1;
  end

  // ---------------- merge, lookup, moments ----------------
  logic              m_start, m_hit, m_end, m_busy;
  logic [TS_W-1:0]   m_ts;
  logic [1:0]        m_region;
  logic [ADDR_W-1:0] m_addr;

  l2_event_merger #(.NR(NR)) u_merge (
    .clk, .rst, .head(heads), .empty(in_empty), .pop(in_pop),
    .window, .timeout,
    .ev_start(m_start), .ev_ts(m_ts), .hit_valid(m_hit), .hit_region(m_region),
    .hit_addr(m_addr), .ev_end(m_end), .busy(m_busy)
  );

  logic                l_valid;
  logic [CAM_ID_W-1:0] l_id;
  logic [COORD_W-1:0]  l_x, l_y;
  logic                d_start, d_hit, d_end;
  logic [TS_W-1:0]     d_ts;

  pixel_xy_lut u_lut (
    .clk, .region(m_region), .addr(m_addr),
    .valid(l_valid), .cam_id(l_id), .x(l_x), .y(l_y)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      d_start <= 1'b0;
      d_hit   <= 1'b0;
      d_end   <= 1'b0;
      d_ts    <= '0;
    end else begin
      d_start <= m_start;
      d_hit   <= m_hit;
      d_end   <= m_end;
      d_ts    <= m_ts;
    end
  end

  logic        acc_valid;
  moment_rec_t acc_rec;
  logic [15:0] dup_count;

  moment_accumulator u_mom (
    .clk, .rst, .ev_start(d_start), .ev_ts(d_ts), .hit_valid(d_hit && l_valid),
    .cam_id(l_id), .x(l_x), .y(l_y), .ev_end(d_end),
    .rec_valid(acc_valid), .rec(acc_rec), .dup_count
  );

  assign rec_valid = acc_valid;
  assign rec       = acc_rec;

  // ---------------- record FIFO and framer ----------------
  logic          rf_full, rf_empty, rf_ready;
  logic [RW-1:0] rf_head;
  logic [$clog2(REC_FIFO_DEPTH):0] rf_level;
  logic [15:0]   rec_drop, rec_sent;

  sync_fifo #(.WIDTH(RW), .DEPTH(REC_FIFO_DEPTH)) u_recfifo (
    .clk, .rst,
    .wr_en(acc_valid), .wr_data(acc_rec), .full(rf_full),
    .rd_en(rf_ready && !rf_empty), .rd_data(rf_head), .empty(rf_empty), .level(rf_level)
  );

  l2_record_framer u_framer (
    .clk, .rst, .rec_valid(!rf_empty), .rec(moment_rec_t'(rf_head)), .rec_ready(rf_ready),
    .tx_valid(l3_tx_valid), .tx_word(l3_tx_word), .tx_ready(l3_tx_ready)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      rec_drop <= '0;
      rec_sent <= '0;
    end else begin
      if (acc_valid && rf_full)      rec_drop <= rec_drop + 1'b1;
      if (rf_ready && !rf_empty)     rec_sent <= rec_sent + 1'b1;
    end
  end

  // ---------------- Level 3 commands ----------------
  logic [15:0] l3_err;
  l3_command_decoder u_cmd (
    .clk, .rst, .rx_valid(l3_rx_valid), .rx_word(l3_rx_word),
    .pps(pps_out), .sys_reset, .err_count(l3_err)
  );

  // ---------------- diagnostic capture ----------------
  logic [15:0]  cap_data;
  logic [CAW:0] cap_count;
  diag_capture #(.WIDTH(16), .DEPTH(CAP_DEPTH)) u_cap (
    .clk, .rst, .arm(cap_arm),
    .din_valid(l3_tx_valid && l3_tx_ready), .din(l3_tx_word),
    .rd_addr(cfg_addr[CAW-1:0]), .rd_data(cap_data), .count(cap_count)
  );

  // ---------------- setup bus read ----------------
  always_ff @(posedge clk) begin
    if (rst) cfg_rdata <= '0;
    else begin
      case (cfg_addr)
        12'h000: cfg_rdata <= 32'(window);
        12'h001: cfg_rdata <= 32'(timeout);
        12'h003: cfg_rdata <= 32'(diag_len);
        12'h004: cfg_rdata <= 32'(rec_drop);
        12'h005: cfg_rdata <= 32'(in_drop);
        12'h006: cfg_rdata <= 32'(l3_err);
        12'h007: cfg_rdata <= 32'(rec_sent);
        12'h008: cfg_rdata <= 32'(dup_count);
        12'h009: cfg_rdata <= 32'(cap_count);
        12'h00F: cfg_rdata <= {m_busy, 31'(rf_level)};
        default: begin
          cfg_rdata <= cfg_addr[11] ? 32'(cap_data) : 32'd0;
          for (int i = 0; i < NR; i++)
            if (int'(cfg_addr) == 'h00A + i) cfg_rdata <= 32'(in_level[i]);
        end
      endcase
    end
  end
endmodule
