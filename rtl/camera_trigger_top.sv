// camera_trigger_top: the trigger crate of one telescope camera.
//
// The 500 camera pixels (25 rows x 20 columns of an offset-row hexagonal
// grid) are routed, as the crate backplane does, into three regions of ten
// rows starting at camera rows 0, 8 and 16. Neighbouring regions share two
// rows, so every pixel there is sent to two boards and any group of three
// touching pixels lies wholly inside one region; the last region has only
// nine real rows. Each region feeds one l15_processor; their ribbon-cable
// words go to one l2_processor, whose 16-bit record words go towards Level 3
// and which turns Level 3 commands into the once-per-second timestamp marker
// and a system reset for the whole crate.
//
// Clocking: one clock (400 MHz in the real crate) runs everything; a 1-in-8
// enable stands for the 50 MHz rate of the ribbon cables, which the real crate
// derives from the same distributed reference. A RESET command from Level 3
// resets every board one tick later.
//
// Setup bus: cfg_addr[15:12] selects the board (0..2 the L1.5 boards, 3 the
// L2 board) and cfg_addr[11:0] is the board's register address; cfg_rdata
// follows one tick after cfg_addr.
// The crate structure follows the trigger this models; the camera grid,
// region bands, single clock and bus are this design's choices.
module camera_trigger_top
  import trig_pkg::*;
(
  input  logic                  clk,
  input  logic                  rst,
  input  logic [CAM_PIXELS-1:0] l1_pix,
  input  logic                  l3_rx_valid,
  input  logic [15:0]           l3_rx_word,
  output logic                  l3_tx_valid,
  output logic [15:0]           l3_tx_word,
  input  logic                  l3_tx_ready,
  output logic                  rec_valid,
  output moment_rec_t           rec,
  output logic [N_REGIONS-1:0]  l15_trig,
  output logic [15:0]           l15_overflow [N_REGIONS],
  input  logic                  cfg_we,
  input  logic [15:0]           cfg_addr,
  input  logic [31:0]           cfg_wdata,
  output logic [31:0]           cfg_rdata
);
  logic       sys_reset, rst_all, pps;
  logic [2:0] ce_cnt;
  logic       link_ce;

  always_ff @(posedge clk) begin
    if (rst) rst_all <= 1'b1;
    else     rst_all <= sys_reset;
  end

  // 50 MHz word strobe.
  always_ff @(posedge clk) begin
    if (rst) ce_cnt <= '0;
    else     ce_cnt <= ce_cnt + 1'b1;
  end
  assign link_ce = (ce_cnt == 3'd7);

  link_word_t  links [N_REGIONS];
  logic [31:0] rdata [N_REGIONS+1];
  logic [3:0]  sel_q;

  for (genvar k = 0; k < N_REGIONS; k++) begin : g_l15
    logic [REG_PIX-1:0] region_pix;

    // Backplane routing of camera rows k*REG_ROW_STEP .. +REG_ROWS-1.
    for (genvar p = 0; p < REG_PIX; p++) begin : g_pix
      localparam int CAM = k * REG_ROW_STEP * CAM_COLS + p;
      if (CAM < CAM_PIXELS) begin : g_on
        assign region_pix[p] = l1_pix[CAM];
      end else begin : g_off
        assign region_pix[p] = 1'b0;
      end
    end

    l15_processor u_l15 (
      .clk, .rst(rst || rst_all), .pps, .link_ce,
      .l1_in(region_pix), .link_word(links[k]), .trig_out(l15_trig[k]),
      .overflow_count(l15_overflow[k]),
      .cfg_we(cfg_we && cfg_addr[15:12] == 4'(k)), .cfg_addr(cfg_addr[11:0]),
      .cfg_wdata, .cfg_rdata(rdata[k])
    );
  end

  l2_processor u_l2 (
    .clk, .rst(rst || rst_all), .link_ce, .link_in(links),
    .l3_rx_valid, .l3_rx_word, .l3_tx_valid, .l3_tx_word, .l3_tx_ready,
    .pps_out(pps), .sys_reset, .rec_valid, .rec,
    .cfg_we(cfg_we && cfg_addr[15:12] == 4'(N_REGIONS)), .cfg_addr(cfg_addr[11:0]),
    .cfg_wdata, .cfg_rdata(rdata[N_REGIONS])
  );

  always_ff @(posedge clk) begin
    if (rst) sel_q <= '0;
    else     sel_q <= cfg_addr[15:12];
  end
  assign cfg_rdata = (int'(sel_q) <= N_REGIONS) ? rdata[sel_q[1:0]] : 32'd0;
endmodule
