// pixel_xy_lut: lookup table from a board's local pixel address to the camera
// pixel number and its X-Y coordinates.
//
// The table holds one entry per (region, address): region k, local address a
// is camera row k*REG_ROW_STEP + a/COLS, column a%COLS. Coordinates are in
// grid units of the offset-row hexagonal camera: x = 2*column + (row odd),
// y = row. Addresses past the camera edge read valid = 0. The table is filled
// at start-up from that formula and read with one tick of latency, like a
// block RAM. Pixel-to-coordinate lookup tables follow the trigger this models;
// the camera layout and coordinate units are this design's choices.
module pixel_xy_lut
  import trig_pkg::*;
#(
  parameter int ROWS = REG_ROWS,
  parameter int COLS = CAM_COLS,
  parameter int NR   = N_REGIONS
) (
  input  logic                clk,
  input  logic [1:0]          region,
  input  logic [ADDR_W-1:0]   addr,
  output logic                valid,
  output logic [CAM_ID_W-1:0] cam_id,
  output logic [COORD_W-1:0]  x,
  output logic [COORD_W-1:0]  y
);
  typedef struct packed {
    logic                valid;
    logic [CAM_ID_W-1:0] cam_id;
    logic [COORD_W-1:0]  x;
    logic [COORD_W-1:0]  y;
  } lut_ent_t;

  localparam int ENTRIES = 4 << ADDR_W;   // region in the top two bits

  lut_ent_t rom [ENTRIES];

  initial begin
    for (int k = 0; k < 4; k++)
      for (int a = 0; a < (1 << ADDR_W); a++) begin
        int r, c;
        r = k * REG_ROW_STEP + a / COLS;
        c = a % COLS;
        if (k < NR && a < ROWS * COLS && r < CAM_ROWS)
          rom[(k << ADDR_W) + a] = '{valid: 1'b1,
                                     cam_id: CAM_ID_W'(r * COLS + c),
                                     x: COORD_W'(2 * c + (r % 2)),
                                     y: COORD_W'(r)};
        else
          rom[(k << ADDR_W) + a] = '0;
      end
  end

  lut_ent_t q;
  always_ff @(posedge clk) q <= rom[{region, addr}];

  assign valid  = q.valid;
  assign cam_id = q.cam_id;
  assign x      = q.x;
  assign y      = q.y;
endmodule
