// trig_pkg: types, sizes and camera geometry shared by the camera trigger.
//
// The camera is a hexagonal grid stored in offset rows: odd rows sit half a
// pixel to the right of even rows, so a pixel (r,c) touches (r,c-1), (r,c+1)
// and two pixels in each of the rows above and below. A trigger region is a
// band of REG_ROWS full camera rows; consecutive regions start REG_ROW_STEP rows
// apart, so neighbouring regions share two rows. The grid, region size and
// overlap are this design's stand-ins for a real pixel map; the 500-pixel
// camera, three regions and the 32-bit timestamp follow the trigger it models.
// The link word format (20 bits, one per ribbon-cable pair) is also this
// design's own choice.
package trig_pkg;

  localparam int CAM_ROWS     = 25;
  localparam int CAM_COLS     = 20;
  localparam int CAM_PIXELS   = CAM_ROWS * CAM_COLS;   // 500
  localparam int N_REGIONS    = 3;
  localparam int REG_ROWS     = 10;
  localparam int REG_ROW_STEP = 8;                     // two shared rows
  localparam int REG_PIX      = REG_ROWS * CAM_COLS;   // 200 per L1.5 board
  localparam int ADDR_W       = 8;                     // local pixel address
  localparam int CAM_ID_W     = 9;                     // camera pixel number
  localparam int COORD_W      = 8;                     // X and Y coordinates
  localparam int TS_W         = 32;

  // Ribbon-cable word: 20 signal pairs from an L1.5 board to the L2 board.
  typedef enum logic [1:0] {
    LT_IDLE  = 2'd0,
    LT_TS_HI = 2'd1,   // timestamp bits 31:16
    LT_TS_LO = 2'd2,   // timestamp bits 15:0
    LT_ADDR  = 2'd3    // local address of one hit pixel
  } link_type_e;

  typedef struct packed {
    logic       valid;
    link_type_e typ;
    logic       last;      // final word of the event
    logic [15:0] payload;
  } link_word_t;           // 20 bits

  // One entry of an L2 input FIFO: a hit pixel with its event timestamp.
  typedef struct packed {
    logic [TS_W-1:0]   ts;
    logic [ADDR_W-1:0] addr;
    logic              last;   // last entry of this board's event fragment
    logic              empty;  // fragment carried no pixel (addr invalid)
  } hit_entry_t;

  // Image moments of one event, as sent to Level 3.
  typedef struct packed {
    logic [TS_W-1:0] ts;
    logic [15:0]     n;
    logic [23:0]     sx;
    logic [23:0]     sy;
    logic [31:0]     sxx;
    logic [31:0]     syy;
    logic [31:0]     sxy;
  } moment_rec_t;

  // Level 3 command opcodes (bits 15:12 of a command word, bit 0 even parity).
  localparam logic [3:0] CMD_SYNC      = 4'h1;
  localparam logic [3:0] CMD_RESET     = 4'h2;
  localparam logic [3:0] CMD_CLEAR_ERR = 4'h3;

  // Record frame header word on the link to Level 3.
  localparam logic [15:0] REC_HEADER = 16'hA55A;
  localparam int          REC_WORDS  = 15;

  // k-th hexagonal neighbour (k = 0..5) of pixel (r,c) in a rows x cols
  // offset-row grid; returns its index r*cols+c or -1 if it is off the grid.
  function automatic int hex_nbr(int r, int c, int k, int rows, int cols);
    int dr, dc, rr, cc;
    int odd;
    odd = r % 2;
    case (k)
      0: begin dr = 0;  dc = -1; end
      1: begin dr = 0;  dc = 1;  end
      2: begin dr = -1; dc = odd - 1; end
      3: begin dr = -1; dc = odd;     end
      4: begin dr = 1;  dc = odd - 1; end
      default: begin dr = 1; dc = odd; end
    endcase
    rr = r + dr;
    cc = c + dc;
    if (rr < 0 || rr >= rows || cc < 0 || cc >= cols) return -1;
    return rr * cols + cc;
  endfunction

endpackage
