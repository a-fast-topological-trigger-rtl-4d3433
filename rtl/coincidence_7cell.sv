// coincidence_7cell: topological 3-fold coincidence over hexagonal 7-pixel
// cells.
//
// Every pixel is the centre of a cell made of itself and its (up to) six
// hexagonal neighbours, and is a neighbour in the cells around it. A cell
// fires when its centre and at least two of its neighbours are on. Because any
// connected group of three pixels has one pixel touching the other two, the
// OR of all cells is exactly "three neighbouring pixels on together". Cells
// and trigger are registered: one clock of latency. The neighbour map is built
// at elaboration from trig_pkg::hex_nbr for a ROWS x COLS offset-row grid.
// The cell structure follows the trigger this models; the exact 3-of-7 rule
// (centre required) is this design's reading of it.
module coincidence_7cell
  import trig_pkg::*;
#(
  parameter int ROWS = REG_ROWS,
  parameter int COLS = CAM_COLS
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic [ROWS*COLS-1:0] pix,
  output logic [ROWS*COLS-1:0] cells,
  output logic                 trig
);
  logic [ROWS*COLS-1:0] fire;

  for (genvar r = 0; r < ROWS; r++) begin : g_row
    for (genvar c = 0; c < COLS; c++) begin : g_col
      logic [5:0] nb;
      for (genvar k = 0; k < 6; k++) begin : g_nb
        localparam int J = hex_nbr(r, c, k, ROWS, COLS);
        if (J >= 0) begin : g_on
          assign nb[k] = pix[J];
        end else begin : g_off
          assign nb[k] = 1'b0;
        end
      end
      assign fire[r*COLS+c] = pix[r*COLS+c] && ($countones(nb) >= 2);
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      cells <= '0;
      trig  <= 1'b0;
    end else begin
      cells <= fire;
      trig  <= |fire;
    end
  end

endmodule
