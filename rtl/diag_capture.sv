// diag_capture: diagnostic memory that records a board's results for readout
// over the setup bus.
//
// An arm pulse empties the memory and starts a capture; every tick with
// din_valid then stores din at the next address until DEPTH words are held.
// rd_data shows the word at rd_addr (combinational read) and count how many
// words were captured. The L1.5 board records its outgoing link words, the L2
// board its outgoing record words. What is recorded and the memory size are
// this design's choices.
module diag_capture #(
  parameter int WIDTH = 32,
  parameter int DEPTH = 256,
  parameter int AW    = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             arm,
  input  logic             din_valid,
  input  logic [WIDTH-1:0] din,
  input  logic [AW-1:0]    rd_addr,
  output logic [WIDTH-1:0] rd_data,
  output logic [AW:0]      count
);
  logic [WIDTH-1:0] mem [DEPTH];
  logic             armed;

  always_ff @(posedge clk) begin
    if (armed && din_valid && count < (AW+1)'(DEPTH)) mem[count[AW-1:0]] <= din;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      armed <= 1'b0;
      count <= '0;
    end else if (arm) begin
      armed <= 1'b1;
      count <= '0;
    end else if (armed && din_valid && count < (AW+1)'(DEPTH)) begin
      count <= count + 1'b1;
    end
  end

  assign rd_data = mem[rd_addr];
endmodule
