// tb_coincidence_7cell: checks the 7-pixel cells on a small hexagonal grid.
// Neighbours are worked out from the pixel centres (x = 2c + row parity,
// y = row): two pixels touch when they are in the same row with |dx| = 2 or
// in adjacent rows with |dx| = 1. A cell must fire when its centre and two
// neighbours are on, and the trigger must equal a brute-force search for
// three mutually connected pixels (a path of three). Latency: one tick.
module tb_coincidence_7cell;
  localparam int R = 4, C = 5, N = R * C;
  logic clk = 0, rst = 1;
  logic [N-1:0] pix, cells;
  logic trig;
  int checks = 0, failures = 0;
  int n_trig = 0;

  coincidence_7cell #(.ROWS(R), .COLS(C)) dut (.clk, .rst, .pix, .cells, .trig);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic bit touch(int a, int b);
    int ra, ca, rb, cb, xa, xb, dx, dr;
    ra = a / C; ca = a % C; rb = b / C; cb = b % C;
    xa = 2 * ca + (ra % 2); xb = 2 * cb + (rb % 2);
    dx = (xa > xb) ? xa - xb : xb - xa;
    dr = (ra > rb) ? ra - rb : rb - ra;
    return (dr == 0 && dx == 2) || (dr == 1 && dx == 1);
  endfunction

  logic [N-1:0] exp_cells;
  bit exp_trig;

  initial begin
    pix = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int t = 0; t < 3000; t++) begin
      // sparse random patterns, some denser
      pix = '0;
      for (int i = 0; i < N; i++) if ($urandom_range(0, 99) < ((t % 3 == 0) ? 25 : 8)) pix[i] = 1'b1;
      exp_trig = 0;
      for (int i = 0; i < N; i++) begin
        int cnt;
        cnt = 0;
        for (int j = 0; j < N; j++) if (pix[j] && touch(i, j)) cnt++;
        exp_cells[i] = pix[i] && cnt >= 2;
      end
      for (int a = 0; a < N; a++) if (pix[a])
        for (int b = 0; b < N; b++) if (pix[b] && touch(a, b))
          for (int c = 0; c < N; c++) if (pix[c] && c != a && touch(b, c)) exp_trig = 1;
      @(posedge clk); #1;
      checks += 2;
      if (cells !== exp_cells) begin failures++; if (failures < 10) $display("FAIL cells %h exp %h pix %h", cells, exp_cells, pix); end
      if (trig !== exp_trig)   begin failures++; if (failures < 10) $display("FAIL trig %0b exp %0b pix %h", trig, exp_trig, pix); end
      if (exp_trig) n_trig++;
      @(negedge clk);
    end
    checks++;
    if (n_trig == 0 || n_trig == 3000) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
