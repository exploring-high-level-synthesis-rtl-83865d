// tb_stencil_window: self-checking test of the FIFO-and-register buffer.
//
// A 12 x 6 grid is streamed as 3 x 2 tiles (4 tiles per band, 3 bands), two
// grids back to back with random gaps in `shift`. After every shift k >=
// WPR+1 the window must hold the neighbourhood of tile k-WPR-1; every
// window position that lies inside the grid (and inside the same grid) is
// compared with the grid array. Positions outside the grid are not checked,
// the PE masks them.
module tb_stencil_window;
  localparam int DW = 16, COLS = 12, ROWS = 6, PX = 3, PY = 2;
  localparam int WPR = COLS / PX, NB = ROWS / PY, TOTAL = WPR * NB;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic shift = 0;
  logic [PY-1:0][PX-1:0][DW-1:0] in_tile = '0;
  logic [PY+1:0][PX+1:0][DW-1:0] win;
  stencil_window #(.DW(DW), .COLS(COLS), .PX(PX), .PY(PY)) dut (.*);

  logic [DW-1:0] grid [2][ROWS][COLS];

  initial begin
    for (int f = 0; f < 2; f++)
      for (int y = 0; y < ROWS; y++)
        for (int x = 0; x < COLS; x++) grid[f][y][x] = DW'($urandom);
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < 2 * TOTAL + WPR + 1; k++) begin
      @(negedge clk);
      while ($urandom % 3 == 0) begin shift = 0; @(negedge clk); end
      if (k < 2 * TOTAL) begin
        automatic int f = k / TOTAL, t = k % TOTAL;
        for (int r = 0; r < PY; r++)
          for (int c = 0; c < PX; c++)
            in_tile[r][c] = grid[f][(t / WPR) * PY + r][(t % WPR) * PX + c];
      end else in_tile = '0;
      shift = 1;
      @(posedge clk); #1;
      if (k >= WPR + 1) begin
        automatic int tk = k - WPR - 1, f = tk / TOTAL, t = tk % TOTAL;
        automatic int y0 = (t / WPR) * PY - 1, x0 = (t % WPR) * PX - 1;
        for (int r = 0; r < PY + 2; r++)
          for (int c = 0; c < PX + 2; c++) begin
            automatic int y = y0 + r, x = x0 + c;
            if (y >= 0 && y < ROWS && x >= 0 && x < COLS) begin
              checks++;
              if (win[r][c] != grid[f][y][x]) begin
                failures++;
                if (failures < 10) $display("tile %0d pos (%0d,%0d): got %h exp %h", tk, r, c, win[r][c], grid[f][y][x]);
              end
            end
          end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
