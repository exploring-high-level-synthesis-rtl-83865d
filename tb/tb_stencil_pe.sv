// tb_stencil_pe: self-checking test of one stencil PE.
//
// Two PEs are tested side by side on small grids whose width is not a
// multiple of the tile width (so partial tiles and all four grid edges are
// exercised): a Laplace PE with a 4x2 tile (hybrid unrolling) and a Sobel PE
// with a 3x1 tile. Each receives two grids back to back with random input
// gaps and random output back-pressure; every output cell is compared with a
// reference computed here from the grid arrays with zero padding. A third
// run with no stalls checks the throughput: one tile per cycle, latency
// WPR+1 tiles.
module tb_stencil_pe;
  import stencil_pkg::*;

  localparam int COLS = 10, ROWS = 7;
  localparam int LPX = 4, LPY = 2, LDW = 32;
  localparam int SPX = 3, SPY = 1, SDW = 8;
  localparam int LWPR = (COLS + LPX - 1) / LPX, LNB = (ROWS + LPY - 1) / LPY;
  localparam int SWPR = (COLS + SPX - 1) / SPX, SNB = ROWS;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  // ---------------- Laplace DUT ----------------
  logic l_in_valid, l_in_ready, l_out_valid, l_out_ready;
  logic [LPY-1:0][LPX-1:0][LDW-1:0] l_in_data, l_out_data;
  stencil_pe #(.KERNEL(KERN_LAPLACE), .DW(LDW), .COLS(COLS), .ROWS(ROWS), .PX(LPX), .PY(LPY)) dut_l (
    .clk, .rst_n, .in_valid(l_in_valid), .in_ready(l_in_ready), .in_data(l_in_data),
    .out_valid(l_out_valid), .out_ready(l_out_ready), .out_data(l_out_data));

  // ---------------- Sobel DUT ----------------
  logic s_in_valid, s_in_ready, s_out_valid, s_out_ready;
  logic [SPY-1:0][SPX-1:0][SDW-1:0] s_in_data, s_out_data;
  stencil_pe #(.KERNEL(KERN_SOBEL), .DW(SDW), .COLS(COLS), .ROWS(ROWS), .PX(SPX), .PY(SPY)) dut_s (
    .clk, .rst_n, .in_valid(s_in_valid), .in_ready(s_in_ready), .in_data(s_in_data),
    .out_valid(s_out_valid), .out_ready(s_out_ready), .out_data(s_out_data));

  int lgrid [2][ROWS][COLS];
  int sgrid [2][ROWS][COLS];
  bit stall_mode = 1;

  function automatic int lat(int f, int y, int x);
    if (y < 0 || y >= ROWS || x < 0 || x >= COLS) return 0;
    return lgrid[f][y][x];
  endfunction
  function automatic int sat(int f, int y, int x);
    if (y < 0 || y >= ROWS || x < 0 || x >= COLS) return 0;
    return sgrid[f][y][x];
  endfunction
  function automatic int lap_ref(int f, int y, int x);
    longint s;
    s = longint'(lat(f,y-1,x)) + lat(f,y+1,x) + lat(f,y,x-1) + lat(f,y,x+1);
    return int'(s >>> 2);
  endfunction
  function automatic int sob_ref(int f, int y, int x);
    int gx, gy, m;
    gx = (sat(f,y-1,x-1) + 2*sat(f,y,x-1) + sat(f,y+1,x-1)) - (sat(f,y-1,x+1) + 2*sat(f,y,x+1) + sat(f,y+1,x+1));
    gy = (sat(f,y-1,x-1) + 2*sat(f,y-1,x) + sat(f,y-1,x+1)) - (sat(f,y+1,x-1) + 2*sat(f,y+1,x) + sat(f,y+1,x+1));
    m = (gx < 0 ? -gx : gx) + (gy < 0 ? -gy : gy);
    return m > 255 ? 255 : m;
  endfunction

  // Laplace driver and checker
  initial begin
    l_in_valid = 0; l_in_data = '0;
    wait (rst_n);
    for (int f = 0; f < 2; f++)
      for (int b = 0; b < LNB; b++)
        for (int j = 0; j < LWPR; j++) begin
          @(negedge clk);
          while (stall_mode && ($urandom % 4 == 0)) begin l_in_valid = 0; @(negedge clk); end
          for (int r = 0; r < LPY; r++)
            for (int c = 0; c < LPX; c++) begin
              automatic int y = b*LPY + r, x = j*LPX + c;
              l_in_data[r][c] = (y < ROWS && x < COLS) ? lgrid[f][y][x] : $urandom;
            end
          l_in_valid = 1;
          @(posedge clk); while (!l_in_ready) @(posedge clk);
        end
    @(negedge clk); l_in_valid = 0;
  end
  int l_outs = 0;
  always @(negedge clk) l_out_ready = stall_mode ? ($urandom % 3 != 0) : 1'b1;
  always @(posedge clk) if (rst_n && l_out_valid && l_out_ready) begin
    int f, t, b, j;
    f = l_outs / (LWPR*LNB); t = l_outs % (LWPR*LNB); b = t / LWPR; j = t % LWPR;
    for (int r = 0; r < LPY; r++)
      for (int c = 0; c < LPX; c++) begin
        automatic int y = b*LPY + r, x = j*LPX + c, exp;
        exp = (y < ROWS && x < COLS) ? lap_ref(f % 2, y, x) : 0;
        checks++;
        if (int'(l_out_data[r][c]) != exp) begin
          failures++;
          if (failures < 10) $display("LAP f%0d (%0d,%0d): got %0d exp %0d", f, y, x, int'(l_out_data[r][c]), exp);
        end
      end
    l_outs++;
  end

  // Sobel driver and checker
  initial begin
    s_in_valid = 0; s_in_data = '0;
    wait (rst_n);
    for (int f = 0; f < 2; f++)
      for (int b = 0; b < SNB; b++)
        for (int j = 0; j < SWPR; j++) begin
          @(negedge clk);
          while (stall_mode && ($urandom % 4 == 0)) begin s_in_valid = 0; @(negedge clk); end
          for (int c = 0; c < SPX; c++) begin
            automatic int x = j*SPX + c;
            s_in_data[0][c] = (x < COLS) ? SDW'(sgrid[f][b][x]) : SDW'($urandom);
          end
          s_in_valid = 1;
          @(posedge clk); while (!s_in_ready) @(posedge clk);
        end
    @(negedge clk); s_in_valid = 0;
  end
  int s_outs = 0;
  always @(negedge clk) s_out_ready = ($urandom % 3 != 0);
  always @(posedge clk) if (rst_n && s_out_valid && s_out_ready) begin
    int f, t, b, j;
    f = s_outs / (SWPR*SNB); t = s_outs % (SWPR*SNB); b = t / SWPR; j = t % SWPR;
    for (int c = 0; c < SPX; c++) begin
      automatic int x = j*SPX + c, exp;
      exp = (x < COLS) ? sob_ref(f, b, x) : 0;
      checks++;
      if (int'(s_out_data[0][c]) != exp) begin
        failures++;
        if (failures < 10) $display("SOB f%0d (%0d,%0d): got %0d exp %0d", f, b, x, int'(s_out_data[0][c]), exp);
      end
    end
    s_outs++;
  end

  // Throughput run: a third Laplace grid with no stalls.
  int t_first_in, t_last_out;
  initial begin
    for (int f = 0; f < 2; f++)
      for (int y = 0; y < ROWS; y++)
        for (int x = 0; x < COLS; x++) begin
          lgrid[f][y][x] = int'($urandom) >>> 4;
          sgrid[f][y][x] = $urandom % 256;
        end
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (l_outs == 2*LWPR*LNB && s_outs == 2*SWPR*SNB);
    checks++;
    // run grid 0 of the Laplace data again, without stalls
    stall_mode = 0;
    repeat (2) @(posedge clk);
        for (int b = 0; b < LNB; b++)
          for (int j = 0; j < LWPR; j++) begin
            @(negedge clk);
            for (int r = 0; r < LPY; r++)
              for (int c = 0; c < LPX; c++) begin
                automatic int y = b*LPY + r, x = j*LPX + c;
                l_in_data[r][c] = (y < ROWS && x < COLS) ? lgrid[0][y][x] : 0;
              end
            l_in_valid = 1;
            if (b == 0 && j == 0) t_first_in = $time / 10;
            @(posedge clk); if (!l_in_ready) begin failures++; $display("PE stalled its input"); end
          end
        @(negedge clk); l_in_valid = 0;
    wait (l_outs == 3*LWPR*LNB);
    t_last_out = $time / 10;
    checks++;
    // inputs take TOTAL cycles, flush WPR+1 more, output register 1
    if (t_last_out - t_first_in != LWPR*LNB + LWPR + 1) begin
      failures++;
      $display("throughput: %0d cycles, expected %0d", t_last_out - t_first_in, LWPR*LNB + LWPR + 1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
