// tb_lgca_pe: self-checking test of one LGCA processing element.
//
// A 10 x 6 hexagonal grid (COLS not a multiple of the group width G = 4, so
// the last group of each row is partly used) is streamed through the PE
// twice, with different time-step numbers, random input gaps and random
// output back-pressure. Every output site is compared with a reference
// written here independently of the RTL: its own list of FHP collision rules
// (expressed with direction arithmetic), its own hexagonal neighbour tables
// and bounce-back at the grid edge. Particle count of every output grid is
// compared with the input grid (mass conservation). A third pass without
// stalls checks one group per cycle and a latency of WPR+1 groups.
module tb_lgca_pe;
  import lgca_pkg::*;

  localparam int COLS = 10, ROWS = 6, G = 4;
  localparam int WPR = (COLS + G - 1) / G, TOTAL = WPR * ROWS;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [15:0] step = 0;
  logic in_valid = 0, in_ready, out_valid, out_ready = 0;
  logic [NDIR-1:0][G-1:0] in_data = '0, out_data;
  lgca_pe #(.COLS(COLS), .ROWS(ROWS), .G(G)) dut (
    .clk, .rst_n, .step, .in_valid, .in_ready, .in_data, .out_valid, .out_ready, .out_data);

  logic [6:0] grid [ROWS][COLS];
  logic [6:0] expg [ROWS][COLS];
  bit stall_mode = 1;

  // direction i as a one-hot site (i taken modulo 6, 1..6)
  function automatic logic [6:0] B(int i);
    return 7'(1) << (((i - 1) % 6 + 6) % 6 + 1);
  endfunction
  function automatic logic [6:0] coll_ref(logic [6:0] s, bit xi);
    for (int i = 1; i <= 6; i++) begin
      if (s == (B(i) | B(i+3)))            return xi ? (B(i+1) | B(i+4)) : (B(i-1) | B(i+2));
      if (s == (B(i) | B(i+3) | 7'd1))     return xi ? (B(i+1) | B(i+4) | 7'd1) : (B(i-1) | B(i+2) | 7'd1);
      if (s == (B(i) | B(i+2) | B(i+4)))   return B(i+1) | B(i+3) | B(i+5);
      if (s == (B(i-1) | B(i+1)))          return B(i) | 7'd1;
      if (s == (B(i) | 7'd1))              return B(i-1) | B(i+1);
      if (s == (B(i) | B(i-1) | B(i+2)))  return xi ? (B(i) | B(i+1) | B(i-2)) : (B(i-1) | B(i+1) | 7'd1);
      if (s == (B(i) | B(i+1) | B(i-2)))  return xi ? (B(i) | B(i-1) | B(i+2)) : (B(i-1) | B(i+1) | 7'd1);
    end
    return s;
  endfunction
  // neighbour of (x,y) along C_i; odd rows sit half a site to the right
  localparam int DXO [7] = '{0, 0, 1, 1, 1, 0, -1};
  localparam int DXE [7] = '{0, -1, 0, 1, 0, -1, -1};
  localparam int DY  [7] = '{0, 1, 1, 0, -1, -1, 0};
  function automatic int oppd(int i); return i > 3 ? i - 3 : i + 3; endfunction

  task automatic make_ref(input logic [15:0] st);
    logic [6:0] post [ROWS][COLS];
    for (int y = 0; y < ROWS; y++)
      for (int x = 0; x < COLS; x++)
        post[y][x] = coll_ref(grid[y][x], fhp_xi(16'(x), 16'(y), st));
    for (int y = 0; y < ROWS; y++)
      for (int x = 0; x < COLS; x++) begin
        expg[y][x][0] = post[y][x][0];
        for (int i = 1; i <= 6; i++) begin
          int o, sx, sy;
          o  = oppd(i);
          sx = x + ((y % 2) ? DXO[o] : DXE[o]);
          sy = y + DY[o];
          if (sx >= 0 && sx < COLS && sy >= 0 && sy < ROWS) expg[y][x][i] = post[sy][sx][i];
          else expg[y][x][i] = post[y][x][o];
        end
      end
  endtask

  function automatic int mass(input logic [6:0] g [ROWS][COLS]);
    int m = 0;
    for (int y = 0; y < ROWS; y++) for (int x = 0; x < COLS; x++) m += $countones(g[y][x]);
    return m;
  endfunction

  int outs = 0, out_mass = 0;
  always @(negedge clk) out_ready = stall_mode ? ($urandom % 3 != 0) : 1'b1;
  always @(posedge clk) if (rst_n && out_valid && out_ready) begin
    int t, y, j;
    t = outs % TOTAL; y = t / WPR; j = t % WPR;
    for (int g = 0; g < G; g++) begin
      automatic int x = j * G + g;
      automatic logic [6:0] got, exp;
      for (int d = 0; d < NDIR; d++) got[d] = out_data[d][g];
      exp = (x < COLS) ? expg[y][x] : 7'd0;
      out_mass += $countones(got);
      checks++;
      if (got != exp) begin
        failures++;
        if (failures < 10) $display("site (%0d,%0d): got %b exp %b", x, y, got, exp);
      end
    end
    outs++;
  end

  task automatic send_grid(input bit stalls);
    for (int y = 0; y < ROWS; y++)
      for (int j = 0; j < WPR; j++) begin
        @(negedge clk);
        while (stalls && ($urandom % 4 == 0)) begin in_valid = 0; @(negedge clk); end
        for (int g = 0; g < G; g++)
          for (int d = 0; d < NDIR; d++)
            in_data[d][g] = (j*G + g < COLS) ? grid[y][j*G + g][d] : 1'($urandom);
        in_valid = 1;
        @(posedge clk);
        if (!stalls && !in_ready) begin failures++; $display("PE stalled its input"); end
        while (!in_ready) @(posedge clk);
      end
    @(negedge clk); in_valid = 0;
  endtask

  int t0, t1;
  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int pass = 0; pass < 3; pass++) begin
      for (int y = 0; y < ROWS; y++)
        for (int x = 0; x < COLS; x++) grid[y][x] = 7'($urandom);
      step = 16'(pass * 7 + 1);
      make_ref(step);
      stall_mode = (pass < 2);
      out_mass = 0;
      t0 = $time / 10;
      send_grid(stall_mode);
      wait (outs == (pass + 1) * TOTAL);
      t1 = $time / 10;
      checks++;
      if (out_mass != mass(grid)) begin
        failures++; $display("mass not conserved: %0d -> %0d", mass(grid), out_mass);
      end
      if (!stall_mode) begin
        checks++;
        if (t1 - t0 != TOTAL + WPR + 2) begin
          failures++; $display("throughput: %0d cycles, expected %0d", t1 - t0, TOTAL + WPR + 2);
        end
      end
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
