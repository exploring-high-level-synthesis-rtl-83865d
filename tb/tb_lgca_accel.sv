// tb_lgca_accel: self-checking test of the LGCA accelerator (PE chain).
//
// Three PEs (three time steps per pass) with groups of G = 4 sites on a
// 10 x 6 hexagonal grid. Two grids go through with random input gaps and
// output back-pressure, a third without stalls. Each output site is compared
// with three steps of an FHP reference written here (own collision rule
// list, own neighbour tables, bounce-back walls); PE i must use time step
// base_step + i for its chirality bits. Mass is checked per grid. For the
// unstalled grid the chain must deliver one group per cycle (last output
// TOTAL-1 cycles after the first) with a fill latency of at most
// NPE*(WPR+4) cycles.
module tb_lgca_accel;
  import lgca_pkg::*;

  localparam int COLS = 10, ROWS = 6, G = 4, NPE = 3;
  localparam int WPR = (COLS + G - 1) / G, TOTAL = WPR * ROWS;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [15:0] step = 0;
  logic in_valid = 0, in_ready, out_valid, out_ready = 0;
  logic [NDIR-1:0][G-1:0] in_data = '0, out_data;
  lgca_accel #(.COLS(COLS), .ROWS(ROWS), .G(G), .NPE(NPE)) dut (
    .clk, .rst_n, .base_step(step), .in_valid, .in_ready, .in_data, .out_valid, .out_ready, .out_data);

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

  task automatic make_ref_n(input logic [15:0] st);
    logic [6:0] keep [ROWS][COLS];
    keep = grid;
    for (int s = 0; s < NPE; s++) begin
      make_ref(16'(st + s));
      grid = expg;
    end
    grid = keep;
  endtask

  function automatic int mass(input logic [6:0] g [ROWS][COLS]);
    int m = 0;
    for (int y = 0; y < ROWS; y++) for (int x = 0; x < COLS; x++) m += $countones(g[y][x]);
    return m;
  endfunction

  int outs = 0, out_mass = 0, t_first_out = 0, t_last_out = 0;
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
    if (outs % TOTAL == 0) t_first_out = $time / 10;
    t_last_out = $time / 10;
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
      make_ref_n(step);
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
        if (t_last_out - t_first_out != TOTAL - 1) begin
          failures++; $display("rate: %0d groups in %0d cycles", TOTAL, t_last_out - t_first_out + 1);
        end
        checks++;
        if (t_first_out - t0 > NPE * (WPR + 4)) begin
          failures++; $display("latency %0d cycles", t_first_out - t0);
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
