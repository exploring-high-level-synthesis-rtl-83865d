// tb_lbm_pe: self-checking test of one LBM (D2Q9) processing element.
//
// A 5 x 4 grid of sites (odd width, so the last word of two sites is half
// used) near rest (f_i = w_i rho (1 + small random)) is streamed through a
// PE with NCU = 2 computing units, twice with random input gaps and output
// back-pressure, then once without stalls to check one word per cycle and
// a latency of WPR+1 words. The reference is written here in double
// precision: pull streaming with bounce-back at the grid edge, then BGK
// relaxation towards the second-order equilibrium. A site passes when all
// nine distributions lie within 2e-6 of the reference (the RTL works in
// Q8.24 fixed point). Total mass of each output grid is also compared.
module tb_lbm_pe;
  localparam int COLS = 5, ROWS = 4, NCU = 2, FW = 32, FRAC = 24;
  localparam int WPR = (COLS + NCU - 1) / NCU, TOTAL = WPR * ROWS;
  localparam real TAU = 0.6, TOL = 2.0e-6, SCALE = 16777216.0;
  localparam int OMEGA = int'(SCALE / TAU);

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic in_valid = 0, in_ready, out_valid, out_ready = 0;
  logic [NCU-1:0][8:0][FW-1:0] in_data = '0, out_data;
  lbm_pe #(.COLS(COLS), .ROWS(ROWS), .NCU(NCU), .FW(FW), .FRAC(FRAC), .OMEGA(OMEGA)) dut (
    .clk, .rst_n, .in_valid, .in_ready, .in_data, .out_valid, .out_ready, .out_data);

  localparam int  EX [9] = '{0, 1, 0, -1, 0, 1, -1, -1, 1};
  localparam int  EY [9] = '{0, 0, 1, 0, -1, 1, 1, -1, -1};
  localparam int  OP [9] = '{0, 3, 4, 1, 2, 7, 8, 5, 6};
  localparam real W  [9] = '{4.0/9, 1.0/9, 1.0/9, 1.0/9, 1.0/9, 1.0/36, 1.0/36, 1.0/36, 1.0/36};

  logic [FW-1:0] grid [ROWS][COLS][9];
  real           expg [ROWS][COLS][9];
  bit stall_mode = 1;

  function automatic real fx2r(logic [FW-1:0] v); return real'($signed(v)) / SCALE; endfunction

  task automatic make_ref();
    for (int y = 0; y < ROWS; y++)
      for (int x = 0; x < COLS; x++) begin
        real f [9];
        real rho, ux, uy, usq;
        for (int i = 0; i < 9; i++) begin
          int sx, sy;
          sx = x - EX[i]; sy = y - EY[i];
          if (sx >= 0 && sx < COLS && sy >= 0 && sy < ROWS) f[i] = fx2r(grid[sy][sx][i]);
          else f[i] = fx2r(grid[y][x][OP[i]]);
        end
        rho = 0; ux = 0; uy = 0;
        for (int i = 0; i < 9; i++) begin rho += f[i]; ux += EX[i] * f[i]; uy += EY[i] * f[i]; end
        ux /= rho; uy /= rho; usq = ux*ux + uy*uy;
        for (int i = 0; i < 9; i++) begin
          real cu, feq;
          cu  = EX[i]*ux + EY[i]*uy;
          feq = W[i] * rho * (1.0 + 3.0*cu + 4.5*cu*cu - 1.5*usq);
          expg[y][x][i] = f[i] + (feq - f[i]) / TAU;
        end
      end
  endtask

  real in_mass, out_mass;
  int outs = 0;
  always @(negedge clk) out_ready = stall_mode ? ($urandom % 3 != 0) : 1'b1;
  always @(posedge clk) if (rst_n && out_valid && out_ready) begin
    int t, y, j;
    t = outs % TOTAL; y = t / WPR; j = t % WPR;
    for (int u = 0; u < NCU; u++) begin
      automatic int x = j * NCU + u;
      automatic bit bad = 0;
      for (int i = 0; i < 9; i++) begin
        automatic real got = fx2r(out_data[u][i]);
        if (x < COLS) begin
          out_mass += got;
          if (got - expg[y][x][i] > TOL || expg[y][x][i] - got > TOL) bad = 1;
        end else if (out_data[u][i] != '0) bad = 1;
      end
      checks++;
      if (bad) begin
        failures++;
        if (failures < 10) $display("site (%0d,%0d) f1 got %f exp %f", x, y, fx2r(out_data[u][1]),
                                    x < COLS ? expg[y][x][1] : 0.0);
      end
    end
    outs++;
  end

  task automatic send_grid(input bit stalls);
    for (int y = 0; y < ROWS; y++)
      for (int j = 0; j < WPR; j++) begin
        @(negedge clk);
        while (stalls && ($urandom % 4 == 0)) begin in_valid = 0; @(negedge clk); end
        for (int u = 0; u < NCU; u++)
          for (int i = 0; i < 9; i++)
            in_data[u][i] = (j*NCU + u < COLS) ? grid[y][j*NCU + u][i] : FW'($urandom);
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
      in_mass = 0;
      for (int y = 0; y < ROWS; y++)
        for (int x = 0; x < COLS; x++)
          for (int i = 0; i < 9; i++) begin
            automatic real v = W[i] * (1.0 + 0.2 * (real'($urandom % 1000) / 1000.0 - 0.5));
            grid[y][x][i] = FW'(longint'(v * SCALE));
            in_mass += fx2r(grid[y][x][i]);
          end
      make_ref();
      stall_mode = (pass < 2);
      out_mass = 0;
      t0 = $time / 10;
      send_grid(stall_mode);
      wait (outs == (pass + 1) * TOTAL);
      t1 = $time / 10;
      checks++;
      if (out_mass - in_mass > 1e-4 || in_mass - out_mass > 1e-4) begin
        failures++; $display("mass not conserved: %f -> %f", in_mass, out_mass);
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
