// tb_lbm_cu: self-checking test of the D2Q9 LBM computing unit.
//
// 1000 random 3x3 neighbourhoods (distributions w_i rho (1 + noise), rho
// between 0.5 and 1.5, noise up to +-40 %) with random in-grid flags for the
// eight neighbours (the centre is always inside). Each result is compared
// with a double precision reference of pull streaming, bounce-back for
// sources outside the grid, and BGK relaxation (tau = 0.6); tolerance 4e-6
// per distribution. Two invariants are checked as well: a site at rest
// equilibrium stays unchanged, and the collision keeps mass.
module tb_lbm_cu;
  localparam int FW = 32, FRAC = 24;
  localparam real TAU = 0.6, SCALE = 16777216.0, TOL = 4.0e-6;
  localparam int OMEGA = int'(SCALE / TAU);
  int checks = 0, failures = 0;

  logic [2:0][2:0][8:0][FW-1:0] nb;
  logic [2:0][2:0]              in_grid;
  logic [8:0][FW-1:0]           fout;
  lbm_cu #(.FW(FW), .FRAC(FRAC), .OMEGA(OMEGA)) dut (.nb, .in_grid, .fout);

  localparam int  EX [9] = '{0, 1, 0, -1, 0, 1, -1, -1, 1};
  localparam int  EY [9] = '{0, 0, 1, 0, -1, 1, 1, -1, -1};
  localparam int  OP [9] = '{0, 3, 4, 1, 2, 7, 8, 5, 6};
  localparam real W  [9] = '{4.0/9, 1.0/9, 1.0/9, 1.0/9, 1.0/9, 1.0/36, 1.0/36, 1.0/36, 1.0/36};

  function automatic real r(logic [FW-1:0] v); return real'($signed(v)) / SCALE; endfunction

  initial begin
    for (int t = 0; t < 1001; t++) begin
      automatic real f [9];
      automatic real rho, ux, uy, usq, m_in, m_out;
      for (int a = 0; a < 3; a++)
        for (int b = 0; b < 3; b++) begin
          automatic real rh = 0.5 + real'($urandom % 1000) / 1000.0;
          in_grid[a][b] = (t == 1000) || (a == 1 && b == 1) || ($urandom % 4 != 0);
          for (int i = 0; i < 9; i++) begin
            automatic real v = (t == 1000) ? W[i] : W[i] * rh * (1.0 + 0.8 * (real'($urandom % 1000) / 1000.0 - 0.5));
            nb[a][b][i] = FW'(longint'(v * SCALE));
          end
        end
      #1;
      for (int i = 0; i < 9; i++)
        f[i] = in_grid[1 - EY[i]][1 - EX[i]] ? r(nb[1 - EY[i]][1 - EX[i]][i]) : r(nb[1][1][OP[i]]);
      rho = 0; ux = 0; uy = 0;
      for (int i = 0; i < 9; i++) begin rho += f[i]; ux += EX[i] * f[i]; uy += EY[i] * f[i]; end
      ux /= rho; uy /= rho; usq = ux*ux + uy*uy;
      m_in = rho; m_out = 0;
      for (int i = 0; i < 9; i++) begin
        automatic real cu = EX[i]*ux + EY[i]*uy;
        automatic real feq = W[i] * rho * (1.0 + 3.0*cu + 4.5*cu*cu - 1.5*usq);
        automatic real exp = f[i] + (feq - f[i]) / TAU;
        m_out += r(fout[i]);
        checks++;
        if (r(fout[i]) - exp > TOL || exp - r(fout[i]) > TOL ||
            (t == 1000 && (r(fout[i]) - W[i] > TOL || W[i] - r(fout[i]) > TOL))) begin
          failures++;
          if (failures < 10) $display("t%0d f%0d: got %f exp %f", t, i, r(fout[i]), exp);
        end
      end
      checks++;
      if (m_out - m_in > 1e-5 || m_in - m_out > 1e-5) begin
        failures++; if (failures < 10) $display("t%0d mass %f -> %f", t, m_in, m_out);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000;
    failures++; $display("watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
