// lbm_cu: computing unit of the D2Q9 lattice Boltzmann (BGK) simulation, one
// lattice site per evaluation, "one-step" form: streaming by pulling and the
// collision fused in one unit.
//
// Input: the 3x3 neighbourhood of the site (nb[row][col][i], row 0 = y-1,
// col 0 = x-1, i = distribution index) and a flag per neighbour telling
// whether it lies in_grid the grid. Directions (index: (ex,ey)):
//   0:(0,0) 1:(1,0) 2:(0,1) 3:(-1,0) 4:(0,-1) 5:(1,1) 6:(-1,1) 7:(-1,-1) 8:(1,-1)
// weights 4/9 (i=0), 1/9 (i=1..4), 1/36 (i=5..8).
//   pull      f_i = f_i(x - e_i); a source outside the grid is a wall:
//             f_i = f_opp(i)(x) (bounce-back)
//   moments   rho = sum f_i, u = (sum f_i e_i) / rho
//   equilib.  feq_i = w_i rho (1 + 3 e_i.u + 4.5 (e_i.u)^2 - 1.5 u.u)
//   relax     f_i' = f_i + OMEGA (feq_i - f_i),  OMEGA = 1/tau
//
// Number format: the document computes in single precision floating point;
// this unit uses FW-bit signed fixed point with FRAC fraction bits (default
// Q8.24) and 64-bit intermediates, truncating after each product. The
// velocity needs one division per component. Purely combinational.
module lbm_cu #(
  parameter int unsigned FW    = 32,
  parameter int unsigned FRAC  = 24,
  parameter int          OMEGA = 27962027   // 1/tau = 1/0.6 in Q8.24
) (
  input  logic [2:0][2:0][8:0][FW-1:0] nb,
  input  logic [2:0][2:0]              in_grid,
  output logic [8:0][FW-1:0]           fout
);
  localparam longint ONE = longint'(1) << FRAC;
  localparam int EX [9] = '{0, 1, 0, -1, 0, 1, -1, -1, 1};
  localparam int EY [9] = '{0, 0, 1, 0, -1, 1, 1, -1, -1};
  localparam int OP [9] = '{0, 3, 4, 1, 2, 7, 8, 5, 6};

  function automatic longint fmul(input longint a, input longint b);
    return (a * b) >>> FRAC;
  endfunction

  function automatic longint wgt(input int i);
    if (i == 0)      return (4 * ONE) / 9;
    else if (i <= 4) return ONE / 9;
    else             return ONE / 36;
  endfunction

  longint f [9];
  longint rho, mx, my, ux, uy, usq;

  always_comb begin
    for (int i = 0; i < 9; i++) begin
      if (in_grid[1 - EY[i]][1 - EX[i]])
        f[i] = longint'($signed(nb[1 - EY[i]][1 - EX[i]][i]));
      else
        f[i] = longint'($signed(nb[1][1][OP[i]]));
    end
    rho = 0; mx = 0; my = 0;
    for (int i = 0; i < 9; i++) begin
      rho += f[i];
      mx  += EX[i] * f[i];
      my  += EY[i] * f[i];
    end
    if (rho > 0) begin
      ux = (mx <<< FRAC) / rho;
      uy = (my <<< FRAC) / rho;
    end else begin
      ux = 0;
      uy = 0;
    end
    usq = fmul(ux, ux) + fmul(uy, uy);
    for (int i = 0; i < 9; i++) begin
      longint cu, feq;
      cu  = EX[i] * ux + EY[i] * uy;
      feq = fmul(fmul(wgt(i), rho),
                 ONE + 3 * cu + fmul((9 * ONE) / 2, fmul(cu, cu)) - fmul((3 * ONE) / 2, usq));
      fout[i] = FW'(f[i] + fmul(longint'(OMEGA), feq - f[i]));
    end
  end

endmodule
