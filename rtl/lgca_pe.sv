// lgca_pe: one LGCA (FHP lattice gas) processing element = one time step.
//
// The grid of ROWS x COLS hexagonal sites streams in as groups of G sites of
// one row (plane-major words: G bits per direction, 7 directions), row after
// row; the PE returns the grid one time step later in the same order.
//   1. collision: lgca_collision on the incoming group, chirality bits from
//      lgca_pkg::fhp_xi(x, y, step);
//   2. custom buffer: stencil_window with one-row tiles of G sites holds two
//      rows of collided sites in its FIFOs plus the registers around the
//      group being finished (the 2M+3 site buffer of the single-site design,
//      widened to a group);
//   3. propagation: each site pulls every moving particle from the neighbour
//      that sends it, using the odd/even row offsets of the hexagonal
//      mapping (lgca_pkg::nb_dx/nb_dy). Pulling across a group boundary reads
//      the neighbour group's column in the window, the shift-and-merge of the
//      group-based propagation.
// Boundary: the grid edge is a reflecting wall. A particle whose source lies
// outside the grid is replaced by the site's own particle of the opposite
// direction (bounce-back), so mass is conserved. Sites of a partly used last
// group (COLS not a multiple of G) stay empty.
//
// Flow control and timing as stencil_pe: valid/ready on both sides, one group
// per cycle, output of group t after input group t+WPR+1, WPR+1 flush cycles
// per grid. `step` is the time step this PE computes; it only seeds the
// chirality bits and must be stable during a grid.
module lgca_pe
  import lgca_pkg::*;
#(
  parameter int unsigned COLS = 2048,
  parameter int unsigned ROWS = 4096,
  parameter int unsigned G    = 48
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic [15:0]            step,
  input  logic                   in_valid,
  output logic                   in_ready,
  input  logic [NDIR-1:0][G-1:0] in_data,
  output logic                   out_valid,
  input  logic                   out_ready,
  output logic [NDIR-1:0][G-1:0] out_data
);
  localparam int unsigned WPR    = (COLS + G - 1) / G;
  localparam int unsigned TOTAL  = WPR * ROWS;
  localparam int unsigned SHIFTS = TOTAL + WPR + 1;
  localparam int unsigned KW     = $clog2(SHIFTS + 1);
  localparam int unsigned BW     = $clog2(ROWS + 1);
  localparam int unsigned JW     = $clog2(WPR + 1);

  logic [KW-1:0] k;
  logic [BW-1:0] iy, oy;          // row of the input group / of the window group
  logic [JW-1:0] ij, oj;          // group column of the input / of the window
  logic          win_valid, flushing, can_adv, shift;

  logic [NDIR-1:0][G-1:0]   coll;
  logic [G-1:0]             xi;
  logic [0:0][G-1:0][NDIR-1:0] in_tile;
  logic [2:0][G+1:0][NDIR-1:0] win;

  assign flushing = (k >= KW'(TOTAL));
  assign can_adv  = !win_valid || out_ready;
  assign shift    = can_adv && (flushing || in_valid);
  assign in_ready = can_adv && !flushing;

  // ---- collision on the incoming group ----
  always_comb begin
    for (int g = 0; g < G; g++)
      xi[g] = fhp_xi(16'(int'(ij) * G + g), 16'(iy), step);
  end

  lgca_collision #(.G(G)) u_coll (.cin(in_data), .xi(xi), .cout(coll));

  always_comb begin
    for (int g = 0; g < G; g++)
      for (int d = 0; d < NDIR; d++)
        in_tile[0][g][d] = flushing ? 1'b0 : coll[d][g];
  end

  // ---- custom buffer ----
  stencil_window #(.DW(NDIR), .COLS(COLS), .PX(G), .PY(1)) u_buf (
    .clk, .rst_n, .shift(shift), .in_tile(in_tile), .win(win)
  );

  // ---- counters ----
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      k <= '0; iy <= '0; ij <= '0; oy <= '0; oj <= '0; win_valid <= 1'b0;
    end else if (shift) begin
      k         <= (k == KW'(SHIFTS - 1)) ? '0 : k + 1'b1;
      win_valid <= (k >= KW'(WPR + 1));
      if (k == KW'(SHIFTS - 1)) begin
        iy <= '0; ij <= '0;
      end else if (!flushing) begin
        if (ij == JW'(WPR - 1)) begin ij <= '0; iy <= iy + 1'b1; end
        else ij <= ij + 1'b1;
      end
      if (k == KW'(WPR + 1)) begin
        oy <= '0; oj <= '0;
      end else if (k > KW'(WPR + 1)) begin
        if (oj == JW'(WPR - 1)) begin oj <= '0; oy <= oy + 1'b1; end
        else oj <= oj + 1'b1;
      end
    end else if (out_ready) begin
      win_valid <= 1'b0;
    end
  end

  // ---- propagation (pull) with bounce-back walls ----
  always_comb begin
    for (int g = 0; g < G; g++) begin
      int x;
      x = int'(oj) * G + g;
      out_data[0][g] = win[1][g+1][0];
      for (int unsigned i = 1; i <= 6; i++) begin
        int dx, dy, sx, sy;
        // the particle arriving along C_i left its source along C_i, so the
        // source is the neighbour in the opposite direction
        dx = nb_dx(opp(i), oy[0]);
        dy = nb_dy(opp(i));
        sx = x + dx;
        sy = int'(oy) + dy;
        if (sx >= 0 && sx < COLS && sy >= 0 && sy < ROWS)
          out_data[i][g] = win[1+dy][g+1+dx][i];
        else
          out_data[i][g] = win[1][g+1][opp(i)];
      end
      if (x >= COLS)
        for (int d = 0; d < NDIR; d++) out_data[d][g] = 1'b0;
    end
  end
  assign out_valid = win_valid;

endmodule
