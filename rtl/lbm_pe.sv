// lbm_pe: one LBM processing element = one time step of the D2Q9 simulation,
// with NCU computing units working on NCU neighbouring sites of a row.
//
// The grid (ROWS x COLS sites, each nine FW-bit distributions) streams in as
// words of NCU consecutive sites of one row, row after row, and leaves one
// time step later in the same order. The extended custom buffer
// (stencil_window with one-row tiles of NCU sites) keeps two grid rows in its
// FIFOs and the registers around the NCU target sites, so all NCU CUs read
// their full 3x3 neighbourhoods every cycle from a single buffer of about
// 2*COLS + NCU + 2 sites, instead of NCU duplicated buffers.
// Each CU gets in-grid flags for its neighbours and applies bounce-back at
// the grid edge. Sites of a partly used last word are passed out as zeros.
//
// Flow control and timing as stencil_pe: valid/ready on both sides, one word
// per cycle, output of word t after input word t+WPR+1 (WPR = words per
// row), WPR+1 flush cycles per grid.
module lbm_pe #(
  parameter int unsigned COLS  = 1024,
  parameter int unsigned ROWS  = 2048,
  parameter int unsigned NCU   = 2,
  parameter int unsigned FW    = 32,
  parameter int unsigned FRAC  = 24,
  parameter int          OMEGA = 27962027
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          in_valid,
  output logic                          in_ready,
  input  logic [NCU-1:0][8:0][FW-1:0]   in_data,
  output logic                          out_valid,
  input  logic                          out_ready,
  output logic [NCU-1:0][8:0][FW-1:0]   out_data
);
  localparam int unsigned WPR    = (COLS + NCU - 1) / NCU;
  localparam int unsigned TOTAL  = WPR * ROWS;
  localparam int unsigned SHIFTS = TOTAL + WPR + 1;
  localparam int unsigned KW     = $clog2(SHIFTS + 1);
  localparam int unsigned BW     = $clog2(ROWS + 1);
  localparam int unsigned JW     = $clog2(WPR + 1);
  localparam int unsigned SW     = 9 * FW;

  logic [KW-1:0] k;
  logic [BW-1:0] oy;
  logic [JW-1:0] oj;
  logic          win_valid, flushing, can_adv, shift;

  logic [2:0][NCU+1:0][SW-1:0] win;
  logic [NCU-1:0][8:0][FW-1:0] res;

  assign flushing = (k >= KW'(TOTAL));
  assign can_adv  = !win_valid || out_ready;
  assign shift    = can_adv && (flushing || in_valid);
  assign in_ready = can_adv && !flushing;

  stencil_window #(.DW(SW), .COLS(COLS), .PX(NCU), .PY(1)) u_buf (
    .clk, .rst_n, .shift(shift),
    .in_tile(flushing ? '0 : in_data),
    .win    (win)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      k <= '0; oy <= '0; oj <= '0; win_valid <= 1'b0;
    end else if (shift) begin
      k         <= (k == KW'(SHIFTS - 1)) ? '0 : k + 1'b1;
      win_valid <= (k >= KW'(WPR + 1));
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

  for (genvar u = 0; u < NCU; u++) begin : g_cu
    logic [2:0][2:0][8:0][FW-1:0] nb;
    logic [2:0][2:0]              in_grid;
    always_comb begin
      for (int r = 0; r < 3; r++)
        for (int c = 0; c < 3; c++) begin
          int gy, gx;
          gy = int'(oy) + r - 1;
          gx = int'(oj) * NCU + u + c - 1;
          nb[r][c]     = win[r][u + c];
          in_grid[r][c] = (gy >= 0 && gy < ROWS && gx >= 0 && gx < COLS);
        end
    end
    lbm_cu #(.FW(FW), .FRAC(FRAC), .OMEGA(OMEGA)) u_cu (.nb(nb), .in_grid(in_grid), .fout(res[u]));
    assign out_data[u] = (int'(oj) * NCU + u < COLS) ? res[u] : '0;
  end
  assign out_valid = win_valid;

endmodule
