// stencil_pe: one processing element of the stencil chain = one time step.
//
// A PE consumes one ROWS x COLS grid as a stream of PX x PY tiles (tile order:
// along each band of PY rows, then band after band) and produces the grid
// after one stencil step in the same order, one tile per accepted cycle.
// Inside are the FIFO-and-register custom buffer (stencil_window) and the
// computing unit (laplace_cu or sobel_cu, chosen by KERNEL).
//
// Boundary handling: a neighbour outside the grid reads as zero (the
// "(condition) ? data : 0" rule of the shift-register kernels the design
// replaces). Cells of a partly filled last tile (COLS not a multiple of PX,
// ROWS not a multiple of PY) are outputs of zero and their inputs are ignored.
//
// Flow control: valid/ready on both sides. The buffer advances only when the
// output register is free, so back-pressure stalls the whole PE. After the
// last input tile of a grid the PE feeds WPR+1 zero tiles of its own to flush
// the buffer, then the next grid may start. Latency: the output for tile t
// appears after input tile t+WPR+1 has been taken (WPR = tiles per band);
// throughput is one tile per cycle when neither side stalls.
module stencil_pe
  import stencil_pkg::*;
#(
  parameter kernel_e     KERNEL = KERN_LAPLACE,
  parameter int unsigned DW     = 32,
  parameter int unsigned COLS   = 16384,
  parameter int unsigned ROWS   = 16384,
  parameter int unsigned PX     = 64,
  parameter int unsigned PY     = 1
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          in_valid,
  output logic                          in_ready,
  input  logic [PY-1:0][PX-1:0][DW-1:0] in_data,
  output logic                          out_valid,
  input  logic                          out_ready,
  output logic [PY-1:0][PX-1:0][DW-1:0] out_data
);
  localparam int unsigned WPR    = (COLS + PX - 1) / PX;
  localparam int unsigned NBANDS = (ROWS + PY - 1) / PY;
  localparam int unsigned TOTAL  = WPR * NBANDS;
  localparam int unsigned SHIFTS = TOTAL + WPR + 1;
  localparam int unsigned KW     = $clog2(SHIFTS + 1);
  localparam int unsigned BW     = $clog2(NBANDS + 1);
  localparam int unsigned JW     = $clog2(WPR + 1);

  logic [KW-1:0] k;           // shift counter within the current grid
  logic [BW-1:0] ob;          // band of the tile in the window
  logic [JW-1:0] oj;          // tile column of the tile in the window
  logic          win_valid;
  logic          flushing, can_adv, shift;

  logic [PY+1:0][PX+1:0][DW-1:0] win, win_m;
  logic [PY-1:0][PX-1:0][DW-1:0] res;

  assign flushing = (k >= KW'(TOTAL));
  assign can_adv  = !win_valid || out_ready;
  assign shift    = can_adv && (flushing || in_valid);
  assign in_ready = can_adv && !flushing;

  stencil_window #(.DW(DW), .COLS(COLS), .PX(PX), .PY(PY)) u_buf (
    .clk, .rst_n,
    .shift   (shift),
    .in_tile (flushing ? '0 : in_data),
    .win     (win)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      k         <= '0;
      ob        <= '0;
      oj        <= '0;
      win_valid <= 1'b0;
    end else if (shift) begin
      k         <= (k == KW'(SHIFTS - 1)) ? '0 : k + 1'b1;
      win_valid <= (k >= KW'(WPR + 1));
      if (k == KW'(WPR + 1)) begin
        ob <= '0;
        oj <= '0;
      end else if (k > KW'(WPR + 1)) begin
        if (oj == JW'(WPR - 1)) begin
          oj <= '0;
          ob <= ob + 1'b1;
        end else begin
          oj <= oj + 1'b1;
        end
      end
    end else if (out_ready) begin
      win_valid <= 1'b0;
    end
  end

  // Zero every window position that lies outside the grid.
  always_comb begin
    for (int r = 0; r < PY + 2; r++) begin
      for (int c = 0; c < PX + 2; c++) begin
        int gy, gx;
        gy = int'(ob) * PY + r - 1;
        gx = int'(oj) * PX + c - 1;
        win_m[r][c] = (gy >= 0 && gy < ROWS && gx >= 0 && gx < COLS) ? win[r][c] : '0;
      end
    end
  end

  generate
    if (KERNEL == KERN_SOBEL) begin : g_sobel
      sobel_cu #(.DW(DW), .PX(PX), .PY(PY)) u_cu (.win(win_m), .res(res));
    end else begin : g_laplace
      laplace_cu #(.DW(DW), .PX(PX), .PY(PY)) u_cu (.win(win_m), .res(res));
    end
  endgenerate

  always_comb begin
    for (int r = 0; r < PY; r++)
      for (int c = 0; c < PX; c++)
        out_data[r][c] = (int'(ob) * PY + r < ROWS && int'(oj) * PX + c < COLS) ? res[r][c] : '0;
  end
  assign out_valid = win_valid;

  a_hold: assert property (@(posedge clk) disable iff (!rst_n)
                           out_valid && !out_ready |=> out_valid && $stable(out_data));

endmodule
