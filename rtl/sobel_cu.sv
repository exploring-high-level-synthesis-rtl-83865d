// sobel_cu: computing unit for the Sobel 2D edge filter.
//
// For each cell of a PX x PY tile it forms
//     Gx = [+1 0 -1; +2 0 -2; +1 0 -1] * A      Gy = [+1 +2 +1; 0 0 0; -1 -2 -1] * A
// over the 3x3 neighbourhood A taken from the (PY+2) x (PX+2) window, and
// outputs |Gx| + |Gy|, saturated to the DW-bit unsigned pixel range.
//
// Result sharing across the tile: the smoothed column sums
//     V(r,c) = W[r-1][c] + 2 W[r][c] + W[r+1][c]
// are computed once per window column and each serves the two outputs at
// c-1 and c+1 (Gx = V(r,c-1) - V(r,c+1)); the smoothed row sums
//     H(r,c) = W[r][c-1] + 2 W[r][c] + W[r][c+1]
// are computed once per window row and each serves the outputs at r-1 and
// r+1 (Gy = H(r-1,c) - H(r+1,c)). The wider the tile in a direction, the
// larger the share of reused partial sums.
// Pixels are DW-bit unsigned. The output definition |Gx|+|Gy| and the
// saturation are this design's choice. Purely combinational.
module sobel_cu #(
  parameter int unsigned DW = 16,
  parameter int unsigned PX = 64,
  parameter int unsigned PY = 1
) (
  input  logic [PY+1:0][PX+1:0][DW-1:0] win,
  output logic [PY-1:0][PX-1:0][DW-1:0] res
);
  localparam int unsigned SW = DW + 3;   // signed width of V, H and G terms

  logic signed [SW-1:0] vsum [PY+2][PX+2];
  logic signed [SW-1:0] hsum [PY+2][PX+2];

  always_comb begin
    for (int r = 0; r < PY + 2; r++)
      for (int c = 0; c < PX + 2; c++) begin
        vsum[r][c] = '0;
        hsum[r][c] = '0;
      end
    for (int r = 1; r <= PY; r++)
      for (int c = 0; c < PX + 2; c++)
        vsum[r][c] = SW'(win[r-1][c]) + (SW'(win[r][c]) << 1) + SW'(win[r+1][c]);
    for (int r = 0; r < PY + 2; r++)
      for (int c = 1; c <= PX; c++)
        hsum[r][c] = SW'(win[r][c-1]) + (SW'(win[r][c]) << 1) + SW'(win[r][c+1]);
  end

  always_comb begin
    for (int r = 1; r <= PY; r++)
      for (int c = 1; c <= PX; c++) begin
        logic signed [SW-1:0] gx, gy;
        logic [SW:0] mag;
        gx = vsum[r][c-1] - vsum[r][c+1];
        gy = hsum[r-1][c] - hsum[r+1][c];
        mag = (SW+1)'(gx < 0 ? -gx : gx) + (SW+1)'(gy < 0 ? -gy : gy);
        res[r-1][c-1] = (mag > (SW+1)'({DW{1'b1}})) ? {DW{1'b1}} : DW'(mag);
      end
  end

endmodule
