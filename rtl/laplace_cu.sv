// laplace_cu: computing unit for the 4-point Laplace (Jacobi) stencil.
//
// For every cell of a PX x PY tile it computes
//     out(y,x) = 0.25 * (in(y-1,x) + in(y+1,x) + in(y,x-1) + in(y,x+1))
// from the (PY+2) x (PX+2) window that the custom buffer provides.
//
// Result sharing: the sum is split into two pair sums,
//     P(r,c) = W[r][c-1] + W[r+1][c]      (left + below)
//     out(r,c) uses P(r,c) + P(r-1,c+1)   (P(r-1,c+1) = above + right)
// so the pair P(r,c) serves both cell (r,c) and its diagonal neighbour
// (r+1,c-1). With PY > 1 (the hybrid x/y unrolling) this saves about a third
// of the adders, which is the computation-result reuse the design is built
// to exploit; with PY = 1 the count equals the plain form.
//
// Number format: the document computes in single-precision floating point.
// This unit works on DW-bit signed two's-complement fixed-point values; the
// multiply by 0.25 is an arithmetic right shift by two (rounding toward minus
// infinity). The binary point is wherever the user puts it.
// Purely combinational; the PE registers around it.
module laplace_cu #(
  parameter int unsigned DW = 32,
  parameter int unsigned PX = 64,
  parameter int unsigned PY = 1
) (
  input  logic [PY+1:0][PX+1:0][DW-1:0] win,
  output logic [PY-1:0][PX-1:0][DW-1:0] res
);
  // Pair sums, one bit wider than the data.
  logic signed [DW:0] pair [PY+1][PX+2];

  always_comb begin
    for (int r = 0; r <= PY; r++) begin
      pair[r][0] = '0;
      for (int c = 1; c <= PX + 1; c++)
        pair[r][c] = (DW+1)'(signed'(win[r][c-1])) + (DW+1)'(signed'(win[r+1][c]));
    end
  end

  always_comb begin
    for (int r = 1; r <= PY; r++) begin
      for (int c = 1; c <= PX; c++) begin
        logic signed [DW+1:0] sum4;
        sum4 = (DW+2)'(pair[r][c]) + (DW+2)'(pair[r-1][c+1]);
        res[r-1][c-1] = DW'(sum4 >>> 2);
      end
    end
  end

endmodule
