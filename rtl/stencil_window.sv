// stencil_window: FIFO-and-register custom buffer for 2D stencils.
//
// The grid (COLS cells per row) streams in as tiles of PY rows by PX columns,
// tile after tile along a band of PY rows, band after band. Every cycle with
// `shift` high, one tile is taken and the buffer presents, in registers, the
// complete neighbourhood of one earlier tile: a window of (PY+2) x (PX+2)
// cells holding the tile, the row above it, the row below it, the column to
// its left and the column to its right (corners included, so both cross-shaped
// and 3x3 stencils can be computed from it).
//
// Structure (the document's FIFO-based custom buffer, generalised to a PX x PY
// tile as in its x, y and hybrid variants):
//   * band FIFO : WPR tiles deep (WPR = tiles per band). Its head is the tile
//                 one band above the incoming tile, i.e. the centre band.
//   * up FIFO   : WPR rows of PX cells. It receives the last row of every
//                 centre tile and returns it one band later as the row above.
//   * registers : the column stack (above row, centre tile, below row) of the
//                 previous tile, the last column of the one before it, and
//                 the window register itself.
// Total FIFO storage is (PY+1)*COLS cells (rounded up to whole tiles), the
// (p_y+1)*M term of the buffer-size formula; the registers add O(PX*PY).
//
// Timing: the window produced at shift number k belongs to tile k-WPR-1 of
// the stream (a lag of one band plus one tile). Windows at the grid edge hold
// stale or neighbouring-row data in the out-of-grid positions; the PE masks
// them. The buffer keeps no frame state: the PE counts tiles.
// Row orientation: row 0 of the window is the row before the tile in stream
// order ("above"), row PY+1 the row after it ("below").
module stencil_window #(
  parameter int unsigned DW   = 32,
  parameter int unsigned COLS = 16384,
  parameter int unsigned PX   = 64,
  parameter int unsigned PY   = 1
) (
  input  logic                                 clk,
  input  logic                                 rst_n,
  input  logic                                 shift,
  input  logic [PY-1:0][PX-1:0][DW-1:0]        in_tile,
  output logic [PY+1:0][PX+1:0][DW-1:0]        win
);
  localparam int unsigned WPR = (COLS + PX - 1) / PX;

  typedef logic [PX-1:0][DW-1:0]   row_t;
  typedef logic [PY-1:0][PX-1:0][DW-1:0] tile_t;
  typedef logic [PY+1:0][PX-1:0][DW-1:0] stack_t;

  tile_t  band_head;
  row_t   up_head;
  logic   band_full, up_full;
  stack_t stack_now, stack_mid;
  logic [PY+1:0][DW-1:0] left_col;

  sync_fifo #(.DW(PX*PY*DW), .DEPTH(WPR)) u_band_fifo (
    .clk, .rst_n,
    .push (shift),
    .din  (in_tile),
    .pop  (shift && band_full),
    .dout (band_head),
    .full (band_full),
    .empty(),
    .count()
  );

  sync_fifo #(.DW(PX*DW), .DEPTH(WPR)) u_up_fifo (
    .clk, .rst_n,
    .push (shift),
    .din  (band_head[PY-1]),
    .pop  (shift && up_full),
    .dout (up_head),
    .full (up_full),
    .empty(),
    .count()
  );

  // Column stack of the tile that is leaving the band FIFO now.
  always_comb begin
    stack_now[0] = up_head;
    for (int r = 0; r < PY; r++) stack_now[r+1] = band_head[r];
    stack_now[PY+1] = in_tile[0];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      stack_mid <= '0;
      left_col  <= '0;
      win       <= '0;
    end else if (shift) begin
      for (int r = 0; r < PY + 2; r++) begin
        win[r][0] <= left_col[r];
        for (int c = 0; c < PX; c++) win[r][c+1] <= stack_mid[r][c];
        win[r][PX+1] <= stack_now[r][0];
        left_col[r]  <= stack_mid[r][PX-1];
      end
      stack_mid <= stack_now;
    end
  end

endmodule
