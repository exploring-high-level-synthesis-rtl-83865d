// tb_laplace_cu: self-checking test of the Laplace computing unit.
//
// 500 random (PY+2) x (PX+2) windows of signed 32-bit cells (full range,
// so the widened pair sums are exercised) for a 4 x 3 tile, plus windows
// of all minimum and all maximum values. Every output cell is compared with
// the four-neighbour sum divided by four (arithmetic shift, rounding toward
// minus infinity) computed here in 64 bits.
module tb_laplace_cu;
  localparam int DW = 32, PX = 4, PY = 3;
  int checks = 0, failures = 0;
  logic [PY+1:0][PX+1:0][DW-1:0] win;
  logic [PY-1:0][PX-1:0][DW-1:0] res;
  laplace_cu #(.DW(DW), .PX(PX), .PY(PY)) dut (.win, .res);

  function automatic longint w(int r, int c); return longint'($signed(win[r][c])); endfunction

  initial begin
    for (int t = 0; t < 502; t++) begin
      for (int r = 0; r < PY + 2; r++)
        for (int c = 0; c < PX + 2; c++)
          win[r][c] = (t == 500) ? 32'h8000_0000 : (t == 501) ? 32'h7fff_ffff : $urandom;
      #1;
      for (int r = 1; r <= PY; r++)
        for (int c = 1; c <= PX; c++) begin
          automatic longint exp = (w(r-1,c) + w(r+1,c) + w(r,c-1) + w(r,c+1)) >>> 2;
          checks++;
          if (longint'($signed(res[r-1][c-1])) != exp) begin
            failures++;
            if (failures < 10) $display("t%0d (%0d,%0d): got %0d exp %0d", t, r, c, $signed(res[r-1][c-1]), exp);
          end
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
