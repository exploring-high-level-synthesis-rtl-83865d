// tb_sobel_cu: self-checking test of the Sobel computing unit.
//
// 500 random windows of 8-bit pixels for a 3 x 2 tile, plus an all-black
// window and a hard vertical/horizontal edge window that must saturate.
// Every output pixel is compared with |Gx| + |Gy| of the 3x3 Sobel masks,
// computed here directly from the nine pixels and clipped to 255.
module tb_sobel_cu;
  localparam int DW = 8, PX = 3, PY = 2;
  int checks = 0, failures = 0, n_sat = 0;
  logic [PY+1:0][PX+1:0][DW-1:0] win;
  logic [PY-1:0][PX-1:0][DW-1:0] res;
  sobel_cu #(.DW(DW), .PX(PX), .PY(PY)) dut (.win, .res);

  function automatic int a(int r, int c); return int'(win[r][c]); endfunction

  initial begin
    for (int t = 0; t < 502; t++) begin
      for (int r = 0; r < PY + 2; r++)
        for (int c = 0; c < PX + 2; c++)
          win[r][c] = (t == 500) ? 8'd0 : (t == 501) ? ((r < 2 && c < 2) ? 8'd255 : 8'd0) : DW'($urandom);
      #1;
      for (int r = 1; r <= PY; r++)
        for (int c = 1; c <= PX; c++) begin
          automatic int gx, gy, m;
          gx = (a(r-1,c-1) + 2*a(r,c-1) + a(r+1,c-1)) - (a(r-1,c+1) + 2*a(r,c+1) + a(r+1,c+1));
          gy = (a(r-1,c-1) + 2*a(r-1,c) + a(r-1,c+1)) - (a(r+1,c-1) + 2*a(r+1,c) + a(r+1,c+1));
          m = (gx < 0 ? -gx : gx) + (gy < 0 ? -gy : gy);
          if (m > 255) begin m = 255; n_sat++; end
          checks++;
          if (int'(res[r-1][c-1]) != m) begin
            failures++;
            if (failures < 10) $display("t%0d (%0d,%0d): got %0d exp %0d", t, r, c, res[r-1][c-1], m);
          end
        end
    end
    checks++;
    if (n_sat == 0) begin failures++; $display("saturation never exercised"); end
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
