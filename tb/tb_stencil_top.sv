// tb_stencil_top: end-to-end test of the three accelerators side by side,
// all running at the same time at reduced sizes.
//
//  * stencil: 16 x 6 grid of 16-bit cells, 4 x 2 tiles, 2 PEs, 2 modelled
//    HBM channels with random stalls, two passes (second pass reads the
//    result of the first), result compared with Jacobi Laplace steps.
//  * LGCA: 10 x 5 hexagonal grid, groups of 4 sites, 3 PEs, two grids
//    streamed back to back, compared with an FHP reference.
//  * LBM: 5 x 4 grid, 2 sites per word, 2 PEs, compared with a double
//    precision D2Q9 BGK reference (tolerance 1e-5).
// Output streams get random back-pressure. Every mechanism the designs rely
// on is counted while the test runs (memory stalls, partial AXI bursts,
// second memory channel, ping/pong alternation, PE flush, stream
// back-pressure, grid-edge cells, FHP collisions, bounce-back, partial
// groups, restart); one that is never seen is a failure.
module tb_stencil_top;
  import stencil_pkg::*;
  import lgca_pkg::*;

  // ---------------- stencil configuration ----------------
  localparam int COLS = 16, ROWS = 6, PX = 4, PY = 2, DW = 16, NPE = 2;
  localparam int NCH = 2, MEM_W = 128, AW = 33, BURST = 4;
  localparam int WPR = COLS / PX, NB = ROWS / PY, PE_W = PX*PY*DW, WIDE = NCH*MEM_W;
  localparam int RATIO = WIDE / PE_W, NBEATS = WPR*NB*PE_W / WIDE;
  // ---------------- LGCA configuration ----------------
  localparam int LC = 10, LR = 5, LG = 4, LNPE = 3;
  localparam int LWPR = (LC + LG - 1) / LG, LTOT = LWPR * LR;
  // ---------------- LBM configuration ----------------
  localparam int BC = 5, BR = 4, NCU = 2, BNPE = 2, FW = 32;
  localparam int BWPR = (BC + NCU - 1) / NCU, BTOT = BWPR * BR;
  localparam real TAU = 0.6, SCALE = 16777216.0, TOL = 1.0e-5;
  localparam int OMEGA = int'(SCALE / TAU);

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic st_start = 0, st_done;
  logic [NCH-1:0][AW-1:0] st_src_base = '0, st_dst_base = '0;
  logic [NCH-1:0] st_ar_valid, st_ar_ready, st_r_valid, st_r_ready, st_r_last, st_aw_valid, st_aw_ready;
  logic [NCH-1:0] st_w_valid, st_w_ready, st_w_last, st_b_valid, st_b_ready;
  logic [NCH-1:0][AW-1:0] st_ar_addr, st_aw_addr;
  logic [NCH-1:0][3:0] st_ar_len, st_aw_len;
  logic [NCH-1:0][MEM_W-1:0] st_r_data, st_w_data;

  logic [15:0] lg_base_step = 0;
  logic lg_in_valid = 0, lg_in_ready, lg_out_valid, lg_out_ready = 0;
  logic [NDIR-1:0][LG-1:0] lg_in_data = '0, lg_out_data;
  logic lb_in_valid = 0, lb_in_ready, lb_out_valid, lb_out_ready = 0;
  logic [NCU-1:0][8:0][FW-1:0] lb_in_data = '0, lb_out_data;

  stencil_top #(
    .ST_KERNEL(KERN_LAPLACE), .ST_DW(DW), .ST_COLS(COLS), .ST_ROWS(ROWS), .ST_PX(PX), .ST_PY(PY),
    .ST_NPE(NPE), .ST_NCH(NCH), .ST_MEM_W(MEM_W), .ST_ADDR_W(AW), .ST_BURST(BURST),
    .LG_COLS(LC), .LG_ROWS(LR), .LG_G(LG), .LG_NPE(LNPE),
    .LB_COLS(BC), .LB_ROWS(BR), .LB_NCU(NCU), .LB_NPE(BNPE), .LB_FW(FW), .LB_FRAC(24),
    .LB_OMEGA(OMEGA), .PP_DEPTH(2)
  ) dut (.*);

  for (genvar c = 0; c < NCH; c++) begin : g_mem
    hbm_axi_model #(.ADDR_W(AW), .DATA_W(MEM_W), .STALL_PCT(25)) u_mem (
      .clk, .rst_n,
      .ar_valid(st_ar_valid[c]), .ar_ready(st_ar_ready[c]), .ar_addr(st_ar_addr[c]), .ar_len(st_ar_len[c]),
      .r_valid(st_r_valid[c]), .r_ready(st_r_ready[c]), .r_data(st_r_data[c]), .r_last(st_r_last[c]),
      .aw_valid(st_aw_valid[c]), .aw_ready(st_aw_ready[c]), .aw_addr(st_aw_addr[c]), .aw_len(st_aw_len[c]),
      .w_valid(st_w_valid[c]), .w_ready(st_w_ready[c]), .w_data(st_w_data[c]), .w_last(st_w_last[c]),
      .b_valid(st_b_valid[c]), .b_ready(st_b_ready[c]));
  end

  // ---------------- mechanism counters ----------------
  int n_partial_burst = 0, n_ch1_burst = 0, n_pong = 0, n_flush = 0, n_backpressure = 0;
  int n_edge = 0, n_collision = 0, n_bounce = 0, n_partial_group = 0, n_restart = 0;
  int n_lg_pong = 0, n_lb_pong = 0;
  always @(posedge clk) if (rst_n) begin
    for (int c = 0; c < NCH; c++)
      if (st_ar_valid[c] && st_ar_ready[c]) begin
        if (st_ar_len[c] != 4'(BURST - 1)) n_partial_burst++;
        if (c == 1) n_ch1_burst++;
      end
    if (dut.u_stencil.g_pe[0].g_link.u_pp.wr_sel && dut.u_stencil.g_pe[0].g_link.u_pp.in_valid &&
        dut.u_stencil.g_pe[0].g_link.u_pp.in_ready) n_pong++;
    if (dut.u_lgca.g_pe[0].g_link.u_pp.wr_sel && dut.u_lgca.g_pe[0].g_link.u_pp.in_valid &&
        dut.u_lgca.g_pe[0].g_link.u_pp.in_ready) n_lg_pong++;
    if (dut.u_lbm.g_pe[0].g_link.u_pp.wr_sel && dut.u_lbm.g_pe[0].g_link.u_pp.in_valid &&
        dut.u_lbm.g_pe[0].g_link.u_pp.in_ready) n_lb_pong++;
    if (dut.u_stencil.g_pe[1].u_pe.flushing && dut.u_stencil.g_pe[1].u_pe.shift) n_flush++;
    if ((lg_out_valid && !lg_out_ready) || (lb_out_valid && !lb_out_ready)) n_backpressure++;
  end

  // ---------------- stencil reference ----------------
  int grid [ROWS][COLS];
  int nxt  [ROWS][COLS];
  function automatic int at(int y, int x);
    if (y < 0 || y >= ROWS || x < 0 || x >= COLS) return 0;
    return grid[y][x];
  endfunction
  task automatic ref_step();
    for (int y = 0; y < ROWS; y++)
      for (int x = 0; x < COLS; x++)
        nxt[y][x] = (at(y-1,x) + at(y+1,x) + at(y,x-1) + at(y,x+1)) >>> 2;
    grid = nxt;
  endtask
  function automatic int word_of(int y, int x); return (y / PY) * WPR + x / PX; endfunction
  function automatic int cell_of(int y, int x); return (y % PY) * PX + x % PX; endfunction
  task automatic load(longint base_word);
    logic [WIDE-1:0] wide [NBEATS];
    for (int y = 0; y < ROWS; y++)
      for (int x = 0; x < COLS; x++) begin
        automatic int w = word_of(y, x), bit0;
        bit0 = (w % RATIO) * PE_W + cell_of(y, x) * DW;
        wide[w / RATIO][bit0 +: DW] = DW'(grid[y][x]);
      end
    for (int b = 0; b < NBEATS; b++) begin
      g_mem[0].u_mem.poke(base_word + b, wide[b][0 +: MEM_W]);
      g_mem[1].u_mem.poke(base_word + b, wide[b][MEM_W +: MEM_W]);
    end
  endtask
  task automatic check(longint base_word);
    logic [WIDE-1:0] wide [NBEATS];
    for (int b = 0; b < NBEATS; b++) begin
      wide[b][0 +: MEM_W]     = g_mem[0].u_mem.peek(base_word + b);
      wide[b][MEM_W +: MEM_W] = g_mem[1].u_mem.peek(base_word + b);
    end
    for (int y = 0; y < ROWS; y++)
      for (int x = 0; x < COLS; x++) begin
        automatic int w = word_of(y, x), bit0, got;
        bit0 = (w % RATIO) * PE_W + cell_of(y, x) * DW;
        got = int'($signed(wide[w / RATIO][bit0 +: DW]));
        checks++;
        if (y == 0 || x == 0 || y == ROWS-1 || x == COLS-1) n_edge++;
        if (got != grid[y][x]) begin
          failures++;
          if (failures < 10) $display("stencil (%0d,%0d): got %0d exp %0d", y, x, got, grid[y][x]);
        end
      end
  endtask
  task automatic run(longint src_w, longint dst_w);
    st_src_base = {NCH{AW'(src_w * (MEM_W/8))}};
    st_dst_base = {NCH{AW'(dst_w * (MEM_W/8))}};
    @(negedge clk); st_start = 1; @(negedge clk); st_start = 0;
    wait (st_done);
    @(posedge clk);
  endtask
  bit st_finished = 0;
  initial begin
    for (int y = 0; y < ROWS; y++)
      for (int x = 0; x < COLS; x++)
        grid[y][x] = int'($urandom % 20000) - 10000;
    load(0);
    wait (rst_n);
    run(0, 1000);
    for (int s = 0; s < NPE; s++) ref_step();
    check(1000);
    run(1000, 2000);
    n_restart++;
    for (int s = 0; s < NPE; s++) ref_step();
    check(2000);
    st_finished = 1;
  end

  // ---------------- LGCA reference ----------------
  logic [6:0] lgrid [2][LR][LC];
  logic [6:0] lexp  [2][LR][LC];
  function automatic logic [6:0] B(int i);
    return 7'(1) << (((i - 1) % 6 + 6) % 6 + 1);
  endfunction
  function automatic logic [6:0] coll_ref(logic [6:0] s, bit xi);
    for (int i = 1; i <= 6; i++) begin
      if (s == (B(i) | B(i+3)))          return xi ? (B(i+1) | B(i+4)) : (B(i-1) | B(i+2));
      if (s == (B(i) | B(i+3) | 7'd1))   return xi ? (B(i+1) | B(i+4) | 7'd1) : (B(i-1) | B(i+2) | 7'd1);
      if (s == (B(i) | B(i+2) | B(i+4))) return B(i+1) | B(i+3) | B(i+5);
      if (s == (B(i-1) | B(i+1)))        return B(i) | 7'd1;
      if (s == (B(i) | 7'd1))            return B(i-1) | B(i+1);
      if (s == (B(i) | B(i-1) | B(i+2)))  return xi ? (B(i) | B(i+1) | B(i-2)) : (B(i-1) | B(i+1) | 7'd1);
      if (s == (B(i) | B(i+1) | B(i-2)))  return xi ? (B(i) | B(i-1) | B(i+2)) : (B(i-1) | B(i+1) | 7'd1);
    end
    return s;
  endfunction
  localparam int DXO [7] = '{0, 0, 1, 1, 1, 0, -1};
  localparam int DXE [7] = '{0, -1, 0, 1, 0, -1, -1};
  localparam int DY  [7] = '{0, 1, 1, 0, -1, -1, 0};
  function automatic int oppd(int i); return i > 3 ? i - 3 : i + 3; endfunction
  task automatic lgca_step(input int f, input logic [15:0] st);
    logic [6:0] post [LR][LC];
    for (int y = 0; y < LR; y++)
      for (int x = 0; x < LC; x++) begin
        post[y][x] = coll_ref(lexp[f][y][x], fhp_xi(16'(x), 16'(y), st));
        if (post[y][x] != lexp[f][y][x]) n_collision++;
      end
    for (int y = 0; y < LR; y++)
      for (int x = 0; x < LC; x++) begin
        lexp[f][y][x][0] = post[y][x][0];
        for (int i = 1; i <= 6; i++) begin
          int o, sx, sy;
          o  = oppd(i);
          sx = x + ((y % 2) ? DXO[o] : DXE[o]);
          sy = y + DY[o];
          if (sx >= 0 && sx < LC && sy >= 0 && sy < LR) lexp[f][y][x][i] = post[sy][sx][i];
          else begin
            lexp[f][y][x][i] = post[y][x][o];
            if (post[y][x][o]) n_bounce++;
          end
        end
      end
  endtask
  bit lg_finished = 0;
  int lg_outs = 0;
  initial begin
    lg_base_step = 16'd100;
    for (int f = 0; f < 2; f++) begin
      for (int y = 0; y < LR; y++)
        for (int x = 0; x < LC; x++) begin
          lgrid[f][y][x] = 7'($urandom);
          lexp[f][y][x]  = lgrid[f][y][x];
        end
      for (int s = 0; s < LNPE; s++) lgca_step(f, 16'(100 + s));
    end
    wait (rst_n);
    for (int f = 0; f < 2; f++)
      for (int y = 0; y < LR; y++)
        for (int j = 0; j < LWPR; j++) begin
          @(negedge clk);
          while ($urandom % 4 == 0) begin lg_in_valid = 0; @(negedge clk); end
          for (int g = 0; g < LG; g++) begin
            if (j*LG + g >= LC) n_partial_group++;
            for (int d = 0; d < NDIR; d++)
              lg_in_data[d][g] = (j*LG + g < LC) ? lgrid[f][y][j*LG + g][d] : 1'b0;
          end
          lg_in_valid = 1;
          @(posedge clk); while (!lg_in_ready) @(posedge clk);
        end
    @(negedge clk); lg_in_valid = 0;
    wait (lg_outs == 2 * LTOT);
    lg_finished = 1;
  end
  always @(negedge clk) lg_out_ready = ($urandom % 3 != 0);
  always @(posedge clk) if (rst_n && lg_out_valid && lg_out_ready) begin
    int f, t, y, j;
    f = lg_outs / LTOT; t = lg_outs % LTOT; y = t / LWPR; j = t % LWPR;
    for (int g = 0; g < LG; g++) begin
      automatic int x = j * LG + g;
      automatic logic [6:0] got, exp;
      for (int d = 0; d < NDIR; d++) got[d] = lg_out_data[d][g];
      exp = (x < LC) ? lexp[f][y][x] : 7'd0;
      checks++;
      if (got != exp) begin
        failures++;
        if (failures < 10) $display("lgca f%0d (%0d,%0d): got %b exp %b", f, x, y, got, exp);
      end
    end
    lg_outs++;
  end

  // ---------------- LBM reference ----------------
  localparam int  EX [9] = '{0, 1, 0, -1, 0, 1, -1, -1, 1};
  localparam int  EY [9] = '{0, 0, 1, 0, -1, 1, 1, -1, -1};
  localparam int  OP [9] = '{0, 3, 4, 1, 2, 7, 8, 5, 6};
  localparam real W  [9] = '{4.0/9, 1.0/9, 1.0/9, 1.0/9, 1.0/9, 1.0/36, 1.0/36, 1.0/36, 1.0/36};
  logic [FW-1:0] bgrid [BR][BC][9];
  real bref [BR][BC][9];
  task automatic lbm_step();
    real nx [BR][BC][9];
    for (int y = 0; y < BR; y++)
      for (int x = 0; x < BC; x++) begin
        real f [9];
        real rho, ux, uy, usq;
        for (int i = 0; i < 9; i++) begin
          int sx, sy;
          sx = x - EX[i]; sy = y - EY[i];
          if (sx >= 0 && sx < BC && sy >= 0 && sy < BR) f[i] = bref[sy][sx][i];
          else begin f[i] = bref[y][x][OP[i]]; n_bounce++; end
        end
        rho = 0; ux = 0; uy = 0;
        for (int i = 0; i < 9; i++) begin rho += f[i]; ux += EX[i] * f[i]; uy += EY[i] * f[i]; end
        ux /= rho; uy /= rho; usq = ux*ux + uy*uy;
        for (int i = 0; i < 9; i++) begin
          real cu, feq;
          cu  = EX[i]*ux + EY[i]*uy;
          feq = W[i] * rho * (1.0 + 3.0*cu + 4.5*cu*cu - 1.5*usq);
          nx[y][x][i] = f[i] + (feq - f[i]) / TAU;
        end
      end
    bref = nx;
  endtask
  bit lb_finished = 0;
  int lb_outs = 0;
  initial begin
    for (int y = 0; y < BR; y++)
      for (int x = 0; x < BC; x++)
        for (int i = 0; i < 9; i++) begin
          automatic real v = W[i] * (1.0 + 0.2 * (real'($urandom % 1000) / 1000.0 - 0.5));
          bgrid[y][x][i] = FW'(longint'(v * SCALE));
          bref[y][x][i]  = real'($signed(bgrid[y][x][i])) / SCALE;
        end
    for (int s = 0; s < BNPE; s++) lbm_step();
    wait (rst_n);
    for (int y = 0; y < BR; y++)
      for (int j = 0; j < BWPR; j++) begin
        @(negedge clk);
        while ($urandom % 4 == 0) begin lb_in_valid = 0; @(negedge clk); end
        for (int u = 0; u < NCU; u++)
          for (int i = 0; i < 9; i++)
            lb_in_data[u][i] = (j*NCU + u < BC) ? bgrid[y][j*NCU + u][i] : '0;
        lb_in_valid = 1;
        @(posedge clk); while (!lb_in_ready) @(posedge clk);
      end
    @(negedge clk); lb_in_valid = 0;
    wait (lb_outs == BTOT);
    lb_finished = 1;
  end
  always @(negedge clk) lb_out_ready = ($urandom % 3 != 0);
  always @(posedge clk) if (rst_n && lb_out_valid && lb_out_ready) begin
    int y, j;
    y = lb_outs / BWPR; j = lb_outs % BWPR;
    for (int u = 0; u < NCU; u++) begin
      automatic int x = j * NCU + u;
      automatic bit bad = 0;
      for (int i = 0; i < 9; i++) begin
        automatic real got = real'($signed(lb_out_data[u][i])) / SCALE;
        if (x < BC) begin
          if (got - bref[y][x][i] > TOL || bref[y][x][i] - got > TOL) bad = 1;
        end else if (lb_out_data[u][i] != '0) bad = 1;
      end
      checks++;
      if (bad) begin
        failures++;
        if (failures < 10) $display("lbm (%0d,%0d) wrong", x, y);
      end
    end
    lb_outs++;
  end

  // ---------------- sequencing and mechanism check ----------------
  task automatic seen(input string name, input int n);
    checks++;
    if (n == 0) begin failures++; $display("mechanism never exercised: %s", name); end
    else $display("mechanism %-22s seen %0d times", name, n);
  endtask
  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (st_finished && lg_finished && lb_finished);
    seen("memory stall", g_mem[0].u_mem.stalls + g_mem[1].u_mem.stalls);
    seen("partial burst", n_partial_burst);
    seen("second channel burst", n_ch1_burst);
    seen("stencil pong buffer", n_pong);
    seen("lgca pong buffer", n_lg_pong);
    seen("lbm pong buffer", n_lb_pong);
    seen("PE flush", n_flush);
    seen("stream back-pressure", n_backpressure);
    seen("grid edge cell", n_edge);
    seen("FHP collision", n_collision);
    seen("bounce-back", n_bounce);
    seen("partial group", n_partial_group);
    seen("restart", n_restart);
    checks++;
    if (g_mem[0].u_mem.proto_errors + g_mem[1].u_mem.proto_errors != 0) begin failures++; $display("AXI write protocol errors"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
