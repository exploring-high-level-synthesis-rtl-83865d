// tb_stencil_accel: end-to-end test of the HBM stencil accelerator at a
// reduced size.
//
// A 16 x 6 grid of signed 16-bit cells is placed in two modelled HBM
// channels in tile order (4 x 2 tiles, so each 256-bit wide word splits into
// two PE words), the accelerator runs three chained Laplace steps with
// random stalls on every AXI channel, and the result read back from the
// destination region is compared with three reference Jacobi steps with
// zero boundary computed here. Grid sizes give a partial last burst. A second
// pass runs on the result to check that the accelerator restarts cleanly.
module tb_stencil_accel;
  import stencil_pkg::*;

  localparam int COLS = 16, ROWS = 6, PX = 4, PY = 2, DW = 16, NPE = 3;
  localparam int NCH = 2, MEM_W = 128, AW = 33, BURST = 4;
  localparam int WPR = COLS / PX, NB = ROWS / PY, PE_W = PX*PY*DW, WIDE = NCH*MEM_W;
  localparam int RATIO = WIDE / PE_W, NBEATS = WPR*NB*PE_W / WIDE;

  logic clk = 0, rst_n = 0, start = 0, done;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [NCH-1:0][AW-1:0] src_base, dst_base;
  logic [NCH-1:0] ar_valid, ar_ready, r_valid, r_ready, r_last, aw_valid, aw_ready, w_valid, w_ready, w_last, b_valid, b_ready;
  logic [NCH-1:0][AW-1:0] ar_addr, aw_addr;
  logic [NCH-1:0][3:0] ar_len, aw_len;
  logic [NCH-1:0][MEM_W-1:0] r_data, w_data;

  stencil_accel #(.KERNEL(KERN_LAPLACE), .DW(DW), .COLS(COLS), .ROWS(ROWS), .PX(PX), .PY(PY),
                  .NPE(NPE), .NCH(NCH), .MEM_W(MEM_W), .ADDR_W(AW), .BURST(BURST)) dut (.*);

  for (genvar c = 0; c < NCH; c++) begin : g_mem
    hbm_axi_model #(.ADDR_W(AW), .DATA_W(MEM_W), .STALL_PCT(25)) u_mem (
      .clk, .rst_n,
      .ar_valid(ar_valid[c]), .ar_ready(ar_ready[c]), .ar_addr(ar_addr[c]), .ar_len(ar_len[c]),
      .r_valid(r_valid[c]), .r_ready(r_ready[c]), .r_data(r_data[c]), .r_last(r_last[c]),
      .aw_valid(aw_valid[c]), .aw_ready(aw_ready[c]), .aw_addr(aw_addr[c]), .aw_len(aw_len[c]),
      .w_valid(w_valid[c]), .w_ready(w_ready[c]), .w_data(w_data[c]), .w_last(w_last[c]),
      .b_valid(b_valid[c]), .b_ready(b_ready[c]));
  end

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

  // Cell (y,x) -> position in the wide stream: PE word index, cell in it.
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
        if (got != grid[y][x]) begin
          failures++;
          if (failures < 10) $display("cell (%0d,%0d): got %0d exp %0d", y, x, got, grid[y][x]);
        end
      end
  endtask

  task automatic run(longint src_w, longint dst_w);
    int t0;
    src_base = {NCH{AW'(src_w * (MEM_W/8))}};
    dst_base = {NCH{AW'(dst_w * (MEM_W/8))}};
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    t0 = $time / 10;
    wait (done);
    $display("pass finished in %0d cycles", $time / 10 - t0);
  endtask

  initial begin
    for (int y = 0; y < ROWS; y++)
      for (int x = 0; x < COLS; x++)
        grid[y][x] = int'($urandom % 20000) - 10000;
    load(0);
    repeat (3) @(posedge clk);
    rst_n = 1;
    run(0, 1000);
    for (int s = 0; s < NPE; s++) ref_step();
    check(1000);
    run(1000, 2000);
    for (int s = 0; s < NPE; s++) ref_step();
    check(2000);
    checks++;
    if (g_mem[0].u_mem.bursts_rd != 2 * ((NBEATS + BURST - 1) / BURST)) begin
      failures++; $display("read bursts %0d", g_mem[0].u_mem.bursts_rd);
    end
    checks++;
    if (g_mem[0].u_mem.proto_errors + g_mem[1].u_mem.proto_errors != 0) begin failures++; $display("AXI write protocol errors"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
