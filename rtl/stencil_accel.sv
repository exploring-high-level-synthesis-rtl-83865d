// stencil_accel: HBM-attached general stencil accelerator (one pass = NPE
// time steps over a ROWS x COLS grid).
//
// Data path, from memory back to memory:
//   NCH burst_readers (one per HBM channel, reading the same linear range of
//   their own channel) -> gather into one NCH*MEM_W-bit word ->
//   data_distributor (split into PE words of PX*PY cells) ->
//   PE 0 -> ping/pong FIFOs -> PE 1 -> ... -> PE NPE-1 ->
//   data_collector (merge PE words into wide words) -> scatter to NCH
//   burst_writers.
// Spatial parallelism is the tile size PX*PY inside each PE, temporal
// parallelism the number of chained PEs, each working on the next time step
// of the same stream. Only the first and last PE touch memory.
//
// Memory layout: the grid is stored in tile order (tiles of PY rows x PX
// cells along each band, then band after band), cell (r,c) of a tile at bits
// (r*PX+c)*DW. The wide stream is split over the channels, channel c holding
// bits [c*MEM_W +: MEM_W] of every wide word at its own base address, so all
// channels read and write the same offsets in lock-step. The host arranges
// the grid this way and calls the accelerator again, with source and
// destination swapped, for more than NPE steps.
//
// Control: a `start` pulse launches readers and writers; `done` rises when all
// writers have had every burst acknowledged, and stays high until the next
// start. The number of PE words in a grid times PX*PY*DW must be a multiple
// of NCH*MEM_W, and NCH*MEM_W a multiple of PX*PY*DW.
module stencil_accel
  import stencil_pkg::*;
#(
  parameter kernel_e     KERNEL   = KERN_LAPLACE,
  parameter int unsigned DW       = 32,
  parameter int unsigned COLS     = 16384,
  parameter int unsigned ROWS     = 16384,
  parameter int unsigned PX       = 64,
  parameter int unsigned PY       = 1,
  parameter int unsigned NPE      = 4,
  parameter int unsigned NCH      = 4,
  parameter int unsigned MEM_W    = HBM_DATA_W,
  parameter int unsigned ADDR_W   = HBM_ADDR_W,
  parameter int unsigned BURST    = AXI3_MAX_BEAT,
  parameter int unsigned PP_DEPTH = 2
) (
  input  logic                               clk,
  input  logic                               rst_n,
  input  logic                               start,
  input  logic [NCH-1:0][ADDR_W-1:0]         src_base,
  input  logic [NCH-1:0][ADDR_W-1:0]         dst_base,
  output logic                               done,
  // AXI3 read channels, one per HBM channel
  output logic [NCH-1:0]                     ar_valid,
  input  logic [NCH-1:0]                     ar_ready,
  output logic [NCH-1:0][ADDR_W-1:0]         ar_addr,
  output logic [NCH-1:0][AXI_LEN_W-1:0]      ar_len,
  input  logic [NCH-1:0]                     r_valid,
  output logic [NCH-1:0]                     r_ready,
  input  logic [NCH-1:0][MEM_W-1:0]          r_data,
  input  logic [NCH-1:0]                     r_last,
  // AXI3 write channels
  output logic [NCH-1:0]                     aw_valid,
  input  logic [NCH-1:0]                     aw_ready,
  output logic [NCH-1:0][ADDR_W-1:0]         aw_addr,
  output logic [NCH-1:0][AXI_LEN_W-1:0]      aw_len,
  output logic [NCH-1:0]                     w_valid,
  input  logic [NCH-1:0]                     w_ready,
  output logic [NCH-1:0][MEM_W-1:0]          w_data,
  output logic [NCH-1:0]                     w_last,
  input  logic [NCH-1:0]                     b_valid,
  output logic [NCH-1:0]                     b_ready
);
  localparam int unsigned PE_W   = PX * PY * DW;
  localparam int unsigned WIDE_W = NCH * MEM_W;
  localparam int unsigned WPR    = (COLS + PX - 1) / PX;
  localparam int unsigned NBANDS = (ROWS + PY - 1) / PY;
  localparam longint unsigned NBITS  = longint'(WPR) * NBANDS * PE_W;
  localparam int unsigned NBEATS = int'(NBITS / longint'(WIDE_W));

  typedef logic [PY-1:0][PX-1:0][DW-1:0] tile_t;

  // ---------------- memory read side ----------------
  logic [NCH-1:0]            rd_done, rd_valid, wr_done, wr_ready;
  logic [NCH-1:0][MEM_W-1:0] rd_data;
  logic                      gath_valid, gath_ready;

  for (genvar c = 0; c < NCH; c++) begin : g_ch
    burst_reader #(.ADDR_W(ADDR_W), .DATA_W(MEM_W), .BURST(BURST)) u_rd (
      .clk, .rst_n,
      .start    (start),
      .base     (src_base[c]),
      .nbeats   (32'(NBEATS)),
      .done     (rd_done[c]),
      .ar_valid (ar_valid[c]), .ar_ready(ar_ready[c]),
      .ar_addr  (ar_addr[c]),  .ar_len  (ar_len[c]),
      .r_valid  (r_valid[c]),  .r_ready (r_ready[c]),
      .r_data   (r_data[c]),   .r_last  (r_last[c]),
      .out_valid(rd_valid[c]),
      .out_ready(gath_ready && gath_valid),
      .out_data (rd_data[c])
    );
  end
  assign gath_valid = &rd_valid;

  // ---------------- distribution ----------------
  logic  s_valid [NPE+1];
  logic  s_ready [NPE+1];
  tile_t s_data  [NPE+1];     // s_*[i]: stream into PE i; s_*[NPE]: out of the last PE
  logic  p_valid [NPE];
  logic  p_ready [NPE];
  tile_t p_data  [NPE];       // output of PE i

  data_distributor #(.IN_W(WIDE_W), .OUT_W(PE_W)) u_dist (
    .clk, .rst_n,
    .in_valid (gath_valid), .in_ready(gath_ready), .in_data(rd_data),
    .out_valid(s_valid[0]), .out_ready(s_ready[0]), .out_data(s_data[0])
  );

  // ---------------- PE chain ----------------
  for (genvar i = 0; i < NPE; i++) begin : g_pe
    stencil_pe #(.KERNEL(KERNEL), .DW(DW), .COLS(COLS), .ROWS(ROWS), .PX(PX), .PY(PY)) u_pe (
      .clk, .rst_n,
      .in_valid (s_valid[i]), .in_ready (s_ready[i]), .in_data (s_data[i]),
      .out_valid(p_valid[i]), .out_ready(p_ready[i]), .out_data(p_data[i])
    );
    if (i < NPE - 1) begin : g_link
      pingpong_fifo #(.DW(PE_W), .DEPTH(PP_DEPTH)) u_pp (
        .clk, .rst_n,
        .in_valid (p_valid[i]),   .in_ready (p_ready[i]),   .in_data (p_data[i]),
        .out_valid(s_valid[i+1]), .out_ready(s_ready[i+1]), .out_data(s_data[i+1])
      );
    end else begin : g_last
      assign s_valid[NPE] = p_valid[i];
      assign p_ready[i]   = s_ready[NPE];
      assign s_data[NPE]  = p_data[i];
    end
  end

  // ---------------- collection and memory write side ----------------
  logic                      coll_valid;
  logic [NCH-1:0][MEM_W-1:0] coll_data;

  data_collector #(.IN_W(PE_W), .OUT_W(WIDE_W)) u_coll (
    .clk, .rst_n,
    .in_valid (s_valid[NPE]), .in_ready(s_ready[NPE]), .in_data(s_data[NPE]),
    .out_valid(coll_valid),   .out_ready(&wr_ready),   .out_data(coll_data)
  );

  for (genvar c = 0; c < NCH; c++) begin : g_wch
    burst_writer #(.ADDR_W(ADDR_W), .DATA_W(MEM_W), .BURST(BURST)) u_wr (
      .clk, .rst_n,
      .start    (start),
      .base     (dst_base[c]),
      .nbeats   (32'(NBEATS)),
      .done     (wr_done[c]),
      .in_valid (coll_valid && (&wr_ready)),
      .in_ready (wr_ready[c]),
      .in_data  (coll_data[c]),
      .aw_valid (aw_valid[c]), .aw_ready(aw_ready[c]),
      .aw_addr  (aw_addr[c]),  .aw_len  (aw_len[c]),
      .w_valid  (w_valid[c]),  .w_ready (w_ready[c]),
      .w_data   (w_data[c]),   .w_last  (w_last[c]),
      .b_valid  (b_valid[c]),  .b_ready (b_ready[c])
    );
  end

  assign done = (&rd_done) && (&wr_done);

  initial begin
    assert (WIDE_W % PE_W == 0) else $error("NCH*MEM_W must be a multiple of PX*PY*DW");
    assert (NBITS % longint'(WIDE_W) == 0) else $error("grid size must fill whole memory words");
  end

endmodule
