// stencil_top: the three accelerator designs side by side.
//
//  * st_*  stencil_accel - the HLS-style Laplace/Sobel stencil accelerator
//          with NPE chained PEs (temporal parallelism), PX x PY cells per PE
//          (spatial parallelism) and NCH AXI3 memory channels (HBM pseudo
//          channels). Started with st_start, signals st_done.
//  * lg_*  lgca_accel - the FHP lattice gas cellular automaton accelerator,
//          G sites per word, NPE chained PEs, streaming ports.
//  * lb_*  lbm_accel - the D2Q9 lattice Boltzmann accelerator, NCU sites per
//          word, NPE chained PEs, streaming ports.
//
// The designs share clock and reset and nothing else; every parameter is
// passed through, with defaults equal to the configurations the document
// reports (Laplace 16384^2, 64 cells x 4 PEs, 4 channels; LGCA 2048x4096,
// 48 sites x 12 PEs; LBM 1024x2048, 2 CUs x 10 PEs). The LGCA and LBM designs
// are given without their memory movers (own choice): their grids enter and
// leave as valid/ready word streams.
module stencil_top
  import stencil_pkg::*;
  import lgca_pkg::NDIR;
#(
  parameter kernel_e     ST_KERNEL = KERN_LAPLACE,
  parameter int unsigned ST_DW     = 32,
  parameter int unsigned ST_COLS   = 16384,
  parameter int unsigned ST_ROWS   = 16384,
  parameter int unsigned ST_PX     = 64,
  parameter int unsigned ST_PY     = 1,
  parameter int unsigned ST_NPE    = 4,
  parameter int unsigned ST_NCH    = 4,
  parameter int unsigned ST_MEM_W  = HBM_DATA_W,
  parameter int unsigned ST_ADDR_W = HBM_ADDR_W,
  parameter int unsigned ST_BURST  = AXI3_MAX_BEAT,
  parameter int unsigned LG_COLS   = 2048,
  parameter int unsigned LG_ROWS   = 4096,
  parameter int unsigned LG_G      = 48,
  parameter int unsigned LG_NPE    = 12,
  parameter int unsigned LB_COLS   = 1024,
  parameter int unsigned LB_ROWS   = 2048,
  parameter int unsigned LB_NCU    = 2,
  parameter int unsigned LB_NPE    = 10,
  parameter int unsigned LB_FW     = 32,
  parameter int unsigned LB_FRAC   = 24,
  parameter int          LB_OMEGA  = 27962027,
  parameter int unsigned PP_DEPTH  = 2
) (
  input  logic                                 clk,
  input  logic                                 rst_n,
  // stencil accelerator
  input  logic                                 st_start,
  input  logic [ST_NCH-1:0][ST_ADDR_W-1:0]     st_src_base,
  input  logic [ST_NCH-1:0][ST_ADDR_W-1:0]     st_dst_base,
  output logic                                 st_done,
  output logic [ST_NCH-1:0]                    st_ar_valid,
  input  logic [ST_NCH-1:0]                    st_ar_ready,
  output logic [ST_NCH-1:0][ST_ADDR_W-1:0]     st_ar_addr,
  output logic [ST_NCH-1:0][AXI_LEN_W-1:0]     st_ar_len,
  input  logic [ST_NCH-1:0]                    st_r_valid,
  output logic [ST_NCH-1:0]                    st_r_ready,
  input  logic [ST_NCH-1:0][ST_MEM_W-1:0]      st_r_data,
  input  logic [ST_NCH-1:0]                    st_r_last,
  output logic [ST_NCH-1:0]                    st_aw_valid,
  input  logic [ST_NCH-1:0]                    st_aw_ready,
  output logic [ST_NCH-1:0][ST_ADDR_W-1:0]     st_aw_addr,
  output logic [ST_NCH-1:0][AXI_LEN_W-1:0]     st_aw_len,
  output logic [ST_NCH-1:0]                    st_w_valid,
  input  logic [ST_NCH-1:0]                    st_w_ready,
  output logic [ST_NCH-1:0][ST_MEM_W-1:0]      st_w_data,
  output logic [ST_NCH-1:0]                    st_w_last,
  input  logic [ST_NCH-1:0]                    st_b_valid,
  output logic [ST_NCH-1:0]                    st_b_ready,
  // LGCA accelerator
  input  logic [15:0]                          lg_base_step,
  input  logic                                 lg_in_valid,
  output logic                                 lg_in_ready,
  input  logic [NDIR-1:0][LG_G-1:0]            lg_in_data,
  output logic                                 lg_out_valid,
  input  logic                                 lg_out_ready,
  output logic [NDIR-1:0][LG_G-1:0]            lg_out_data,
  // LBM accelerator
  input  logic                                 lb_in_valid,
  output logic                                 lb_in_ready,
  input  logic [LB_NCU-1:0][8:0][LB_FW-1:0]    lb_in_data,
  output logic                                 lb_out_valid,
  input  logic                                 lb_out_ready,
  output logic [LB_NCU-1:0][8:0][LB_FW-1:0]    lb_out_data
);

  stencil_accel #(
    .KERNEL(ST_KERNEL), .DW(ST_DW), .COLS(ST_COLS), .ROWS(ST_ROWS),
    .PX(ST_PX), .PY(ST_PY), .NPE(ST_NPE), .NCH(ST_NCH), .MEM_W(ST_MEM_W),
    .ADDR_W(ST_ADDR_W), .BURST(ST_BURST), .PP_DEPTH(PP_DEPTH)
  ) u_stencil (
    .clk, .rst_n,
    .start(st_start), .src_base(st_src_base), .dst_base(st_dst_base), .done(st_done),
    .ar_valid(st_ar_valid), .ar_ready(st_ar_ready), .ar_addr(st_ar_addr), .ar_len(st_ar_len),
    .r_valid(st_r_valid), .r_ready(st_r_ready), .r_data(st_r_data), .r_last(st_r_last),
    .aw_valid(st_aw_valid), .aw_ready(st_aw_ready), .aw_addr(st_aw_addr), .aw_len(st_aw_len),
    .w_valid(st_w_valid), .w_ready(st_w_ready), .w_data(st_w_data), .w_last(st_w_last),
    .b_valid(st_b_valid), .b_ready(st_b_ready)
  );

  lgca_accel #(
    .COLS(LG_COLS), .ROWS(LG_ROWS), .G(LG_G), .NPE(LG_NPE), .PP_DEPTH(PP_DEPTH)
  ) u_lgca (
    .clk, .rst_n, .base_step(lg_base_step),
    .in_valid(lg_in_valid), .in_ready(lg_in_ready), .in_data(lg_in_data),
    .out_valid(lg_out_valid), .out_ready(lg_out_ready), .out_data(lg_out_data)
  );

  lbm_accel #(
    .COLS(LB_COLS), .ROWS(LB_ROWS), .NCU(LB_NCU), .NPE(LB_NPE), .FW(LB_FW),
    .FRAC(LB_FRAC), .OMEGA(LB_OMEGA), .PP_DEPTH(PP_DEPTH)
  ) u_lbm (
    .clk, .rst_n,
    .in_valid(lb_in_valid), .in_ready(lb_in_ready), .in_data(lb_in_data),
    .out_valid(lb_out_valid), .out_ready(lb_out_ready), .out_data(lb_out_data)
  );

endmodule
