// lgca_accel: LGCA simulation accelerator, NPE chained PEs (temporal
// parallelism) of G sites each (spatial parallelism).
//
// Grids stream in and out as plane-major groups of G sites (see lgca_pe).
// PE i computes time step base_step+i; PEs are linked by ping/pong FIFO
// pairs, so only the first and the last PE face the memory side, and one pass
// advances the grid by NPE time steps. The memory movers of the board are
// outside this module: it offers plain valid/ready streams.
module lgca_accel
  import lgca_pkg::*;
#(
  parameter int unsigned COLS     = 2048,
  parameter int unsigned ROWS     = 4096,
  parameter int unsigned G        = 48,
  parameter int unsigned NPE      = 12,
  parameter int unsigned PP_DEPTH = 2
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic [15:0]            base_step,
  input  logic                   in_valid,
  output logic                   in_ready,
  input  logic [NDIR-1:0][G-1:0] in_data,
  output logic                   out_valid,
  input  logic                   out_ready,
  output logic [NDIR-1:0][G-1:0] out_data
);
  typedef logic [NDIR-1:0][G-1:0] grp_t;

  logic s_valid [NPE+1];
  logic s_ready [NPE+1];
  grp_t s_data  [NPE+1];
  logic p_valid [NPE];
  logic p_ready [NPE];
  grp_t p_data  [NPE];

  assign s_valid[0] = in_valid;
  assign in_ready   = s_ready[0];
  assign s_data[0]  = in_data;

  for (genvar i = 0; i < NPE; i++) begin : g_pe
    lgca_pe #(.COLS(COLS), .ROWS(ROWS), .G(G)) u_pe (
      .clk, .rst_n,
      .step     (base_step + 16'(i)),
      .in_valid (s_valid[i]), .in_ready (s_ready[i]), .in_data (s_data[i]),
      .out_valid(p_valid[i]), .out_ready(p_ready[i]), .out_data(p_data[i])
    );
    if (i < NPE - 1) begin : g_link
      pingpong_fifo #(.DW(NDIR*G), .DEPTH(PP_DEPTH)) u_pp (
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

  assign out_valid    = s_valid[NPE];
  assign s_ready[NPE] = out_ready;
  assign out_data     = s_data[NPE];

endmodule
