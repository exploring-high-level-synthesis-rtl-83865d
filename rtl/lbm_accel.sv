// lbm_accel: D2Q9 LBM simulation accelerator, NPE chained PEs (temporal
// parallelism) of NCU computing units each (spatial parallelism).
//
// Grids stream in and out as words of NCU sites (nine FW-bit distributions
// per site, see lbm_pe). PEs are linked by ping/pong FIFO pairs; only the
// first and the last PE face the memory side, and one pass advances the
// simulation by NPE time steps. Memory movers are outside this module.
module lbm_accel #(
  parameter int unsigned COLS     = 1024,
  parameter int unsigned ROWS     = 2048,
  parameter int unsigned NCU      = 2,
  parameter int unsigned NPE      = 10,
  parameter int unsigned FW       = 32,
  parameter int unsigned FRAC     = 24,
  parameter int          OMEGA    = 27962027,
  parameter int unsigned PP_DEPTH = 2
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        in_valid,
  output logic                        in_ready,
  input  logic [NCU-1:0][8:0][FW-1:0] in_data,
  output logic                        out_valid,
  input  logic                        out_ready,
  output logic [NCU-1:0][8:0][FW-1:0] out_data
);
  typedef logic [NCU-1:0][8:0][FW-1:0] word_t;

  logic  s_valid [NPE+1];
  logic  s_ready [NPE+1];
  word_t s_data  [NPE+1];
  logic  p_valid [NPE];
  logic  p_ready [NPE];
  word_t p_data  [NPE];

  assign s_valid[0] = in_valid;
  assign in_ready   = s_ready[0];
  assign s_data[0]  = in_data;

  for (genvar i = 0; i < NPE; i++) begin : g_pe
    lbm_pe #(.COLS(COLS), .ROWS(ROWS), .NCU(NCU), .FW(FW), .FRAC(FRAC), .OMEGA(OMEGA)) u_pe (
      .clk, .rst_n,
      .in_valid (s_valid[i]), .in_ready (s_ready[i]), .in_data (s_data[i]),
      .out_valid(p_valid[i]), .out_ready(p_ready[i]), .out_data(p_data[i])
    );
    if (i < NPE - 1) begin : g_link
      pingpong_fifo #(.DW(NCU*9*FW), .DEPTH(PP_DEPTH)) u_pp (
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
