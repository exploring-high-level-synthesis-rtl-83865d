// pingpong_fifo: the Ping/Pong FIFO pair that links two neighbouring PEs.
//
// The producing PE writes its results alternately into the Ping and the Pong
// FIFO (one word each), and the consuming PE reads them back alternately in
// the same order, so consecutive words travel through different FIFOs and a
// stall on one side is absorbed without stopping the other. Order is kept
// because both sides start on Ping after reset and toggle on every transfer.
//
// Interface: valid/ready stream in, valid/ready stream out. in_ready is the
// "not full" of the FIFO selected for writing, out_valid the "not empty" of
// the FIFO selected for reading. Each FIFO holds DEPTH words, so the pair
// buffers up to 2*DEPTH. Latency one cycle (show-ahead FIFOs).
module pingpong_fifo #(
  parameter int unsigned DW    = 2048,
  parameter int unsigned DEPTH = 2
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  output logic          in_ready,
  input  logic [DW-1:0] in_data,
  output logic          out_valid,
  input  logic          out_ready,
  output logic [DW-1:0] out_data
);
  logic          wr_sel, rd_sel;      // 0 = Ping, 1 = Pong
  logic [1:0]    full, empty;
  logic [DW-1:0] dout [2];

  for (genvar i = 0; i < 2; i++) begin : g_fifo
    sync_fifo #(.DW(DW), .DEPTH(DEPTH)) u_fifo (
      .clk, .rst_n,
      .push  (in_valid && in_ready && (wr_sel == 1'(i))),
      .din   (in_data),
      .pop   (out_valid && out_ready && (rd_sel == 1'(i))),
      .dout  (dout[i]),
      .full  (full[i]),
      .empty (empty[i]),
      .count ()
    );
  end

  assign in_ready  = !full[wr_sel];
  assign out_valid = !empty[rd_sel];
  assign out_data  = dout[rd_sel];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wr_sel <= 1'b0;
      rd_sel <= 1'b0;
    end else begin
      if (in_valid && in_ready)   wr_sel <= ~wr_sel;
      if (out_valid && out_ready) rd_sel <= ~rd_sel;
    end
  end

endmodule
