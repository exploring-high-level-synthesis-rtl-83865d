// data_distributor: the "distribution" half of the data distribution and
// collection buffer on the memory read path.
//
// The memory side delivers wide words (IN_W bits, e.g. 512 bits per HBM
// channel times the number of channels read together); the PE chain wants
// narrower words of OUT_W bits. The distributor holds one wide word and hands
// it out as RATIO = IN_W/OUT_W narrow words, least significant slice first
// (slice i is bits [(i+1)*OUT_W-1 : i*OUT_W]). A new wide word is accepted in
// the same cycle the last slice of the old one leaves, so a steady stream
// keeps one narrow word per cycle. With RATIO = 1 it is a one-word register.
//
// Interface: valid/ready on both sides. IN_W must be a multiple of OUT_W.
module data_distributor #(
  parameter int unsigned IN_W  = 2048,
  parameter int unsigned OUT_W = 2048
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  output logic             in_ready,
  input  logic [IN_W-1:0]  in_data,
  output logic             out_valid,
  input  logic             out_ready,
  output logic [OUT_W-1:0] out_data
);
  localparam int unsigned RATIO = IN_W / OUT_W;
  localparam int unsigned IW    = (RATIO > 1) ? $clog2(RATIO) : 1;

  logic [RATIO-1:0][OUT_W-1:0] hold;
  logic [IW-1:0]               idx;
  logic                        have;

  wire last_slice = (idx == IW'(RATIO - 1));
  wire take_out   = out_valid && out_ready;

  assign out_valid = have;
  assign out_data  = hold[idx];
  assign in_ready  = !have || (take_out && last_slice);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      have <= 1'b0;
      idx  <= '0;
      hold <= '0;
    end else begin
      if (in_valid && in_ready) begin
        hold <= in_data;
        have <= 1'b1;
        idx  <= '0;
      end else if (take_out) begin
        if (last_slice) begin
          have <= 1'b0;
          idx  <= '0;
        end else begin
          idx <= idx + 1'b1;
        end
      end
    end
  end

  initial assert (IN_W % OUT_W == 0) else $error("IN_W must be a multiple of OUT_W");

endmodule
