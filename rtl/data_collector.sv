// data_collector: the "collection" half of the data distribution and
// collection buffer on the memory write path.
//
// It gathers RATIO = OUT_W/IN_W narrow result words from the PE chain into one
// wide memory word (first word into the least significant slice) so that the
// memory port is always written at its full width. The wide word is offered
// downstream while the next one is being gathered; a narrow word is refused
// only when a completed wide word is still waiting and the last slot would be
// filled. With RATIO = 1 it is a one-word register.
//
// Interface: valid/ready on both sides. OUT_W must be a multiple of IN_W.
module data_collector #(
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
  localparam int unsigned RATIO = OUT_W / IN_W;
  localparam int unsigned IW    = (RATIO > 1) ? $clog2(RATIO) : 1;

  logic [RATIO-1:0][IN_W-1:0] acc;
  logic [IW-1:0]              idx;
  logic                       pend;     // out_data holds a complete word

  wire last_slot = (idx == IW'(RATIO - 1));
  wire take_out  = out_valid && out_ready;

  logic [RATIO-1:0][IN_W-1:0] done_word;
  always_comb begin
    done_word            = acc;
    done_word[RATIO-1]   = in_data;
  end

  assign out_valid = pend;
  assign in_ready  = !last_slot || !pend || take_out;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      acc      <= '0;
      idx      <= '0;
      pend     <= 1'b0;
      out_data <= '0;
    end else begin
      if (take_out) pend <= 1'b0;
      if (in_valid && in_ready) begin
        if (last_slot) begin
          out_data <= done_word;
          idx      <= '0;
          pend     <= 1'b1;
        end else begin
          acc[idx] <= in_data;
          idx      <= idx + 1'b1;
        end
      end
    end
  end

  initial assert (OUT_W % IN_W == 0) else $error("OUT_W must be a multiple of IN_W");

endmodule
