// sync_fifo: single-clock first-in first-out queue.
//
// Used wherever the design needs a hardware stream FIFO: the row FIFOs
// inside the custom buffers and the ping/pong FIFOs between PEs. Storage is
// a plain array with a write and a read pointer; the head entry is always
// visible on dout (show-ahead), so a consumer reads dout and asserts pop in
// the same cycle. A push and a pop in the same cycle are allowed even when
// the FIFO is full, which is how the custom buffers use a full FIFO as a
// fixed-length delay line. DEPTH need not be a power of two.
//
// Timing: push and pop take effect at the rising clock edge; dout shows the
// new head one cycle after a pop. Reset (active low, synchronous) empties it.
module sync_fifo #(
  parameter int unsigned DW    = 32,
  parameter int unsigned DEPTH = 16
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       push,
  input  logic [DW-1:0]              din,
  input  logic                       pop,
  output logic [DW-1:0]              dout,
  output logic                       full,
  output logic                       empty,
  output logic [$clog2(DEPTH+1)-1:0] count
);
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [DW-1:0] mem [DEPTH];
  logic [AW-1:0] wr_ptr, rd_ptr;

  assign full  = (count == DEPTH[$clog2(DEPTH+1)-1:0]);
  assign empty = (count == '0);
  assign dout  = mem[rd_ptr];

  wire do_pop  = pop && !empty;
  wire do_push = push && (!full || do_pop);

  function automatic logic [AW-1:0] incr(input logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (do_push) mem[wr_ptr] <= din;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
      count  <= '0;
    end else begin
      if (do_push) wr_ptr <= incr(wr_ptr);
      if (do_pop)  rd_ptr <= incr(rd_ptr);
      case ({do_push, do_pop})
        2'b10:   count <= count + 1'b1;
        2'b01:   count <= count - 1'b1;
        default: count <= count;
      endcase
    end
  end

  // Handshake rules: never push into a full FIFO without popping, never pop
  // an empty one.
  a_no_overflow:  assert property (@(posedge clk) disable iff (!rst_n) !(push && full && !pop));
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n) !(pop && empty));

endmodule
