// tb_sync_fifo: self-checking test of the show-ahead synchronous FIFO.
//
// A 4-deep, 8-bit FIFO is driven with random push/pop for 2000 cycles
// (pushes are also tried while full together with a pop, the case the FIFO
// allows). A queue model checks dout, full, empty and count every cycle and
// that a full FIFO accepts no extra word.
module tb_sync_fifo;
  localparam int DW = 8, DEPTH = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic push = 0, pop = 0, full, empty;
  logic [DW-1:0] din = '0, dout;
  logic [$clog2(DEPTH+1)-1:0] count;
  sync_fifo #(.DW(DW), .DEPTH(DEPTH)) dut (.*);

  logic [DW-1:0] q [$];
  int n_full = 0, n_push_full = 0;

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 2000; cyc++) begin
      @(negedge clk);
      // check state
      checks++;
      if (int'(count) != q.size() || full != (q.size() == DEPTH) || empty != (q.size() == 0) ||
          (q.size() > 0 && dout != q[0])) begin
        failures++;
        if (failures < 10) $display("cycle %0d: count %0d model %0d dout %h", cyc, count, q.size(), dout);
      end
      if (full) n_full++;
      pop  = !empty && ($urandom % 3 != 0);
      push = ($urandom % 2 == 0) && (!full || pop);
      din  = DW'($urandom);
      if (full && push) n_push_full++;
      @(posedge clk);
      if (pop) void'(q.pop_front());
      if (push) q.push_back(din);
    end
    checks++;
    if (n_full == 0 || n_push_full == 0) begin failures++; $display("full case not reached"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (10000) @(posedge clk);
    failures++; $display("watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
