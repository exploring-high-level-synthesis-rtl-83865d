// tb_pingpong_fifo: self-checking test of the ping/pong FIFO pair.
//
// 500 random words pass through a pair of 2-deep FIFOs with random input
// gaps and output back-pressure; order and content are checked against a
// queue. The test also checks that consecutive words go alternately to the
// Ping and the Pong FIFO, and that without stalls the pair moves one word
// per cycle (200 words in 200 cycles plus one of latency).
module tb_pingpong_fifo;
  localparam int DW = 16, N = 500, NT = 200;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic in_valid = 0, in_ready, out_valid, out_ready = 0;
  logic [DW-1:0] in_data = '0, out_data;
  pingpong_fifo #(.DW(DW), .DEPTH(2)) dut (.*);

  logic [DW-1:0] q [$];
  bit stalls = 1;
  int recv = 0, last_sel = -1, alt_bad = 0;

  always @(negedge clk) out_ready = stalls ? ($urandom % 3 != 0) : 1'b1;
  always @(posedge clk) if (rst_n) begin
    if (in_valid && in_ready) begin
      q.push_back(in_data);
      if (last_sel == int'(dut.wr_sel)) alt_bad++;
      last_sel = int'(dut.wr_sel);
    end
    if (out_valid && out_ready) begin
      checks++;
      if (q.size() == 0 || out_data != q[0]) begin
        failures++;
        if (failures < 10) $display("word %0d: got %h", recv, out_data);
      end
      if (q.size() > 0) void'(q.pop_front());
      recv++;
    end
  end

  task automatic send(int n, bit gaps);
    for (int i = 0; i < n; i++) begin
      @(negedge clk);
      while (gaps && $urandom % 4 == 0) begin in_valid = 0; @(negedge clk); end
      in_valid = 1; in_data = DW'($urandom);
      @(posedge clk); while (!in_ready) @(posedge clk);
    end
    @(negedge clk); in_valid = 0;
  endtask

  int t0;
  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    send(N, 1);
    wait (recv == N);
    stalls = 0;
    @(posedge clk);
    t0 = $time / 10;
    send(NT, 0);
    wait (recv == N + NT);
    checks++;
    if ($time / 10 - t0 > NT + 2) begin failures++; $display("throughput: %0d cycles", $time / 10 - t0); end
    checks++;
    if (alt_bad != 0) begin failures++; $display("ping/pong did not alternate %0d times", alt_bad); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
