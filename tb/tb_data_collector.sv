// tb_data_collector: self-checking test of the data collector
// (IN_W = 8, OUT_W = 32).
//
// 400 random input words with random input gaps and output back-pressure;
// the output stream is compared with the input stream re-cut into OUT_W-bit
// words, least significant part first. Then 100 input words without stalls
// must pass at full rate (one narrow word per cycle).
module tb_data_collector;
  localparam int IN_W = 8, OUT_W = 32, N = 400, NT = 100;
  localparam int NB = (IN_W > OUT_W) ? IN_W : OUT_W;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic in_valid = 0, in_ready, out_valid, out_ready = 0;
  logic [IN_W-1:0] in_data = '0;
  logic [OUT_W-1:0] out_data;
  data_collector #(.IN_W(IN_W), .OUT_W(OUT_W)) dut (.*);

  bit bits [$];      // expected bit stream, LSB of the first word first
  bit stalls = 1;
  int recv = 0;

  always @(negedge clk) out_ready = stalls ? ($urandom % 3 != 0) : 1'b1;
  always @(posedge clk) if (rst_n) begin
    if (in_valid && in_ready)
      for (int b = 0; b < IN_W; b++) bits.push_back(in_data[b]);
    if (out_valid && out_ready) begin
      automatic logic [OUT_W-1:0] exp = '0;
      for (int b = 0; b < OUT_W; b++) exp[b] = (bits.size() > 0) ? bits.pop_front() : 1'bx;
      checks++;
      if (out_data !== exp) begin
        failures++;
        if (failures < 10) $display("word %0d: got %h exp %h", recv, out_data, exp);
      end
      recv++;
    end
  end

  task automatic send(int n, bit gaps);
    for (int i = 0; i < n; i++) begin
      @(negedge clk);
      while (gaps && $urandom % 4 == 0) begin in_valid = 0; @(negedge clk); end
      in_valid = 1; in_data = IN_W'({$urandom, $urandom});
      @(posedge clk); while (!in_ready) @(posedge clk);
    end
    @(negedge clk); in_valid = 0;
  endtask

  int t0;
  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    send(N, 1);
    wait (recv == N * IN_W / OUT_W);
    stalls = 0;
    @(posedge clk);
    t0 = $time / 10;
    send(NT, 0);
    wait (recv == (N + NT) * IN_W / OUT_W);
    checks++;
    if ($time / 10 - t0 > NT * NB / OUT_W + 3) begin
      failures++; $display("throughput: %0d cycles for %0d output words", $time / 10 - t0, NT * IN_W / OUT_W);
    end
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
