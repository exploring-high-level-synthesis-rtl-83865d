// tb_burst_reader: self-checking test of the AXI3 burst read master.
//
// A modelled memory channel (random ready/valid stalls on every AXI
// channel) holds random 64-bit words. The reader fetches three ranges of
// 37, 16 and 1 beats (partial last burst, exact burst, single beat) while
// the output stream gets random back-pressure. Checked: every delivered
// word and the word count, the number of read bursts (ceil(n/16)), the
// length and start address of each burst (16 beats except a shorter last
// one, consecutive addresses), and that done rises only after
// the last word and stays high.
module tb_burst_reader;
  import stencil_pkg::*;
  localparam int AW = 33, DW = 64, BURST = 16;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  bit armed = 0;   // a run is in progress (done of the previous run has dropped)

  logic start = 0, done;
  logic [AW-1:0] base = '0;
  logic [31:0] nbeats = '0;
  logic ar_valid, ar_ready, r_valid, r_ready, r_last, out_valid, out_ready = 0;
  logic [AW-1:0] ar_addr;
  logic [3:0] ar_len;
  logic [DW-1:0] r_data, out_data;
  logic aw_ready, w_ready, b_valid;
  burst_reader #(.ADDR_W(AW), .DATA_W(DW), .BURST(BURST)) dut (.*);
  hbm_axi_model #(.ADDR_W(AW), .DATA_W(DW), .STALL_PCT(30)) mem (
    .clk, .rst_n, .ar_valid, .ar_ready, .ar_addr, .ar_len, .r_valid, .r_ready, .r_data, .r_last,
    .aw_valid(1'b0), .aw_ready, .aw_addr('0), .aw_len('0), .w_valid(1'b0), .w_ready,
    .w_data('0), .w_last(1'b0), .b_valid, .b_ready(1'b0));

  int got_words = 0, base_word = 0, n_exp = 0, burst_i = 0;
  always @(negedge clk) out_ready = ($urandom % 3 != 0);
  always @(posedge clk) if (rst_n) begin
    if (out_valid && out_ready) begin
      checks++;
      if (out_data != mem.peek(base_word + got_words)) begin
        failures++;
        if (failures < 10) $display("word %0d wrong", got_words);
      end
      got_words++;
    end
    if (ar_valid && ar_ready) begin
      automatic int exp_len = (n_exp - burst_i * BURST >= BURST) ? BURST : n_exp - burst_i * BURST;
      checks++;
      if (int'(ar_len) + 1 != exp_len || ar_addr != AW'((base_word + burst_i * BURST) * (DW/8))) begin
        failures++; $display("burst %0d: len %0d addr %h", burst_i, int'(ar_len) + 1, ar_addr);
      end
      burst_i++;
    end
    if (armed && done && got_words != n_exp && !start) begin
      failures++; $display("done before all words delivered"); n_exp = got_words;
    end
  end

  task automatic run(int b, int n);
    int bursts0 = mem.bursts_rd;
    base_word = b; n_exp = n; got_words = 0; burst_i = 0;
    @(negedge clk); base = AW'(b * (DW/8)); nbeats = 32'(n); start = 1;
    @(negedge clk); start = 0; armed = 1;
    wait (done);
    armed = 0;
    repeat (5) @(posedge clk);
    checks++;
    if (got_words != n || !done) begin failures++; $display("run %0d: %0d words", n, got_words); end
    checks++;
    if (mem.bursts_rd - bursts0 != (n + BURST - 1) / BURST) begin
      failures++; $display("run %0d: %0d bursts", n, mem.bursts_rd - bursts0);
    end
  endtask

  initial begin
    for (int i = 0; i < 200; i++) mem.poke(i, {$urandom, $urandom});
    repeat (3) @(posedge clk);
    rst_n = 1;
    run(0, 37);
    run(64, 16);
    run(100, 1);
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
