// tb_burst_writer: self-checking test of the AXI3 burst write master.
//
// Random 64-bit words are offered on the input stream with random gaps and
// written by the writer into a modelled memory channel with random stalls
// on every AXI channel. Three runs of 21, 8 and 3 beats with BURST = 8.
// Checked: memory contents after each run, burst count (ceil(n/8)), burst
// length and address, w_last on exactly the last beat of each burst, and
// that done rises only after every write response has been received.
module tb_burst_writer;
  import stencil_pkg::*;
  localparam int AW = 33, DW = 64, BURST = 8;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  bit armed = 0;   // a run is in progress (done of the previous run has dropped)

  logic start = 0, done;
  logic [AW-1:0] base = '0;
  logic [31:0] nbeats = '0;
  logic in_valid = 0, in_ready;
  logic [DW-1:0] in_data = '0, w_data;
  logic aw_valid, aw_ready, w_valid, w_ready, w_last, b_valid, b_ready;
  logic [AW-1:0] aw_addr;
  logic [3:0] aw_len;
  logic ar_ready, r_valid, r_last;
  logic [DW-1:0] r_data;
  burst_writer #(.ADDR_W(AW), .DATA_W(DW), .BURST(BURST)) dut (.*);
  hbm_axi_model #(.ADDR_W(AW), .DATA_W(DW), .STALL_PCT(30)) mem (
    .clk, .rst_n, .ar_valid(1'b0), .ar_ready, .ar_addr('0), .ar_len('0), .r_valid, .r_ready(1'b0),
    .r_data, .r_last, .aw_valid, .aw_ready, .aw_addr, .aw_len, .w_valid, .w_ready, .w_data, .w_last,
    .b_valid, .b_ready);

  logic [DW-1:0] src [32];
  int n_exp = 0, base_word = 0, burst_i = 0, beat_i = 0, resp = 0;
  always @(posedge clk) if (rst_n) begin
    if (aw_valid && aw_ready) begin
      automatic int exp_len = (n_exp - burst_i * BURST >= BURST) ? BURST : n_exp - burst_i * BURST;
      checks++;
      if (int'(aw_len) + 1 != exp_len || aw_addr != AW'((base_word + burst_i * BURST) * (DW/8))) begin
        failures++; $display("burst %0d: len %0d addr %h", burst_i, int'(aw_len) + 1, aw_addr);
      end
      burst_i++;
    end
    if (w_valid && w_ready) begin
      automatic bit last_exp = (beat_i % BURST == BURST - 1) || (beat_i == n_exp - 1);
      checks++;
      if (w_last != last_exp) begin failures++; $display("w_last wrong at beat %0d", beat_i); end
      beat_i++;
    end
    if (b_valid && b_ready) resp++;
    if (armed && done && !start && resp != (n_exp + BURST - 1) / BURST) begin
      failures++; $display("done before all responses"); resp = (n_exp + BURST - 1) / BURST;
    end
  end

  task automatic run(int b, int n);
    base_word = b; n_exp = n; burst_i = 0; beat_i = 0; resp = 0;
    for (int i = 0; i < n; i++) src[i] = {$urandom, $urandom};
    @(negedge clk); base = AW'(b * (DW/8)); nbeats = 32'(n); start = 1;
    @(negedge clk); start = 0; armed = 1;
    for (int i = 0; i < n; i++) begin
      while ($urandom % 4 == 0) begin in_valid = 0; @(negedge clk); end
      in_valid = 1; in_data = src[i];
      @(posedge clk); while (!in_ready) @(posedge clk);
      @(negedge clk);
    end
    in_valid = 0;
    wait (done);
    armed = 0;
    repeat (3) @(posedge clk);
    for (int i = 0; i < n; i++) begin
      checks++;
      if (mem.peek(b + i) != src[i]) begin failures++; $display("run %0d word %0d wrong", n, i); end
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    run(0, 21);
    run(40, 8);
    run(60, 3);
    checks++;
    if (mem.bursts_wr != 3 + 1 + 1) begin failures++; $display("%0d write bursts", mem.bursts_wr); end
    checks++;
    if (mem.proto_errors != 0) begin failures++; $display("AXI write protocol errors"); end
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
