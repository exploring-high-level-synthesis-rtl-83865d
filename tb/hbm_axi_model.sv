// hbm_axi_model: behavioural model of one HBM pseudo-channel seen through its
// AXI3 port, for simulation only (not synthesizable).
//
// Storage is a sparse array of DATA_W-bit words indexed by word address
// (byte address / (DATA_W/8)). Read bursts are queued and answered in order,
// one beat per cycle when the channel is not stalling; write bursts are
// queued on AW, their data taken on W in order, and acknowledged on B after
// the last beat. STALL_PCT sets the chance, per cycle and per channel, that
// a ready or valid is withheld, to exercise back-pressure. Testbenches load
// and inspect the storage with the peek/poke functions.
module hbm_axi_model #(
  parameter int unsigned ADDR_W    = 33,
  parameter int unsigned DATA_W    = 512,
  parameter int unsigned STALL_PCT = 20
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              ar_valid,
  output logic              ar_ready,
  input  logic [ADDR_W-1:0] ar_addr,
  input  logic [3:0]        ar_len,
  output logic              r_valid,
  input  logic              r_ready,
  output logic [DATA_W-1:0] r_data,
  output logic              r_last,
  input  logic              aw_valid,
  output logic              aw_ready,
  input  logic [ADDR_W-1:0] aw_addr,
  input  logic [3:0]        aw_len,
  input  logic              w_valid,
  output logic              w_ready,
  input  logic [DATA_W-1:0] w_data,
  input  logic              w_last,
  output logic              b_valid,
  input  logic              b_ready
);
  localparam longint BYTES = DATA_W / 8;

  logic [DATA_W-1:0] mem [longint];
  longint rq_addr[$];  int rq_len[$];
  longint wq_addr[$];  int wq_len[$];
  int     r_beat = 0, w_beat = 0, b_pending = 0;
  bit     r_hold = 0;            // a beat was offered and not taken
  int     stalls = 0;          // cycles a valid was met by a withheld ready
  int     bursts_rd = 0, bursts_wr = 0;
  int     proto_errors = 0;    // write bursts with a misplaced w_last

  function automatic void poke(longint word_addr, logic [DATA_W-1:0] d);
    mem[word_addr] = d;
  endfunction
  function automatic logic [DATA_W-1:0] peek(longint word_addr);
    return mem.exists(word_addr) ? mem[word_addr] : '0;
  endfunction

  function automatic bit go();
    return ($urandom % 100) >= STALL_PCT;
  endfunction

  always @(negedge clk) begin
    ar_ready <= go();
    aw_ready <= go();
    w_ready  <= go() && (wq_addr.size() > 0);
    b_valid  <= (b_pending > 0) && go();
    if (rq_addr.size() > 0 && go()) begin
      r_valid <= 1'b1;
      r_data  <= peek(rq_addr[0] / BYTES + r_beat);
      r_last  <= (r_beat == rq_len[0] - 1);
    end else if (!r_hold) begin
      r_valid <= 1'b0;
    end
  end

  always @(posedge clk) begin
    if (!rst_n) begin
      rq_addr.delete(); rq_len.delete(); wq_addr.delete(); wq_len.delete();
      r_beat = 0; w_beat = 0; b_pending = 0;
    end else begin
      r_hold = r_valid && !r_ready;
      if ((ar_valid && !ar_ready) || (w_valid && !w_ready) || (r_valid && !r_ready)) stalls++;
      if (ar_valid && ar_ready) begin
        rq_addr.push_back(longint'(ar_addr)); rq_len.push_back(int'(ar_len) + 1); bursts_rd++;
      end
      if (aw_valid && aw_ready) begin
        wq_addr.push_back(longint'(aw_addr)); wq_len.push_back(int'(aw_len) + 1); bursts_wr++;
      end
      if (r_valid && r_ready) begin
        if (r_beat == rq_len[0] - 1) begin
          r_beat = 0; void'(rq_addr.pop_front()); void'(rq_len.pop_front());
        end else r_beat++;
      end
      if (w_valid && w_ready && wq_addr.size() > 0) begin
        mem[wq_addr[0] / BYTES + w_beat] = w_data;
        if (w_beat == wq_len[0] - 1) begin
          if (!w_last) begin proto_errors++; $display("AXI: w_last missing at end of burst"); end
          w_beat = 0; void'(wq_addr.pop_front()); void'(wq_len.pop_front()); b_pending++;
        end else begin
          if (w_last) begin proto_errors++; $display("AXI: early w_last"); end
          w_beat++;
        end
      end
      if (b_valid && b_ready) b_pending--;
    end
  end

  initial begin
    ar_ready = 0; aw_ready = 0; w_ready = 0; b_valid = 0; r_valid = 0; r_data = '0; r_last = 0;
  end
endmodule
