// burst_writer: AXI3 burst write master for one memory (HBM) channel.
//
// Counterpart of burst_reader on the result path. After `start` it writes
// NBEATS full-width beats taken from its input stream to consecutive
// addresses from `base`, grouped into bursts of BURST beats (the last one
// shorter). Write addresses run ahead of the data by at most MAX_OUT bursts;
// write data beats are the stream words themselves, with w_last on the last
// beat of each burst. `done` rises when every burst has been acknowledged on
// the B channel and stays high until the next `start`.
//
// Interface: AXI3 write-address (aw_*), write-data (w_*) and write-response
// (b_*) channels, stream in (in_valid/in_ready). All byte lanes are written;
// no ID, strobe or error handling.
module burst_writer
  import stencil_pkg::*;
#(
  parameter int unsigned ADDR_W  = HBM_ADDR_W,
  parameter int unsigned DATA_W  = HBM_DATA_W,
  parameter int unsigned BURST   = AXI3_MAX_BEAT,
  parameter int unsigned MAX_OUT = 8,
  parameter int unsigned CNT_W   = 32
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  input  logic [ADDR_W-1:0]    base,
  input  logic [CNT_W-1:0]     nbeats,
  output logic                 done,
  // data stream
  input  logic                 in_valid,
  output logic                 in_ready,
  input  logic [DATA_W-1:0]    in_data,
  // AXI3 write address channel
  output logic                 aw_valid,
  input  logic                 aw_ready,
  output logic [ADDR_W-1:0]    aw_addr,
  output logic [AXI_LEN_W-1:0] aw_len,
  // AXI3 write data channel
  output logic                 w_valid,
  input  logic                 w_ready,
  output logic [DATA_W-1:0]    w_data,
  output logic                 w_last,
  // AXI3 write response channel
  input  logic                 b_valid,
  output logic                 b_ready
);
  localparam int unsigned BYTES = DATA_W / 8;
  localparam int unsigned OW    = $clog2(MAX_OUT + 2);
  localparam int unsigned BCW   = $clog2(BURST + 1);

  logic [CNT_W-1:0] req_left;     // beats whose address is not yet issued
  logic [CNT_W-1:0] dat_left;     // beats not yet written
  logic [CNT_W-1:0] rsp_left;     // bursts not yet acknowledged
  logic [BCW-1:0]   beat_in_burst;
  logic [OW-1:0]    ahead;        // addresses issued minus bursts whose data is complete
  logic             busy;

  wire [CNT_W-1:0] this_len  = (req_left > CNT_W'(BURST)) ? CNT_W'(BURST) : req_left;
  wire [CNT_W-1:0] data_blen = (dat_left > CNT_W'(BURST) - CNT_W'(beat_in_burst))
                             ? CNT_W'(BURST) : dat_left + CNT_W'(beat_in_burst);
  wire aw_fire = aw_valid && aw_ready;
  wire w_fire  = w_valid && w_ready;

  assign aw_valid = busy && (req_left != '0) && (ahead < OW'(MAX_OUT));
  assign aw_len   = AXI_LEN_W'(this_len - 1'b1);
  // Data of a burst is sent only once its address has been issued.
  assign w_valid  = busy && in_valid && (dat_left != '0) && (ahead != '0);
  assign in_ready = busy && w_ready && (dat_left != '0) && (ahead != '0);
  assign w_data   = in_data;
  assign w_last   = (CNT_W'(beat_in_burst) + 1'b1 == data_blen);
  assign b_ready  = 1'b1;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy          <= 1'b0;
      done          <= 1'b0;
      req_left      <= '0;
      dat_left      <= '0;
      rsp_left      <= '0;
      beat_in_burst <= '0;
      ahead         <= '0;
      aw_addr       <= '0;
    end else if (start && !busy) begin
      busy          <= (nbeats != '0);
      done          <= (nbeats == '0);
      req_left      <= nbeats;
      dat_left      <= nbeats;
      rsp_left      <= (nbeats + CNT_W'(BURST - 1)) / CNT_W'(BURST);
      beat_in_burst <= '0;
      ahead         <= '0;
      aw_addr       <= base;
    end else begin
      if (aw_fire) begin
        req_left <= req_left - this_len;
        aw_addr  <= aw_addr + ADDR_W'(this_len * BYTES);
      end
      if (w_fire) begin
        dat_left      <= dat_left - 1'b1;
        beat_in_burst <= w_last ? '0 : beat_in_burst + 1'b1;
      end
      case ({aw_fire, w_fire && w_last})
        2'b10:   ahead <= ahead + 1'b1;
        2'b01:   ahead <= ahead - 1'b1;
        default: ahead <= ahead;
      endcase
      if (b_valid && b_ready) begin
        rsp_left <= rsp_left - 1'b1;
        if (rsp_left == CNT_W'(1)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

  a_aw_stable: assert property (@(posedge clk) disable iff (!rst_n)
                                aw_valid && !aw_ready |=> aw_valid && $stable(aw_addr) && $stable(aw_len));
  a_w_stable:  assert property (@(posedge clk) disable iff (!rst_n)
                                w_valid && !w_ready |=> w_valid && $stable(w_data));

endmodule
