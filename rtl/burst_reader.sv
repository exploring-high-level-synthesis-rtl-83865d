// burst_reader: AXI3 burst read master for one memory (HBM) channel.
//
// The grid is stored in memory already in the order the PEs consume it
// (linearised tile order), so a whole grid is one contiguous address range
// and can be fetched with back-to-back bursts. After `start` the reader
// issues read-address requests of BURST beats (the last one shorter if
// NBEATS is not a multiple of BURST) from `base` upward, and passes the
// returned data beats straight to its output stream; back-pressure on the
// stream is back-pressure on the R channel. `done` rises after the last beat
// has been delivered and stays high until the next `start`. Requests run
// ahead of the data by at most MAX_OUT bursts.
//
// Interface: AXI3 read-address (ar_*) and read-data (r_*) channels, data
// width DATA_W, byte address ADDR_W; stream out (out_valid/out_ready).
// No ID, size, burst-type or response signals: fixed INCR bursts of full-width
// beats, errors not reported.
module burst_reader
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
  // AXI3 read address channel
  output logic                 ar_valid,
  input  logic                 ar_ready,
  output logic [ADDR_W-1:0]    ar_addr,
  output logic [AXI_LEN_W-1:0] ar_len,
  // AXI3 read data channel
  input  logic                 r_valid,
  output logic                 r_ready,
  input  logic [DATA_W-1:0]    r_data,
  input  logic                 r_last,
  // data stream
  output logic                 out_valid,
  input  logic                 out_ready,
  output logic [DATA_W-1:0]    out_data
);
  localparam int unsigned BYTES = DATA_W / 8;
  localparam int unsigned OW    = $clog2(MAX_OUT + 1);

  logic [CNT_W-1:0] req_left;     // beats not yet requested
  logic [CNT_W-1:0] rcv_left;     // beats not yet received
  logic [OW-1:0]    outstanding;  // bursts requested, last beat not yet seen
  logic             busy;

  wire [CNT_W-1:0] this_len = (req_left > CNT_W'(BURST)) ? CNT_W'(BURST) : req_left;
  wire ar_fire = ar_valid && ar_ready;
  wire r_fire  = r_valid && r_ready;

  assign ar_valid  = busy && (req_left != '0) && (outstanding < OW'(MAX_OUT));
  assign ar_len    = AXI_LEN_W'(this_len - 1'b1);
  assign out_valid = r_valid;
  assign out_data  = r_data;
  assign r_ready   = out_ready;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy        <= 1'b0;
      done        <= 1'b0;
      req_left    <= '0;
      rcv_left    <= '0;
      outstanding <= '0;
      ar_addr     <= '0;
    end else if (start && !busy) begin
      busy        <= (nbeats != '0);
      done        <= (nbeats == '0);
      req_left    <= nbeats;
      rcv_left    <= nbeats;
      outstanding <= '0;
      ar_addr     <= base;
    end else begin
      if (ar_fire) begin
        req_left <= req_left - this_len;
        ar_addr  <= ar_addr + ADDR_W'(this_len * BYTES);
      end
      case ({ar_fire, r_fire && r_last})
        2'b10:   outstanding <= outstanding + 1'b1;
        2'b01:   outstanding <= outstanding - 1'b1;
        default: outstanding <= outstanding;
      endcase
      if (r_fire) begin
        rcv_left <= rcv_left - 1'b1;
        if (rcv_left == CNT_W'(1)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

  a_ar_stable: assert property (@(posedge clk) disable iff (!rst_n)
                                ar_valid && !ar_ready |=> ar_valid && $stable(ar_addr) && $stable(ar_len));

endmodule
