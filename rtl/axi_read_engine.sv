// axi_read_engine: streams a contiguous array from DRAM over an AXI4 read channel.
//
// After `start` it reads `total_beats` data beats of DW bits starting at `base_addr`, as
// INCR bursts of up to BURST beats (the last burst may be shorter). A burst is requested
// only when the downstream FIFO has room for it and for every beat still in flight, so the
// R channel never has to be held off (`rready` stays high). Returned beats go straight to
// the FIFO through `beat_valid`/`beat_data`. `done` rises when the last beat has arrived and
// stays high until the next `start`. The base address must be aligned to BURST*DW/8 bytes so
// no burst crosses a 4 KB boundary. Synchronous active-low reset.
module axi_read_engine #(
  parameter int unsigned AW    = 64,
  parameter int unsigned DW    = 512,
  parameter int unsigned BURST = 64,
  parameter int unsigned FREE_W = 16
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic [AW-1:0]     base_addr,
  input  logic [31:0]       total_beats,
  input  logic [FREE_W-1:0] fifo_free_beats,
  output logic              done,
  // AXI4 read address channel
  output logic              arvalid,
  input  logic              arready,
  output logic [AW-1:0]     araddr,
  output logic [7:0]        arlen,
  output logic [2:0]        arsize,
  output logic [1:0]        arburst,
  // AXI4 read data channel
  input  logic              rvalid,
  output logic              rready,
  input  logic [DW-1:0]     rdata,
  input  logic              rlast,
  // to the FIFO
  output logic              beat_valid,
  output logic [DW-1:0]     beat_data
);
  localparam int unsigned BYTES = DW / 8;

  logic [31:0] req_left;     // beats not yet requested
  logic [31:0] rcv_left;     // beats not yet received
  logic [31:0] inflight;     // requested but not received
  logic [31:0] this_len;
  logic        active;

  assign this_len = (req_left < BURST) ? req_left : 32'(BURST);
  assign inflight = rcv_left - req_left;

  assign arsize  = 3'($clog2(BYTES));
  assign arburst = 2'b01;                      // INCR
  assign rready  = 1'b1;
  assign beat_valid = rvalid;
  assign beat_data  = rdata;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      active   <= 1'b0;
      done     <= 1'b0;
      arvalid  <= 1'b0;
      req_left <= '0;
      rcv_left <= '0;
      araddr   <= '0;
      arlen    <= '0;
    end else begin
      if (start) begin
        active   <= 1'b1;
        done     <= 1'b0;
        req_left <= total_beats;
        rcv_left <= total_beats;
        araddr   <= base_addr;
        arvalid  <= 1'b0;
      end else if (active) begin
        if (arvalid) begin
          if (arready) begin
            arvalid  <= 1'b0;
            araddr   <= araddr + AW'(32'(arlen) + 1) * AW'(BYTES);
            req_left <= req_left - (32'(arlen) + 1);
          end
        end else if (req_left != 0 && 32'(fifo_free_beats) >= inflight + this_len) begin
          arvalid <= 1'b1;
          arlen   <= 8'(this_len - 1);
        end
        if (rvalid) begin
          rcv_left <= rcv_left - 1;
          if (rcv_left == 1) begin
            active <= 1'b0;
            done   <= 1'b1;
          end
        end
      end
    end
  end

  ar_stable: assert property (@(posedge clk) disable iff (!rst_n || start)
    arvalid && !arready |=> arvalid && $stable(araddr) && $stable(arlen));
endmodule
