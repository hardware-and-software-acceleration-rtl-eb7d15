// axi_write_engine: writes a stream of results back to DRAM over an AXI4 write channel.
//
// After `start` it writes `total_beats` beats of DW bits from `base_addr` on, as INCR bursts
// of up to BURST beats. A burst's address is issued only once the source FIFO holds the whole
// burst (`fifo_beats`), and its data beats follow back to back with `wlast` on the final one,
// so the W channel never waits for data mid-burst. One burst's address and data are sent
// before the next address; write responses are counted and `done` rises when the last
// response has returned (the data is then in memory). Synchronous active-low reset.
module axi_write_engine #(
  parameter int unsigned AW     = 64,
  parameter int unsigned DW     = 512,
  parameter int unsigned BURST  = 64,
  parameter int unsigned FREE_W = 16
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic [AW-1:0]     base_addr,
  input  logic [31:0]       total_beats,
  input  logic [FREE_W-1:0] fifo_beats,
  input  logic [DW-1:0]     fifo_data,
  output logic              fifo_pop,
  output logic              done,
  // AXI4 write address channel
  output logic              awvalid,
  input  logic              awready,
  output logic [AW-1:0]     awaddr,
  output logic [7:0]        awlen,
  output logic [2:0]        awsize,
  output logic [1:0]        awburst,
  // AXI4 write data channel
  output logic              wvalid,
  input  logic              wready,
  output logic [DW-1:0]     wdata,
  output logic [DW/8-1:0]   wstrb,
  output logic              wlast,
  // AXI4 write response channel
  input  logic              bvalid,
  output logic              bready
);
  localparam int unsigned BYTES = DW / 8;

  typedef enum logic [1:0] { W_IDLE, W_ADDR, W_DATA, W_RESP } wstate_e;
  wstate_e state;

  logic [31:0] left;         // beats not yet addressed
  logic [31:0] bursts_out;   // bursts whose response is still missing
  logic [7:0]  beat_cnt;
  logic [31:0] this_len;

  assign this_len = (left < BURST) ? left : 32'(BURST);
  assign awsize   = 3'($clog2(BYTES));
  assign awburst  = 2'b01;
  assign wdata    = fifo_data;
  assign wstrb    = '1;
  assign wvalid   = (state == W_DATA);
  assign wlast    = (state == W_DATA) && (beat_cnt == awlen);
  assign fifo_pop = wvalid && wready;
  assign bready   = 1'b1;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state      <= W_IDLE;
      done       <= 1'b0;
      awvalid    <= 1'b0;
      awaddr     <= '0;
      awlen      <= '0;
      left       <= '0;
      bursts_out <= '0;
      beat_cnt   <= '0;
    end else begin
      if (start) begin
        state      <= W_ADDR;
        done       <= 1'b0;
        awvalid    <= 1'b0;
        awaddr     <= base_addr;
        left       <= total_beats;
        bursts_out <= '0;
      end else begin
        case (state)
          W_IDLE: ;
          W_ADDR: begin
            if (awvalid) begin
              if (awready) begin
                awvalid  <= 1'b0;
                beat_cnt <= '0;
                state    <= W_DATA;
              end
            end else if (left == 0) begin
              state <= W_RESP;
            end else if (32'(fifo_beats) >= this_len) begin
              awvalid <= 1'b1;
              awlen   <= 8'(this_len - 1);
            end
          end
          W_DATA: begin
            if (wready) begin
              beat_cnt <= beat_cnt + 1'b1;
              if (beat_cnt == awlen) begin
                awaddr <= awaddr + AW'(32'(awlen) + 1) * AW'(BYTES);
                left   <= left - (32'(awlen) + 1);
                state  <= W_ADDR;
              end
            end
          end
          W_RESP: if (bursts_out == 0 && !bvalid) begin
            state <= W_IDLE;
            done  <= 1'b1;
          end
          default: state <= W_IDLE;
        endcase
        // one more burst outstanding on every address handshake, one less per response
        bursts_out <= bursts_out + ((awvalid && awready) ? 32'd1 : 32'd0) - (bvalid ? 32'd1 : 32'd0);
      end
    end
  end

  aw_stable: assert property (@(posedge clk) disable iff (!rst_n || start)
    awvalid && !awready |=> awvalid && $stable(awaddr) && $stable(awlen));
  w_has_data: assert property (@(posedge clk) disable iff (!rst_n) wvalid |-> fifo_beats != 0);
endmodule
