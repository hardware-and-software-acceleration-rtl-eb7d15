// fifo_segment: one FIFO queue of the memory buffer, a fixed-length delay line.
//
// Every cycle that `shift` is high the segment accepts `din` and moves its contents one
// place on; `dout` always shows the word that entered LEN shifts earlier (LEN = 0 is a
// plain wire). From LEN = 2 on, the queue is a circular buffer in one simple-dual-port RAM
// (LEN-1 entries, one read and one write per shift) followed by an output register, which is
// how such a queue maps onto a block RAM. Contents are not reset: the buffer is primed by
// streaming data through it.
module fifo_segment #(
  parameter int unsigned W   = 128,
  parameter int unsigned LEN = 16
) (
  input  logic         clk,
  input  logic         shift,
  input  logic [W-1:0] din,
  output logic [W-1:0] dout
);
  if (LEN == 0) begin : g_wire
    assign dout = din;
  end else if (LEN == 1) begin : g_reg
    always_ff @(posedge clk) if (shift) dout <= din;
  end else begin : g_ram
    localparam int unsigned DEPTH = LEN - 1;
    localparam int unsigned AW    = (DEPTH > 1) ? $clog2(DEPTH) : 1;
    logic [W-1:0]  mem [DEPTH];
    logic [AW-1:0] ptr = '0;
    always_ff @(posedge clk) begin
      if (shift) begin
        dout     <= mem[ptr];
        mem[ptr] <= din;
        ptr      <= (ptr == AW'(DEPTH - 1)) ? '0 : ptr + 1'b1;
      end
    end
  end
endmodule
