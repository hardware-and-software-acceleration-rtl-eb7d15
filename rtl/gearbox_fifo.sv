// gearbox_fifo: synchronous FIFO whose write and read widths differ.
//
// Sits between the DRAM interface and the accelerator: a 512-bit AXI beat is written in and
// read out as four 128-bit words (or four words are written and one beat read out). Storage
// is DEPTH units of G = min(IN_W, OUT_W) bits; a write stores IN_W/G units, a read removes
// OUT_W/G units, lowest bits first. Handshake: a transfer happens on a cycle where valid and
// ready are both high. `free_units` reports empty space (in units of G) so an engine can
// reserve room for a whole burst before requesting it. Synchronous active-low reset clears
// the pointers. Both widths must be multiples of the smaller one.
module gearbox_fifo #(
  parameter int unsigned IN_W  = 512,
  parameter int unsigned OUT_W = 128,
  parameter int unsigned DEPTH = 512        // in units of min(IN_W, OUT_W)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  output logic              in_ready,
  input  logic [IN_W-1:0]   in_data,
  output logic              out_valid,
  input  logic              out_ready,
  output logic [OUT_W-1:0]  out_data,
  output logic [$clog2(DEPTH+1)-1:0] free_units
);
  localparam int unsigned G  = (IN_W < OUT_W) ? IN_W : OUT_W;
  localparam int unsigned RI = IN_W / G;
  localparam int unsigned RO = OUT_W / G;
  localparam int unsigned AW = $clog2(DEPTH);
  localparam int unsigned CW = $clog2(DEPTH + 1);

  logic [G-1:0]  mem [DEPTH];
  logic [AW-1:0] wptr, rptr;
  logic [CW-1:0] count;

  assign in_ready   = (32'(count) + RI) <= DEPTH;
  assign out_valid  = 32'(count) >= RO;
  assign free_units = CW'(DEPTH) - count;

  always_comb begin
    for (int u = 0; u < RO; u++) out_data[u*G +: G] = mem[AW'((32'(rptr) + u) % DEPTH)];
  end

  logic do_wr, do_rd;
  assign do_wr = in_valid && in_ready;
  assign do_rd = out_valid && out_ready;

  always_ff @(posedge clk) begin
    if (do_wr)
      for (int u = 0; u < RI; u++) mem[AW'((32'(wptr) + u) % DEPTH)] <= in_data[u*G +: G];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wptr  <= '0;
      rptr  <= '0;
      count <= '0;
    end else begin
      if (do_wr) wptr <= AW'((32'(wptr) + RI) % DEPTH);
      if (do_rd) rptr <= AW'((32'(rptr) + RO) % DEPTH);
      count <= count + (do_wr ? CW'(RI) : '0) - (do_rd ? CW'(RO) : '0);
    end
  end

  initial assert (IN_W % G == 0 && OUT_W % G == 0 && DEPTH % RI == 0 && DEPTH % RO == 0)
    else $error("gearbox_fifo: widths and depth must be multiples of each other");
endmodule
