// mem_arbiter: round-robin arbiter for the modules that issue DRAM commands.
//
// Each requester raises req[n] and keeps it high until its command is accepted (ack[n],
// the AXI address handshake). The arbiter grants one requester at a time (one-hot `gnt`)
// and holds the grant until that requester's ack, so an AXI valid never drops before its
// ready. The next grant starts the search just after the last winner, which keeps the read
// and write streams fair. Synchronous active-low reset.
module mem_arbiter #(
  parameter int unsigned N = 2
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] req,
  input  logic [N-1:0] ack,
  output logic [N-1:0] gnt
);
  localparam int unsigned IW = (N > 1) ? $clog2(N) : 1;
  logic [IW-1:0] last;
  logic          busy;
  logic [IW-1:0] owner;
  logic [IW-1:0] pick;
  logic          any;

  always_comb begin
    any  = 1'b0;
    pick = last;
    for (int k = 1; k <= N; k++) begin
      int unsigned c;
      c = (32'(last) + k) % N;
      if (!any && req[c]) begin
        any  = 1'b1;
        pick = IW'(c);
      end
    end
  end

  always_comb begin
    gnt = '0;
    if (busy)     gnt[owner] = 1'b1;
    else if (any) gnt[pick]  = 1'b1;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy  <= 1'b0;
      owner <= '0;
      last  <= IW'(N - 1);
    end else begin
      if (busy) begin
        if (ack[owner]) begin
          busy <= 1'b0;
          last <= owner;
        end
      end else if (any) begin
        if (ack[pick]) last <= pick;
        else begin
          busy  <= 1'b1;
          owner <= pick;
        end
      end
    end
  end

  gnt_onehot: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(gnt));
  ack_granted: assert property (@(posedge clk) disable iff (!rst_n) (ack & ~gnt) == '0);
endmodule
