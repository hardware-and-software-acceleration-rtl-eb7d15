// axi_mem_model: behavioural AXI4 slave memory standing in for the board's DRAM in
// simulation. Word-addressed storage of 32-bit values (`mem`, reachable hierarchically by a
// testbench). Accepts any number of outstanding INCR read and write bursts, answers reads in
// order after a short delay, and inserts random wait states on every ready/valid it drives
// when STALL is set, so the master's flow control is exercised.
module axi_mem_model #(
  parameter int unsigned DW    = 512,
  parameter int unsigned WORDS = 4096,
  parameter bit          STALL = 1'b1,
  parameter int unsigned WSLOW = 1        // with STALL, accept write data 1 cycle in WSLOW
) (
  input  logic            clk,
  input  logic            arvalid,
  output logic            arready,
  input  logic [63:0]     araddr,
  input  logic [7:0]      arlen,
  output logic            rvalid,
  input  logic            rready,
  output logic [DW-1:0]   rdata,
  output logic            rlast,
  input  logic            awvalid,
  output logic            awready,
  input  logic [63:0]     awaddr,
  input  logic [7:0]      awlen,
  input  logic            wvalid,
  output logic            wready,
  input  logic [DW-1:0]   wdata,
  input  logic            wlast,
  output logic            bvalid,
  input  logic            bready
);
  localparam int unsigned WPB = DW / 32;
  logic [31:0] mem [WORDS];

  typedef struct { longint addr; int len; } burst_t;
  burst_t rq[$], wq[$];
  int     r_beat = 0, w_beat = 0, b_pend = 0;
  int     stat_rbursts = 0, stat_wbursts = 0, stat_stall_cycles = 0;
  int     protocol_errors = 0;   // burst framing errors seen, for the testbench to check

  function automatic bit rnd();
    return STALL ? ($urandom_range(0, 3) != 0) : 1'b1;
  endfunction

  initial begin
    arready = 0; awready = 0; rvalid = 0; rlast = 0; rdata = '0; wready = 0; bvalid = 0;
  end

  always @(posedge clk) begin
    // address channels
    if (arvalid && arready) begin rq.push_back('{araddr, int'(arlen) + 1}); stat_rbursts++; end
    if (awvalid && awready) begin wq.push_back('{awaddr, int'(awlen) + 1}); stat_wbursts++; end
    // read data
    if (rvalid && rready) begin
      r_beat++;
      if (r_beat == rq[0].len) begin
        void'(rq.pop_front());
        r_beat = 0;
      end
    end
    // write data
    if (wvalid && wready) begin
      longint base;
      base = (wq[0].addr / 4) + longint'(w_beat) * WPB;
      for (int u = 0; u < WPB; u++) mem[base + u] <= wdata[u*32 +: 32];
      w_beat++;
      if (w_beat == wq[0].len) begin
        if (!wlast) begin protocol_errors++; $display("axi_mem_model: wlast missing on last beat"); end
        void'(wq.pop_front());
        w_beat = 0;
        b_pend++;
      end else if (wlast) begin protocol_errors++; $display("axi_mem_model: early wlast"); end
    end
    if (bvalid && bready) b_pend--;
    if (STALL && (!arready || !awready)) stat_stall_cycles++;
    // drive next cycle
    arready <= rnd();
    awready <= rnd();
    bvalid  <= (b_pend > 0);
    if (rq.size() > 0 && rnd()) begin
      longint base;
      base = (rq[0].addr / 4) + longint'(r_beat) * WPB;
      for (int u = 0; u < WPB; u++) rdata[u*32 +: 32] <= mem[base + u];
      rvalid <= 1'b1;
      rlast  <= (r_beat == rq[0].len - 1);
    end else begin
      rvalid <= 1'b0;
      rlast  <= 1'b0;
    end
    wready <= (wq.size() > 0) && rnd() && (!STALL || $urandom_range(0, WSLOW - 1) == 0);
  end
endmodule
