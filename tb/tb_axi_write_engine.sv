// tb_axi_write_engine: writes 21 beats (bursts of 8, the last one short) from a source FIFO
// that fills at random into a behavioural AXI memory with random wait states. Checks the
// memory contents, that an address is only issued once the whole burst is in the FIFO, and
// that `done` comes only after every write response.
module tb_axi_write_engine;
  localparam int DW = 64, BURST = 8, WPB = DW / 32, NB = 21;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic start = 0, done, fifo_pop;
  logic [63:0] base_addr = 64'h200;
  logic [31:0] total_beats = NB;
  logic [7:0]  fifo_beats;
  logic [DW-1:0] fifo_data;
  logic awvalid, awready, wvalid, wready, wlast, bvalid, bready;
  logic [63:0] awaddr; logic [7:0] awlen; logic [2:0] awsize; logic [1:0] awburst;
  logic [DW-1:0] wdata; logic [DW/8-1:0] wstrb;

  axi_write_engine #(.AW(64), .DW(DW), .BURST(BURST), .FREE_W(8)) dut (.*);
  logic rvalid_u, rlast_u; logic [DW-1:0] rdata_u;
  axi_mem_model #(.DW(DW), .WORDS(512)) mem (.clk, .arvalid(1'b0), .arready(), .araddr(64'd0),
    .arlen(8'd0), .rvalid(rvalid_u), .rready(1'b1), .rdata(rdata_u), .rlast(rlast_u),
    .awvalid, .awready, .awaddr, .awlen, .wvalid, .wready, .wdata, .wlast, .bvalid, .bready);

  int produced = 0, popped = 0, b_seen = 0;
  assign fifo_beats = 8'(produced - popped);
  always_comb for (int u = 0; u < WPB; u++) fifo_data[u*32 +: 32] = 32'hB000_0000 + 32'(popped * WPB + u);

  always @(posedge clk) begin
    if (awvalid && awready) begin
      checks++; if (produced - popped < int'(awlen) + 1) failures++;
    end
    if (fifo_pop) popped++;
    if (bvalid && bready) b_seen++;
    if (rst_n && produced < NB && $urandom_range(0, 3) == 0) produced++;
  end

  initial begin
    for (int w = 0; w < 512; w++) mem.mem[w] = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    wait (done);
    checks++; if (b_seen != 3) begin failures++; $display("FAIL responses %0d", b_seen); end
    repeat (3) @(posedge clk);
    for (int w = 0; w < NB * WPB; w++) begin
      checks++; if (mem.mem[128 + w] != 32'hB000_0000 + 32'(w)) failures++;
    end
    checks++; if (mem.mem[127] != 0 || mem.mem[128 + NB * WPB] != 0) failures++;
    checks++; if (mem.protocol_errors != 0) begin failures++; $display("FAIL %0d AXI framing errors", mem.protocol_errors); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (20000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
