// tb_axi_read_engine: reads 37 beats (bursts of 8, the last one short) from a behavioural
// AXI memory with random wait states into a small FIFO model that is drained slowly. Checks
// the data order, the burst lengths and addresses, that the engine never asks for more
// beats than the FIFO can take, and `done`. Runs twice with different base addresses.
module tb_axi_read_engine;
  localparam int DW = 64, BURST = 8, WPB = DW / 32;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic start = 0, done;
  logic [63:0] base_addr = 0;
  logic [31:0] total_beats = 0;
  logic [7:0]  fifo_free_beats;
  logic arvalid, arready, rvalid, rready, rlast, beat_valid;
  logic [63:0] araddr; logic [7:0] arlen; logic [2:0] arsize; logic [1:0] arburst;
  logic [DW-1:0] rdata, beat_data;

  axi_read_engine #(.AW(64), .DW(DW), .BURST(BURST), .FREE_W(8)) dut (.*);
  axi_mem_model #(.DW(DW), .WORDS(1024)) mem (.clk, .arvalid, .arready, .araddr, .arlen,
    .rvalid, .rready, .rdata, .rlast, .awvalid(1'b0), .awready(), .awaddr(64'd0), .awlen(8'd0),
    .wvalid(1'b0), .wready(), .wdata('0), .wlast(1'b0), .bvalid(), .bready(1'b1));

  // FIFO model: 20 beats, drained one beat in three cycles
  localparam int FDEPTH = 20;
  int occ = 0, got = 0, exp_addr;
  logic [DW-1:0] q [$];
  assign fifo_free_beats = 8'(FDEPTH - occ);

  always @(posedge clk) begin
    if (arvalid && arready) begin
      checks += 2;
      if (araddr != 64'(exp_addr)) begin failures++; $display("FAIL araddr %h", araddr); end
      if (int'(arlen) + 1 != ((total_beats - (exp_addr - base_addr) / (DW/8) < BURST) ?
                              total_beats - (exp_addr - base_addr) / (DW/8) : BURST)) failures++;
      exp_addr += (int'(arlen) + 1) * (DW/8);
    end
    if (beat_valid) begin
      occ++;
      q.push_back(beat_data);
      checks++; if (occ > FDEPTH) begin failures++; $display("FAIL fifo overflow"); end
    end
    if (occ > 0 && $urandom_range(0, 2) == 0) begin
      logic [DW-1:0] b;
      b = q.pop_front();
      occ--;
      for (int u = 0; u < WPB; u++) begin
        checks++;
        if (b[u*32 +: 32] != 32'hA000_0000 + 32'(int'(base_addr) / 4 + got * WPB + u)) failures++;
      end
      got++;
    end
  end

  initial begin
    for (int w = 0; w < 1024; w++) mem.mem[w] = 32'hA000_0000 + 32'(w);
    repeat (3) @(posedge clk); rst_n = 1;
    for (int run = 0; run < 2; run++) begin
      @(negedge clk);
      base_addr = (run == 0) ? 64'h0 : 64'h400;
      total_beats = 37;
      exp_addr = int'(base_addr);
      got = 0;
      start = 1; @(negedge clk); start = 0;
      checks++; if (done) failures++;
      wait (done);
      wait (got == 37);
      repeat (10) @(posedge clk);
      checks++; if (got != 37 || occ != 0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (20000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
