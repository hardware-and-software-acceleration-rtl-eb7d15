// tb_hj_full: the accelerator at its default size (60 x 60 x 60 x 60 grid, 4 PEs, 67
// iterations), launched once from the register port and run to completion.
//
// A full-size floating-point model of 67 passes would be far slower than the hardware
// model, so correctness is checked on the fly: every value the accelerator reads in a pass
// is recorded from the AXI read channel, and for every 811th grid point the value written
// back is compared with the reference step computed from the recorded inputs. At the end the
// test checks the completion status, the iteration count, the cycle counter (one word of 4
// points per cycle plus the pipeline fill) and that no value grew (the tube only grows).
module tb_hj_full;
  import hj_pkg::*;
  import hj_ref_pkg::*;

  localparam int N = 60, NPTS = N * N * N * N;
  localparam int SAMPLE = 811;
  localparam longint OUT_W0 = ((longint'(NPTS) + 1023) / 1024) * 1024;   // 4 KB aligned
  localparam int MEMW = int'(OUT_W0) + NPTS;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic arvalid, arready, rvalid, rready, rlast, awvalid, awready, wvalid, wready, wlast, bvalid, bready;
  logic [63:0] araddr, awaddr; logic [7:0] arlen, awlen; logic [2:0] arsize, awsize;
  logic [1:0] arburst, awburst; logic [511:0] rdata, wdata; logic [63:0] wstrb;
  logic reg_wr = 0, reg_rd = 0, reg_rvalid; logic [15:0] reg_addr = 0;
  logic [31:0] reg_wdata = 0, reg_rdata;

  hj_top dut (
    .clk, .rst_n, .reg_wr, .reg_rd, .reg_addr, .reg_wdata, .reg_rdata, .reg_rvalid,
    .m_axi_arvalid(arvalid), .m_axi_arready(arready), .m_axi_araddr(araddr), .m_axi_arlen(arlen),
    .m_axi_arsize(arsize), .m_axi_arburst(arburst), .m_axi_rvalid(rvalid), .m_axi_rready(rready),
    .m_axi_rdata(rdata), .m_axi_rlast(rlast), .m_axi_awvalid(awvalid), .m_axi_awready(awready),
    .m_axi_awaddr(awaddr), .m_axi_awlen(awlen), .m_axi_awsize(awsize), .m_axi_awburst(awburst),
    .m_axi_wvalid(wvalid), .m_axi_wready(wready), .m_axi_wdata(wdata), .m_axi_wstrb(wstrb),
    .m_axi_wlast(wlast), .m_axi_bvalid(bvalid), .m_axi_bready(bready)
  );
  axi_mem_model #(.WORDS(MEMW), .STALL(1'b0)) mem (
    .clk, .arvalid, .arready, .araddr, .arlen, .rvalid, .rready, .rdata, .rlast,
    .awvalid, .awready, .awaddr, .awlen, .wvalid, .wready, .wdata, .wlast, .bvalid, .bready
  );

  // ---------------- snoop: inputs of the current pass, outputs of sampled points -------------
  logic [31:0] shadow [NPTS];
  int rd_pos = 0, wr_pos = 0, n_sampled = 0;
  real worst = 0.0;

  function automatic int lin(int i, int j, int k, int l);
    return ((i * N + j) * N + k) * N + l;
  endfunction

  function automatic real sh(int q);
    return fx2r(fx_t'(shadow[q]));
  endfunction

  task automatic check_point(int q, fx_t hw);
    int n[4], idx[4];
    real m[4], p[4], dv, r, e;
    int i, j, k, l;
    n = '{N, N, N, N};
    i = q / (N*N*N); j = (q / (N*N)) % N; k = (q / N) % N; l = q % N;
    idx = '{i, j, k, l};
    m = '{(i > 0) ? sh(lin(i-1,j,k,l)) : 0.0, (j > 0) ? sh(lin(i,j-1,k,l)) : 0.0,
          (k > 0) ? sh(lin(i,j,k-1,l)) : 0.0, (l > 0) ? sh(lin(i,j,k,l-1)) : 0.0};
    p = '{(i < N-1) ? sh(lin(i+1,j,k,l)) : 0.0, (j < N-1) ? sh(lin(i,j+1,k,l)) : 0.0,
          (k < N-1) ? sh(lin(i,j,k+1,l)) : 0.0, (l < N-1) ? sh(lin(i,j,k,l+1)) : 0.0};
    r = ref_point(n, idx, sh(q), m, p, dv, fx2r(to_fx(step_dt(N, N, N, N, 67))));
    if (r < -16.0) r = -16.0;   // the value format saturates
    e = rabs(r - fx2r(hw));
    if (e > worst) worst = e;
    checks++;
    if (e > 1.0e-6) begin
      failures++;
      if (failures < 10) $display("FAIL pass %0d point %0d: hw %f ref %f", dut.iter, q, fx2r(hw), r);
    end
  endtask

  always @(posedge clk) begin
    if (dut.pass_start) begin rd_pos = 0; wr_pos = 0; end
    if (rvalid && rready) begin
      for (int u = 0; u < 16; u++) shadow[rd_pos + u] = rdata[u*32 +: 32];
      rd_pos += 16;
    end
    if (wvalid && wready) begin
      for (int u = 0; u < 16; u++)
        if ((wr_pos + u) % SAMPLE == 0) begin
          check_point(wr_pos + u, fx_t'(wdata[u*32 +: 32]));
          n_sampled++;
        end
      wr_pos += 16;
    end
  end

  task automatic reg_write(logic [15:0] a, logic [31:0] d);
    @(negedge clk); reg_wr = 1; reg_addr = a; reg_wdata = d;
    @(negedge clk); reg_wr = 0;
  endtask
  task automatic reg_read(logic [15:0] a, output logic [31:0] d);
    @(negedge clk); reg_rd = 1; reg_addr = a;
    @(negedge clk); reg_rd = 0; d = reg_rdata;
  endtask

  initial begin : main
    int n[4], idx[4];
    logic [31:0] rd, cyc;
    longint min_cyc;
    n = '{N, N, N, N};
    // two cones, as in the experiments' rooms
    for (int q = 0; q < NPTS; q++) begin
      real a, b;
      idx = '{q / (N*N*N), (q / (N*N)) % N, (q / N) % N, q % N};
      a = obstacle_v0(n, idx, 2.0, 2.5, 0.08);
      b = obstacle_v0(n, idx, 4.0, 1.5, 0.08);
      mem.mem[q] = to_fx((a < b) ? a : b);
    end
    repeat (4) @(posedge clk);
    rst_n = 1;
    reg_write(16'h050C, 32'd0);
    reg_write(16'h0510, 32'd0);
    reg_write(16'h0514, 32'(OUT_W0 * 4));
    reg_write(16'h0518, 32'((OUT_W0 * 4) >> 32));
    reg_write(16'h0500, 32'd1);
    do begin
      repeat (10000) @(posedge clk);
      reg_read(16'h0500, rd);
      if (dut.iter % 8 == 0 && dut.words_out == 0) $display("iteration %0d", dut.iter);
    end while (rd != 2);
    reg_read(16'h0504, cyc);
    min_cyc = 67 * (longint'(NPTS) / 4);
    $display("finished: %0d iterations, %0d cycles (at least %0d), %0d points checked, worst error %e",
             dut.iter, cyc, min_cyc, n_sampled, worst);
    checks++; if (dut.iter != 67) failures++;
    checks++; if (longint'(cyc) < min_cyc || longint'(cyc) > min_cyc + min_cyc / 10) begin
      failures++; $display("FAIL cycle count %0d", cyc);
    end
    checks++; if (n_sampled < 67 * (NPTS / SAMPLE)) begin failures++; $display("FAIL too few samples"); end
    for (int q = 0; q < NPTS; q += 97) begin
      checks++;
      if (fx_t'(mem.mem[int'(OUT_W0) + q]) > fx_t'(mem.mem[q])) failures++;
    end
    checks++; if (mem.protocol_errors != 0) begin failures++; $display("FAIL %0d AXI framing errors", mem.protocol_errors); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (250_000_000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
