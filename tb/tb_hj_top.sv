// tb_hj_top: end-to-end test of the accelerator on a small grid.
//
// Two accelerators share the test: `dut` runs N_ITER iterations (time steps), `dut_eps`
// has a large convergence threshold and must stop after its first iteration. Each one is
// attached to a behavioural AXI memory with random wait states. The host side is played
// through the register port: program the input and output addresses, write 1 to launch,
// poll the control register for 2, read the cycle counter. The initial array is the distance
// to a cone-shaped obstacle minus its radius; the result is compared point by point with a
// floating-point model of the same iterations. The test also counts how often each
// mechanism happened: datapath stalls (read FIFO empty, write FIFO full), zero padding at
// the end of a pass, in-place passes, arbitration between simultaneous read and write
// address requests, boundary extrapolation and the early convergence stop.
module tb_hj_top;
  import hj_pkg::*;
  import hj_ref_pkg::*;

  localparam int N1 = 4, N2 = 5, N3 = 4, N4 = 8;
  localparam int NP = 4, NITER = 3, BURST = 4;
  localparam int NPTS = N1 * N2 * N3 * N4;
  localparam int MEMW = 2 * NPTS;
  localparam longint IN_BASE = 0, OUT_BASE = longint'(NPTS) * 4;   // bytes

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  // ---------------- two DUTs with their memories ----------------
  `define HJ_AXI_WIRES(P) \
    logic P``arvalid, P``arready, P``rvalid, P``rready, P``rlast, P``awvalid, P``awready; \
    logic P``wvalid, P``wready, P``wlast, P``bvalid, P``bready; \
    logic [63:0] P``araddr, P``awaddr; logic [7:0] P``arlen, P``awlen; \
    logic [2:0] P``arsize, P``awsize; logic [1:0] P``arburst, P``awburst; \
    logic [511:0] P``rdata, P``wdata; logic [63:0] P``wstrb; \
    logic P``reg_wr, P``reg_rd, P``reg_rvalid; logic [15:0] P``reg_addr; \
    logic [31:0] P``reg_wdata, P``reg_rdata;

  `HJ_AXI_WIRES(a_)
  `HJ_AXI_WIRES(b_)

  hj_top #(.N1(N1), .N2(N2), .N3(N3), .N4(N4), .NUM_PE(NP), .N_ITER(NITER), .BURST(BURST)) dut (
    .clk, .rst_n, .reg_wr(a_reg_wr), .reg_rd(a_reg_rd), .reg_addr(a_reg_addr),
    .reg_wdata(a_reg_wdata), .reg_rdata(a_reg_rdata), .reg_rvalid(a_reg_rvalid),
    .m_axi_arvalid(a_arvalid), .m_axi_arready(a_arready), .m_axi_araddr(a_araddr),
    .m_axi_arlen(a_arlen), .m_axi_arsize(a_arsize), .m_axi_arburst(a_arburst),
    .m_axi_rvalid(a_rvalid), .m_axi_rready(a_rready), .m_axi_rdata(a_rdata), .m_axi_rlast(a_rlast),
    .m_axi_awvalid(a_awvalid), .m_axi_awready(a_awready), .m_axi_awaddr(a_awaddr),
    .m_axi_awlen(a_awlen), .m_axi_awsize(a_awsize), .m_axi_awburst(a_awburst),
    .m_axi_wvalid(a_wvalid), .m_axi_wready(a_wready), .m_axi_wdata(a_wdata), .m_axi_wstrb(a_wstrb),
    .m_axi_wlast(a_wlast), .m_axi_bvalid(a_bvalid), .m_axi_bready(a_bready)
  );
  axi_mem_model #(.WORDS(MEMW), .WSLOW(4)) mem_a (
    .clk, .arvalid(a_arvalid), .arready(a_arready), .araddr(a_araddr), .arlen(a_arlen),
    .rvalid(a_rvalid), .rready(a_rready), .rdata(a_rdata), .rlast(a_rlast),
    .awvalid(a_awvalid), .awready(a_awready), .awaddr(a_awaddr), .awlen(a_awlen),
    .wvalid(a_wvalid), .wready(a_wready), .wdata(a_wdata), .wlast(a_wlast),
    .bvalid(a_bvalid), .bready(a_bready)
  );

  hj_top #(.N1(N1), .N2(N2), .N3(N3), .N4(N4), .NUM_PE(NP), .N_ITER(NITER), .BURST(BURST),
           .EPS(to_fx(10.0))) dut_eps (
    .clk, .rst_n, .reg_wr(b_reg_wr), .reg_rd(b_reg_rd), .reg_addr(b_reg_addr),
    .reg_wdata(b_reg_wdata), .reg_rdata(b_reg_rdata), .reg_rvalid(b_reg_rvalid),
    .m_axi_arvalid(b_arvalid), .m_axi_arready(b_arready), .m_axi_araddr(b_araddr),
    .m_axi_arlen(b_arlen), .m_axi_arsize(b_arsize), .m_axi_arburst(b_arburst),
    .m_axi_rvalid(b_rvalid), .m_axi_rready(b_rready), .m_axi_rdata(b_rdata), .m_axi_rlast(b_rlast),
    .m_axi_awvalid(b_awvalid), .m_axi_awready(b_awready), .m_axi_awaddr(b_awaddr),
    .m_axi_awlen(b_awlen), .m_axi_awsize(b_awsize), .m_axi_awburst(b_awburst),
    .m_axi_wvalid(b_wvalid), .m_axi_wready(b_wready), .m_axi_wdata(b_wdata), .m_axi_wstrb(b_wstrb),
    .m_axi_wlast(b_wlast), .m_axi_bvalid(b_bvalid), .m_axi_bready(b_bready)
  );
  axi_mem_model #(.WORDS(MEMW), .STALL(1'b0)) mem_b (
    .clk, .arvalid(b_arvalid), .arready(b_arready), .araddr(b_araddr), .arlen(b_arlen),
    .rvalid(b_rvalid), .rready(b_rready), .rdata(b_rdata), .rlast(b_rlast),
    .awvalid(b_awvalid), .awready(b_awready), .awaddr(b_awaddr), .awlen(b_awlen),
    .wvalid(b_wvalid), .wready(b_wready), .wdata(b_wdata), .wlast(b_wlast),
    .bvalid(b_bvalid), .bready(b_bready)
  );

  // ---------------- mechanism counters ----------------
  int n_stall_rd = 0, n_stall_wr = 0, n_pad = 0, n_inplace = 0, n_arb = 0, n_bound = 0;
  always @(posedge clk) if (rst_n) begin
    if (dut.running && !dut.have_input) n_stall_rd++;
    if (dut.running && dut.have_input && !dut.wf_in_ready) n_stall_wr++;
    if (dut.en && !dut.need_input) n_pad++;
    if (dut.pass_start && dut.iter != 0) n_inplace++;
    if (dut.arb_ar_valid && dut.arb_aw_valid) n_arb++;
    if (dut.en && dut.g_pe[0].u_pe.vld[0] && (dut.g_pe[0].u_pe.at_lo != 0 || dut.g_pe[0].u_pe.at_hi != 0)) n_bound++;
  end

  // ---------------- host tasks ----------------
  task automatic reg_write(bit b, logic [15:0] a, logic [31:0] d);
    @(negedge clk);
    if (b) begin b_reg_wr = 1; b_reg_addr = a; b_reg_wdata = d; end
    else   begin a_reg_wr = 1; a_reg_addr = a; a_reg_wdata = d; end
    @(negedge clk);
    a_reg_wr = 0; b_reg_wr = 0;
  endtask

  task automatic reg_read(bit b, logic [15:0] a, output logic [31:0] d);
    @(negedge clk);
    if (b) begin b_reg_rd = 1; b_reg_addr = a; end
    else   begin a_reg_rd = 1; a_reg_addr = a; end
    @(negedge clk);
    a_reg_rd = 0; b_reg_rd = 0;
    d = b ? b_reg_rdata : a_reg_rdata;
  endtask

  function automatic int lin(int i, int j, int k, int l);
    return ((i * N2 + j) * N3 + k) * N4 + l;
  endfunction

  real vref [NPTS], vtmp [NPTS];

  initial begin : main
    int n[4], idx[4];
    real m[4], p[4], dv, maxdv;
    logic [31:0] rd, cyc;
    int iters_a, wait_cycles;
    n = '{N1, N2, N3, N4};
    a_reg_wr = 0; a_reg_rd = 0; b_reg_wr = 0; b_reg_rd = 0;
    a_reg_addr = 0; b_reg_addr = 0; a_reg_wdata = 0; b_reg_wdata = 0;
    // initial value function: one cone at (2.5, 2.0), radius 0.08 m
    for (int i = 0; i < N1; i++) for (int j = 0; j < N2; j++)
      for (int k = 0; k < N3; k++) for (int l = 0; l < N4; l++) begin
        fx_t f;
        idx = '{i, j, k, l};
        f = to_fx(obstacle_v0(n, idx, 2.5, 2.0, 0.08));
        mem_a.mem[lin(i, j, k, l)] = f;
        mem_b.mem[lin(i, j, k, l)] = f;
        vref[lin(i, j, k, l)] = fx2r(f);
      end
    repeat (4) @(posedge clk);
    rst_n = 1;
    for (int b = 0; b < 2; b++) begin
      reg_write(b[0], 16'h050C, 32'(IN_BASE));
      reg_write(b[0], 16'h0510, 32'(IN_BASE >> 32));
      reg_write(b[0], 16'h0514, 32'(OUT_BASE));
      reg_write(b[0], 16'h0518, 32'(OUT_BASE >> 32));
    end
    reg_read(0, 16'h0514, rd);
    checks++; if (rd != 32'(OUT_BASE)) begin failures++; $display("FAIL out_lsb readback %h", rd); end
    reg_write(0, 16'h0500, 1);
    reg_write(1, 16'h0500, 1);
    // poll both for completion
    wait_cycles = 0;
    do begin reg_read(0, 16'h0500, rd); wait_cycles++; end while (rd != 2 && wait_cycles < 200000);
    checks++; if (rd != 2) begin failures++; $display("FAIL dut never finished"); end
    reg_read(0, 16'h0504, cyc);
    iters_a = dut.iter;
    checks++; if (iters_a != NITER) begin failures++; $display("FAIL iterations %0d", iters_a); end
    // cycle count: at least one cycle per word per iteration
    checks++; if (cyc < NITER * NPTS / NP) begin failures++; $display("FAIL cycle count %0d", cyc); end
    $display("dut: %0d iterations in %0d cycles (%0d words per iteration)", iters_a, cyc, NPTS / NP);

    // reference iterations
    for (int t = 0; t < NITER; t++) begin
      maxdv = 0.0;
      for (int i = 0; i < N1; i++) for (int j = 0; j < N2; j++)
        for (int k = 0; k < N3; k++) for (int l = 0; l < N4; l++) begin
          idx = '{i, j, k, l};
          m = '{(i > 0) ? vref[lin(i-1,j,k,l)] : 0.0, (j > 0) ? vref[lin(i,j-1,k,l)] : 0.0,
                (k > 0) ? vref[lin(i,j,k-1,l)] : 0.0, (l > 0) ? vref[lin(i,j,k,l-1)] : 0.0};
          p = '{(i < N1-1) ? vref[lin(i+1,j,k,l)] : 0.0, (j < N2-1) ? vref[lin(i,j+1,k,l)] : 0.0,
                (k < N3-1) ? vref[lin(i,j,k+1,l)] : 0.0, (l < N4-1) ? vref[lin(i,j,k,l+1)] : 0.0};
          vtmp[lin(i, j, k, l)] = ref_point(n, idx, vref[lin(i,j,k,l)], m, p, dv,
                                                  fx2r(to_fx(step_dt(N1, N2, N3, N4, NITER))));
          if (dv > maxdv) maxdv = dv;
        end
      vref = vtmp;
    end
    begin
      int bad = 0;
      real worst = 0.0, e;
      for (int q = 0; q < NPTS; q++) begin
        e = rabs(fx2r(fx_t'(mem_a.mem[NPTS + q])) - vref[q]);
        if (e > worst) worst = e;
        checks++;
        if (e > 1.0e-5) begin
          failures++; bad++;
          if (bad < 8) $display("FAIL point %0d: hw %f ref %f", q, fx2r(fx_t'(mem_a.mem[NPTS + q])), vref[q]);
        end
      end
      $display("largest difference to the floating-point model: %e", worst);
      // the input array must be untouched
      for (int q = 0; q < NPTS; q += 7) begin
        idx = '{q / (N2*N3*N4), (q / (N3*N4)) % N2, (q / N4) % N3, q % N4};
        checks++;
        if (mem_a.mem[q] != 32'(to_fx(obstacle_v0(n, idx, 2.5, 2.0, 0.08)))) failures++;
      end
    end

    // early-stop instance
    wait_cycles = 0;
    do begin reg_read(1, 16'h0500, rd); wait_cycles++; end while (rd != 2 && wait_cycles < 200000);
    checks++; if (rd != 2 || dut_eps.iter != 1) begin failures++; $display("FAIL early stop: iter %0d", dut_eps.iter); end

    // every mechanism must have happened
    $display("stalls(read)=%0d stalls(write)=%0d padding=%0d in-place passes=%0d arbitration=%0d boundary=%0d",
             n_stall_rd, n_stall_wr, n_pad, n_inplace, n_arb, n_bound);
    checks++; if (n_stall_rd == 0) begin failures++; $display("FAIL no read stall"); end
    checks++; if (n_stall_wr == 0) begin failures++; $display("FAIL no write stall"); end
    checks++; if (n_pad == 0)      begin failures++; $display("FAIL no padding"); end
    checks++; if (n_inplace != NITER - 1) begin failures++; $display("FAIL in-place passes"); end
    checks++; if (n_arb == 0)      begin failures++; $display("FAIL no arbitration"); end
    checks++; if (n_bound == 0)    begin failures++; $display("FAIL no boundary point"); end
    checks++; if (mem_a.protocol_errors + mem_b.protocol_errors != 0) begin failures++; $display("FAIL AXI framing errors"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
