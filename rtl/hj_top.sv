// hj_top: FPGA accelerator for 4D Hamilton-Jacobi reachability (extended Dubins car).
//
// The value function V on an N1 x N2 x N3 x N4 grid (x, y, v, theta) lives in DRAM. One
// iteration streams the whole array through the chip once: axi_read_engine fetches 512-bit
// beats into a gearbox FIFO, which hands out one word of NUM_PE values per cycle to the
// memory buffer (hj_mem_buffer). The buffer presents every PE a grid point and its eight
// neighbours each cycle; the NUM_PE pipelined PEs (hj_pe) compute V_{t+1} at NUM_PE
// consecutive points per cycle; their results are packed back into beats by a second gearbox
// FIFO and written to DRAM by axi_write_engine. Both engines' address requests pass through
// mem_arbiter. The host programs the array addresses in hj_ctrl_regs and launches by writing
// 1 to the control register; the accelerator writes 2 there when it has finished.
//
// Iteration controller (this module): iteration 0 reads the input array and writes the
// output array; later iterations update the output array in place, which is safe because a
// point is always read (S1 words ahead) before its new value is written. The run ends after
// N_ITER iterations, or earlier when the largest |V_{t+1} - V_t| of an iteration falls below
// EPS (EPS = 0 disables that test). The fixed time step DT spreads the 0.5 s horizon of
// the experiments over N_ITER steps (67 steps, dt = 7.46 ms), capped by the CFL bound of
// the grid; the horizon and iteration count are the experiments' numbers, the cap is this
// design's safeguard. While the input side is exhausted the buffer keeps
// shifting zero padding until the last result has been produced. The whole datapath stalls
// (one enable) when the read FIFO has no word or the write FIFO has no room.
//
// Ports: clk, rst_n (synchronous active-low), the register port of hj_ctrl_regs, and an
// AXI4 master (64-bit address, 512-bit data, INCR bursts of up to BURST beats, no IDs).
// Both array base addresses must be BURST*64-byte aligned.
module hj_top
  import hj_pkg::*;
#(
  parameter int unsigned N1     = 60,
  parameter int unsigned N2     = 60,
  parameter int unsigned N3     = 60,
  parameter int unsigned N4     = 60,
  parameter int unsigned NUM_PE = 4,
  parameter int unsigned N_ITER = 67,
  parameter fx_t         EPS    = '0,
  parameter fx_t         DT     = to_fx(step_dt(N1, N2, N3, N4, N_ITER)),
  parameter int unsigned AXI_DW = 512,
  parameter int unsigned BURST  = 64
) (
  input  logic                clk,
  input  logic                rst_n,
  // host register port
  input  logic                reg_wr,
  input  logic                reg_rd,
  input  logic [15:0]         reg_addr,
  input  logic [31:0]         reg_wdata,
  output logic [31:0]         reg_rdata,
  output logic                reg_rvalid,
  // AXI4 master to DRAM
  output logic                m_axi_arvalid,
  input  logic                m_axi_arready,
  output logic [63:0]         m_axi_araddr,
  output logic [7:0]          m_axi_arlen,
  output logic [2:0]          m_axi_arsize,
  output logic [1:0]          m_axi_arburst,
  input  logic                m_axi_rvalid,
  output logic                m_axi_rready,
  input  logic [AXI_DW-1:0]   m_axi_rdata,
  input  logic                m_axi_rlast,
  output logic                m_axi_awvalid,
  input  logic                m_axi_awready,
  output logic [63:0]         m_axi_awaddr,
  output logic [7:0]          m_axi_awlen,
  output logic [2:0]          m_axi_awsize,
  output logic [1:0]          m_axi_awburst,
  output logic                m_axi_wvalid,
  input  logic                m_axi_wready,
  output logic [AXI_DW-1:0]   m_axi_wdata,
  output logic [AXI_DW/8-1:0] m_axi_wstrb,
  output logic                m_axi_wlast,
  input  logic                m_axi_bvalid,
  output logic                m_axi_bready
);
  localparam int unsigned WW     = NUM_PE * FX_W;          // buffer word
  localparam int unsigned WPB    = AXI_DW / WW;            // words per beat
  localparam int unsigned TW     = N1 * N2 * N3 * N4 / NUM_PE;
  localparam int unsigned TBEATS = TW / WPB;
  localparam int unsigned FDEPTH = 2 * BURST * WPB;        // FIFO depth in words (two bursts)
  localparam int unsigned FREE_W = $clog2(FDEPTH + 1);

  // ---------------- control registers ----------------
  logic        launch, busy, finished;
  logic [63:0] in_addr, out_addr;
  hj_ctrl_regs u_regs (
    .clk, .rst_n, .reg_wr, .reg_rd, .reg_addr, .reg_wdata, .reg_rdata, .reg_rvalid,
    .launch, .busy, .finished, .in_addr, .out_addr
  );

  // ---------------- iteration controller ----------------
  typedef enum logic [2:0] { S_IDLE, S_START, S_RUN, S_END, S_DONE } state_e;
  state_e      state;
  logic [31:0] iter;
  logic [31:0] words_in, words_out;
  fx_t         max_dv;
  logic        pass_start;
  logic        rd_done, wr_done;

  assign busy       = (state != S_IDLE);
  assign pass_start = (state == S_START);

  // ---------------- read path ----------------
  logic              rbeat_valid;
  logic [AXI_DW-1:0] rbeat_data;
  logic              rf_in_ready, rf_out_valid, rf_out_ready;
  logic [WW-1:0]     rf_out_data;
  logic [$clog2(FDEPTH+1)-1:0] rf_free_units;
  logic [FREE_W-1:0] rf_free_beats;
  logic              arb_ar_valid, arb_aw_valid;
  logic [1:0]        arb_req, arb_ack, arb_gnt;

  assign rf_free_beats = FREE_W'(rf_free_units / WPB);

  axi_read_engine #(.AW(64), .DW(AXI_DW), .BURST(BURST), .FREE_W(FREE_W)) u_rd (
    .clk, .rst_n, .start(pass_start),
    .base_addr((iter == 0) ? in_addr : out_addr),
    .total_beats(32'(TBEATS)), .fifo_free_beats(rf_free_beats), .done(rd_done),
    .arvalid(arb_ar_valid), .arready(m_axi_arready && arb_gnt[0]),
    .araddr(m_axi_araddr), .arlen(m_axi_arlen), .arsize(m_axi_arsize), .arburst(m_axi_arburst),
    .rvalid(m_axi_rvalid), .rready(m_axi_rready), .rdata(m_axi_rdata), .rlast(m_axi_rlast),
    .beat_valid(rbeat_valid), .beat_data(rbeat_data)
  );

  gearbox_fifo #(.IN_W(AXI_DW), .OUT_W(WW), .DEPTH(FDEPTH)) u_rfifo (
    .clk, .rst_n, .in_valid(rbeat_valid), .in_ready(rf_in_ready), .in_data(rbeat_data),
    .out_valid(rf_out_valid), .out_ready(rf_out_ready), .out_data(rf_out_data),
    .free_units(rf_free_units)
  );

  // ---------------- arbiter ----------------
  assign arb_req       = {arb_aw_valid, arb_ar_valid};
  assign arb_ack       = {m_axi_awvalid && m_axi_awready, m_axi_arvalid && m_axi_arready};
  assign m_axi_arvalid = arb_ar_valid && arb_gnt[0];
  assign m_axi_awvalid = arb_aw_valid && arb_gnt[1];
  mem_arbiter #(.N(2)) u_arb (.clk, .rst_n, .req(arb_req), .ack(arb_ack), .gnt(arb_gnt));

  // ---------------- datapath enable ----------------
  logic          need_input, have_input, wf_in_ready, en, running;
  logic [WW-1:0] buf_din;
  assign running      = (state == S_RUN) && (words_out < TW);
  assign need_input   = (words_in < TW);
  assign have_input   = need_input ? rf_out_valid : 1'b1;
  assign en           = running && have_input && wf_in_ready;
  assign rf_out_ready = en && need_input;
  assign buf_din      = need_input ? rf_out_data : '0;

  // ---------------- memory buffer and PEs ----------------
  stencil_t [NUM_PE-1:0] st;
  logic                  center_valid;
  hj_mem_buffer #(.N1(N1), .N2(N2), .N3(N3), .N4(N4), .NUM_PE(NUM_PE)) u_buf (
    .clk, .rst_n, .clear(pass_start), .shift(en), .din(buf_din), .st, .center_valid
  );

  logic [NUM_PE-1:0] pe_valid;
  fx_t  [NUM_PE-1:0] pe_v, pe_dv;
  for (genvar q = 0; q < NUM_PE; q++) begin : g_pe
    hj_pe #(.N1(N1), .N2(N2), .N3(N3), .N4(N4), .NUM_PE(NUM_PE), .LANE(q), .DT(DT)) u_pe (
      .clk, .rst_n, .clear(pass_start), .en, .in_valid(center_valid), .st(st[q]),
      .out_valid(pe_valid[q]), .v_out(pe_v[q]), .dv_abs(pe_dv[q])
    );
  end

  // ---------------- write path ----------------
  logic              wf_out_valid, wf_pop;
  logic [AXI_DW-1:0] wf_out_data;
  logic [$clog2(FDEPTH+1)-1:0] wf_free_units;
  logic [FREE_W-1:0] wf_beats;
  logic              push;
  assign push     = en && pe_valid[0];
  assign wf_beats = FREE_W'((FDEPTH - 32'(wf_free_units)) / WPB);

  gearbox_fifo #(.IN_W(WW), .OUT_W(AXI_DW), .DEPTH(FDEPTH)) u_wfifo (
    .clk, .rst_n, .in_valid(push), .in_ready(wf_in_ready), .in_data(pe_v),
    .out_valid(wf_out_valid), .out_ready(wf_pop), .out_data(wf_out_data),
    .free_units(wf_free_units)
  );

  axi_write_engine #(.AW(64), .DW(AXI_DW), .BURST(BURST), .FREE_W(FREE_W)) u_wr (
    .clk, .rst_n, .start(pass_start), .base_addr(out_addr), .total_beats(32'(TBEATS)),
    .fifo_beats(wf_beats), .fifo_data(wf_out_data), .fifo_pop(wf_pop), .done(wr_done),
    .awvalid(arb_aw_valid), .awready(m_axi_awready && arb_gnt[1]),
    .awaddr(m_axi_awaddr), .awlen(m_axi_awlen), .awsize(m_axi_awsize), .awburst(m_axi_awburst),
    .wvalid(m_axi_wvalid), .wready(m_axi_wready), .wdata(m_axi_wdata), .wstrb(m_axi_wstrb),
    .wlast(m_axi_wlast), .bvalid(m_axi_bvalid), .bready(m_axi_bready)
  );

  // largest change among the NUM_PE results of this cycle
  fx_t dv_cycle;
  always_comb begin
    dv_cycle = '0;
    for (int q = 0; q < NUM_PE; q++) if (pe_dv[q] > dv_cycle) dv_cycle = pe_dv[q];
  end

  // ---------------- controller FSM ----------------
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      iter      <= '0;
      words_in  <= '0;
      words_out <= '0;
      max_dv    <= '0;
      finished  <= 1'b0;
    end else begin
      finished <= 1'b0;
      unique case (state)
        S_IDLE: if (launch) begin
          iter  <= '0;
          state <= S_START;
        end
        S_START: begin
          words_in  <= '0;
          words_out <= '0;
          max_dv    <= '0;
          state     <= S_RUN;
        end
        S_RUN: begin
          if (rf_out_ready) words_in <= words_in + 1;
          if (push) begin
            words_out <= words_out + 1;
            if (dv_cycle > max_dv) max_dv <= dv_cycle;
          end
          if (wr_done && rd_done && words_out == TW) state <= S_END;
        end
        S_END: begin
          iter <= iter + 1;
          if (iter + 1 >= N_ITER || max_dv < EPS) begin
            state    <= S_DONE;
            finished <= 1'b1;
          end else begin
            state <= S_START;
          end
        end
        S_DONE: state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  initial assert (AXI_DW % WW == 0 && TW % WPB == 0)
    else $error("hj_top: the grid must fill a whole number of AXI beats");
endmodule
