// hj_pe: processing element, one new value V_{t+1} per cycle.
//
// A fully pipelined datapath that takes a grid point and its 8 neighbours from the memory
// buffer and produces the updated value at that point (one step of the level-set solver):
//   stage 0      register the stencil and the point's grid index
//   stages 1-2   hj_deriv x4: boundary extrapolation, central differences p_d and the
//                dissipation differences (D+ - D-)/2; in parallel hj_state_lut reads
//                v, |v|tan(delta_max)/L, cos(theta), sin(theta) for the point
//   stage 3      hj_dynamics: bang-bang optimal control and the car's state rates z'
//   stages 4-5   hj_hamiltonian: H = p.z' - sum |z'_d| (D+ - D-)/2
//   stages 6-7   hj_update: V + H*dt, minimum with V, |change|
// The PE keeps its own loop indices (i, j, k, l) with l starting at LANE and stepping by
// NUM_PE for every valid input, so it knows where each point lies (for the boundaries and
// the lookup table) without receiving addresses. `clear` restarts the indices for a new
// pass. Every stage advances only when `en` is high, so the pipeline stalls as a whole;
// latency is LATENCY enabled cycles and the throughput one point per enabled cycle.
// Values enter and leave in the 32-bit value format; derivatives and the Hamiltonian are
// carried at 48 bits inside (hj_pkg). The stage split, the stall scheme and the wide
// internal format are this design's choices; the step itself follows the level-set update
// with a precomputed time step that the accelerator is specified to perform.
module hj_pe
  import hj_pkg::*;
#(
  parameter int unsigned N1     = 60,
  parameter int unsigned N2     = 60,
  parameter int unsigned N3     = 60,
  parameter int unsigned N4     = 60,
  parameter int unsigned NUM_PE = 4,
  parameter int unsigned LANE   = 0,
  parameter coef_t       INV_DZ_X  = to_coef(1.0 / grid_dz(X_LO,  X_HI,  N1)),
  parameter coef_t       INV_DZ_Y  = to_coef(1.0 / grid_dz(Y_LO,  Y_HI,  N2)),
  parameter coef_t       INV_DZ_V  = to_coef(1.0 / grid_dz(V_LO,  V_HI,  N3)),
  parameter coef_t       INV_DZ_TH = to_coef(1.0 / grid_dz(TH_LO, TH_HI, N4)),
  parameter fx_t         DT        = to_fx(cfl_dt(N1, N2, N3, N4))
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     clear,
  input  logic     en,
  input  logic     in_valid,
  input  stencil_t st,
  output logic     out_valid,
  output fx_t      v_out,
  output fx_t      dv_abs
);
  localparam int unsigned LATENCY = 8;
  localparam int unsigned IW1 = (N1 > 1) ? $clog2(N1) : 1;
  localparam int unsigned IW2 = (N2 > 1) ? $clog2(N2) : 1;
  localparam int unsigned IW3 = (N3 > 1) ? $clog2(N3) : 1;
  localparam int unsigned IW4 = (N4 > 1) ? $clog2(N4) : 1;

  typedef struct packed {
    logic [IW1-1:0] i;
    logic [IW2-1:0] j;
    logic [IW3-1:0] k;
    logic [IW4-1:0] l;
  } idx_t;

  // ---------------- loop indices ----------------
  idx_t cnt;
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cnt <= '{i: '0, j: '0, k: '0, l: IW4'(LANE)};
    end else if (clear) begin
      cnt <= '{i: '0, j: '0, k: '0, l: IW4'(LANE)};
    end else if (en && in_valid) begin
      if (32'(cnt.l) + NUM_PE < N4) cnt.l <= cnt.l + IW4'(NUM_PE);
      else begin
        cnt.l <= IW4'(LANE);
        if (32'(cnt.k) + 1 < N3) cnt.k <= cnt.k + 1'b1;
        else begin
          cnt.k <= '0;
          if (32'(cnt.j) + 1 < N2) cnt.j <= cnt.j + 1'b1;
          else begin
            cnt.j <= '0;
            cnt.i <= (32'(cnt.i) + 1 < N1) ? cnt.i + 1'b1 : '0;
          end
        end
      end
    end
  end

  // ---------------- stage 0 ----------------
  stencil_t s0;
  idx_t     idx0;
  always_ff @(posedge clk) if (en) begin
    s0   <= st;
    idx0 <= cnt;
  end

  // ---------------- stages 1-2: derivatives ----------------
  dfx_t [NDIM-1:0] p2, diss2;
  logic [NDIM-1:0] at_lo, at_hi;
  always_comb begin
    at_lo = {idx0.l == '0, idx0.k == '0, idx0.j == '0, idx0.i == '0};
    at_hi = {32'(idx0.l) == N4 - 1, 32'(idx0.k) == N3 - 1,
             32'(idx0.j) == N2 - 1, 32'(idx0.i) == N1 - 1};
  end
  localparam coef_t INV_DZ [NDIM] = '{INV_DZ_X, INV_DZ_Y, INV_DZ_V, INV_DZ_TH};
  for (genvar d = 0; d < NDIM; d++) begin : g_der
    hj_deriv u_der (
      .clk(clk), .en(en), .v_c(s0.c), .v_m(s0.m[d]), .v_p(s0.p[d]),
      .at_lo(at_lo[d]), .at_hi(at_hi[d]), .inv_dz(INV_DZ[d]),
      .p(p2[d]), .diss(diss2[d])
    );
  end

  // lookup table read issued from stage 1 so its data lines up with stage 2
  idx_t idx1;
  always_ff @(posedge clk) if (en) idx1 <= idx0;
  fx_t lut_v, lut_vtl, lut_cos, lut_sin;
  hj_state_lut #(.NV(N3), .NTH(N4)) u_lut (
    .clk(clk), .en(en), .k_idx(idx1.k), .l_idx(idx1.l),
    .v(lut_v), .vtl(lut_vtl), .cos_th(lut_cos), .sin_th(lut_sin)
  );

  // ---------------- stage 3: dynamics ----------------
  fx_t  [NDIM-1:0] zdot3;
  dfx_t [NDIM-1:0] p3, diss3;
  hj_dynamics u_dyn (
    .clk(clk), .en(en), .p(p2), .v(lut_v), .vtl(lut_vtl),
    .cos_th(lut_cos), .sin_th(lut_sin), .zdot(zdot3)
  );
  always_ff @(posedge clk) if (en) begin
    p3    <= p2;
    diss3 <= diss2;
  end

  // ---------------- stages 4-5: Hamiltonian ----------------
  dfx_t h5;
  hj_hamiltonian u_ham (
    .clk(clk), .en(en), .p(p3), .diss(diss3), .zdot(zdot3), .h(h5)
  );

  // centre value delayed to meet H: stage 0 -> stage 5 is 5 enabled cycles
  fx_t vc_dly [5];
  always_ff @(posedge clk) if (en) begin
    vc_dly[0] <= s0.c;
    for (int n = 1; n < 5; n++) vc_dly[n] <= vc_dly[n-1];
  end

  // ---------------- stages 6-7: update ----------------
  hj_update u_upd (
    .clk(clk), .en(en), .v_old(vc_dly[4]), .h(h5), .dt(DT),
    .v_out(v_out), .dv_abs(dv_abs)
  );

  // ---------------- valid pipeline ----------------
  logic [LATENCY-1:0] vld;
  always_ff @(posedge clk) begin
    if (!rst_n)    vld <= '0;
    else if (en)   vld <= {vld[LATENCY-2:0], in_valid};
  end
  assign out_valid = vld[LATENCY-1];
endmodule
