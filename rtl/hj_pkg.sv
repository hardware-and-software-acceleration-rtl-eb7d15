// hj_pkg: types and constants shared by the Hamilton-Jacobi reachability accelerator.
//
// Values of the level-set function V are signed fixed-point numbers with 32 bits in total:
// 5 integer bits including the sign and 27 fraction bits (range -16..16, resolution 2^-27),
// the format chosen for the 4D Dubins-car experiments. All products are formed at 64 bits
// and shifted back by FRAC bits (truncation toward minus infinity). Derivatives and the
// Hamiltonian use a wider internal format (dfx_t, same 27 fraction bits, 21 integer bits)
// because at fine grid spacings they exceed the value range; only the new value is
// saturated back to 32 bits.
// The car parameters (acceleration bound, steering bound, car length) are the experiment's
// own numbers; the grid extents of the speed and heading axes are this design's choice.
package hj_pkg;

  localparam int unsigned FX_W = 32;   // total width of a value
  localparam int unsigned FRAC = 27;   // fraction bits

  typedef logic signed [FX_W-1:0] fx_t;

  // Grid-spacing reciprocals 1/dz can exceed the value range (1/dz = 29.5 for 60 speed nodes
  // over 2 m/s), so they use their own 32-bit format with 12 integer and 20 fraction bits.
  localparam int unsigned COEF_FRAC = 20;
  typedef logic signed [FX_W-1:0] coef_t;

  // Internal format of differences, derivatives and the Hamiltonian: 48 bits, 27 fraction
  // bits. A value difference of 0.5 over a speed spacing of 0.034 is already 14.7, and the
  // dissipation term sums several such slopes.
  localparam int unsigned DX_W = 48;
  typedef logic signed [DX_W-1:0] dfx_t;

  // Number of grid dimensions of the Dubins car (x, y, v, theta).
  localparam int unsigned NDIM = 4;

  // Dimension order of the grid: index i (outermost loop) .. l (innermost loop).
  typedef enum logic [1:0] { DIM_X = 2'd0, DIM_Y = 2'd1, DIM_V = 2'd2, DIM_TH = 2'd3 } dim_e;

  // Grid point and its two neighbours in every dimension, as delivered to one PE.
  typedef struct packed {
    fx_t              c;   // V at the grid point itself
    fx_t [NDIM-1:0]   m;   // V at index - 1 in each dimension
    fx_t [NDIM-1:0]   p;   // V at index + 1 in each dimension
  } stencil_t;

  // Real -> fixed-point conversion (round to nearest), for constants computed at elaboration.
  function automatic fx_t to_fx(real r);
    return fx_t'($rtoi(r * 134217728.0 + ((r >= 0.0) ? 0.5 : -0.5)));
  endfunction

  // Fixed-point multiply: (a*b) >> FRAC.
  function automatic fx_t fx_mul(fx_t a, fx_t b);
    logic signed [2*FX_W-1:0] p;
    p = 64'(a) * 64'(b);
    return fx_t'(p >>> FRAC);
  endfunction

  function automatic coef_t to_coef(real r);
    return coef_t'($rtoi(r * 1048576.0 + ((r >= 0.0) ? 0.5 : -0.5)));
  endfunction

  // Value times coefficient: (a*c) >> COEF_FRAC, result in the value format.
  function automatic fx_t coef_mul(fx_t a, coef_t c);
    logic signed [2*FX_W-1:0] p;
    p = 64'(a) * 64'(c);
    return fx_t'(p >>> COEF_FRAC);
  endfunction

  // Wide-by-32-bit products are formed from two partial products of at most 56 bits, the
  // way a multiplier is split over DSP slices: a = ah * 2^24 + al with al unsigned. The
  // result is exactly (a*b) >> shift, without any intermediate wider than 64 bits.
  localparam int unsigned DX_SPLIT = 24;

  // Wide difference times coefficient: (a*c) >> COEF_FRAC, result in the wide format.
  function automatic dfx_t dx_coef_mul(dfx_t a, coef_t c);
    logic signed [63:0] hi_p, lo_p;
    hi_p = 64'(a >>> DX_SPLIT) * 64'(c);
    lo_p = $signed({40'd0, a[DX_SPLIT-1:0]}) * 64'(c);
    return dfx_t'((hi_p <<< (DX_SPLIT - COEF_FRAC)) + (lo_p >>> COEF_FRAC));
  endfunction

  // Wide number times value: (a*b) >> FRAC, result in the wide format.
  function automatic dfx_t dx_mul(dfx_t a, fx_t b);
    logic signed [63:0] hi_p, lo_p;
    hi_p = 64'(a >>> DX_SPLIT) * 64'(b);
    lo_p = $signed({40'd0, a[DX_SPLIT-1:0]}) * 64'(b)
         + $signed({{(64-FRAC){1'b0}}, hi_p[FRAC-DX_SPLIT-1:0], {DX_SPLIT{1'b0}}});
    return dfx_t'((hi_p >>> (FRAC - DX_SPLIT)) + (lo_p >>> FRAC));
  endfunction

  function automatic dfx_t dx_abs(dfx_t a);
    return (a < 0) ? -a : a;
  endfunction

  // Wide number clamped to the value range.
  localparam fx_t FX_MAX = {1'b0, {(FX_W-1){1'b1}}};
  localparam fx_t FX_MIN = {1'b1, {(FX_W-1){1'b0}}};

  function automatic fx_t sat_fx(dfx_t a);
    if (a > dfx_t'(FX_MAX))      return FX_MAX;
    else if (a < dfx_t'(FX_MIN)) return FX_MIN;
    else                         return fx_t'(a);
  endfunction

  function automatic fx_t fx_abs(fx_t a);
    return (a < 0) ? -a : a;
  endfunction

  // Car parameters of the experiment: a in [-1.5,1.5], delta in [-pi/12, pi/12], L = 0.3 m.
  localparam real A_MAX     = 1.5;
  localparam real TAN_DMAX  = 0.2679491924311227;   // tan(pi/12)
  localparam real CAR_L     = 0.3;
  localparam real PI        = 3.141592653589793;

  // Grid extents (room 6 m x 5 m; speed and heading ranges chosen by this design).
  localparam real X_LO  = 0.0, X_HI  = 6.0;
  localparam real Y_LO  = 0.0, Y_HI  = 5.0;
  localparam real V_LO  = -1.0, V_HI = 1.0;
  localparam real TH_LO = -PI, TH_HI = PI;

  // Grid spacing of a dimension with n nodes spanning [lo, hi].
  function automatic real grid_dz(real lo, real hi, int n);
    return (hi - lo) / real'(n - 1);
  endfunction

  // Fixed time step, precomputed from the largest rate of change of every state component
  // (the CFL bound dt = 1 / sum_d(alpha_d_max / dz_d)).
  function automatic real cfl_dt(int n1, int n2, int n3, int n4);
    real vmax, s;
    vmax = (V_HI > -V_LO) ? V_HI : -V_LO;
    s = vmax / grid_dz(X_LO, X_HI, n1)
      + vmax / grid_dz(Y_LO, Y_HI, n2)
      + A_MAX / grid_dz(V_LO, V_HI, n3)
      + (vmax * TAN_DMAX / CAR_L) / grid_dz(TH_LO, TH_HI, n4);
    return 1.0 / s;
  endfunction

  // Time horizon of one run: N_ITER steps cover T_HORIZON seconds (67 steps for 0.5 s in the
  // experiments), so dt = T_HORIZON / N_ITER, but never above the CFL bound.
  localparam real T_HORIZON = 0.5;

  function automatic real step_dt(int n1, int n2, int n3, int n4, int iters);
    real d, c;
    d = T_HORIZON / real'(iters);
    c = cfl_dt(n1, n2, n3, n4);
    return (d < c) ? d : c;
  endfunction

endpackage
