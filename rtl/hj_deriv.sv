// hj_deriv: spatial derivative of V along one grid dimension (central difference).
//
// Given the value at a grid point and at its two neighbours, it forms the one-sided
// differences D- = (V_i - V_{i-1})/dz and D+ = (V_{i+1} - V_i)/dz, their mean p (the central
// difference used as the gradient component) and half their difference (D+ - D-)/2 (the
// quantity the dissipation term scales). At the first and last node of the dimension the
// missing neighbour is extrapolated as V_i + |V_i - V_other| * sign(V_i), as in the reference
// level-set toolbox. `inv_dz` is 1/dz in the coefficient format of hj_pkg (12 integer, 20 fraction bits).
// The differences and outputs are in the wide internal format of hj_pkg (dfx_t), since slopes
// over fine spacings exceed the 32-bit value range; the wide format is this design's choice.
// Timing: two register stages, both advancing only when `en` is high (latency 2 enables).
module hj_deriv
  import hj_pkg::*;
(
  input  logic clk,
  input  logic en,
  input  fx_t  v_c,
  input  fx_t  v_m,
  input  fx_t  v_p,
  input  logic at_lo,     // index is 0: v_m is not a grid value
  input  logic at_hi,     // index is N-1: v_p is not a grid value
  input  coef_t inv_dz,   // 1/dz, 12.20 coefficient format
  output dfx_t p,         // central difference (D+ + D-)/2, wide format
  output dfx_t diss       // (D+ - D-)/2, wide format
);
  // sign(V) * x with sign(0) = 0
  function automatic dfx_t sgn_scale(fx_t v, dfx_t x);
    if (v > 0)      return x;
    else if (v < 0) return -x;
    else            return '0;
  endfunction

  dfx_t vm_e, vp_e;  // neighbours, extrapolated at a boundary (may exceed the value range)
  dfx_t dm_q, dp_q;  // stage 1: raw differences

  always_comb begin
    vm_e = at_lo ? dfx_t'(v_c) + sgn_scale(v_c, dx_abs(dfx_t'(v_c) - dfx_t'(v_p))) : dfx_t'(v_m);
    vp_e = at_hi ? dfx_t'(v_c) + sgn_scale(v_c, dx_abs(dfx_t'(v_c) - dfx_t'(v_m))) : dfx_t'(v_p);
  end

  always_ff @(posedge clk) begin
    if (en) begin
      dm_q <= dfx_t'(v_c) - vm_e;
      dp_q <= vp_e - dfx_t'(v_c);
    end
  end

  dfx_t dminus, dplus;
  always_comb begin
    dminus = dx_coef_mul(dm_q, inv_dz);
    dplus  = dx_coef_mul(dp_q, inv_dz);
  end

  always_ff @(posedge clk) begin
    if (en) begin
      p    <= (dplus + dminus) >>> 1;
      diss <= (dplus - dminus) >>> 1;
    end
  end
endmodule
