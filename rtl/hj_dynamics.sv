// hj_dynamics: optimal control and rates of change of the extended Dubins car.
//
// Dynamics: x' = v cos(theta), y' = v sin(theta), v' = a, theta' = v tan(delta) / L with
// a in [-A_MAX, A_MAX] and delta in [-delta_max, delta_max]. The control maximises
// grad(V) . f, and since f is affine in a and in tan(delta) the optimum is bang-bang:
// a = +A_MAX when dV/dv >= 0 (else -A_MAX), and tan(delta) takes the sign of dV/dtheta * v,
// which makes theta' = sign(dV/dtheta) * |v| tan(delta_max) / L (`vtl` from the lookup table).
// Outputs are the four state rates z' for the Hamiltonian stage.
// Timing: one register stage advancing when `en` is high.
module hj_dynamics
  import hj_pkg::*;
(
  input  logic           clk,
  input  logic           en,
  input  dfx_t [NDIM-1:0] p,       // gradient components (x, y, v, theta)
  input  fx_t            v,        // speed at this grid point
  input  fx_t            vtl,      // |v| tan(delta_max) / L
  input  fx_t            cos_th,
  input  fx_t            sin_th,
  output fx_t [NDIM-1:0] zdot      // x', y', v', theta' under the optimal control
);
  localparam fx_t A_FX = to_fx(A_MAX);

  always_ff @(posedge clk) begin
    if (en) begin
      zdot[DIM_X]  <= fx_mul(v, cos_th);
      zdot[DIM_Y]  <= fx_mul(v, sin_th);
      zdot[DIM_V]  <= (p[DIM_V]  >= 0) ? A_FX : -A_FX;
      zdot[DIM_TH] <= (p[DIM_TH] >= 0) ? vtl  : -vtl;
    end
  end
endmodule
