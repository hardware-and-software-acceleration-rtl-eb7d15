// hj_update: first-order time step and the backward-reachable-tube minimum.
//
// V_new = V + H * dt with the time step dt fixed in advance, then V_out = min(V, V_new) so
// the tube never shrinks. It also reports |V_out - V|, the per-point change from which the
// controller takes the largest change of an iteration for the convergence test.
// H arrives in the wide internal format; V + H*dt is formed wide and, when it is the smaller
// value, saturated to the 32-bit value range (saturation is this design's choice).
// Timing: two register stages advancing when `en` is high.
module hj_update
  import hj_pkg::*;
(
  input  logic clk,
  input  logic en,
  input  fx_t  v_old,
  input  dfx_t h,
  input  fx_t  dt,
  output fx_t  v_out,
  output fx_t  dv_abs
);
  fx_t  v_old_q;
  dfx_t v_new_q;

  always_ff @(posedge clk) begin
    if (en) begin
      v_old_q <= v_old;
      v_new_q <= dfx_t'(v_old) + dx_mul(h, dt);
    end
  end

  fx_t v_min;
  assign v_min = (v_new_q < dfx_t'(v_old_q)) ? sat_fx(v_new_q) : v_old_q;

  always_ff @(posedge clk) begin
    if (en) begin
      v_out  <= v_min;
      dv_abs <= sat_fx(dx_abs(dfx_t'(v_min) - dfx_t'(v_old_q)));
    end
  end
endmodule
