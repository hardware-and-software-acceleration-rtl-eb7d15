// hj_hamiltonian: Hamiltonian with Lax-Friedrichs artificial dissipation.
//
// H = sum_d p_d * z'_d  -  sum_d |z'_d| * (D+_d - D-_d)/2.
// For this car the dissipation coefficient |dH/dp_d| equals |z'_d| under the optimal
// control, so no grid-wide minimum/maximum of the derivatives is needed and the whole
// update fits in one pass over the grid.
// Inputs p and diss and the result h are in the wide internal format (dfx_t); the rates z'
// are values.
// Timing: two register stages (eight products, then the sum), advancing when `en` is high.
module hj_hamiltonian
  import hj_pkg::*;
(
  input  logic           clk,
  input  logic           en,
  input  dfx_t [NDIM-1:0] p,
  input  dfx_t [NDIM-1:0] diss,
  input  fx_t  [NDIM-1:0] zdot,
  output dfx_t            h
);
  dfx_t [NDIM-1:0] flow_q, diss_q;

  always_ff @(posedge clk) begin
    if (en) begin
      for (int d = 0; d < NDIM; d++) begin
        flow_q[d] <= dx_mul(p[d], zdot[d]);
        diss_q[d] <= dx_mul(diss[d], fx_abs(zdot[d]));
      end
    end
  end

  dfx_t sum;
  always_comb begin
    sum = '0;
    for (int d = 0; d < NDIM; d++) sum = sum + flow_q[d] - diss_q[d];
  end

  always_ff @(posedge clk) if (en) h <= sum;
endmodule
