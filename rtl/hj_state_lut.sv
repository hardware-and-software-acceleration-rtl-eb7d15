// hj_state_lut: per-PE lookup table of the state values the car dynamics need.
//
// The state vectors depend only on the grid, never on the obstacles, so they are kept
// on chip instead of being fetched from DRAM. Indexed by the speed index k and the heading
// index l it returns v_k, |v_k| * tan(delta_max) / L (the magnitude of the largest turn rate
// at that speed) and cos(theta_l), sin(theta_l). The tables are filled once at configuration
// from the grid extents in hj_pkg (node n of a dimension lies at lo + n*dz).
// Timing: synchronous read, one register stage advancing when `en` is high.
module hj_state_lut
  import hj_pkg::*;
#(
  parameter int unsigned NV  = 60,   // nodes on the speed axis
  parameter int unsigned NTH = 60    // nodes on the heading axis
) (
  input  logic                   clk,
  input  logic                   en,
  input  logic [$clog2(NV)-1:0]  k_idx,
  input  logic [$clog2(NTH)-1:0] l_idx,
  output fx_t                    v,
  output fx_t                    vtl,
  output fx_t                    cos_th,
  output fx_t                    sin_th
);
  fx_t v_rom   [NV];
  fx_t vtl_rom [NV];
  fx_t cos_rom [NTH];
  fx_t sin_rom [NTH];

  initial begin
    for (int n = 0; n < NV; n++) begin
      real vv;
      vv = V_LO + real'(n) * grid_dz(V_LO, V_HI, NV);
      v_rom[n]   = to_fx(vv);
      vtl_rom[n] = to_fx(((vv < 0.0) ? -vv : vv) * TAN_DMAX / CAR_L);
    end
    for (int n = 0; n < NTH; n++) begin
      real th;
      th = TH_LO + real'(n) * grid_dz(TH_LO, TH_HI, NTH);
      cos_rom[n] = to_fx($cos(th));
      sin_rom[n] = to_fx($sin(th));
    end
  end

  always_ff @(posedge clk) begin
    if (en) begin
      v      <= v_rom[k_idx];
      vtl    <= vtl_rom[k_idx];
      cos_th <= cos_rom[l_idx];
      sin_th <= sin_rom[l_idx];
    end
  end
endmodule
