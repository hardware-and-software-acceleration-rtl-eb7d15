// hj_ref_pkg: floating-point reference of one solver step at one grid point, used by the
// testbenches to check the fixed-point hardware. It follows the level-set update directly:
// boundary extrapolation V_i + |V_i - V_other| sign(V_i), central differences, bang-bang
// optimal control of the Dubins car, Lax-Friedrichs dissipation with |z'_d|, an Euler step of
// the precomputed CFL time step, and the minimum with the old value.
package hj_ref_pkg;
  import hj_pkg::*;

  function automatic real fx2r(fx_t v);
    return real'(v) / 134217728.0;
  endfunction

  function automatic real dx2r(dfx_t v);
    return real'(v) / 134217728.0;
  endfunction

  function automatic dfx_t to_dx(real r);
    return dfx_t'(longint'(r * 134217728.0));   // real to integer cast rounds to nearest
  endfunction

  function automatic real rsign(real v);
    return (v > 0.0) ? 1.0 : ((v < 0.0) ? -1.0 : 0.0);
  endfunction

  function automatic real rabs(real v);
    return (v < 0.0) ? -v : v;
  endfunction

  // n[d]: grid size, idx[d]: index, c: centre, m/p: neighbours (ignored at a boundary)
  function automatic real ref_point(int n[4], int idx[4], real c, real m[4], real p[4],
                                    output real dv, input real dt = 0.0);
    real lo[4], hi[4], dz, vm, vp, dm, dp, pd[4], ds[4], zd[4], v, th, h, vn, vo;
    lo = '{X_LO, Y_LO, V_LO, TH_LO};
    hi = '{X_HI, Y_HI, V_HI, TH_HI};
    for (int d = 0; d < 4; d++) begin
      dz = (hi[d] - lo[d]) / real'(n[d] - 1);
      vm = m[d];
      vp = p[d];
      if (idx[d] == 0)        vm = c + rabs(c - p[d]) * rsign(c);
      if (idx[d] == n[d] - 1) vp = c + rabs(c - m[d]) * rsign(c);
      dm = (c - vm) / dz;
      dp = (vp - c) / dz;
      pd[d] = (dp + dm) / 2.0;
      ds[d] = (dp - dm) / 2.0;
    end
    v  = V_LO + real'(idx[2]) * (V_HI - V_LO) / real'(n[2] - 1);
    th = TH_LO + real'(idx[3]) * (TH_HI - TH_LO) / real'(n[3] - 1);
    zd[0] = v * $cos(th);
    zd[1] = v * $sin(th);
    zd[2] = (pd[2] >= 0.0) ? A_MAX : -A_MAX;
    zd[3] = ((pd[3] >= 0.0) ? 1.0 : -1.0) * rabs(v) * TAN_DMAX / CAR_L;
    h = 0.0;
    for (int d = 0; d < 4; d++) h += pd[d] * zd[d] - rabs(zd[d]) * ds[d];
    // dt <= 0: the CFL step of the grid
    vn = c + h * ((dt > 0.0) ? dt : cfl_dt(n[0], n[1], n[2], n[3]));
    vo = (vn < c) ? vn : c;
    dv = rabs(vo - c);
    return vo;
  endfunction

  // Initial value: distance to a round obstacle at (xo, yo) of radius r (cone of 0.08 m).
  function automatic real obstacle_v0(int n[4], int idx[4], real xo, real yo, real r);
    real x, y;
    x = X_LO + real'(idx[0]) * (X_HI - X_LO) / real'(n[0] - 1);
    y = Y_LO + real'(idx[1]) * (Y_HI - Y_LO) / real'(n[1] - 1);
    return $sqrt((x - xo) * (x - xo) + (y - yo) * (y - yo)) - r;
  endfunction
endpackage
