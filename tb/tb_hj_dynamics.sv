// tb_hj_dynamics: random gradients, speeds and headings; checks that the chosen control is
// the one that maximises grad(V).f among the four bang-bang corners, and that x', y' equal
// v cos(theta), v sin(theta).
module tb_hj_dynamics;
  import hj_pkg::*;
  import hj_ref_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic en = 0;
  dfx_t [NDIM-1:0] p;
  fx_t  [NDIM-1:0] zdot;
  fx_t v, vtl, cos_th, sin_th;
  hj_dynamics dut (.*);

  initial begin
    for (int t = 0; t < 400; t++) begin
      real vv, th, best, val, pr[4];
      vv = (real'($urandom_range(0, 2000)) - 1000.0) / 1000.0;
      th = (real'($urandom_range(0, 6283)) - 3141.0) / 1000.0;
      for (int d = 0; d < 4; d++) begin
        p[d] = to_dx((real'($urandom_range(0, 2000)) - 1000.0) / 10.0);
        pr[d] = dx2r(p[d]);
      end
      v = to_fx(vv); vtl = to_fx(rabs(vv) * TAN_DMAX / CAR_L);
      cos_th = to_fx($cos(th)); sin_th = to_fx($sin(th));
      @(negedge clk); en = 1; @(negedge clk); en = 0;
      // best value over the control corners a = +-A_MAX, tan(delta) = +-TAN_DMAX
      best = -1.0e9;
      for (int sa = -1; sa <= 1; sa += 2) for (int sd = -1; sd <= 1; sd += 2) begin
        val = pr[2] * sa * A_MAX + pr[3] * vv * sd * TAN_DMAX / CAR_L;
        if (val > best) best = val;
      end
      val = pr[2] * fx2r(zdot[DIM_V]) + pr[3] * fx2r(zdot[DIM_TH]);
      checks += 3;
      if (rabs(val - best) > 1e-5) begin failures++; if (failures < 5) $display("FAIL control t=%0d", t); end
      if (rabs(fx2r(zdot[DIM_X]) - vv * $cos(th)) > 1e-6) failures++;
      if (rabs(fx2r(zdot[DIM_Y]) - vv * $sin(th)) > 1e-6) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (10000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
