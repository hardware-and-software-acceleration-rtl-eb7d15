// tb_hj_deriv: random values and spacings, interior and both boundaries; compares p and
// (D+ - D-)/2 with a floating-point computation, and checks the two-enable latency by
// holding `en` low for random cycles between samples.
module tb_hj_deriv;
  import hj_pkg::*;
  import hj_ref_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic en = 0, at_lo = 0, at_hi = 0;
  fx_t v_c, v_m, v_p;
  dfx_t p, diss;
  coef_t inv_dz;
  hj_deriv dut (.*);

  initial begin
    for (int t = 0; t < 300; t++) begin
      real c, m, pp, dz, vm, vp, dm, dp, ep, ed;
      c  = (real'($urandom_range(0, 2000)) - 1000.0) / 1000.0;
      // every other point with steep neighbours: slopes far beyond the value range
      m  = c + (real'($urandom_range(0, 200)) - 100.0) / ((t % 2 == 0) ? 1000.0 : 15.0);
      pp = c + (real'($urandom_range(0, 200)) - 100.0) / ((t % 2 == 0) ? 1000.0 : 15.0);
      dz = 0.02 + real'($urandom_range(0, 100)) / 200.0;
      if (t % 50 == 7) c = 0.0;
      case (t % 3) 0: begin at_lo = 0; at_hi = 0; end 1: begin at_lo = 1; at_hi = 0; end
                   default: begin at_lo = 0; at_hi = 1; end endcase
      v_c = to_fx(c); v_m = to_fx(m); v_p = to_fx(pp); inv_dz = to_coef(1.0 / dz);
      c = fx2r(v_c); m = fx2r(v_m); pp = fx2r(v_p);
      vm = at_lo ? c + rabs(c - pp) * rsign(c) : m;
      vp = at_hi ? c + rabs(c - m) * rsign(c) : pp;
      dm = (c - vm) * (real'(inv_dz) / 1048576.0); dp = (vp - c) * (real'(inv_dz) / 1048576.0);
      ep = (dp + dm) / 2.0; ed = (dp - dm) / 2.0;
      @(negedge clk); en = 1; @(negedge clk); en = 0;
      repeat ($urandom_range(0, 3)) @(negedge clk);
      en = 1; @(negedge clk); en = 0;
      checks += 2;
      if (rabs(dx2r(p) - ep) > 1e-5 || rabs(dx2r(diss) - ed) > 1e-5) begin
        failures++;
        if (failures < 5) $display("FAIL t=%0d p %f/%f diss %f/%f", t, dx2r(p), ep, dx2r(diss), ed);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (10000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
