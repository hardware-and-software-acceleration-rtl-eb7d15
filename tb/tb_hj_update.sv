// tb_hj_update: random old values, Hamiltonians and time steps; checks
// min(V, V + H dt) and |change| after two enables.
module tb_hj_update;
  import hj_pkg::*;
  import hj_ref_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic en = 0;
  fx_t v_old, dt, v_out, dv_abs;
  dfx_t h;
  hj_update dut (.*);
  int n_lower = 0, n_sat = 0;

  initial begin
    for (int t = 0; t < 300; t++) begin
      real vo, vn, e;
      v_old = to_fx((real'($urandom_range(0, 2000)) - 1000.0) / 200.0);
      // every fourth step a Hamiltonian far outside the value range (up to +-1000)
      h     = to_dx((real'($urandom_range(0, 2000)) - 1000.0) / ((t % 4 == 3) ? 1.0 : 100.0));
      dt    = to_fx(real'($urandom_range(1, 1000)) / 20000.0);
      if (t % 20 == 19) begin   // a step that leaves the value range downwards
        v_old = to_fx(-10.0); h = to_dx(-900.0); dt = to_fx(0.05);
      end
      vo = fx2r(v_old);
      vn = vo + dx2r(h) * fx2r(dt);
      e  = (vn < vo) ? vn : vo;
      if (e < -16.0) begin e = -16.0; n_sat++; end   // saturated to the value range
      if (vn < vo) n_lower++;
      @(negedge clk); en = 1; @(negedge clk); en = 0;
      repeat ($urandom_range(0, 2)) @(negedge clk);
      en = 1; @(negedge clk); en = 0;
      checks += 2;
      if (rabs(fx2r(v_out) - e) > 1e-7) begin failures++; if (failures < 5) $display("FAIL v %f ref %f", fx2r(v_out), e); end
      if (rabs(fx2r(dv_abs) - ((rabs(e - vo) < 16.0) ? rabs(e - vo) : 16.0)) > 1e-7) begin
        failures++; if (failures < 5) $display("FAIL dv %f ref %f", fx2r(dv_abs), rabs(e - vo));
      end
    end
    checks++; if (n_lower == 0) failures++;
    checks++; if (n_sat == 0) begin failures++; $display("FAIL no saturated step"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (10000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
