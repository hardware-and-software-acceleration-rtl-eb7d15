// tb_hj_hamiltonian: random inputs; H must equal sum p_d z'_d - sum |z'_d| diss_d after two
// enables, and must not change while `en` is low.
module tb_hj_hamiltonian;
  import hj_pkg::*;
  import hj_ref_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic en = 0;
  dfx_t [NDIM-1:0] p, diss;
  fx_t  [NDIM-1:0] zdot;
  dfx_t h;
  hj_hamiltonian dut (.*);

  initial begin
    for (int t = 0; t < 300; t++) begin
      real e;
      dfx_t hold;
      e = 0.0;
      for (int d = 0; d < 4; d++) begin
        // slopes up to +-250, beyond the value range, as on a fine speed axis
        p[d]    = to_dx((real'($urandom_range(0, 2000)) - 1000.0) / ((t % 2 == 0) ? 400.0 : 4.0));
        diss[d] = to_dx((real'($urandom_range(0, 2000)) - 1000.0) / ((t % 2 == 0) ? 400.0 : 4.0));
        zdot[d] = to_fx((real'($urandom_range(0, 2000)) - 1000.0) / 500.0);
        e += dx2r(p[d]) * fx2r(zdot[d]) - rabs(fx2r(zdot[d])) * dx2r(diss[d]);
      end
      @(negedge clk); en = 1; @(negedge clk); en = 0;
      hold = h;
      @(negedge clk);
      checks++; if (h != hold) failures++;
      en = 1; @(negedge clk); en = 0;
      checks++;
      if (rabs(dx2r(h) - e) > 1e-5) begin failures++; if (failures < 5) $display("FAIL h %f ref %f", dx2r(h), e); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (10000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
