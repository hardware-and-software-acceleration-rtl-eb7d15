// tb_hj_state_lut: reads every speed and heading entry of a 60 x 60 table and compares with
// v = V_LO + k dv, |v| tan(delta_max)/L, cos and sin of theta = TH_LO + l dtheta. Also checks
// that the output holds while `en` is low.
module tb_hj_state_lut;
  import hj_pkg::*;
  import hj_ref_pkg::*;
  localparam int NV = 60, NTH = 60;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic en = 0;
  logic [5:0] k_idx = 0, l_idx = 0;
  fx_t v, vtl, cos_th, sin_th;
  hj_state_lut #(.NV(NV), .NTH(NTH)) dut (.*);

  initial begin
    for (int n = 0; n < 60; n++) begin
      real ev, eth;
      fx_t hold;
      k_idx = 6'(n); l_idx = 6'(59 - n);
      @(negedge clk); en = 1; @(negedge clk); en = 0;
      ev  = V_LO + real'(n) * (V_HI - V_LO) / 59.0;
      eth = TH_LO + real'(59 - n) * (TH_HI - TH_LO) / 59.0;
      checks += 4;
      if (rabs(fx2r(v) - ev) > 1e-7) failures++;
      if (rabs(fx2r(vtl) - rabs(ev) * TAN_DMAX / CAR_L) > 1e-7) failures++;
      if (rabs(fx2r(cos_th) - $cos(eth)) > 1e-7) failures++;
      if (rabs(fx2r(sin_th) - $sin(eth)) > 1e-7) begin failures++; $display("FAIL sin %0d", n); end
      hold = v;
      k_idx = 6'((n + 5) % 60);
      @(negedge clk);
      checks++; if (v != hold) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (10000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
