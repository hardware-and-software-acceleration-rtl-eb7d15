// tb_gearbox_fifo: a 64-bit -> 16-bit and a 16-bit -> 64-bit FIFO with random valid/ready
// on both sides. Every narrow word written must come out in order (low bits first), the
// FIFOs must fill (in_ready low) and drain, and free_units must match the occupancy.
module tb_gearbox_fifo;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  // down-sizer
  logic d_iv, d_ir, d_ov, d_or; logic [63:0] d_id; logic [15:0] d_od; logic [5:0] d_free;
  gearbox_fifo #(.IN_W(64), .OUT_W(16), .DEPTH(32)) dn (.clk, .rst_n, .in_valid(d_iv), .in_ready(d_ir),
    .in_data(d_id), .out_valid(d_ov), .out_ready(d_or), .out_data(d_od), .free_units(d_free));
  // up-sizer
  logic u_iv, u_ir, u_ov, u_or; logic [15:0] u_id; logic [63:0] u_od; logic [5:0] u_free;
  gearbox_fifo #(.IN_W(16), .OUT_W(64), .DEPTH(32)) up (.clk, .rst_n, .in_valid(u_iv), .in_ready(u_ir),
    .in_data(u_id), .out_valid(u_ov), .out_ready(u_or), .out_data(u_od), .free_units(u_free));

  logic [15:0] dq [$], uq [$];
  int full_seen = 0, occ_d = 0;

  initial begin
    d_iv = 0; d_or = 0; u_iv = 0; u_or = 0; d_id = '0; u_id = '0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int c = 0; c < 3000; c++) begin
      @(negedge clk);
      d_iv = $urandom_range(0, 1); d_id = {$urandom, $urandom};
      d_or = (c < 200) ? 1'b0 : ($urandom_range(0, 2) != 0);
      u_iv = $urandom_range(0, 1); u_id = 16'($urandom);
      u_or = (c < 200) ? 1'b0 : ($urandom_range(0, 2) != 0);
      checks++; if (32'(d_free) != 32 - occ_d) failures++;
      @(posedge clk);
      if (!d_ir) full_seen++;
      if (d_iv && d_ir) begin for (int u = 0; u < 4; u++) dq.push_back(d_id[u*16 +: 16]); occ_d += 4; end
      if (d_ov && d_or) begin
        checks++; if (d_od != dq.pop_front()) failures++;
        occ_d -= 1;
      end
      if (u_iv && u_ir) uq.push_back(u_id);
      if (u_ov && u_or) for (int u = 0; u < 4; u++) begin
        checks++; if (u_od[u*16 +: 16] != uq.pop_front()) failures++;
      end
    end
    checks++; if (full_seen == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (10000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
