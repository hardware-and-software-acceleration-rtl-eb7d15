// tb_hj_pe: drives four processing elements (lanes 0..3 of 4) with the stencils of a whole
// small grid (4 x 4 x 3 x 8) in loop order. Each point goes to the PE of its lane, with random
// stalls, and every result is compared with the floating-point reference step. Checks the
// pipeline latency (8 enabled cycles), that each PE's own index counters follow the grid
// (every boundary of every axis included, the heading axis through lanes 0 and 3) and that
// `clear` restarts them for a second pass.
module tb_hj_pe;
  import hj_pkg::*;
  import hj_ref_pkg::*;
  localparam int N1 = 4, N2 = 4, N3 = 3, N4 = 8, NP = 4;
  localparam int NPTS = N1 * N2 * N3 * N4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic clear = 0;
  logic [NP-1:0] en = '0, in_valid = '0, out_valid;
  stencil_t st;
  fx_t v_out [NP], dv_abs [NP];

  for (genvar g = 0; g < NP; g++) begin : g_pe
    hj_pe #(.N1(N1), .N2(N2), .N3(N3), .N4(N4), .NUM_PE(NP), .LANE(g)) dut (
      .clk, .rst_n, .clear, .en(en[g]), .in_valid(in_valid[g]), .st,
      .out_valid(out_valid[g]), .v_out(v_out[g]), .dv_abs(dv_abs[g])
    );
  end

  fx_t  grid [NPTS];
  real  expv [NP][$], expd [NP][$];
  int   sent_at [NP][$];
  int   en_count [NP];

  function automatic int lin(int i, int j, int k, int l);
    return ((i * N2 + j) * N3 + k) * N4 + l;
  endfunction

  initial begin
    int n[4];
    n = '{N1, N2, N3, N4};
    for (int g = 0; g < NP; g++) en_count[g] = 0;
    for (int q = 0; q < NPTS; q++) grid[q] = to_fx((real'($urandom_range(0, 1000)) - 500.0) / 1000.0);
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int pass = 0; pass < 2; pass++) begin
      @(negedge clk); clear = 1; @(negedge clk); clear = 0;
      for (int i = 0; i < N1; i++) for (int j = 0; j < N2; j++)
        for (int k = 0; k < N3; k++) for (int l = 0; l < N4; l++) begin
          int idx[4], g;
          real m[4], p[4], dv, r;
          g = l % NP;
          idx = '{i, j, k, l};
          st.c = grid[lin(i,j,k,l)];
          st.m = '{(l > 0) ? grid[lin(i,j,k,l-1)] : 32'h0BAD, (k > 0) ? grid[lin(i,j,k-1,l)] : 32'h0BAD,
                   (j > 0) ? grid[lin(i,j-1,k,l)] : 32'h0BAD, (i > 0) ? grid[lin(i-1,j,k,l)] : 32'h0BAD};
          st.p = '{(l < N4-1) ? grid[lin(i,j,k,l+1)] : 32'h0BAD, (k < N3-1) ? grid[lin(i,j,k+1,l)] : 32'h0BAD,
                   (j < N2-1) ? grid[lin(i,j+1,k,l)] : 32'h0BAD, (i < N1-1) ? grid[lin(i+1,j,k,l)] : 32'h0BAD};
          for (int d = 0; d < 4; d++) begin
            m[d] = fx2r(st.m[d]);
            p[d] = fx2r(st.p[d]);
          end
          r = ref_point(n, idx, fx2r(st.c), m, p, dv);
          expv[g].push_back(r); expd[g].push_back(dv);
          in_valid[g] = 1;
          // hold the point through random stall cycles
          do begin
            en[g] = ($urandom_range(0, 3) != 0);
            @(posedge clk);
            #1;
          end while (!en[g]);
          sent_at[g].push_back(en_count[g]);
          in_valid[g] = 0;
          en[g] = 0;
          @(negedge clk);
        end
      // flush
      in_valid = '0;
      repeat (12) begin en = '1; @(posedge clk); #1; end
      en = '0;
    end
    for (int g = 0; g < NP; g++) begin
      checks++;
      if (expv[g].size() != 0) begin failures++; $display("FAIL lane %0d: %0d results missing", g, expv[g].size()); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // monitor: results appear after the 8th enable following the input
  always @(posedge clk) begin
    for (int g = 0; g < NP; g++) begin
      if (en[g]) begin
        en_count[g]++;
        if (out_valid[g]) begin
          real e;
          checks += 3;
          if (expv[g].size() == 0) begin
            failures++; $display("FAIL lane %0d: unexpected result", g);
          end else begin
            e = rabs(fx2r(v_out[g]) - expv[g][0]);
            if (e > 2.0e-6) begin
              failures++;
              if (failures < 8) $display("FAIL lane %0d value hw %f ref %f", g, fx2r(v_out[g]), expv[g][0]);
            end
            if (rabs(fx2r(dv_abs[g]) - expd[g][0]) > 2.0e-6) failures++;
            if (en_count[g] - sent_at[g][0] != 8) begin
              failures++; $display("FAIL lane %0d latency %0d", g, en_count[g] - sent_at[g][0]);
            end
            void'(expv[g].pop_front()); void'(expd[g].pop_front()); void'(sent_at[g].pop_front());
          end
        end
      end
    end
  end

  initial begin repeat (40000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
