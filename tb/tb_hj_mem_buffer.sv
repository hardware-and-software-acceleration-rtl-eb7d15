// tb_hj_mem_buffer: streams a small grid (3 x 4 x 3 x 8, 4 lanes) through the memory
// buffer with random stalls and checks, for every valid centre, that the centre and all
// eight neighbours of every lane carry the grid values at the right indices (neighbours
// outside the grid are not checked; the PE replaces them). Each value encodes its own linear
// index. Also checks that exactly the grid's words are flagged valid.
module tb_hj_mem_buffer;
  import hj_pkg::*;
  localparam int N1 = 3, N2 = 4, N3 = 3, N4 = 8, NP = 4;
  localparam int TW = N1 * N2 * N3 * N4 / NP, S1 = N2 * N3 * N4 / NP;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic clear = 0, shift = 0, center_valid;
  logic [NP*32-1:0] din = '0;
  stencil_t [NP-1:0] st;

  hj_mem_buffer #(.N1(N1), .N2(N2), .N3(N3), .N4(N4), .NUM_PE(NP)) dut (.*);

  function automatic int lin(int i, int j, int k, int l);
    return ((i * N2 + j) * N3 + k) * N4 + l;
  endfunction

  task automatic chk(int want_ok, fx_t got, int i, int j, int k, int l);
    if (want_ok) begin
      checks++;
      if (got != fx_t'(1000 + lin(i, j, k, l))) begin
        failures++;
        if (failures < 6) $display("FAIL (%0d,%0d,%0d,%0d) got %0d", i, j, k, l, got);
      end
    end
  endtask

  initial begin
    int words = 0, centre = 0, nvalid = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int pass = 0; pass < 2; pass++) begin
      @(negedge clk); clear = 1; @(negedge clk); clear = 0;
      words = 0; centre = 0;
      while (centre < TW) begin
        @(negedge clk);
        if (center_valid) begin
          for (int q = 0; q < NP; q++) begin
            int p, i, j, k, l;
            p = centre * NP + q;
            i = p / (N2*N3*N4); j = (p / (N3*N4)) % N2; k = (p / N4) % N3; l = p % N4;
            chk(1, st[q].c, i, j, k, l);
            chk(i > 0, st[q].m[DIM_X], i-1, j, k, l);     chk(i < N1-1, st[q].p[DIM_X], i+1, j, k, l);
            chk(j > 0, st[q].m[DIM_Y], i, j-1, k, l);     chk(j < N2-1, st[q].p[DIM_Y], i, j+1, k, l);
            chk(k > 0, st[q].m[DIM_V], i, j, k-1, l);     chk(k < N3-1, st[q].p[DIM_V], i, j, k+1, l);
            chk(l > 0, st[q].m[DIM_TH], i, j, k, l-1);    chk(l < N4-1, st[q].p[DIM_TH], i, j, k, l+1);
          end
          nvalid++;
        end
        shift = ($urandom_range(0, 2) != 0);
        for (int q = 0; q < NP; q++) din[q*32 +: 32] = (words < TW) ? 32'(1000 + words * NP + q) : 32'hDEAD;
        @(posedge clk);
        if (shift) begin
          if (center_valid) centre++;
          words++;
        end
        #1 shift = 0;
      end
    end
    checks++; if (nvalid < 2 * TW) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (20000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
