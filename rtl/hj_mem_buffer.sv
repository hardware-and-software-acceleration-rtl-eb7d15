// hj_mem_buffer: on-chip memory buffer that feeds NUM_PE processing elements.
//
// The value grid V[N1][N2][N3][N4] streams in from DRAM in row-major order (l, the N4 index,
// fastest), NUM_PE consecutive values per word, one word per `shift`. Word lane q holds the
// point with l mod NUM_PE = q, so the buffer is banked into NUM_PE line buffers and every PE
// gets a value and its 8 neighbours each cycle without any port conflict.
// Each line buffer is a chain of fifo_segment queues whose lengths are the distances (in
// words) between the grid points one stencil needs: S1 = N2*N3*N4/NUM_PE (step in i),
// S2 = N3*N4/NUM_PE (step in j), S3 = N4/NUM_PE (step in k), and 1 (the l neighbours that fall
// in the previous or next word). The taps between the queues are the stencil. The chain holds
// 2*S1 + 2 words, i.e. 2*N2*N3*N4 + 2*NUM_PE values, the minimum reuse distance of the
// stencil plus one word on either side.
// Interface: `clear` restarts the word count for a new pass over the grid; after `shift`
// number s the stencil of word s-1-S1 is on `st`, and `center_valid` tells whether that word
// lies inside the grid. The buffer must be shifted S1 + 1 times past the last word (with any
// padding data) to present the last stencils; neighbours outside the grid show padding or
// stale data and are replaced by the PE's boundary extrapolation.
// Requires N4 to be a multiple of NUM_PE.
module hj_mem_buffer
  import hj_pkg::*;
#(
  parameter int unsigned N1     = 60,
  parameter int unsigned N2     = 60,
  parameter int unsigned N3     = 60,
  parameter int unsigned N4     = 60,
  parameter int unsigned NUM_PE = 4
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     clear,
  input  logic                     shift,
  input  logic [NUM_PE*FX_W-1:0]   din,
  output stencil_t [NUM_PE-1:0]    st,
  output logic                     center_valid
);
  localparam int unsigned WW  = NUM_PE * FX_W;
  localparam int unsigned S3  = N4 / NUM_PE;
  localparam int unsigned S2  = N3 * S3;
  localparam int unsigned S1  = N2 * S2;
  localparam int unsigned TW  = N1 * S1;      // words in the grid

  // Chain: r0 (delay 0) -> ... taps at delays
  //   0 (i+1), S1-S2 (j+1), S1-S3 (k+1), S1-1 (next word), S1 (centre), S1+1 (previous word),
  //   S1+S3 (k-1), S1+S2 (j-1), 2*S1 (i-1)
  localparam int unsigned NSEG = 8;
  localparam int unsigned SEG_LEN [NSEG] = '{S1 - S2, S2 - S3, S3 - 1, 1, 1, S3 - 1, S2 - S3, S1 - S2};

  logic [WW-1:0] tap [NSEG+1];

  always_ff @(posedge clk) if (shift) tap[0] <= din;

  for (genvar g = 0; g < NSEG; g++) begin : g_seg
    fifo_segment #(.W(WW), .LEN(SEG_LEN[g])) u_seg (
      .clk  (clk),
      .shift(shift),
      .din  (tap[g]),
      .dout (tap[g+1])
    );
  end

  // tap index: 0 i+1, 1 j+1, 2 k+1, 3 next word, 4 centre, 5 previous word, 6 k-1, 7 j-1, 8 i-1
  function automatic fx_t lane(logic [WW-1:0] w, int q);
    return fx_t'(w[q*FX_W +: FX_W]);
  endfunction

  always_comb begin
    for (int q = 0; q < NUM_PE; q++) begin
      st[q].c          = lane(tap[4], q);
      st[q].p[DIM_X]   = lane(tap[0], q);
      st[q].p[DIM_Y]   = lane(tap[1], q);
      st[q].p[DIM_V]   = lane(tap[2], q);
      st[q].m[DIM_X]   = lane(tap[8], q);
      st[q].m[DIM_Y]   = lane(tap[7], q);
      st[q].m[DIM_V]   = lane(tap[6], q);
      st[q].p[DIM_TH]  = (q == NUM_PE - 1) ? lane(tap[3], 0)          : lane(tap[4], q + 1);
      st[q].m[DIM_TH]  = (q == 0)          ? lane(tap[5], NUM_PE - 1) : lane(tap[4], q - 1);
    end
  end

  // Count shifts since `clear` to know which word sits at the centre tap.
  logic [31:0] nshift;
  always_ff @(posedge clk) begin
    if (!rst_n)      nshift <= '0;
    else if (clear)  nshift <= '0;
    else if (shift)  nshift <= nshift + 1'b1;
  end
  assign center_valid = (nshift > 32'(S1)) && (nshift <= 32'(S1 + TW));

  initial begin
    assert (N4 % NUM_PE == 0) else $error("N4 must be a multiple of NUM_PE");
    assert (S3 >= 1 && N2 >= 2 && N3 >= 2) else $error("grid too small for the stencil");
  end
endmodule
