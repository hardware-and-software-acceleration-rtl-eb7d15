// tb_fifo_segment: checks the delay of fifo_segment for lengths 0, 1, 2 and 7 under random
// shift enables: the output must always equal the input of exactly LEN shifts earlier.
module tb_fifo_segment;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic shift;
  logic [15:0] din;
  logic [15:0] dout [4];
  localparam int LENS [4] = '{0, 1, 2, 7};

  fifo_segment #(.W(16), .LEN(0)) u0 (.clk, .shift, .din, .dout(dout[0]));
  fifo_segment #(.W(16), .LEN(1)) u1 (.clk, .shift, .din, .dout(dout[1]));
  fifo_segment #(.W(16), .LEN(2)) u2 (.clk, .shift, .din, .dout(dout[2]));
  fifo_segment #(.W(16), .LEN(7)) u7 (.clk, .shift, .din, .dout(dout[3]));

  logic [15:0] hist [$];   // inputs in order of shifts

  initial begin
    shift = 0; din = 0;
    for (int c = 0; c < 400; c++) begin
      @(negedge clk);
      // check: LEN = 0 shows the current input, others the input LEN shifts ago
      for (int u = 0; u < 4; u++) begin
        if (LENS[u] == 0) begin
          checks++; if (dout[u] != din) failures++;
        end else if (hist.size() >= LENS[u]) begin
          checks++;
          if (dout[u] != hist[hist.size() - LENS[u]]) begin
            failures++;
            if (failures < 5) $display("FAIL len %0d cycle %0d", LENS[u], c);
          end
        end
      end
      shift = ($urandom_range(0, 3) != 0);
      din   = 16'($urandom);
      @(posedge clk);
      if (shift) hist.push_back(din);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (10000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
