// tb_mem_arbiter: three requesters that hold their request until acknowledged (acks are
// random, as an AXI ready would be). Checks: at most one grant, a grant stays with its
// owner until the ack, no request waits more than N grants (round-robin fairness), and
// with all three always requesting the grants rotate 0, 1, 2, 0, ... Also checks that some
// request is granted whenever any is pending, and counts the requests served.
module tb_mem_arbiter;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic [2:0] req = 0, ack = 0, gnt;
  mem_arbiter #(.N(3)) dut (.*);
  int wait_cnt [3] = '{0, 0, 0};
  int last = -1, rot_bad = 0;
  logic [2:0] prev_gnt = 0, prev_ack = 0;
  bit all_on = 0;
  int served = 0;

  always @(posedge clk) if (rst_n) begin
    checks++; if (!$onehot0(gnt)) failures++;
    // work conserving: a pending request is always granted to someone
    checks++; if (req != 0 && gnt == 0) failures++;
    // hold: a grant without ack must persist
    if (prev_gnt != 0 && (prev_gnt & prev_ack) == 0) begin checks++; if (gnt != prev_gnt) failures++; end
    for (int n = 0; n < 3; n++) begin
      if (gnt[n] && ack[n]) begin
        if (all_on && last >= 0) begin checks++; if (n != (last + 1) % 3) rot_bad++; end
        last = n;
        served++;
        for (int o = 0; o < 3; o++) if (o != n && req[o]) wait_cnt[o]++;
        wait_cnt[n] = 0;
      end
    end
    for (int n = 0; n < 3; n++) begin checks++; if (wait_cnt[n] > 2) failures++; end
    prev_gnt <= gnt; prev_ack <= ack;
  end

  initial begin
    repeat (2) @(posedge clk); rst_n = 1;
    for (int c = 0; c < 2000; c++) begin
      @(negedge clk);
      all_on = (c >= 1000);
      for (int n = 0; n < 3; n++) if (!req[n]) req[n] = all_on ? 1'b1 : 1'($urandom_range(0, 1));
      #1;
      ack = gnt & 3'($urandom_range(0, 7));
      @(posedge clk);
      #1;
      for (int n = 0; n < 3; n++) if (ack[n]) req[n] = 0;
      ack = 0;
    end
    failures += rot_bad;
    checks++; if (served < 1000) begin failures++; $display("FAIL only %0d requests served", served); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (10000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
