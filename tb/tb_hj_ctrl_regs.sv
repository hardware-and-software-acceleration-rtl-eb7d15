// tb_hj_ctrl_regs: host-side sequence on the register port: program the four address
// halves and read them back, launch (control = 1 gives a one-cycle `launch`), let the cycle
// counter run for a known number of busy cycles, signal completion (control reads 2),
// check an unmapped address reads 0 and that writing another value does not launch.
module tb_hj_ctrl_regs;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic reg_wr = 0, reg_rd = 0, reg_rvalid, launch, busy = 0, finished = 0;
  logic [15:0] reg_addr = 0;
  logic [31:0] reg_wdata = 0, reg_rdata;
  logic [63:0] in_addr, out_addr;
  int launches = 0;
  hj_ctrl_regs dut (.*);
  always @(posedge clk) if (rst_n && launch) launches++;

  task automatic wr(logic [15:0] a, logic [31:0] d);
    @(negedge clk); reg_wr = 1; reg_addr = a; reg_wdata = d; @(negedge clk); reg_wr = 0;
  endtask
  task automatic rd_chk(logic [15:0] a, logic [31:0] e);
    @(negedge clk); reg_rd = 1; reg_addr = a; @(negedge clk); reg_rd = 0;
    checks++;
    if (!reg_rvalid || reg_rdata != e) begin failures++; $display("FAIL read %h = %h, want %h", a, reg_rdata, e); end
  endtask

  initial begin
    repeat (2) @(posedge clk); rst_n = 1;
    wr(16'h050C, 32'h1111_2222); wr(16'h0510, 32'h0000_0003);
    wr(16'h0514, 32'h4444_5555); wr(16'h0518, 32'h0000_0006);
    rd_chk(16'h050C, 32'h1111_2222); rd_chk(16'h0510, 32'h3);
    rd_chk(16'h0514, 32'h4444_5555); rd_chk(16'h0518, 32'h6);
    checks += 2;
    if (in_addr != 64'h3_1111_2222) failures++;
    if (out_addr != 64'h6_4444_5555) failures++;
    rd_chk(16'h0600, 32'h0);
    wr(16'h0500, 32'd1);
    @(negedge clk);
    checks++; if (launches != 1) failures++;
    rd_chk(16'h0500, 32'd1);
    @(negedge clk); busy = 1; repeat (25) @(negedge clk); busy = 0;
    rd_chk(16'h0504, 32'd25);
    @(negedge clk); finished = 1; @(negedge clk); finished = 0;
    rd_chk(16'h0500, 32'd2);
    wr(16'h0500, 32'd3);
    checks++; if (launches != 1) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (5000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
