// hj_ctrl_regs: host-visible control registers of the accelerator.
//
// Six 32-bit registers reached from the host through a simple memory-mapped port
// (`reg_wr`/`reg_rd` with a byte address; read data returns one cycle later with
// `reg_rvalid`):
//   0x500 control  host writes 1 to launch; the accelerator writes 2 when it has finished,
//                  which the host polls for
//   0x504 cycle    clock cycles counted while the accelerator is busy (read only)
//   0x50C in_lsb   low / high halves of the 64-bit DRAM address of the input value array
//   0x510 in_msb
//   0x514 out_lsb  low / high halves of the 64-bit DRAM address of the output array
//   0x518 out_msb
// Other addresses read as 0. `launch` pulses for one cycle when 1 is written to control.
// Synchronous active-low reset clears every register.
module hj_ctrl_regs (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        reg_wr,
  input  logic        reg_rd,
  input  logic [15:0] reg_addr,
  input  logic [31:0] reg_wdata,
  output logic [31:0] reg_rdata,
  output logic        reg_rvalid,
  // to / from the accelerator
  output logic        launch,
  input  logic        busy,
  input  logic        finished,     // one-cycle pulse at the end of the computation
  output logic [63:0] in_addr,
  output logic [63:0] out_addr
);
  localparam logic [15:0] A_CONTROL = 16'h0500;
  localparam logic [15:0] A_CYCLE   = 16'h0504;
  localparam logic [15:0] A_IN_LSB  = 16'h050C;
  localparam logic [15:0] A_IN_MSB  = 16'h0510;
  localparam logic [15:0] A_OUT_LSB = 16'h0514;
  localparam logic [15:0] A_OUT_MSB = 16'h0518;

  logic [31:0] control, cycles;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      control    <= '0;
      cycles     <= '0;
      in_addr    <= '0;
      out_addr   <= '0;
      launch     <= 1'b0;
      reg_rdata  <= '0;
      reg_rvalid <= 1'b0;
    end else begin
      launch <= 1'b0;
      if (finished) control <= 32'd2;
      if (busy) cycles <= cycles + 1'b1;
      if (reg_wr) begin
        unique case (reg_addr)
          A_CONTROL: begin
            control <= reg_wdata;
            if (reg_wdata == 32'd1) begin
              launch <= 1'b1;
              cycles <= '0;
            end
          end
          A_IN_LSB:  in_addr[31:0]   <= reg_wdata;
          A_IN_MSB:  in_addr[63:32]  <= reg_wdata;
          A_OUT_LSB: out_addr[31:0]  <= reg_wdata;
          A_OUT_MSB: out_addr[63:32] <= reg_wdata;
          default: ;
        endcase
      end
      reg_rvalid <= reg_rd;
      if (reg_rd) begin
        unique case (reg_addr)
          A_CONTROL: reg_rdata <= control;
          A_CYCLE:   reg_rdata <= cycles;
          A_IN_LSB:  reg_rdata <= in_addr[31:0];
          A_IN_MSB:  reg_rdata <= in_addr[63:32];
          A_OUT_LSB: reg_rdata <= out_addr[31:0];
          A_OUT_MSB: reg_rdata <= out_addr[63:32];
          default:   reg_rdata <= '0;
        endcase
      end
    end
  end
endmodule
