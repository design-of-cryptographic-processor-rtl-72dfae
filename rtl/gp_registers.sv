// gp_registers: the block of sixteen 32-bit general purpose registers.
//
// Every register is visible at once on regs_o, which feeds the two operand
// multiplexers MUXA and MUXD. One register is written per clock: when we is
// high at a rising edge, register sel_d (the controller's SelD line) takes
// wdata. The register count and width follow the processor description;
// the synchronous, active-high reset to zero is this design's choice.
module gp_registers
  import crypto_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 we,
  input  logic [REG_IDX_W-1:0] sel_d,
  input  logic [XLEN-1:0]      wdata,
  output logic [XLEN-1:0]      regs_o [NREGS]
);

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < NREGS; i++) regs_o[i] <= '0;
    end else if (we) begin
      regs_o[sel_d] <= wdata;
    end
  end

endmodule
