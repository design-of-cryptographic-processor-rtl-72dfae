// reg_select_mux: a 16-to-1 operand multiplexer.
//
// The processor has two of these, MUXA and MUXD. Each picks one of the
// sixteen general purpose registers, by the controller's SelA or SelB line,
// and hands it to the ALU as an operand. Purely combinational.
module reg_select_mux
  import crypto_pkg::*;
(
  input  logic [XLEN-1:0]      regs_i [NREGS],
  input  logic [REG_IDX_W-1:0] sel,
  output logic [XLEN-1:0]      y
);

  assign y = regs_i[sel];

endmodule
