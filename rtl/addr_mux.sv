// addr_mux: the memory address multiplexer (MUX).
//
// While the controller's Fetch line is high the program counter addresses the
// memory; otherwise the operand address taken from the instruction register
// does. Purely combinational.
module addr_mux #(
  parameter int unsigned ADDR_W = 8
) (
  input  logic              fetch,
  input  logic [ADDR_W-1:0] pc_out,
  input  logic [ADDR_W-1:0] ops_addr,
  output logic [ADDR_W-1:0] addr
);

  assign addr = fetch ? pc_out : ops_addr;

endmodule
