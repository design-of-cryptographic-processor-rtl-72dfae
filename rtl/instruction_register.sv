// instruction_register: holds the instruction read from program memory.
//
// When load is high at a rising clock edge the word on the data bus is
// captured. The held word is split into its fields: the operation code, the
// destination and two source register addresses, and the operand address,
// which goes to the program counter and to the address multiplexer. The
// field layout (see crypto_pkg::instr_t) is this design's choice. Reset
// clears the register, which reads as a NOP.
module instruction_register
  import crypto_pkg::*;
#(
  parameter int unsigned ADDR_W = 8
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 load,
  input  logic [XLEN-1:0]      data_bus,
  output opcode_e              opcode,
  output logic [REG_IDX_W-1:0] rd,
  output logic [REG_IDX_W-1:0] ra,
  output logic [REG_IDX_W-1:0] rb,
  output logic [ADDR_W-1:0]    ops_addr
);

  instr_t ireg;

  always_ff @(posedge clk) begin
    if (rst)       ireg <= '0;
    else if (load) ireg <= instr_t'(data_bus);
  end

  assign opcode   = ireg.opcode;
  assign rd       = ireg.rd;
  assign ra       = ireg.ra;
  assign rb       = ireg.rb;
  assign ops_addr = ireg.addr[ADDR_W-1:0];

endmodule
