// crypto_processor: a 32-bit load/store processor for the arithmetic of
// symmetric block ciphers (AES and RC6).
//
// Blocks and connections:
//   control_decoder      FSM that sequences every instruction and drives the
//                        select lines SelA, SelB, SelC, SelD and Fetch
//   program_counter      next instruction address (increment or jump)
//   addr_mux (MUX)       memory address: PC when Fetch is high, else the
//                        instruction's operand address
//   crypto_memory        separate program and data memories; its output
//                        register drives the 32-bit data bus
//   instruction_register captures the instruction from the data bus
//   gp_registers         sixteen 32-bit registers
//   MUXA, MUXD           two reg_select_mux instances choosing the operands
//   crypto_alu           XOR, GF(2^8) multiply, shifts, rotates, MixColumn,
//                        word matrix multiply, fixed coefficient multiply,
//                        RC6 x(2x+1)
// The ALU output is latched in the OPERAND_FETCH state and written to the
// register block in STORE_RESULT; a LOAD writes the data bus instead. A
// STORE writes the MUXA operand to data memory.
//
// Operation: hold rst high for a cycle, fill the memories through the host
// port, then pulse start. busy stays high until a HALT instruction. Results
// are read back from data memory through the host port. Cycle counts per
// instruction are given in control_decoder.
module crypto_processor
  import crypto_pkg::*;
#(
  parameter int unsigned ADDR_W      = 8,
  parameter logic [7:0]  POLY        = AES_POLY,
  parameter logic [7:0]  FIXED_COEFF = 8'h02
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              start,
  output logic              busy,
  output state_e            state_o,
  output logic [ADDR_W-1:0] pc_o,
  // host access to the memories
  input  logic              host_we,
  input  logic              host_prog,
  input  logic [ADDR_W-1:0] host_addr,
  input  logic [XLEN-1:0]   host_wdata,
  output logic [XLEN-1:0]   host_rdata
);

  // control lines
  logic                 fetch, mem_rd, mem_wr, ir_load, pc_inc, pc_load;
  logic                 alu_latch, reg_we, wb_from_mem;
  logic [REG_IDX_W-1:0] sel_a, sel_b, sel_d;
  opcode_e              sel_c;

  // datapath
  logic [XLEN-1:0]      data_bus;
  logic [XLEN-1:0]      regs [NREGS];
  logic [XLEN-1:0]      opnd_a, opnd_b, alu_y, alu_q, reg_wdata;
  logic [ADDR_W-1:0]    pc_out, ops_addr, mem_addr;
  opcode_e              ir_opcode;
  logic [REG_IDX_W-1:0] ir_rd, ir_ra, ir_rb;
  opcode_e              bus_opcode;

  // Opcode field of the word on the data bus, decoded while it is loaded.
  assign bus_opcode = opcode_e'(data_bus[XLEN-1 -: 4]);

  control_decoder u_ctrl (
    .clk, .rst, .start,
    .bus_opcode,
    .ir_opcode, .ir_rd, .ir_ra, .ir_rb,
    .state      (state_o),
    .fetch, .mem_rd, .mem_wr, .ir_load, .pc_inc, .pc_load,
    .alu_latch, .reg_we, .wb_from_mem,
    .sel_a, .sel_b, .sel_c, .sel_d,
    .busy
  );

  program_counter #(.ADDR_W(ADDR_W)) u_pc (
    .clk, .rst, .load_pc(pc_load), .inc(pc_inc), .ops_addr, .pc_out
  );

  addr_mux #(.ADDR_W(ADDR_W)) u_mux (
    .fetch, .pc_out, .ops_addr, .addr(mem_addr)
  );

  crypto_memory #(.ADDR_W(ADDR_W)) u_mem (
    .clk, .rst, .fetch, .mem_rd, .mem_wr,
    .addr(mem_addr), .wdata(opnd_a), .data_reg(data_bus),
    .host_we, .host_prog, .host_addr, .host_wdata, .host_rdata
  );

  instruction_register #(.ADDR_W(ADDR_W)) u_ir (
    .clk, .rst, .load(ir_load), .data_bus,
    .opcode(ir_opcode), .rd(ir_rd), .ra(ir_ra), .rb(ir_rb), .ops_addr
  );

  assign reg_wdata = wb_from_mem ? data_bus : alu_q;

  gp_registers u_regs (
    .clk, .rst, .we(reg_we), .sel_d, .wdata(reg_wdata), .regs_o(regs)
  );

  reg_select_mux u_muxa (.regs_i(regs), .sel(sel_a), .y(opnd_a));
  reg_select_mux u_muxd (.regs_i(regs), .sel(sel_b), .y(opnd_b));

  crypto_alu #(.POLY(POLY), .FIXED_COEFF(FIXED_COEFF)) u_alu (
    .a(opnd_a), .b(opnd_b), .sel_c, .y(alu_y)
  );

  // ALU result register, loaded in OPERAND_FETCH.
  always_ff @(posedge clk) begin
    if (rst)            alu_q <= '0;
    else if (alu_latch) alu_q <= alu_y;
  end

  assign pc_o = pc_out;

  initial assert (ADDR_W >= 1 && ADDR_W <= 16)
    else $error("ADDR_W must lie in 1..16: the operand address field is 16 bits");

endmodule
