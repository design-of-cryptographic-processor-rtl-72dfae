// control_decoder: the processor's controller, a finite state machine.
//
// States: RESET, IDLE, FETCH, DECODE (decode and load), ADDR_SETUP,
// OPERAND_FETCH and STORE_RESULT. After reset the machine waits in IDLE
// until start is pulsed, then runs instructions until a HALT returns it to
// IDLE.
//   FETCH         Fetch high, so the PC addresses program memory; memory read.
//   DECODE        the instruction word on the data bus is loaded into the
//                 instruction register, the PC is incremented, and the opcode
//                 on the bus chooses the next state.
//   ADDR_SETUP    Fetch low, so the operand address reaches memory: a STORE
//                 writes R[SelA], a JMP loads the PC.
//   OPERAND_FETCH a LOAD reads data memory; an ALU operation gets its
//                 operands through MUXA (SelA) and MUXD (SelB) and its result
//                 is latched.
//   STORE_RESULT  R[SelD] is written, from the ALU or, for a LOAD, from the
//                 data bus. In the same cycle the memory, otherwise idle,
//                 fetches the next instruction, so the machine goes straight
//                 to DECODE.
// The overlap gives three stages (fetch, decode/operand, execute/write-back)
// with at most two instructions in flight. Cycles from one DECODE to the
// next: ALU op 3, LOAD 4, STORE 3, JMP 3, NOP 2; a HALT leaves DECODE for IDLE,
// and start costs one FETCH cycle before the first DECODE.
// The state names and select lines (SelA for MUXA, SelB for MUXD, SelC for
// the ALU, SelD for the register block, Fetch for the address multiplexer)
// follow the processor description. SelA, SelB, SelC and SelD are the
// instruction register's ra, rb, opcode and rd fields, passed through
// unchanged: each instruction holds them for all of its states, so they
// need no decoding. The transitions, the overlap and the
// cycle counts are this design's own.
module control_decoder
  import crypto_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 start,
  input  opcode_e              bus_opcode,   // opcode field of the data bus
  input  opcode_e              ir_opcode,    // fields of the instruction register
  input  logic [REG_IDX_W-1:0] ir_rd,
  input  logic [REG_IDX_W-1:0] ir_ra,
  input  logic [REG_IDX_W-1:0] ir_rb,
  output state_e               state,
  output logic                 fetch,
  output logic                 mem_rd,
  output logic                 mem_wr,
  output logic                 ir_load,
  output logic                 pc_inc,
  output logic                 pc_load,
  output logic                 alu_latch,
  output logic                 reg_we,
  output logic                 wb_from_mem,
  output logic [REG_IDX_W-1:0] sel_a,
  output logic [REG_IDX_W-1:0] sel_b,
  output opcode_e              sel_c,
  output logic [REG_IDX_W-1:0] sel_d,
  output logic                 busy
);

  state_e state_nx;

  always_ff @(posedge clk) begin
    if (rst) state <= S_RESET;
    else     state <= state_nx;
  end

  assign sel_a = ir_ra;
  assign sel_b = ir_rb;
  assign sel_c = ir_opcode;
  assign sel_d = ir_rd;
  assign busy  = (state != S_RESET) && (state != S_IDLE);

  always_comb begin
    state_nx    = state;
    fetch       = 1'b0;
    mem_rd      = 1'b0;
    mem_wr      = 1'b0;
    ir_load     = 1'b0;
    pc_inc      = 1'b0;
    pc_load     = 1'b0;
    alu_latch   = 1'b0;
    reg_we      = 1'b0;
    wb_from_mem = 1'b0;
    unique case (state)
      S_RESET: state_nx = S_IDLE;
      S_IDLE:  if (start) state_nx = S_FETCH;
      S_FETCH: begin
        fetch    = 1'b1;
        mem_rd   = 1'b1;
        state_nx = S_DECODE;
      end
      S_DECODE: begin
        fetch   = 1'b1;
        ir_load = 1'b1;
        pc_inc  = 1'b1;
        if (is_alu_op(bus_opcode)) state_nx = S_OPERAND_FETCH;
        else begin
          case (bus_opcode)
            OP_LOAD, OP_STORE, OP_JMP: state_nx = S_ADDR_SETUP;
            OP_HALT:                   state_nx = S_IDLE;
            default:                   state_nx = S_FETCH;
          endcase
        end
      end
      S_ADDR_SETUP: begin
        case (ir_opcode)
          OP_STORE: begin mem_wr  = 1'b1; state_nx = S_FETCH; end
          OP_JMP:   begin pc_load = 1'b1; state_nx = S_FETCH; end
          default:  state_nx = S_OPERAND_FETCH;   // OP_LOAD
        endcase
      end
      S_OPERAND_FETCH: begin
        if (ir_opcode == OP_LOAD) mem_rd = 1'b1;
        else                      alu_latch = 1'b1;
        state_nx = S_STORE_RESULT;
      end
      S_STORE_RESULT: begin
        reg_we      = 1'b1;
        wb_from_mem = (ir_opcode == OP_LOAD);
        fetch       = 1'b1;
        mem_rd      = 1'b1;
        state_nx    = S_DECODE;
      end
      default: state_nx = S_RESET;
    endcase
  end

endmodule
