// tb_control_decoder: self-checking test of the controller FSM.
//
// The testbench plays the rest of the processor: it presents an opcode on
// the data bus during DECODE and keeps it as the instruction register's
// opcode afterwards. For a random stream of instructions it checks the state
// sequence and, in every state, the control lines (Fetch, memory read and
// write, IR load, PC increment and load, ALU latch, register write and its
// source) against a table of the expected behaviour, and the number of
// cycles each instruction class takes.
module tb_control_decoder;
  import crypto_pkg::*;

  logic       clk = 0, rst, start;
  opcode_e    bus_opcode, ir_opcode;
  logic [3:0] ir_rd, ir_ra, ir_rb;
  state_e     state;
  logic       fetch, mem_rd, mem_wr, ir_load, pc_inc, pc_load, alu_latch, reg_we, wb_from_mem;
  logic [3:0] sel_a, sel_b, sel_d;
  opcode_e    sel_c;
  logic       busy;
  int checks = 0, failures = 0;

  control_decoder dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s got %0h expected %0h (state %s)", what, got, exp, state.name());
    end
  endtask

  // Expected control word {fetch, mem_rd, mem_wr, ir_load, pc_inc, pc_load,
  // alu_latch, reg_we, wb_from_mem} in a state, for the opcode in the IR.
  function automatic logic [8:0] expected(input state_e s, input opcode_e op);
    case (s)
      S_FETCH:         return 9'b110_000_000;
      S_DECODE:        return 9'b100_110_000;
      S_ADDR_SETUP:    return (op == OP_STORE) ? 9'b001_000_000 :
                              (op == OP_JMP)   ? 9'b000_001_000 : 9'b000_000_000;
      S_OPERAND_FETCH: return (op == OP_LOAD)  ? 9'b010_000_000 : 9'b000_000_100;
      S_STORE_RESULT:  return (op == OP_LOAD)  ? 9'b110_000_011 : 9'b110_000_010;
      default:         return 9'b000_000_000;
    endcase
  endfunction

  // Cycles from entering DECODE to entering the next DECODE.
  function automatic int cycles_of(input opcode_e op);
    if (is_alu_op(op)) return 3;
    case (op)
      OP_LOAD:                 return 4;
      OP_STORE, OP_JMP:        return 3;
      default:                 return 2;   // NOP, reserved
    endcase
  endfunction

  logic [8:0] ctl;
  assign ctl = {fetch, mem_rd, mem_wr, ir_load, pc_inc, pc_load, alu_latch, reg_we, wb_from_mem};

  // IR model: loaded in DECODE.
  always_ff @(posedge clk)
    if (rst)          ir_opcode <= OP_NOP;
    else if (ir_load) ir_opcode <= bus_opcode;

  initial begin
    int n_instr = 0;
    rst = 1; start = 0; bus_opcode = OP_NOP;
    ir_rd = 4'd3; ir_ra = 4'd5; ir_rb = 4'd9;
    @(posedge clk); #1;
    check("state in reset", state, S_RESET);
    rst = 0;
    @(posedge clk); #1;
    check("state after reset", state, S_IDLE);
    repeat (3) begin @(posedge clk); #1; check("waits in idle", state, S_IDLE); end
    check("busy in idle", busy, 0);
    check("select lines", {sel_a, sel_b, sel_d}, {4'd5, 4'd9, 4'd3});
    for (int run = 0; run < 20; run++) begin
      start = 1;
      @(posedge clk); #1;
      start = 0;
      check("start -> fetch", state, S_FETCH);
      check("fetch ctl", ctl, expected(S_FETCH, ir_opcode));
      @(posedge clk); #1;
      // Random instructions, then HALT.
      for (int k = 0; k < 30; k++) begin
        opcode_e op;
        int cyc;
        op = (k == 29) ? OP_HALT : opcode_e'($urandom_range(14));
        bus_opcode = op;
        check("decode state", state, S_DECODE);
        check("busy", busy, 1);
        check("decode ctl", ctl, expected(S_DECODE, op));
        cyc = 0;
        do begin
          @(posedge clk); #1;
          cyc++;
          bus_opcode = OP_NOP;
          if (state != S_DECODE && state != S_IDLE)
            check("ctl", ctl, expected(state, ir_opcode));
          if (state == S_OPERAND_FETCH || state == S_STORE_RESULT)
            check("sel_c", sel_c, ir_opcode);
        end while (state != S_DECODE && state != S_IDLE && cyc < 10);
        if (op == OP_HALT) check("halt -> idle", {state, 32'(cyc)}, {S_IDLE, 32'd1});
        else               check($sformatf("cycles of %s", op.name()), cyc, cycles_of(op));
        n_instr++;
      end
    end
    $display("instructions run: %0d", n_instr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
