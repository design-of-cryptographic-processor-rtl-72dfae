// tb_crypto_processor: end-to-end test of the processor at its default
// size (256-word program and data memories).
//
// The testbench writes a random program and random data through the host
// port and runs it in two parts separated by a HALT and a new start. The
// program loads all sixteen registers, runs every ALU operation on random
// registers, mixes in stores, reloads of stored words, NOPs, a reserved
// opcode and a jump that skips an instruction, and finally stores all
// sixteen registers. A reference model written here (instruction set
// simulator with its own GF(2^8), MixColumn, matrix, shift and RC6
// arithmetic) executes the same program. Checked: every data memory word
// afterwards, the PC at each HALT, and the number of clock cycles of each
// part against the cycle counts of the instruction classes (ALU op 3,
// LOAD 4, STORE 3, JMP 3, NOP 2, plus one FETCH after start and one DECODE
// for the HALT). Also counted, and required to happen: every opcode, a
// fetch overlapping a register write-back, a HALT followed by a restart,
// and the reset state.
module tb_crypto_processor;
  import crypto_pkg::*;

  localparam int AW    = 8;
  localparam int DEPTH = 1 << AW;

  logic          clk = 0, rst, start, busy;
  state_e        state_o;
  logic [AW-1:0] pc_o;
  logic          host_we, host_prog;
  logic [AW-1:0] host_addr;
  logic [31:0]   host_wdata, host_rdata;

  crypto_processor dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 15) $display("FAIL %s got %h expected %h", what, got, exp);
    end
  endtask

  // ---------------- reference arithmetic ----------------
  function automatic logic [7:0] ref_gf(input logic [7:0] x, input logic [7:0] y8);
    logic [8:0] aa;
    logic [7:0] r;
    aa = {1'b0, x};
    r  = 0;
    for (int i = 0; i < 8; i++) begin
      if (y8[i]) r ^= aa[7:0];
      aa = aa << 1;
      if (aa[8]) aa ^= 9'h11B;
    end
    return r;
  endfunction

  function automatic logic [31:0] ref_alu(input opcode_e o, input logic [31:0] x,
                                          input logic [31:0] z);
    logic [31:0] r;
    logic [7:0]  xb [4], zb [4], rb [4];
    logic [63:0] wide;
    int          s;
    for (int i = 0; i < 4; i++) begin
      xb[i] = x[8*i +: 8];
      zb[i] = z[8*i +: 8];
    end
    s = int'(z[4:0]);
    case (o)
      OP_ADD:   r = x ^ z;
      OP_GFMUL: begin
        for (int i = 0; i < 4; i++) rb[i] = ref_gf(xb[i], zb[i]);
        r = {rb[3], rb[2], rb[1], rb[0]};
      end
      OP_SHL: begin r = x; repeat (s) r = {r[30:0], 1'b0}; end
      OP_SHR: begin r = x; repeat (s) r = {1'b0, r[31:1]}; end
      OP_ROL: begin r = x; repeat (s) r = {r[30:0], r[31]}; end
      OP_ROR: begin r = x; repeat (s) r = {r[0], r[31:1]}; end
      OP_MIXCOL: begin
        rb[0] = ref_gf(xb[0], 2) ^ ref_gf(xb[1], 3) ^ xb[2] ^ xb[3];
        rb[1] = xb[0] ^ ref_gf(xb[1], 2) ^ ref_gf(xb[2], 3) ^ xb[3];
        rb[2] = xb[0] ^ xb[1] ^ ref_gf(xb[2], 2) ^ ref_gf(xb[3], 3);
        rb[3] = ref_gf(xb[0], 3) ^ xb[1] ^ xb[2] ^ ref_gf(xb[3], 2);
        r = {rb[3], rb[2], rb[1], rb[0]};
      end
      OP_MATMUL: begin
        for (int k = 0; k < 4; k++) begin
          rb[k] = 0;
          for (int i = 0; i < 4; i++) rb[k] ^= ref_gf(xb[(k + 4 - i) % 4], zb[i]);
        end
        r = {rb[3], rb[2], rb[1], rb[0]};
      end
      OP_FCM: begin
        for (int i = 0; i < 4; i++) rb[i] = ref_gf(xb[i], 8'h02);
        r = {rb[3], rb[2], rb[1], rb[0]};
      end
      OP_RC6F: begin
        wide = {32'b0, x} * ({32'b0, x} * 64'd2 + 64'd1);
        r = wide[31:0];
      end
      default: r = x;
    endcase
    return r;
  endfunction

  // ---------------- program construction ----------------
  logic [31:0] prog  [DEPTH];
  logic [31:0] dinit [DEPTH];
  int          plen;

  function automatic logic [31:0] enc(input opcode_e op, input int rd, input int ra,
                                      input int rb, input int addr);
    return {op, 4'(rd), 4'(ra), 4'(rb), 16'(addr)};
  endfunction

  opcode_e alu_ops [10] = '{OP_ADD, OP_GFMUL, OP_SHL, OP_SHR, OP_ROL, OP_ROR,
                            OP_MIXCOL, OP_MATMUL, OP_FCM, OP_RC6F};

  task automatic emit(input logic [31:0] w);
    prog[plen] = w;
    plen++;
  endtask

  task automatic emit_random_block(input int n);
    for (int k = 0; k < n; k++) begin
      int c;
      c = $urandom_range(9);
      if (k < 10)      emit(enc(alu_ops[k], $urandom_range(15), $urandom_range(15), $urandom_range(15), 0));
      else if (c < 6)  emit(enc(alu_ops[$urandom_range(9)], $urandom_range(15), $urandom_range(15),
                                $urandom_range(15), 0));
      else if (c == 6) emit(enc(OP_STORE, 0, $urandom_range(15), 0, 32 + $urandom_range(31)));
      else if (c == 7) emit(enc(OP_LOAD, $urandom_range(15), 0, 0, $urandom_range(63)));
      else if (c == 8) emit(enc(OP_NOP, 0, 0, 0, 0));
      else             emit(enc(OP_RSV, $urandom_range(15), 0, 0, 0));
    end
  endtask

  // ---------------- reference model ----------------
  logic [31:0] mreg [NREGS];
  logic [31:0] mdat [DEPTH];
  int          mpc;

  // Runs from mpc to the next HALT; returns the expected cycle count from
  // the start pulse until the processor is idle again.
  function automatic int model_run();
    int cyc;
    instr_t ins;
    cyc = 1;                              // FETCH after start
    forever begin
      ins = instr_t'(prog[mpc]);
      mpc = (mpc + 1) % DEPTH;
      if (is_alu_op(ins.opcode)) begin
        mreg[ins.rd] = ref_alu(ins.opcode, mreg[ins.ra], mreg[ins.rb]);
        cyc += 3;
      end else begin
        case (ins.opcode)
          OP_LOAD:  begin mreg[ins.rd] = mdat[ins.addr[AW-1:0]]; cyc += 4; end
          OP_STORE: begin mdat[ins.addr[AW-1:0]] = mreg[ins.ra]; cyc += 3; end
          OP_JMP:   begin mpc = int'(ins.addr[AW-1:0]); cyc += 3; end
          OP_HALT:  begin cyc += 1; return cyc; end
          default:  cyc += 2;
        endcase
      end
    end
  endfunction

  // ---------------- mechanism counters ----------------
  int op_seen [16];
  int overlap_fetch = 0, restarts = 0, reset_seen = 0, jumps_taken = 0;

  always @(posedge clk) begin
    if (dut.u_ctrl.state == S_DECODE) op_seen[dut.bus_opcode]++;
    if (dut.u_ctrl.reg_we && dut.u_ctrl.mem_rd && dut.u_ctrl.fetch) overlap_fetch++;
    if (dut.u_ctrl.state == S_RESET) reset_seen++;
    if (dut.u_ctrl.pc_load) jumps_taken++;
  end

  task automatic run_part(input string name);
    int exp_cyc, cyc, exp_pc;
    exp_cyc = model_run();
    exp_pc  = mpc;
    start = 1;
    @(posedge clk); #1;
    start = 0;
    // cyc counts the cycles spent outside IDLE.
    cyc = 0;
    while (state_o != S_IDLE && cyc < 100000) begin
      @(posedge clk); #1;
      cyc++;
    end
    check({name, ": cycles"}, cyc, exp_cyc);
    check({name, ": PC after HALT"}, 32'(pc_o), exp_pc);
    check({name, ": busy low"}, 32'(busy), 0);
    $display("%s: %0d cycles", name, cyc);
  endtask

  initial begin
    int skip_at;
    rst = 1; start = 0; host_we = 0; host_prog = 0; host_addr = 0; host_wdata = 0;
    repeat (2) @(posedge clk);
    #1 rst = 0;

    // Data: random words everywhere.
    for (int i = 0; i < DEPTH; i++) dinit[i] = $urandom;

    // Part 1: load all registers, random work, a skipped store, HALT.
    plen = 0;
    for (int r = 0; r < NREGS; r++) emit(enc(OP_LOAD, r, 0, 0, r));
    emit_random_block(70);
    skip_at = plen;
    emit(enc(OP_JMP, 0, 0, 0, skip_at + 2));
    emit(enc(OP_STORE, 0, 1, 0, 250));     // skipped by the jump
    emit(enc(OP_HALT, 0, 0, 0, 0));
    // Part 2: more work, store every register, HALT.
    emit_random_block(70);
    for (int r = 0; r < NREGS; r++) emit(enc(OP_STORE, 0, r, 0, 128 + r));
    emit(enc(OP_HALT, 0, 0, 0, 0));
    for (int i = plen; i < DEPTH; i++) prog[i] = enc(OP_HALT, 0, 0, 0, 0);
    $display("program length %0d words", plen);

    // Host writes both memories.
    for (int i = 0; i < DEPTH; i++) begin
      host_we = 1; host_prog = 1; host_addr = AW'(i); host_wdata = prog[i];
      @(posedge clk); #1;
      host_prog = 0; host_wdata = dinit[i];
      @(posedge clk); #1;
    end
    host_we = 0;

    for (int i = 0; i < DEPTH; i++) mdat[i] = dinit[i];
    for (int r = 0; r < NREGS; r++) mreg[r] = 0;
    mpc = 0;

    check("idle before start", 32'(state_o), 32'(S_IDLE));
    run_part("part 1");
    repeat (3) @(posedge clk);
    #1 check("still idle", 32'(state_o), 32'(S_IDLE));
    restarts++;
    run_part("part 2");

    // Compare the whole data memory.
    for (int i = 0; i < DEPTH; i++) begin
      host_addr = AW'(i);
      @(posedge clk); #1;
      check($sformatf("data[%0d]", i), host_rdata, mdat[i]);
    end

    // Every mechanism must have happened.
    for (int o = 0; o < 16; o++) begin
      opcode_e op;
      op = opcode_e'(o);
      checks++;
      if (op_seen[o] == 0) begin
        failures++;
        $display("FAIL opcode %s never executed", op.name());
      end
    end
    checks++; if (overlap_fetch == 0) begin failures++; $display("FAIL no overlapped fetch"); end
    checks++; if (restarts == 0)      begin failures++; $display("FAIL no restart"); end
    checks++; if (reset_seen == 0)    begin failures++; $display("FAIL reset state never seen"); end
    checks++; if (jumps_taken == 0)   begin failures++; $display("FAIL no jump taken"); end
    for (int o = 0; o < 16; o++) $display("  %-10s executed %0d times", opcode_e'(o), op_seen[o]);
    $display("  overlapped fetches %0d, restarts %0d, jumps %0d", overlap_fetch, restarts, jumps_taken);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
