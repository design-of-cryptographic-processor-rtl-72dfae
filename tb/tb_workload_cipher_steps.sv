// tb_workload_cipher_steps: runs cipher steps as programs on the processor.
//
// AES: MixColumns and AddRoundKey of round 1 of the FIPS-197 Appendix B
// example. The four columns of the state after ShiftRows are loaded into
// registers, each is passed through MIXCOL, XORed with the round-1 key word
// and stored. The same columns are also put through MATMUL with the
// coefficient word {03}x^3+{01}x^2+{01}x+{02}, which must give the same
// MixColumns result. Expected words are the published ones.
//
// RC6: the data-dependent part of a round, t = (B(2B+1)) <<< 5,
// u = (D(2D+1)) <<< 5, A' = (A ^ t) <<< u, C' = (C ^ u) <<< t, for random
// A, B, C, D, checked against integer arithmetic done here. (The key
// addition of RC6 uses an integer adder, which this processor does not have.)
//
// The cycle count of the whole program is checked against the per-class
// counts (ALU op 3, LOAD 4, STORE 3, plus FETCH and the HALT's DECODE).
module tb_workload_cipher_steps;
  import crypto_pkg::*;

  localparam int AW = 8;

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
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s got %h expected %h", what, got, exp);
    end
  endtask

  function automatic logic [31:0] enc(input opcode_e op, input int rd, input int ra,
                                      input int rb, input int addr);
    return {op, 4'(rd), 4'(ra), 4'(rb), 16'(addr)};
  endfunction

  function automatic logic [31:0] rotl(input logic [31:0] x, input int s);
    logic [63:0] d;
    d = {x, x} << (s % 32);
    return d[63:32];
  endfunction

  // FIPS-197 Appendix B, round 1: state after ShiftRows, after MixColumns,
  // and the round-1 key; one column per word, first byte in bits [7:0].
  logic [31:0] shifted [4] = '{32'h305dbfd4, 32'hae52b4e0, 32'hf11141b8, 32'he598271e};
  logic [31:0] mixed   [4] = '{32'he5816604, 32'h9a19cbe0, 32'h7ad3f848, 32'h4c260628};
  logic [31:0] rkey    [4] = '{32'h17fefaa0, 32'hb12c5488, 32'h3939a323, 32'h05766c2a};
  logic [31:0] round2  [4] = '{32'hf27f9ca4, 32'h2b359f68, 32'h43ea5b6b, 32'h49506a02};

  logic [31:0] prog [256];
  logic [31:0] dmem [256];
  int plen, exp_cyc;

  task automatic emit(input logic [31:0] w, input int cyc);
    prog[plen] = w;
    plen++;
    exp_cyc += cyc;
  endtask

  initial begin
    logic [31:0] ra, rb, rc, rd_, t, u, a2, c2;
    int cyc;
    rst = 1; start = 0; host_we = 0; host_prog = 0; host_addr = 0; host_wdata = 0;
    repeat (2) @(posedge clk);
    #1 rst = 0;

    for (int i = 0; i < 256; i++) dmem[i] = 0;
    for (int i = 0; i < 4; i++) begin
      dmem[i]     = shifted[i];
      dmem[4 + i] = rkey[i];
    end
    dmem[8] = 32'h03010102;      // MixColumns coefficient word
    dmem[9] = 32'd5;             // lg(w) for RC6 with w = 32
    ra = $urandom; rb = $urandom; rc = $urandom; rd_ = $urandom;
    dmem[10] = ra; dmem[11] = rb; dmem[12] = rc; dmem[13] = rd_;

    plen = 0;
    exp_cyc = 1;                 // FETCH after start
    // AES round-1 MixColumns and AddRoundKey.
    for (int i = 0; i < 4; i++) emit(enc(OP_LOAD, i, 0, 0, i), 4);
    for (int i = 0; i < 4; i++) emit(enc(OP_LOAD, 4 + i, 0, 0, 4 + i), 4);
    emit(enc(OP_LOAD, 8, 0, 0, 8), 4);
    for (int i = 0; i < 4; i++) begin
      emit(enc(OP_MATMUL, 9, i, 8, 0), 3);          // r9  = column x coeff word
      emit(enc(OP_STORE, 0, 9, 0, 32 + i), 3);
      emit(enc(OP_MIXCOL, i, i, 0, 0), 3);          // ri  = MixColumn(ri)
      emit(enc(OP_STORE, 0, i, 0, 16 + i), 3);
      emit(enc(OP_ADD, i, i, 4 + i, 0), 3);         // ri ^= round key
      emit(enc(OP_STORE, 0, i, 0, 20 + i), 3);
    end
    // RC6: registers 10..13 hold A..D, 9 holds 5.
    emit(enc(OP_LOAD, 9, 0, 0, 9), 4);
    for (int i = 0; i < 4; i++) emit(enc(OP_LOAD, 10 + i, 0, 0, 10 + i), 4);
    emit(enc(OP_RC6F, 14, 11, 0, 0), 3);            // B(2B+1)
    emit(enc(OP_ROL, 14, 14, 9, 0), 3);             // t
    emit(enc(OP_RC6F, 15, 13, 0, 0), 3);            // D(2D+1)
    emit(enc(OP_ROL, 15, 15, 9, 0), 3);             // u
    emit(enc(OP_ADD, 10, 10, 14, 0), 3);            // A ^ t
    emit(enc(OP_ROL, 10, 10, 15, 0), 3);            // (A ^ t) <<< u
    emit(enc(OP_ADD, 12, 12, 15, 0), 3);            // C ^ u
    emit(enc(OP_ROL, 12, 12, 14, 0), 3);            // (C ^ u) <<< t
    emit(enc(OP_STORE, 0, 14, 0, 40), 3);
    emit(enc(OP_STORE, 0, 15, 0, 41), 3);
    emit(enc(OP_STORE, 0, 10, 0, 42), 3);
    emit(enc(OP_STORE, 0, 12, 0, 43), 3);
    emit(enc(OP_HALT, 0, 0, 0, 0), 1);
    for (int i = plen; i < 256; i++) prog[i] = enc(OP_HALT, 0, 0, 0, 0);

    for (int i = 0; i < 256; i++) begin
      host_we = 1; host_prog = 1; host_addr = AW'(i); host_wdata = prog[i];
      @(posedge clk); #1;
      host_prog = 0; host_wdata = dmem[i];
      @(posedge clk); #1;
    end
    host_we = 0;

    start = 1;
    @(posedge clk); #1;
    start = 0;
    cyc = 0;
    while (state_o != S_IDLE && cyc < 10000) begin
      @(posedge clk); #1;
      cyc++;
    end
    check("program cycles", cyc, exp_cyc);
    $display("program of %0d instructions ran in %0d cycles", plen, cyc);

    t  = rotl(rb  * (2 * rb  + 1), 5);
    u  = rotl(rd_ * (2 * rd_ + 1), 5);
    a2 = rotl(ra ^ t, int'(u[4:0]));
    c2 = rotl(rc ^ u, int'(t[4:0]));

    for (int i = 0; i < 44; i++) begin
      logic [31:0] exp;
      logic        chk;
      host_addr = AW'(i);
      @(posedge clk); #1;
      chk = 1;
      if (i >= 16 && i < 20)      exp = mixed[i - 16];
      else if (i >= 20 && i < 24) exp = round2[i - 20];
      else if (i >= 32 && i < 36) exp = mixed[i - 32];
      else if (i == 40)           exp = t;
      else if (i == 41)           exp = u;
      else if (i == 42)           exp = a2;
      else if (i == 43)           exp = c2;
      else chk = 0;
      if (chk) check($sformatf("data[%0d]", i), host_rdata, exp);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
