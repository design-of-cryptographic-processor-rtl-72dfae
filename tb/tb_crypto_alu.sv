// tb_crypto_alu: self-checking test of the ALU.
//
// Checks published AES values (the GF(2^8) products {57}x{83} = {c1} and
// {57}x{13} = {fe}, and two MixColumn test columns), then a few thousand
// random operands for every operation against reference models written here
// independently of the design: GF products by right-to-left shift and add
// with the full 9-bit AES polynomial, MixColumn and matrix multiplication
// from those products, shifts and rotates by loops, and the RC6 function
// with a wide multiply. A second ALU, built for the reduction polynomial
// x^8 + x^4 + x^3 + x^2 + 1 and the fixed coefficient {03}, is checked the
// same way on the GF operations, to show the polynomial is not wired to AES.
module tb_crypto_alu;
  import crypto_pkg::*;

  logic [31:0] a, b, y, y2;
  opcode_e     op;
  int checks = 0, failures = 0;

  crypto_alu dut (.a, .b, .sel_c(op), .y);
  crypto_alu #(.POLY(8'h1D), .FIXED_COEFF(8'h03)) dut2 (.a, .b, .sel_c(op), .y(y2));

  // Watchdog: the test is combinational and finishes well before this.
  initial begin
    #1ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [8:0] ref_poly = 9'h11B;   // polynomial used by the reference model

  function automatic logic [7:0] ref_gf(input logic [7:0] x, input logic [7:0] y8);
    logic [8:0] aa;
    logic [7:0] r;
    aa = {1'b0, x};
    r  = 0;
    for (int i = 0; i < 8; i++) begin
      if (y8[i]) r ^= aa[7:0];
      aa = aa << 1;
      if (aa[8]) aa ^= ref_poly;
    end
    return r;
  endfunction

  logic [7:0] ref_coeff = 8'h02;   // fixed coefficient used by the reference model

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
        rb[0] = ref_gf(xb[0],zb[0]) ^ ref_gf(xb[3],zb[1]) ^ ref_gf(xb[2],zb[2]) ^ ref_gf(xb[1],zb[3]);
        rb[1] = ref_gf(xb[1],zb[0]) ^ ref_gf(xb[0],zb[1]) ^ ref_gf(xb[3],zb[2]) ^ ref_gf(xb[2],zb[3]);
        rb[2] = ref_gf(xb[2],zb[0]) ^ ref_gf(xb[1],zb[1]) ^ ref_gf(xb[0],zb[2]) ^ ref_gf(xb[3],zb[3]);
        rb[3] = ref_gf(xb[3],zb[0]) ^ ref_gf(xb[2],zb[1]) ^ ref_gf(xb[1],zb[2]) ^ ref_gf(xb[0],zb[3]);
        r = {rb[3], rb[2], rb[1], rb[0]};
      end
      OP_FCM: begin
        for (int i = 0; i < 4; i++) rb[i] = ref_gf(xb[i], ref_coeff);
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

  task automatic check(input opcode_e o, input logic [31:0] x, input logic [31:0] z,
                       input logic [31:0] exp);
    op = o; a = x; b = z;
    #1;
    checks++;
    if (y !== exp) begin
      failures++;
      if (failures < 10)
        $display("FAIL %s a=%h b=%h y=%h expected %h", o.name(), x, z, y, exp);
    end
  endtask

  opcode_e ops [11] = '{OP_ADD, OP_GFMUL, OP_SHL, OP_SHR, OP_ROL, OP_ROR,
                        OP_MIXCOL, OP_MATMUL, OP_FCM, OP_RC6F, OP_NOP};

  opcode_e gf_ops [4] = '{OP_GFMUL, OP_MIXCOL, OP_MATMUL, OP_FCM};

  initial begin
    // Published AES values.
    check(OP_GFMUL, 32'h57575757, 32'h83130183, 32'hc1fe57c1);
    check(OP_MIXCOL, 32'h455313db, 32'h0, 32'hbca14d8e);
    check(OP_MIXCOL, 32'h5c220af2, 32'h0, 32'h9d58dc9f);
    check(OP_MIXCOL, 32'h01010101, 32'h0, 32'h01010101);
    // MixColumn equals matrix multiplication by {03}x^3+{01}x^2+{01}x+{02}.
    check(OP_MATMUL, 32'h455313db, 32'h03010102, 32'hbca14d8e);
    check(OP_ROL, 32'h80000001, 32'd1, 32'h00000003);
    check(OP_ROR, 32'h80000001, 32'd1, 32'hc0000000);
    check(OP_RC6F, 32'd3, 32'd0, 32'd21);
    // Random operands for every operation.
    for (int n = 0; n < 3000; n++) begin
      logic [31:0] x, z;
      opcode_e o;
      x = $urandom;
      z = $urandom;
      o = ops[n % 11];
      check(o, x, z, ref_alu(o, x, z));
    end
    // Second ALU: another irreducible polynomial and coefficient.
    ref_poly  = 9'h11D;
    ref_coeff = 8'h03;
    for (int n = 0; n < 1000; n++) begin
      logic [31:0] x, z, exp;
      opcode_e o;
      x = $urandom;
      z = $urandom;
      o = gf_ops[n % 4];
      op = o; a = x; b = z;
      #1;
      exp = ref_alu(o, x, z);
      checks++;
      if (y2 !== exp) begin
        failures++;
        if (failures < 10)
          $display("FAIL poly 11D %s a=%h b=%h y=%h expected %h", o.name(), x, z, y2, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
