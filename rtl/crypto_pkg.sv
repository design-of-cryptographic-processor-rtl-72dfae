// crypto_pkg: types, constants and arithmetic shared by the cryptographic
// processor.
//
// The processor works on 32-bit words held in sixteen general purpose
// registers. Its arithmetic follows the AES and RC6 ciphers: addition is
// bitwise XOR, multiplication is carried out in GF(2^8) on each byte of a
// word, and a word is treated either as an AES state column (MixColumn) or as
// a polynomial of degree 3 with GF(2^8) coefficients (word matrix
// multiplication). The reduction polynomial is passed to every function as an
// argument so that any irreducible polynomial of degree 8 can be used; the
// AES one, x^8 + x^4 + x^3 + x + 1, is the default.
//
// The instruction encoding and the state encoding of the controller are this
// design's own choices; the operations and the controller's states come from
// the processor description.
package crypto_pkg;

  localparam int unsigned XLEN      = 32;  // register and data bus width
  localparam int unsigned NREGS     = 16;  // sixteen general purpose registers
  localparam int unsigned REG_IDX_W = 4;   // width of a register index

  // Low eight bits of the AES reduction polynomial x^8 + x^4 + x^3 + x + 1.
  localparam logic [7:0] AES_POLY = 8'h1B;

  // Operation codes. The same code drives the ALU select line (SelC).
  typedef enum logic [3:0] {
    OP_NOP    = 4'd0,   // no operation
    OP_LOAD   = 4'd1,   // R[rd] <= DMEM[addr]
    OP_STORE  = 4'd2,   // DMEM[addr] <= R[ra]
    OP_ADD    = 4'd3,   // modulo-2 addition: R[rd] <= R[ra] ^ R[rb]
    OP_GFMUL  = 4'd4,   // byte-wise GF(2^8) product of R[ra] and R[rb]
    OP_SHL    = 4'd5,   // logical shift left by R[rb][4:0]
    OP_SHR    = 4'd6,   // logical shift right by R[rb][4:0]
    OP_ROL    = 4'd7,   // circular shift left by R[rb][4:0]
    OP_ROR    = 4'd8,   // circular shift right by R[rb][4:0]
    OP_MIXCOL = 4'd9,   // AES MixColumn of R[ra]
    OP_MATMUL = 4'd10,  // word matrix multiplication of R[ra] and R[rb]
    OP_FCM    = 4'd11,  // each byte of R[ra] times a fixed coefficient
    OP_RC6F   = 4'd12,  // RC6 function x(2x+1) mod 2^32 of R[ra]
    OP_JMP    = 4'd13,  // PC <= addr
    OP_RSV    = 4'd14,  // reserved, executed as NOP
    OP_HALT   = 4'd15   // stop and return to the idle state
  } opcode_e;

  // 32-bit instruction word.
  typedef struct packed {
    opcode_e               opcode;  // [31:28]
    logic [REG_IDX_W-1:0]  rd;      // [27:24] destination register (SelD)
    logic [REG_IDX_W-1:0]  ra;      // [23:20] first source register (SelA)
    logic [REG_IDX_W-1:0]  rb;      // [19:16] second source register (SelB)
    logic [15:0]           addr;    // [15:0]  operand / jump address
  } instr_t;

  // States of the control and decoder FSM.
  typedef enum logic [2:0] {
    S_RESET         = 3'd0,
    S_IDLE          = 3'd1,
    S_FETCH         = 3'd2,
    S_DECODE        = 3'd3,  // decode and load
    S_ADDR_SETUP    = 3'd4,
    S_OPERAND_FETCH = 3'd5,
    S_STORE_RESULT  = 3'd6
  } state_e;

  // Returns 1 for the opcodes that the ALU evaluates and that write R[rd].
  function automatic logic is_alu_op(input opcode_e op);
    case (op)
      OP_ADD, OP_GFMUL, OP_SHL, OP_SHR, OP_ROL, OP_ROR,
      OP_MIXCOL, OP_MATMUL, OP_FCM, OP_RC6F: return 1'b1;
      default:                               return 1'b0;
    endcase
  endfunction

  // Multiplication by x in GF(2^8): shift left one bit, reduce on carry.
  function automatic logic [7:0] xtime(input logic [7:0] a,
                                       input logic [7:0] poly);
    return {a[6:0], 1'b0} ^ (a[7] ? poly : 8'h00);
  endfunction

  // GF(2^8) product by shift and add, most significant bit of b first.
  function automatic logic [7:0] gf_mul8(input logic [7:0] a,
                                         input logic [7:0] b,
                                         input logic [7:0] poly);
    logic [7:0] p;
    p = 8'h00;
    for (int i = 7; i >= 0; i--) begin
      p = xtime(p, poly);
      if (b[i]) p = p ^ a;
    end
    return p;
  endfunction

  // AES MixColumn of one column; byte 0 is bits [7:0]. Each output byte is
  // a row of the circulant matrix [2 3 1 1; 1 2 3 1; 1 1 2 3; 3 1 1 2].
  function automatic logic [31:0] mix_column(input logic [31:0] w,
                                             input logic [7:0]  poly);
    logic [7:0] a0, a1, a2, a3, c0, c1, c2, c3;
    a0 = w[7:0];  a1 = w[15:8];  a2 = w[23:16];  a3 = w[31:24];
    c0 = xtime(a0, poly) ^ xtime(a1, poly) ^ a1 ^ a2 ^ a3;
    c1 = a0 ^ xtime(a1, poly) ^ xtime(a2, poly) ^ a2 ^ a3;
    c2 = a0 ^ a1 ^ xtime(a2, poly) ^ xtime(a3, poly) ^ a3;
    c3 = xtime(a0, poly) ^ a0 ^ a1 ^ a2 ^ xtime(a3, poly);
    return {c3, c2, c1, c0};
  endfunction

  // Product of two words seen as polynomials with GF(2^8) coefficients,
  // reduced modulo x^4 + 1: d_k = XOR over i of a_(k-i mod 4) * b_i.
  function automatic logic [31:0] word_matmul(input logic [31:0] a,
                                              input logic [31:0] b,
                                              input logic [7:0]  poly);
    logic [7:0] d [4];
    for (int k = 0; k < 4; k++) begin
      d[k] = 8'h00;
      for (int i = 0; i < 4; i++)
        d[k] = d[k] ^ gf_mul8(a[8*((k - i + 4) % 4) +: 8], b[8*i +: 8], poly);
    end
    return {d[3], d[2], d[1], d[0]};
  endfunction

endpackage
