// crypto_alu: the processor's arithmetic and logic unit.
//
// A purely combinational unit. Operand a comes from MUXA and operand b from
// MUXD; the operation is selected by the controller's SelC line, which
// carries the instruction's opcode. The operations are the ones the
// processor is built for, taken from AES and RC6:
//   OP_ADD     modulo-2 addition, a ^ b
//   OP_GFMUL   four independent GF(2^8) products, byte i of a times byte i of b
//   OP_SHL/SHR logical shift of a by b[4:0]
//   OP_ROL/ROR circular shift of a by b[4:0]
//   OP_MIXCOL  AES MixColumn of the column held in a (byte 0 in bits [7:0])
//   OP_MATMUL  word matrix multiplication: a and b as 4-term polynomials over
//              GF(2^8), multiplied modulo x^4 + 1
//   OP_FCM     fixed coefficient multiplier: each byte of a times FIXED_COEFF
//   OP_RC6F    the RC6 function a * (2a + 1) mod 2^32
// Any other code gives y = a. The reduction polynomial POLY (its low eight
// bits; x^8 is implied) can be set to any irreducible polynomial; the default
// is the AES one. Byte-wise GF multiplication, the fixed coefficient value and
// the shift amount taken from b[4:0] are this design's choices.
module crypto_alu
  import crypto_pkg::*;
#(
  parameter logic [7:0] POLY        = AES_POLY,
  parameter logic [7:0] FIXED_COEFF = 8'h02
) (
  input  logic [XLEN-1:0] a,
  input  logic [XLEN-1:0] b,
  input  opcode_e         sel_c,
  output logic [XLEN-1:0] y
);

  logic [4:0]      shamt;
  logic [XLEN-1:0] gf_bytes, fcm_bytes;

  assign shamt = b[4:0];

  always_comb begin
    for (int i = 0; i < 4; i++) begin
      gf_bytes[8*i +: 8]  = gf_mul8(a[8*i +: 8], b[8*i +: 8], POLY);
      fcm_bytes[8*i +: 8] = gf_mul8(a[8*i +: 8], FIXED_COEFF, POLY);
    end
  end

  always_comb begin
    unique case (sel_c)
      OP_ADD:    y = a ^ b;
      OP_GFMUL:  y = gf_bytes;
      OP_SHL:    y = a << shamt;
      OP_SHR:    y = a >> shamt;
      OP_ROL:    y = (a << shamt) | (a >> ((6'd32 - {1'b0, shamt}) & 6'd31));
      OP_ROR:    y = (a >> shamt) | (a << ((6'd32 - {1'b0, shamt}) & 6'd31));
      OP_MIXCOL: y = mix_column(a, POLY);
      OP_MATMUL: y = word_matmul(a, b, POLY);
      OP_FCM:    y = fcm_bytes;
      OP_RC6F:   y = a * {a[XLEN-2:0], 1'b1};
      default:   y = a;
    endcase
  end

endmodule
