// alu: combinational 16-bit ALU of the execution unit.
//
// Operations by opcode (a = operand A, b = operand B):
//   ADD a+b, SUB a-b, AND a&b, OR a|b, XOR a^b, INC a+1, DEC a-1,
//   NOT ~a (ones' complement), NEG -a (two's complement),
//   SHR a>>1 logical, SHL a<<1, ROR rotate right by 1, ROL rotate left by 1.
// Sums wrap modulo 2^16; no carry or flags are produced, since the
// instruction set has no instruction that could read them. NOP, LD and ST
// produce zero here (the execution unit handles LD and ST itself).
//
// Interface: op (opcode_t), a, b (16 bits) in; y (16 bits) out. No clock.
// The operation list and opcodes follow the source design; the single-bit
// shift and rotate distance and the absence of flags are this design's
// reading of it.
module alu
  import risc_pkg::*;
(
  input  opcode_t op,
  input  word_t   a,
  input  word_t   b,
  output word_t   y
);

  always_comb begin
    unique case (op)
      OP_ADD: y = a + b;
      OP_SUB: y = a - b;
      OP_AND: y = a & b;
      OP_OR:  y = a | b;
      OP_XOR: y = a ^ b;
      OP_INC: y = a + 16'd1;
      OP_DEC: y = a - 16'd1;
      OP_NOT: y = ~a;
      OP_NEG: y = ~a + 16'd1;
      OP_SHR: y = {1'b0, a[XLEN-1:1]};
      OP_SHL: y = {a[XLEN-2:0], 1'b0};
      OP_ROR: y = {a[0], a[XLEN-1:1]};
      OP_ROL: y = {a[XLEN-2:0], a[XLEN-1]};
      default: y = '0;
    endcase
  end

endmodule
