// risc_pkg: types, sizes and preload images shared by the 16-bit four-stage
// pipelined RISC.
//
// The machine has 16-bit fixed-length instructions, sixteen 16-bit registers,
// a 48-word instruction cache addressed by a 6-bit program counter and a
// 32-word data cache addressed by a 5-bit address. Sixteen opcodes exist:
// NOP, fourteen register-to-register ALU operations, LD and ST.
//
// Instruction formats (bit 15 on the left):
//   ALU : [15:12] opcode  [11:8] operand A  [7:4] operand B  [3:0] destination
//   LD  : [15:12] 1110    [9:5] data cache address            [3:0] destination
//   ST  : [15:12] 1111    [8:5] source register               [4:0] data cache address
//
// The opcode numbering, the formats and the sizes follow the source design.
// The preload images below reproduce its demonstration program and data:
// sixteen loads fill r0..r15 from dcache[0..15], one instance of each ALU
// operation follows, and sixteen stores copy r0..r15 to dcache[16..31].
// The last three instruction words are NOPs. Words of the data cache above
// 15 start at zero, which is this design's choice.
package risc_pkg;

  localparam int unsigned XLEN      = 16;  // data and instruction width
  localparam int unsigned NREGS     = 16;  // register file entries
  localparam int unsigned RADDR_W   = 4;   // register address width
  localparam int unsigned PC_W      = 6;   // program counter width
  localparam int unsigned IC_DEPTH  = 48;  // instruction cache words
  localparam int unsigned DC_DEPTH  = 32;  // data cache words
  localparam int unsigned DC_ADDR_W = 5;   // data cache address width

  typedef logic [XLEN-1:0]    word_t;
  typedef logic [RADDR_W-1:0] raddr_t;
  typedef logic [PC_W-1:0]    pc_t;
  typedef logic [DC_ADDR_W-1:0] dcaddr_t;

  // All sixteen registers side by side, as the register file presents them
  // to the execution unit. regs[i] is register i.
  typedef word_t [NREGS-1:0] regs_t;

  typedef enum logic [3:0] {
    OP_NOP = 4'b0000,
    OP_ADD = 4'b0001,
    OP_SUB = 4'b0010,
    OP_AND = 4'b0011,
    OP_OR  = 4'b0100,
    OP_XOR = 4'b0101,
    OP_INC = 4'b0110,
    OP_DEC = 4'b0111,
    OP_NOT = 4'b1000,
    OP_NEG = 4'b1001,
    OP_SHR = 4'b1010,
    OP_SHL = 4'b1011,
    OP_ROR = 4'b1100,
    OP_ROL = 4'b1101,
    OP_LD  = 4'b1110,
    OP_ST  = 4'b1111
  } opcode_t;

  typedef word_t [IC_DEPTH-1:0] icache_image_t;
  typedef word_t [DC_DEPTH-1:0] dcache_image_t;

  // Instruction encoders.
  function automatic word_t enc_ld(dcaddr_t addr, raddr_t d);
    return {OP_LD, 2'b00, addr, 1'b0, d};
  endfunction

  function automatic word_t enc_st(raddr_t s, dcaddr_t addr);
    return {OP_ST, 3'b000, s, addr};
  endfunction

  // Demonstration program: LD ri <- dcache[i] for i = 0..15; one of each ALU
  // operation, opcodes 1 to 13 in order; ST ri -> dcache[16+i] for
  // i = 0..15; NOP to the end of the cache.
  function automatic icache_image_t demo_program();
    icache_image_t img;
    // {operand A, operand B, destination} of the k-th ALU instruction
    logic [11:0] alu_fields [13] = '{12'h010, 12'h127, 12'h236, 12'h345,
                                     12'h454, 12'h563, 12'h678, 12'h709,
                                     12'h01a, 12'h12b, 12'h23c, 12'h34d,
                                     12'h45e};
    img = '0;
    for (int i = 0; i < 16; i++) img[i] = enc_ld(dcaddr_t'(i), raddr_t'(i));
    for (int k = 0; k < 13; k++) img[16+k] = {4'(k + 1), alu_fields[k]};
    for (int i = 0; i < 16; i++) img[29+i] = enc_st(raddr_t'(i), dcaddr_t'(16 + i));
    return img;
  endfunction

  // Demonstration data: dcache[0..15] hold the initial register values.
  function automatic dcache_image_t demo_data();
    dcache_image_t img;
    word_t init [16] = '{16'h0000, 16'h0044, 16'h0088, 16'h00bb,
                         16'h00ff, 16'h4400, 16'h8800, 16'hbb00,
                         16'h2200, 16'h4400, 16'h8800, 16'haa00,
                         16'hbb00, 16'hcc00, 16'hdd00, 16'hff00};
    img = '0;
    for (int i = 0; i < 16; i++) img[i] = init[i];
    return img;
  endfunction

endpackage
