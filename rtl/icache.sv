// icache: instruction cache of the pipelined RISC, a preloaded read-only
// memory of DEPTH 16-bit instructions.
//
// The instruction unit drives the program counter in; the word at that
// address comes out combinationally in the same cycle, and the instruction
// unit registers it into its instruction register at the next clock edge.
// Addresses at or above DEPTH read as 0000, the NOP instruction, so a
// program counter that runs past the program executes NOPs.
//
// Interface: pc (PC_W bits) in, instruction (16 bits) out. No clock.
// The depth of 48 words, the 6-bit address and the combinational read follow
// the source design; the contents come from the INIT parameter, whose
// default is the demonstration program of risc_pkg.
module icache
  import risc_pkg::*;
#(
  parameter int unsigned   DEPTH = IC_DEPTH,
  parameter icache_image_t INIT  = demo_program()
) (
  input  pc_t   pc,
  output word_t instruction
);

  // The image is a constant, so this synthesizes to a ROM (or to LUTs).
  always_comb begin
    if (int'(pc) < int'(DEPTH)) instruction = INIT[pc];
    else                        instruction = '0;
  end

endmodule
