// iunit: instruction unit, the fetch stage of the pipelined RISC.
//
// A 6-bit program counter addresses the instruction cache and advances by
// one every clock. The word the cache returns is captured in the 16-bit
// instruction register ir, which feeds the decode unit. There is no branch
// instruction, so the counter only ever increments; it wraps from 63 to 0.
//
// Interface: clk, rst (synchronous, active high), instruction in from the
// icache; pc out to the icache, ir out to the decode unit.
// Timing: after reset pc = 0 and ir = 0000 (NOP). At each rising edge
// pc <= pc + 1 and ir <= icache[pc], so ir lags pc by one address.
// The counter, incrementer and instruction register follow the source
// design; the synchronous reset and the reset value of ir are this design's
// choice.
module iunit
  import risc_pkg::*;
(
  input  logic  clk,
  input  logic  rst,
  input  word_t instruction,
  output pc_t   pc,
  output word_t ir
);

  always_ff @(posedge clk) begin
    if (rst) begin
      pc <= '0;
      ir <= '0;
    end else begin
      pc <= pc + 1'b1;
      ir <= instruction;
    end
  end

endmodule
