// regfile: register file of the RISC, written in the fourth (store) stage.
//
// Sixteen 16-bit registers. A 4-to-16 decoder on dst, gated by reg_wr_vld,
// picks the register to write at the clock edge. load_op chooses the data:
// the data cache output dcdataout for a load, the execution unit's result
// rslt otherwise. All sixteen registers are brought out at once on regs,
// where the execution unit's operand multiplexers pick from them.
//
// Interface: clk, rst (synchronous, active high), reg_wr_vld, load_op, dst,
// rslt, dcdataout in; regs out.
// Timing: a write is visible on regs right after the clock edge that
// performs it; there is no write-to-read bypass. Reset clears all registers.
// The decoder, the two write sources and the sixteen outputs follow the
// source design; clearing on reset is this design's choice.
module regfile
  import risc_pkg::*;
(
  input  logic   clk,
  input  logic   rst,
  input  logic   reg_wr_vld,
  input  logic   load_op,
  input  raddr_t dst,
  input  word_t  rslt,
  input  word_t  dcdataout,
  output regs_t  regs
);

  word_t wdata;
  logic [NREGS-1:0] wsel;

  assign wdata = load_op ? dcdataout : rslt;

  // Write-select decoder.
  always_comb begin
    wsel = '0;
    if (reg_wr_vld) wsel[dst] = 1'b1;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      regs <= '0;
    end else begin
      for (int i = 0; i < int'(NREGS); i++)
        if (wsel[i]) regs[i] <= wdata;
    end
  end

endmodule
