// risc_system_top: the complete 16-bit four-stage pipelined RISC system.
//
// The processor core (risc_cpu_top) sits between its two separate memories,
// a Harvard arrangement: the instruction cache is read at the program
// counter, and the data cache is read by LD and written by ST in the store
// stage. Both memories are preloaded, by default with the demonstration
// program and data of risc_pkg, so that after reset the system runs the
// program with only a clock and a reset as inputs: 16 loads, 13 ALU
// operations and 16 stores, then NOPs until the 6-bit program counter wraps
// and the program runs again.
//
// Interface: clk, rst (synchronous, active high; hold it for at least one
// rising edge). All other ports are outputs for observation, the signals a
// logic analyser would watch on the board: pc, ir, the decoded opcode, the
// data cache strobes and address, the result bus, the register file write
// strobes and destination, and all sixteen registers.
// Timing: with rst released before edge 1, the instruction at address n is
// written back at edge n + 4 (its register changes right after that edge).
// IC_INIT and DC_INIT choose other memory contents.
// The structure follows the source design; the observation ports are this
// design's addition.
module risc_system_top
  import risc_pkg::*;
#(
  parameter icache_image_t IC_INIT = demo_program(),
  parameter dcache_image_t DC_INIT = demo_data()
) (
  input  logic    clk,
  input  logic    rst,
  output pc_t     pc,
  output word_t   ir,
  output opcode_t du_opcode,
  output logic    dcenbl,
  output logic    rdwr,
  output dcaddr_t dcaddr,
  output word_t   rslt,
  output logic    reg_wr_vld,
  output logic    load_op,
  output raddr_t  dst,
  output regs_t   regs
);

  word_t instruction;
  word_t dcdataout;

  icache #(.INIT(IC_INIT)) u_icache (
    .pc          (pc),
    .instruction (instruction)
  );

  risc_cpu_top u_cpu (
    .clk         (clk),
    .rst         (rst),
    .pc          (pc),
    .instruction (instruction),
    .dcenbl      (dcenbl),
    .rdwr        (rdwr),
    .dcaddr      (dcaddr),
    .dcdatain    (rslt),
    .dcdataout   (dcdataout),
    .ir          (ir),
    .du_opcode   (du_opcode),
    .reg_wr_vld  (reg_wr_vld),
    .load_op     (load_op),
    .eu_dst      (dst),
    .regs        (regs)
  );

  dcache #(.INIT(DC_INIT)) u_dcache (
    .clk       (clk),
    .dcenbl    (dcenbl),
    .rdwr      (rdwr),
    .dcaddr    (dcaddr),
    .dcdatain  (rslt),
    .dcdataout (dcdataout)
  );

endmodule
