// risc_cpu_top: processor core of the 16-bit four-stage pipelined RISC,
// without its memories.
//
// Four units form the pipeline, each ending in a register:
//   fetch   iunit    pc -> icache, instruction -> ir
//   decode  decode   ir -> opcode, dcaddr, opnda, opndb, dst
//   execute eunit    operand muxes + ALU + ctrl -> rslt, dst, dc_addr, strobes
//   store   regfile  regs[dst] <= rslt or dcdataout; dcache written with rslt
// A new instruction enters every clock and one completes every clock; an
// instruction fetched at program counter value n is written back at the
// fourth clock edge after pc showed n. There are no branches, stalls or
// bypasses.
//
// Interface: clk, rst (synchronous, active high). Instruction cache side:
// pc out, instruction in. Data cache side: dcenbl, rdwr, dcaddr, dcdatain
// out, dcdataout in. Observation outputs: ir, the decoded opcode, the
// store-stage strobes reg_wr_vld/load_op and destination dst, and all
// registers on regs.
// The data cache enable is forced low while rst is high. Two assertions
// state the strobe rules of the store stage.
// The unit partition and the wiring follow the source design; the
// observation outputs and the reset gating of dcenbl are this design's
// additions.
module risc_cpu_top
  import risc_pkg::*;
(
  input  logic    clk,
  input  logic    rst,
  // instruction cache
  output pc_t     pc,
  input  word_t   instruction,
  // data cache
  output logic    dcenbl,
  output logic    rdwr,
  output dcaddr_t dcaddr,
  output word_t   dcdatain,
  input  word_t   dcdataout,
  // observation
  output word_t   ir,
  output opcode_t du_opcode,
  output logic    reg_wr_vld,
  output logic    load_op,
  output raddr_t  eu_dst,
  output regs_t   regs
);

  dcaddr_t du_dcaddr;
  raddr_t  du_opnda_addr, du_opndb_addr, du_dst;
  word_t   eu_rslt;
  logic    eu_dcenbl;

  iunit u_iunit (
    .clk         (clk),
    .rst         (rst),
    .instruction (instruction),
    .pc          (pc),
    .ir          (ir)
  );

  decode u_decode (
    .clk    (clk),
    .rst    (rst),
    .instr  (ir),
    .opcode (du_opcode),
    .dcaddr (du_dcaddr),
    .opnda  (du_opnda_addr),
    .opndb  (du_opndb_addr),
    .dst    (du_dst)
  );

  eunit u_eunit (
    .clk        (clk),
    .rst        (rst),
    .opcode     (du_opcode),
    .dcaddrin   (du_dcaddr),
    .opnda_addr (du_opnda_addr),
    .opndb_addr (du_opndb_addr),
    .dstin      (du_dst),
    .regs       (regs),
    .dcenbl     (eu_dcenbl),
    .rdwr       (rdwr),
    .reg_wr_vld (reg_wr_vld),
    .load_op    (load_op),
    .dc_addr    (dcaddr),
    .rslt       (eu_rslt),
    .dst        (eu_dst)
  );

  regfile u_regfile (
    .clk        (clk),
    .rst        (rst),
    .reg_wr_vld (reg_wr_vld),
    .load_op    (load_op),
    .dst        (eu_dst),
    .rslt       (eu_rslt),
    .dcdataout  (dcdataout),
    .regs       (regs)
  );

  assign dcdatain = eu_rslt;
  // The enable is held off during reset: until the first reset edge the
  // execution unit's strobe register holds its power-up value, which must
  // not reach the preloaded data cache.
  assign dcenbl   = eu_dcenbl & ~rst;

  // Store-stage strobe rules: a load reads the data cache and writes a
  // register; a data cache write never writes a register.
  a_load_reads_dcache: assert property (@(posedge clk) disable iff (rst)
    load_op |-> (reg_wr_vld && dcenbl && rdwr));
  a_store_no_reg_write: assert property (@(posedge clk) disable iff (rst)
    (dcenbl && !rdwr) |-> !reg_wr_vld);

endmodule
