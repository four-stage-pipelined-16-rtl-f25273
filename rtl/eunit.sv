// eunit: execution unit, the third pipeline stage of the RISC.
//
// Two 16-to-1 multiplexers (A and B) pick operand A and operand B out of the
// sixteen register-file outputs, using the operand addresses from the decode
// unit. The ALU combines them, and the control block turns the opcode into
// the data cache and register file strobes. At the clock edge the result,
// the destination, the data cache address and the strobes are registered;
// these registers are the buffer into the store stage, where the register
// file and data cache act on them.
//
//   opcode   rslt        reg_wr_vld load_op dcenbl rdwr
//   NOP      0           0          0       0      1
//   ALU op   ALU result  1          0       0      1
//   LD       0           1          1       1      1   (read dcache[dc_addr])
//   ST       operand A   0          0       1      0   (write rslt there)
//
// There is no forwarding and no interlock: operands are read from the
// register file as it stands while the instruction is in this stage, so an
// instruction does not see the result of the instruction just ahead of it
// (still in the store stage) and sees the register as it was before that
// write. Results of instructions two or more ahead are visible.
//
// Interface: clk, rst (synchronous, active high); opcode, dcaddrin,
// opnda_addr, opndb_addr, dstin from decode; regs (all sixteen registers)
// from the register file. Out: dcenbl, rdwr, dc_addr, rslt to the data
// cache; reg_wr_vld, load_op, dst, rslt to the register file.
// Timing: one clock from inputs to outputs. Reset gives the NOP row above.
// The multiplexers, the ALU, the ctrl block and the registered rslt/dst/
// address follow the source design; the control table and the 16-bit rslt
// width are this design's reading of it.
module eunit
  import risc_pkg::*;
(
  input  logic    clk,
  input  logic    rst,
  input  opcode_t opcode,
  input  dcaddr_t dcaddrin,
  input  raddr_t  opnda_addr,
  input  raddr_t  opndb_addr,
  input  raddr_t  dstin,
  input  regs_t   regs,
  output logic    dcenbl,
  output logic    rdwr,
  output logic    reg_wr_vld,
  output logic    load_op,
  output dcaddr_t dc_addr,
  output word_t   rslt,
  output raddr_t  dst
);

  word_t opnd_a, opnd_b, alu_y, rslt_d;
  logic  dcenbl_d, rdwr_d, reg_wr_vld_d, load_op_d;

  // Operand multiplexers A and B.
  assign opnd_a = regs[opnda_addr];
  assign opnd_b = regs[opndb_addr];

  alu u_alu (
    .op (opcode),
    .a  (opnd_a),
    .b  (opnd_b),
    .y  (alu_y)
  );

  // Control block.
  always_comb begin
    dcenbl_d     = 1'b0;
    rdwr_d       = 1'b1;
    reg_wr_vld_d = 1'b0;
    load_op_d    = 1'b0;
    rslt_d       = '0;
    unique case (opcode)
      OP_NOP: ;
      OP_LD: begin
        dcenbl_d     = 1'b1;
        reg_wr_vld_d = 1'b1;
        load_op_d    = 1'b1;
      end
      OP_ST: begin
        dcenbl_d = 1'b1;
        rdwr_d   = 1'b0;
        rslt_d   = opnd_a;
      end
      default: begin
        reg_wr_vld_d = 1'b1;
        rslt_d       = alu_y;
      end
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      dcenbl     <= 1'b0;
      rdwr       <= 1'b1;
      reg_wr_vld <= 1'b0;
      load_op    <= 1'b0;
      dc_addr    <= '0;
      rslt       <= '0;
      dst        <= '0;
    end else begin
      dcenbl     <= dcenbl_d;
      rdwr       <= rdwr_d;
      reg_wr_vld <= reg_wr_vld_d;
      load_op    <= load_op_d;
      dc_addr    <= dcaddrin;
      rslt       <= rslt_d;
      dst        <= dstin;
    end
  end

endmodule
