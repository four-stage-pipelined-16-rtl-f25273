// decode: decode unit, the second pipeline stage of the RISC.
//
// The instruction from the instruction register is split into its fields and
// the fields are registered, forming the buffer between decode and execute:
//   ALU ops : opcode = [15:12], opnda = [11:8], opndb = [7:4], dst = [3:0]
//   LD      : dcaddr = [9:5],  dst = [3:0]
//   ST      : opnda  = [8:5],  dcaddr = [4:0]
// A field an instruction does not use is cleared to zero.
//
// Interface: clk, rst (synchronous, active high), instr in; opcode, dcaddr,
// opnda, opndb, dst out to the execution unit.
// Timing: one clock from instr to the outputs. Reset clears all outputs,
// which decodes as a NOP.
// The field positions follow the source design; clearing unused fields is
// this design's choice.
module decode
  import risc_pkg::*;
(
  input  logic    clk,
  input  logic    rst,
  input  word_t   instr,
  output opcode_t opcode,
  output dcaddr_t dcaddr,
  output raddr_t  opnda,
  output raddr_t  opndb,
  output raddr_t  dst
);

  opcode_t op_d;
  dcaddr_t dcaddr_d;
  raddr_t  opnda_d, opndb_d, dst_d;

  always_comb begin
    op_d     = opcode_t'(instr[15:12]);
    dcaddr_d = '0;
    opnda_d  = '0;
    opndb_d  = '0;
    dst_d    = '0;
    unique case (op_d)
      OP_LD: begin
        dcaddr_d = instr[9:5];
        dst_d    = instr[3:0];
      end
      OP_ST: begin
        opnda_d  = instr[8:5];
        dcaddr_d = instr[4:0];
      end
      OP_NOP: ;
      default: begin
        opnda_d = instr[11:8];
        opndb_d = instr[7:4];
        dst_d   = instr[3:0];
      end
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      opcode <= OP_NOP;
      dcaddr <= '0;
      opnda  <= '0;
      opndb  <= '0;
      dst    <= '0;
    end else begin
      opcode <= op_d;
      dcaddr <= dcaddr_d;
      opnda  <= opnda_d;
      opndb  <= opndb_d;
      dst    <= dst_d;
    end
  end

endmodule
