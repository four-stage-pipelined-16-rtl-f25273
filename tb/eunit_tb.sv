// eunit_tb: self-checking testbench of the execution unit.
//
// Presents random register contents and random decoded instructions of
// every opcode, then checks one clock later the registered result, the
// destination, the data cache address and the four strobes against values
// computed here: the ALU result from risc_ref_pkg::ref_alu for ALU opcodes,
// operand A for ST, and the strobe table of the execution unit.
module eunit_tb;
  import risc_pkg::*;
  import risc_ref_pkg::*;

  logic    clk = 0, rst;
  opcode_t opcode;
  dcaddr_t dcaddrin, dc_addr;
  raddr_t  opnda_addr, opndb_addr, dstin, dst;
  regs_t   regs;
  logic    dcenbl, rdwr, reg_wr_vld, load_op;
  word_t   rslt;
  int checks = 0, failures = 0;
  int seen [16];

  eunit dut (.clk(clk), .rst(rst), .opcode(opcode), .dcaddrin(dcaddrin),
             .opnda_addr(opnda_addr), .opndb_addr(opndb_addr), .dstin(dstin),
             .regs(regs), .dcenbl(dcenbl), .rdwr(rdwr), .reg_wr_vld(reg_wr_vld),
             .load_op(load_op), .dc_addr(dc_addr), .rslt(rslt), .dst(dst));

  always #5 clk = ~clk;

  task automatic check(logic cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s (op=%s)", what, opcode.name()); end
  endtask

  initial begin
    foreach (seen[o]) seen[o] = 0;
    rst = 1;
    opcode = OP_ADD; dcaddrin = 5'd3; opnda_addr = 0; opndb_addr = 1; dstin = 4'd2;
    foreach (regs[i]) regs[i] = word_t'($urandom);
    @(posedge clk); #1;
    check(!dcenbl && rdwr && !reg_wr_vld && !load_op && rslt == 0 && dst == 0
          && dc_addr == 0, "reset state");
    rst = 0;
    for (int i = 0; i < 3000; i++) begin
      logic  e_en, e_rd, e_wr, e_ld;
      word_t e_rslt;
      foreach (regs[r]) regs[r] = word_t'($urandom);
      opcode     = opcode_t'($urandom_range(0, 15));
      dcaddrin   = dcaddr_t'($urandom);
      opnda_addr = raddr_t'($urandom);
      opndb_addr = raddr_t'($urandom);
      dstin      = raddr_t'($urandom);
      seen[opcode]++;
      e_en = (opcode == OP_LD || opcode == OP_ST);
      e_rd = (opcode != OP_ST);
      e_wr = (opcode != OP_NOP && opcode != OP_ST);
      e_ld = (opcode == OP_LD);
      if (opcode == OP_ST) e_rslt = regs[opnda_addr];
      else                 e_rslt = ref_alu(opcode, regs[opnda_addr], regs[opndb_addr]);
      @(posedge clk); #1;
      check(dcenbl == e_en, "dcenbl");
      check(rdwr == e_rd, "rdwr");
      check(reg_wr_vld == e_wr, "reg_wr_vld");
      check(load_op == e_ld, "load_op");
      check(dc_addr == dcaddrin, "dc_addr");
      check(dst == dstin, "dst");
      check(rslt == e_rslt, "rslt");
    end
    foreach (seen[o]) check(seen[o] > 0, "every opcode applied");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
