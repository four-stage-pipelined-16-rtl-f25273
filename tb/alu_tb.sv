// alu_tb: self-checking testbench of the ALU.
//
// Every opcode is applied with the worked examples of the design's
// documentation (for instance SHR of 0044 gives 0022, ROL of 00ff gives
// 01fe, NEG of 0000 stays 0000) and with random operands. Expected values
// come from the integer arithmetic of risc_ref_pkg::ref_alu, not from the
// ALU's own bit slicing.
module alu_tb;
  import risc_pkg::*;
  import risc_ref_pkg::*;

  opcode_t op;
  word_t a, b, y;
  int checks = 0, failures = 0;

  alu dut (.op(op), .a(a), .b(b), .y(y));

  task automatic check(opcode_t o, word_t ia, word_t ib, word_t exp);
    op = o; a = ia; b = ib;
    #1;
    checks++;
    if (y !== exp) begin
      failures++;
      $display("FAIL op=%s a=%h b=%h y=%h expected %h", o.name(), ia, ib, y, exp);
    end
  endtask

  initial begin
    // worked examples
    check(OP_ADD, 16'h0000, 16'h0044, 16'h0044);
    check(OP_SUB, 16'h0044, 16'h0088, 16'hffbc);
    check(OP_AND, 16'h0088, 16'h00bb, 16'h0088);
    check(OP_OR,  16'h00bb, 16'h00ff, 16'h00ff);
    check(OP_XOR, 16'h00ff, 16'h4400, 16'h44ff);
    check(OP_INC, 16'h4400, 16'h0000, 16'h4401);
    check(OP_DEC, 16'h8800, 16'h0000, 16'h87ff);
    check(OP_NOT, 16'hbb00, 16'h0000, 16'h44ff);
    check(OP_NEG, 16'h0000, 16'h0000, 16'h0000);
    check(OP_NEG, 16'h0044, 16'h0000, 16'hffbc);
    check(OP_SHR, 16'h0044, 16'h0000, 16'h0022);
    check(OP_SHL, 16'h0088, 16'h0000, 16'h0110);
    check(OP_ROR, 16'h00bb, 16'h0000, 16'h805d);
    check(OP_ROL, 16'h00ff, 16'h0000, 16'h01fe);
    check(OP_ROL, 16'h8001, 16'h0000, 16'h0003);
    check(OP_NOP, 16'h1234, 16'h5678, 16'h0000);
    check(OP_LD,  16'h1234, 16'h5678, 16'h0000);
    check(OP_ST,  16'h1234, 16'h5678, 16'h0000);
    // random operands for every opcode
    for (int i = 0; i < 2000; i++) begin
      opcode_t o;
      word_t ra, rb;
      o  = opcode_t'($urandom_range(0, 15));
      ra = word_t'($urandom);
      rb = word_t'($urandom);
      check(o, ra, rb, ref_alu(o, ra, rb));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
