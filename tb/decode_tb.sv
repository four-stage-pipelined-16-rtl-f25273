// decode_tb: self-checking testbench of the decode unit.
//
// Feeds the instructions of the demonstration program and random words, and
// checks one clock later that opcode, dcaddr, opnda, opndb and dst carry the
// fields of that instruction according to its format (ALU, LD or ST), with
// unused fields zero. Expected fields are cut out with shifts and masks on
// an integer copy of the instruction.
module decode_tb;
  import risc_pkg::*;

  logic    clk = 0, rst;
  word_t   instr;
  opcode_t opcode;
  dcaddr_t dcaddr;
  raddr_t  opnda, opndb, dst;
  int checks = 0, failures = 0;
  int n_ld = 0, n_st = 0, n_alu = 0;

  decode dut (.clk(clk), .rst(rst), .instr(instr), .opcode(opcode),
              .dcaddr(dcaddr), .opnda(opnda), .opndb(opndb), .dst(dst));

  always #5 clk = ~clk;

  task automatic apply(word_t w);
    int unsigned v = 32'(w);
    int unsigned op = v >> 12;
    int unsigned e_dc = 0, e_a = 0, e_b = 0, e_d = 0;
    if (op == 14) begin
      e_dc = (v >> 5) & 31; e_d = v & 15; n_ld++;
    end else if (op == 15) begin
      e_a = (v >> 5) & 15; e_dc = v & 31; n_st++;
    end else if (op != 0) begin
      e_a = (v >> 8) & 15; e_b = (v >> 4) & 15; e_d = v & 15; n_alu++;
    end
    instr = w;
    @(posedge clk); #1;
    checks++;
    if (opcode != opcode_t'(op) || dcaddr != dcaddr_t'(e_dc) || opnda != raddr_t'(e_a)
        || opndb != raddr_t'(e_b) || dst != raddr_t'(e_d)) begin
      failures++;
      $display("FAIL instr=%h: op=%b dcaddr=%b a=%b b=%b dst=%b", w, opcode, dcaddr,
               opnda, opndb, dst);
    end
  endtask

  initial begin
    icache_image_t prog;
    prog = demo_program();
    rst = 1; instr = 16'hffff;
    @(posedge clk); #1;
    checks++;
    if (opcode != OP_NOP || dcaddr != 0 || opnda != 0 || opndb != 0 || dst != 0) begin
      failures++; $display("FAIL reset");
    end
    rst = 0;
    // one worked example per format
    apply(16'he1ef);   // LD  r15 <- dcache[15]
    checks++; if (dcaddr != 5'b01111 || dst != 4'b1111) failures++;
    apply(16'hf1ff);   // ST  r15 -> dcache[31]
    checks++; if (dcaddr != 5'b11111 || opnda != 4'b1111) failures++;
    apply(16'h2127);   // SUB r7 <- r1 - r2
    checks++; if (opnda != 4'b0001 || opndb != 4'b0010 || dst != 4'b0111) failures++;
    for (int i = 0; i < IC_DEPTH; i++) apply(prog[i]);
    for (int i = 0; i < 1000; i++) apply(word_t'($urandom));
    checks++;
    if (n_ld == 0 || n_st == 0 || n_alu == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
