// iunit_tb: self-checking testbench of the instruction unit.
//
// A behavioural instruction memory filled with random words answers the
// program counter. After reset pc must be 0 and ir 0000; after every rising
// edge pc must have advanced by one (wrapping from 63 to 0) and ir must hold
// the word that was at the previous pc. A reset in mid-run is checked too.
// Finally the memory is loaded with the demonstration program and the first
// fetches are compared with the listed trace: pc=01 shows e021 with ir=e000,
// pc=02 shows e042 with ir=e021, and so on.
module iunit_tb;
  import risc_pkg::*;

  logic  clk = 0, rst;
  pc_t   pc;
  word_t ir, instruction;
  word_t mem [64];
  int checks = 0, failures = 0;
  int wraps = 0;

  iunit dut (.clk(clk), .rst(rst), .instruction(instruction), .pc(pc), .ir(ir));

  always #5 clk = ~clk;
  assign instruction = mem[pc];

  task automatic check(logic cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    pc_t   exp_pc;
    word_t exp_ir;
    foreach (mem[i]) mem[i] = word_t'($urandom);
    rst = 1;
    @(posedge clk); @(posedge clk); #1;
    check(pc == 0 && ir == 0, "reset values");
    rst = 0;
    exp_pc = 0;
    for (int c = 0; c < 150; c++) begin
      exp_ir = mem[exp_pc];
      @(posedge clk); #1;
      if (exp_pc == 63) wraps++;
      exp_pc = exp_pc + 1;
      check(pc == exp_pc, "pc increments");
      check(ir == exp_ir, "ir holds the word at the previous pc");
    end
    check(wraps == 2, "pc wrapped twice");
    rst = 1;
    @(posedge clk); #1;
    check(pc == 0 && ir == 0, "mid-run reset");
    for (int i = 0; i < 16; i++) mem[i] = word_t'(32'he000 + 32'h21 * i);
    @(posedge clk); #1;
    rst = 0;
    for (int n = 1; n <= 10; n++) begin
      @(posedge clk); #1;
      check(pc == pc_t'(n) && instruction == word_t'(32'he000 + 32'h21 * n)
            && ir == word_t'(32'he000 + 32'h21 * (n - 1)), "demonstration fetch trace");
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
