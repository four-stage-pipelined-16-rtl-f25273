// risc_cpu_top_tb: self-checking testbench of the processor core.
//
// Behavioural instruction and data memories surround the core. Each of
// several runs loads a random program of valid instructions (NOP, ALU, LD,
// ST in random mix, random registers and addresses) and random data, resets
// the core and clocks it for 150 cycles, so the 6-bit program counter
// wraps. After every clock edge all sixteen registers are compared with the
// reference model of risc_ref_pkg: the instruction at address n must be
// written back exactly at edge n + 4, and an instruction must read its
// operands without the result of the instruction just ahead of it. At the
// end of a run the data memory is compared with the model's.
module risc_cpu_top_tb;
  import risc_pkg::*;
  import risc_ref_pkg::*;

  logic    clk = 0, rst;
  pc_t     pc;
  word_t   instruction, dcdatain, dcdataout, ir;
  logic    dcenbl, rdwr, reg_wr_vld, load_op;
  dcaddr_t dcaddr;
  opcode_t du_opcode;
  raddr_t  eu_dst;
  regs_t   regs;

  word_t imem [64];
  word_t dmem [32];
  ref_state_t s;
  int checks = 0, failures = 0;
  int n_ld = 0, n_st = 0, n_alu = 0;

  risc_cpu_top dut (
    .clk(clk), .rst(rst), .pc(pc), .instruction(instruction),
    .dcenbl(dcenbl), .rdwr(rdwr), .dcaddr(dcaddr), .dcdatain(dcdatain),
    .dcdataout(dcdataout), .ir(ir), .du_opcode(du_opcode),
    .reg_wr_vld(reg_wr_vld), .load_op(load_op), .eu_dst(eu_dst), .regs(regs));

  always #5 clk = ~clk;

  assign instruction = imem[pc];
  assign dcdataout   = (dcenbl && rdwr) ? dmem[dcaddr] : 16'h0000;
  always @(posedge clk) if (dcenbl && !rdwr) dmem[dcaddr] <= dcdatain;

  function automatic word_t random_instr();
    int unsigned kind = $urandom_range(0, 9);
    word_t w = word_t'($urandom);
    if (kind == 0) return 16'h0000;
    if (kind < 3)  return {4'he, 2'b00, w[9:5], 1'b0, w[3:0]};
    if (kind < 5)  return {4'hf, 3'b000, w[8:5], w[4:0]};
    return {4'($urandom_range(1, 13)), w[11:0]};
  endfunction

  initial begin
    for (int run = 0; run < 20; run++) begin
      // reset first, so that a store still in flight from the previous run
      // lands before the memories are refilled
      rst = 1;
      @(posedge clk); @(posedge clk); #1;
      foreach (imem[i]) imem[i] = random_instr();
      foreach (dmem[i]) dmem[i] = word_t'($urandom);
      foreach (imem[i]) begin
        if (imem[i][15:12] == 4'he) n_ld++;
        else if (imem[i][15:12] == 4'hf) n_st++;
        else if (imem[i] != 0) n_alu++;
      end
      s.dmem = dmem;
      ref_reset(s, s);
      @(posedge clk); #1;
      rst = 0;
      for (int k = 1; k <= 150; k++) begin
        @(posedge clk); #1;
        if (k >= 4) ref_exec(s, imem[(k - 4) % 64], s);
        checks++;
        foreach (regs[r])
          if (regs[r] != s.cur[r]) begin
            failures++;
            $display("FAIL run %0d edge %0d: r%0d=%h expected %h", run, k, r,
                     regs[r], s.cur[r]);
            break;
          end
      end
      foreach (dmem[a]) begin
        checks++;
        if (dmem[a] != s.dmem[a]) begin
          failures++;
          $display("FAIL run %0d dmem[%0d]=%h expected %h", run, a, dmem[a], s.dmem[a]);
        end
      end
    end
    checks++;
    if (n_ld == 0 || n_st == 0 || n_alu == 0) failures++;
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
