// risc_system_top_tb: end-to-end test of the whole system at its default
// size and contents.
//
// Resets the system and lets it run the demonstration program out of the
// preloaded caches for 140 clocks: 16 loads, 13 ALU operations, 16 stores,
// NOPs, and, after the program counter wraps at 64, the program a second
// time (and the start of a third). The program's last store reaches the
// data cache at edge 48; the second pass ends at edge 112. After every clock edge the sixteen registers are compared with the
// reference model of risc_ref_pkg run on the program listed here word by
// word. The final register values and the sixteen words the stores leave in
// dcache[16..31] are also checked against constants worked out by hand.
// The per-edge comparison also fixes the latency: the instruction at
// address n must reach the register file at edge n + 4.
//
// Counted mechanisms, each of which must occur: every one of the sixteen
// opcodes passing decode, a register write from the data cache (LD), a
// data cache write (ST), a register write from the ALU, an operand read
// that misses the result of the instruction just ahead (no forwarding), and
// a wrap of the program counter.
module risc_system_top_tb;
  import risc_pkg::*;
  import risc_ref_pkg::*;

  logic    clk = 0, rst;
  pc_t     pc;
  word_t   ir, rslt;
  opcode_t du_opcode;
  logic    dcenbl, rdwr, reg_wr_vld, load_op;
  dcaddr_t dcaddr;
  raddr_t  dst;
  regs_t   regs;

  int checks = 0, failures = 0;
  int seen_op [16];
  int n_ld_wr, n_st_wr, n_alu_wr, n_stale, n_wrap;

  risc_system_top dut (
    .clk(clk), .rst(rst), .pc(pc), .ir(ir), .du_opcode(du_opcode),
    .dcenbl(dcenbl), .rdwr(rdwr), .dcaddr(dcaddr), .rslt(rslt),
    .reg_wr_vld(reg_wr_vld), .load_op(load_op), .dst(dst), .regs(regs));

  always #5 clk = ~clk;

  word_t alu_words [13] = '{16'h1010, 16'h2127, 16'h3236, 16'h4345, 16'h5454,
                           16'h6563, 16'h7678, 16'h8709, 16'h901a, 16'ha12b,
                           16'hb23c, 16'hc34d, 16'hd45e};
  word_t init_data [16] = '{16'h0000, 16'h0044, 16'h0088, 16'h00bb, 16'h00ff,
                            16'h4400, 16'h8800, 16'hbb00, 16'h2200, 16'h4400,
                            16'h8800, 16'haa00, 16'hbb00, 16'hcc00, 16'hdd00,
                            16'hff00};
  // Register contents after the program, by hand: each ALU instruction reads
  // its operands as left by the instructions two or more ahead of it.
  word_t final_regs [16] = '{16'h0044, 16'h0044, 16'h0088, 16'h0100, 16'h44ff,
                             16'h00ff, 16'h0088, 16'hffbc, 16'h0087, 16'h0043,
                             16'hffbc, 16'h0022, 16'h0110, 16'h0080, 16'h89fe,
                             16'hff00};

  function automatic word_t program_word(int n);
    if (n < 16) return word_t'(32'he000 + 32'h21 * n);
    if (n < 29) return alu_words[n-16];
    if (n < 45) return word_t'(32'hf010 + 32'h21 * (n - 29));
    return 16'h0000;
  endfunction

  // Mechanism counters, sampled just before each rising edge.
  always @(posedge clk) if (!rst) begin
    opcode_t eop;
    seen_op[du_opcode]++;
    if (reg_wr_vld && load_op) n_ld_wr++;
    if (reg_wr_vld && !load_op) n_alu_wr++;
    if (dcenbl && !rdwr) n_st_wr++;
    if (pc == 6'd63) n_wrap++;
    eop = dut.u_cpu.u_eunit.opcode;
    if (reg_wr_vld && eop != OP_NOP && eop != OP_LD &&
        (dut.u_cpu.u_eunit.opnda_addr == dst ||
         (eop >= OP_ADD && eop <= OP_XOR && dut.u_cpu.u_eunit.opndb_addr == dst)))
      n_stale++;
  end

  task automatic check(logic cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    ref_state_t s;
    regs_t after_first, after_second;
    n_ld_wr = 0; n_st_wr = 0; n_alu_wr = 0; n_stale = 0; n_wrap = 0;
    foreach (seen_op[o]) seen_op[o] = 0;
    foreach (s.dmem[a]) s.dmem[a] = (a < 16) ? init_data[a] : 16'h0000;
    ref_reset(s, s);
    rst = 1;
    repeat (2) @(posedge clk);
    #1;
    check(pc == 0 && regs == '0, "reset state");
    rst = 0;
    for (int k = 1; k <= 140; k++) begin
      @(posedge clk); #1;
      if (k >= 4) ref_exec(s, program_word((k - 4) % 64), s);
      checks++;
      foreach (regs[r])
        if (regs[r] != s.cur[r]) begin
          failures++;
          $display("FAIL edge %0d: r%0d=%h expected %h", k, r, regs[r], s.cur[r]);
          break;
        end
      if (k == 48) after_first = regs;
      if (k == 112) after_second = regs;
    end
    foreach (final_regs[r])
      check(after_first[r] == final_regs[r], $sformatf("final r%0d=%h", r, after_first[r]));
    for (int a = 0; a < 32; a++) begin
      word_t exp;
      exp = (a < 16) ? init_data[a] : final_regs[a % 16];
      check(dut.u_dcache.mem[a] == exp, $sformatf("dcache[%0d]=%h", a, dut.u_dcache.mem[a]));
      check(s.dmem[a] == exp, $sformatf("model dcache[%0d]", a));
    end
    check(after_first == after_second, "second pass gives the same registers");
    foreach (seen_op[o]) check(seen_op[o] > 0, $sformatf("opcode %0d decoded", o));
    // two passes of 16 loads, and the first 9 loads of the third pass
    check(n_ld_wr == 41, "register writes from the data cache");
    check(n_st_wr == 32, "data cache writes");
    check(n_alu_wr == 26, "register writes from the ALU");
    check(n_stale > 0, "operand read without forwarding");
    check(n_wrap == 2, "program counter wrap");
    $display("mechanisms: ld=%0d st=%0d alu=%0d stale_reads=%0d pc_wraps=%0d",
             n_ld_wr, n_st_wr, n_alu_wr, n_stale, n_wrap);
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
