// icache_tb: self-checking testbench of the instruction cache.
//
// Reads all 64 addresses the 6-bit program counter can reach. The expected
// words are the demonstration program as listed word by word (16 loads
// e000..e1ef, the ALU instructions 1010..d45e, 16 stores f010..f1ff), then
// NOP (0000) up to address 63.
module icache_tb;
  import risc_pkg::*;

  pc_t   pc;
  word_t instruction;
  int checks = 0, failures = 0;

  word_t alu_words [13] = '{16'h1010, 16'h2127, 16'h3236, 16'h4345, 16'h5454,
                           16'h6563, 16'h7678, 16'h8709, 16'h901a, 16'ha12b,
                           16'hb23c, 16'hc34d, 16'hd45e};

  icache dut (.pc(pc), .instruction(instruction));

  function automatic word_t expected(int n);
    if (n < 16) return word_t'(32'he000 + 32'h21 * n);
    if (n < 29) return alu_words[n-16];
    if (n < 45) return word_t'(32'hf010 + 32'h21 * (n - 29));
    return 16'h0000;
  endfunction

  initial begin
    for (int n = 0; n < 64; n++) begin
      pc = pc_t'(n);
      #1;
      checks++;
      if (instruction !== expected(n)) begin
        failures++;
        $display("FAIL address %0d: %h, expected %h", n, instruction, expected(n));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
