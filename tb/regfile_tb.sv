// regfile_tb: self-checking testbench of the register file.
//
// Drives random writes, some from the result input and some from the data
// cache input (load_op), with reg_wr_vld sometimes low, and keeps its own
// array of sixteen words. After every clock all sixteen outputs must match
// the array. Reset must clear every register.
module regfile_tb;
  import risc_pkg::*;

  logic   clk = 0, rst, reg_wr_vld, load_op;
  raddr_t dst;
  word_t  rslt, dcdataout;
  regs_t  regs;
  word_t  model [16];
  int checks = 0, failures = 0;
  int n_load = 0, n_alu = 0, n_idle = 0;

  regfile dut (.clk(clk), .rst(rst), .reg_wr_vld(reg_wr_vld), .load_op(load_op),
               .dst(dst), .rslt(rslt), .dcdataout(dcdataout), .regs(regs));

  always #5 clk = ~clk;

  task automatic compare(string what);
    checks++;
    foreach (model[i])
      if (regs[i] != model[i]) begin
        failures++;
        $display("FAIL %s: r%0d=%h expected %h", what, i, regs[i], model[i]);
        break;
      end
  endtask

  initial begin
    rst = 1; reg_wr_vld = 1; load_op = 0; dst = 3; rslt = 16'h1234; dcdataout = 16'h5678;
    @(posedge clk); #1;
    foreach (model[i]) model[i] = '0;
    compare("reset");
    rst = 0;
    for (int i = 0; i < 2000; i++) begin
      reg_wr_vld = ($urandom_range(0, 3) != 0);
      load_op    = ($urandom_range(0, 1) != 0);
      dst        = raddr_t'($urandom);
      rslt       = word_t'($urandom);
      dcdataout  = word_t'($urandom);
      if (!reg_wr_vld) n_idle++;
      else if (load_op) begin model[dst] = dcdataout; n_load++; end
      else begin model[dst] = rslt; n_alu++; end
      @(posedge clk); #1;
      compare("write");
    end
    checks++;
    if (n_load == 0 || n_alu == 0 || n_idle == 0) failures++;
    rst = 1;
    @(posedge clk); #1;
    foreach (model[i]) model[i] = '0;
    compare("second reset");
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
