// dcache_tb: self-checking testbench of the data cache.
//
// First reads addresses 0..15 and checks the preloaded words (0000, 0044,
// 0088, 00bb, 00ff, 4400, 8800, bb00, 2200, 4400, 8800, aa00, bb00, cc00,
// dd00, ff00) and that 16..31 start at 0000. Then writes 1111, 2222, ...
// to addresses 17..31, as the documented test does, and reads them back.
// Also checks that nothing is written while dcenbl is low or rdwr is high,
// and that the output is 0000 when no read is enabled. Finally random
// traffic is compared with a model array.
module dcache_tb;
  import risc_pkg::*;

  logic    clk = 0, dcenbl, rdwr;
  dcaddr_t dcaddr;
  word_t   dcdatain, dcdataout;
  word_t   model [32];
  int checks = 0, failures = 0;

  word_t preload [16] = '{16'h0000, 16'h0044, 16'h0088, 16'h00bb, 16'h00ff,
                          16'h4400, 16'h8800, 16'hbb00, 16'h2200, 16'h4400,
                          16'h8800, 16'haa00, 16'hbb00, 16'hcc00, 16'hdd00,
                          16'hff00};

  dcache dut (.clk(clk), .dcenbl(dcenbl), .rdwr(rdwr), .dcaddr(dcaddr),
              .dcdatain(dcdatain), .dcdataout(dcdataout));

  always #5 clk = ~clk;

  task automatic rd(int a, word_t exp);
    dcenbl = 1; rdwr = 1; dcaddr = dcaddr_t'(a);
    #1;
    checks++;
    if (dcdataout != exp) begin
      failures++;
      $display("FAIL read %0d: %h expected %h", a, dcdataout, exp);
    end
  endtask

  task automatic wr(logic en, logic rw, int a, word_t d);
    dcenbl = en; rdwr = rw; dcaddr = dcaddr_t'(a); dcdatain = d;
    @(posedge clk); #1;
  endtask

  initial begin
    dcenbl = 0; rdwr = 1; dcaddr = '0; dcdatain = '0;
    @(negedge clk);
    for (int a = 0; a < 32; a++) model[a] = (a < 16) ? preload[a] : 16'h0000;
    for (int a = 0; a < 32; a++) rd(a, model[a]);
    for (int a = 17; a < 32; a++) begin
      wr(1, 0, a, word_t'(16'h1111 * (a - 16)));
      model[a] = word_t'(16'h1111 * (a - 16));
    end
    for (int a = 0; a < 32; a++) rd(a, model[a]);
    wr(0, 0, 5, 16'hdead);        // disabled: no write
    wr(1, 1, 6, 16'hbeef);        // read cycle: no write
    rd(5, model[5]);
    rd(6, model[6]);
    dcenbl = 0; rdwr = 1; #1;
    checks++; if (dcdataout != 0) failures++;
    dcenbl = 1; rdwr = 0; #1;
    checks++; if (dcdataout != 0) failures++;
    for (int i = 0; i < 2000; i++) begin
      int a;
      word_t d;
      a = $urandom_range(0, 31);
      d = word_t'($urandom);
      if ($urandom_range(0, 1) != 0) rd(a, model[a]);
      else begin
        wr(1, 0, a, d);
        model[a] = d;
      end
    end
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
