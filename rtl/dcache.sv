// dcache: data cache of the RISC, a preloaded 32 x 16-bit data memory.
//
// dcenbl enables the memory, and rdwr selects a read (1) or a write (0) at
// address dcaddr. A write stores dcdatain at the rising clock edge. A read
// is combinational: dcdataout shows the addressed word in the same cycle, so
// the register file can take it at the edge that ends the store stage.
// While the memory is not enabled for a read, dcdataout is 0000.
//
// Interface: clk; dcenbl, rdwr, dcaddr, dcdatain in; dcdataout out.
// The contents start as the INIT parameter (default: the demonstration data
// of risc_pkg) and are not changed by reset, like a preloaded FPGA block
// memory.
// The size, the enable and read/write ports and the preloading follow the
// source design; the clock input, the combinational read and the zero
// output when idle are this design's choices.
module dcache
  import risc_pkg::*;
#(
  parameter int unsigned   DEPTH = DC_DEPTH,
  parameter dcache_image_t INIT  = demo_data()
) (
  input  logic    clk,
  input  logic    dcenbl,
  input  logic    rdwr,
  input  dcaddr_t dcaddr,
  input  word_t   dcdatain,
  output word_t   dcdataout
);

  word_t mem [DEPTH];

  initial begin
    for (int i = 0; i < int'(DEPTH); i++) mem[i] = INIT[i];
  end

  always_ff @(posedge clk) begin
    if (dcenbl && !rdwr && int'(dcaddr) < int'(DEPTH)) mem[dcaddr] <= dcdatain;
  end

  always_comb begin
    if (dcenbl && rdwr && int'(dcaddr) < int'(DEPTH)) dcdataout = mem[dcaddr];
    else                                              dcdataout = '0;
  end

endmodule
