// Data cache: 32-bit dual-port data memory.
//
// 2**AW words of 32 bits with one synchronous read port and one write port,
// both on physical addresses formed by the memory control unit. The read
// data of an address presented in cycle t is valid in cycle t+1 (the memory
// stage). Every operation is single cycle; there is no miss. A read of the
// word being written in the same cycle returns the old contents (the
// assembler separates a store from a dependent load by one no-op). The
// default size (11-bit physical address = 2 partition bits + 9 local bits)
// follows the memory-access instruction format. Contents are not cleared
// at reset: static data is copied in by the loader.
module aero_dcache
  import aero_pkg::*;
#(
  parameter int unsigned AW = DA_W + SEG_W
) (
  input  logic          clk,
  input  logic          re,
  input  logic [AW-1:0] raddr,
  output word_t         rdata,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  word_t         wdata
);

  word_t mem [2**AW];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    if (re) rdata <= mem[raddr];
  end

endmodule
