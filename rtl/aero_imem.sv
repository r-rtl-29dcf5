// Instruction cache: 16-bit instruction memory shared by all partitions.
//
// 2**AW words of 16 bits. The processor only reads it: the read port is
// asynchronous, addressed by the physical program counter (partition index in
// the two MSBs), and the processor has no connection to the write enable.
// The write port belongs to the program loader, which fills the memory before
// the processor leaves reset. There is no miss: all code is resident. The
// default size (16-bit physical address, 14 bits per partition) follows the
// instruction format; the asynchronous read is this design's choice, so that
// an instruction is latched into the fetch register in the cycle its address
// is presented. Contents are not cleared at reset.
module aero_imem
  import aero_pkg::*;
#(
  parameter int unsigned AW = PC_W + SEG_W
) (
  input  logic          clk,
  input  logic [AW-1:0] raddr,
  output instr_t        rdata,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  instr_t        wdata
);

  instr_t mem [2**AW];

  always_ff @(posedge clk)
    if (we) mem[waddr] <= wdata;

  assign rdata = mem[raddr];

endmodule
