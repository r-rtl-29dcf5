// Memory control unit: address segmentation by partition.
//
// The processor issues partition-local addresses of AW bits. The memory
// control unit forms the AW+2 bit physical address: the two most significant
// bits are the active partition index (ptr_c_flag2), the rest come unchanged
// from the processor, so software in every partition uses the same local
// addresses while landing in its own region. With SHARED = 1 (used for the
// data cache) local addresses whose MSB is set are the shared region and are
// sent to segment 0, which no partition owns; the placement of the shared
// region is this design's choice. Purely combinational.
module aero_mcu
  import aero_pkg::*;
#(
  parameter int unsigned AW     = 9,
  parameter bit          SHARED = 1'b0
) (
  input  pid_t              pid,
  input  logic [AW-1:0]     laddr,
  output logic [AW+SEG_W-1:0] paddr,
  output logic              shared
);

  always_comb begin
    shared = SHARED && laddr[AW-1];
    paddr  = shared ? {{SEG_W{1'b0}}, laddr} : {pid, laddr};
  end

endmodule
