// Address stack: return addresses of subroutine calls.
//
// A single-port 16-bit memory with one region per partition (the partition
// index forms the two MSBs of the physical address, as the memory control
// unit does for the other memories). Each partition has its own pair of
// pointers: stack_write_pointer (wp) is where the next return address goes,
// stack_read_pointer (rp) points at the return address of the current call.
//   push (call)  : mem[wp] <= din; rp <= wp; wp <= wp + 1
//   pop (return) : rp <= rp - 1;   wp <= wp - 1
// dout is always the entry at rp of partition pid (the hardware return
// register), read asynchronously. The depth per partition (2**DEPTH_W) is
// not published and is this design's choice; pointers wrap and an overflow
// or underflow is not detected. Push and pop in one cycle are not allowed.
module aero_addr_stack
  import aero_pkg::*;
#(
  parameter int unsigned NPART   = 3,
  parameter int unsigned DEPTH_W = 6
) (
  input  logic   clk,
  input  logic   rst,
  input  pid_t   pid,
  input  logic   push,
  input  pc_t    din,
  input  logic   pop,
  output pc_t    dout
);

  typedef logic [DEPTH_W-1:0] ptr_t;
  logic wr_shared_unused, rd_shared_unused;

  logic [ILEN-1:0] mem [2**(DEPTH_W+SEG_W)];
  ptr_t rp [NPART+1];
  ptr_t wp [NPART+1];
  logic [DEPTH_W+SEG_W-1:0] waddr, raddr;

  aero_mcu #(.AW(DEPTH_W), .SHARED(1'b0)) u_wmcu (
    .pid(pid), .laddr(wp[pid]), .paddr(waddr), .shared(wr_shared_unused));
  aero_mcu #(.AW(DEPTH_W), .SHARED(1'b0)) u_rmcu (
    .pid(pid), .laddr(rp[pid]), .paddr(raddr), .shared(rd_shared_unused));

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int p = 0; p <= NPART; p++) begin
        rp[p] <= '1;
        wp[p] <= '0;
      end
    end else if (pid != '0) begin
      if (push) begin
        mem[waddr] <= ILEN'(din);
        rp[pid]    <= wp[pid];
        wp[pid]    <= wp[pid] + 1'b1;
      end else if (pop) begin
        rp[pid] <= rp[pid] - 1'b1;
        wp[pid] <= wp[pid] - 1'b1;
      end
    end
  end

  assign dout = pc_t'(mem[raddr]);

  always_ff @(posedge clk) if (!rst) assert (!(push && pop))
    else $error("address stack: push and pop in the same cycle");

endmodule
