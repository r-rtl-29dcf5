// Program counter unit with replicated per-partition state.
//
// pc_reg holds the partition-local address of the instruction being fetched.
// Each cycle it is loaded with, in priority order:
//   sw_load          pc_save[sw_load_pid]   (partition switch: resource load)
//   jump or call     jump_reg[ex_pid]       (taken branch, resolved in execute)
//   ret              ret_addr               (top of the address stack)
//   hold             pc_reg                 (ptr_c_flag1 active or no partition)
//   otherwise        pc_reg + 1
// sw_store copies pc_reg into pc_save[sw_store_pid] (resource store). Each
// partition also has its own jump register, written by a memory-address
// instruction in the decode stage (jad_we / jad_pid / jad_target). All
// registers reset to zero, so every partition starts at local address 0.
// The separate saved-pc registers and the priority order are this design's
// reading of the published block diagram and switching sequence.
module aero_pc_unit
  import aero_pkg::*;
#(
  parameter int unsigned NPART = 3
) (
  input  logic clk,
  input  logic rst,
  input  logic hold,
  input  logic jad_we,
  input  pid_t jad_pid,
  input  pc_t  jad_target,
  input  logic jump,
  input  logic call,
  input  logic ret,
  input  pid_t ex_pid,
  input  pc_t  ret_addr,
  input  logic sw_store,
  input  pid_t sw_store_pid,
  input  logic sw_load,
  input  pid_t sw_load_pid,
  output pc_t  pc
);

  pc_t pc_reg;
  pc_t pc_save  [NPART+1];
  pc_t jump_reg [NPART+1];

  assign pc          = pc_reg;

  always_ff @(posedge clk) begin
    if (rst) begin
      pc_reg <= '0;
      for (int p = 0; p <= NPART; p++) begin
        pc_save[p]  <= '0;
        jump_reg[p] <= '0;
      end
    end else begin
      if (sw_load)            pc_reg <= pc_save[sw_load_pid];
      else if (jump || call)  pc_reg <= jump_reg[ex_pid];
      else if (ret)           pc_reg <= ret_addr;
      else if (!hold)         pc_reg <= pc_reg + 1'b1;
      if (sw_store) pc_save[sw_store_pid] <= pc_reg;
      if (jad_we)   jump_reg[jad_pid]     <= jad_target;
    end
  end

endmodule
