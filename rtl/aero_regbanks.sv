// Replicated register banks, one per partition.
//
// Each partition owns a bank of NREG x 32-bit registers. The active bank is
// selected by ptr_c_flag2 (partition index 1..NPART, 0 meaning no partition
// is active); the instruction stream never names a bank. Two combinational
// read ports serve operand multiplexers Op_1 and Op_2 of the decode stage,
// and one write port serves the write-back stage, which names its own
// partition (wr_pid) so a write always lands in the bank of the partition that
// issued the instruction. A write to the register being read in the same
// cycle is returned on the read port (write-through), so one no-op between a
// producer and a consumer is enough; this is this design's choice, made so
// the one-bubble hazard rule holds without any other forwarding. Writes with
// wr_pid = 0 are ignored. Banks are cleared on reset.
module aero_regbanks
  import aero_pkg::*;
#(
  parameter int unsigned NPART = 3
) (
  input  logic   clk,
  input  logic   rst,
  input  pid_t   rd_pid,
  input  raddr_t ra,
  input  raddr_t rb,
  output word_t  qa,
  output word_t  qb,
  input  logic   we,
  input  pid_t   wr_pid,
  input  raddr_t wa,
  input  word_t  wd
);

  word_t bank [NPART][NREG];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int p = 0; p < NPART; p++)
        for (int r = 0; r < NREG; r++)
          bank[p][r] <= '0;
    end else if (we && wr_pid != '0 && int'(wr_pid) <= NPART) begin
      bank[int'(wr_pid) - 1][wa] <= wd;
    end
  end

  function automatic word_t rd(pid_t pid, raddr_t r);
    if (pid == '0 || int'(pid) > NPART) return '0;
    if (we && wr_pid == pid && wa == r) return wd;
    return bank[int'(pid) - 1][r];
  endfunction

  assign qa = rd(rd_pid, ra);
  assign qb = rd(rd_pid, rb);

endmodule
