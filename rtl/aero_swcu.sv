// Switching-Control-Unit (SwCU): time-triggered partition scheduler.
//
// Each partition i has a period clock that counts down by one every cycle
// and an enable bit; one execution clock, shared by all partitions, counts up.
// At reset each period clock is loaded with cfg_offset[i], which sets the
// starting sequence. Partition i is switched in every cfg_period[i] cycles
// and may run for cfg_exec[i] cycles:
//   * When period clock i reaches SWITCH_TIME (it is SWITCH_TIME+1 on the
//     clock edge that starts the switch), ptr_c_flag1 goes high: the program
//     counter holds and the fetch stage feeds no-ops while the instructions
//     already in the pipeline finish.
//   * Two cycles before the end the active partition's pc is saved
//     (pc_store); in the last cycle, when period clock i is 1, the pc of
//     partition i is loaded (pc_load).
//   * On the next edge ptr_c_flag2 becomes i, ptr_c_flag1 drops, period clock
//     i is reloaded with cfg_period[i] and the execution clock restarts at 0.
// ptr_c_flag1 is therefore high for exactly SWITCH_TIME cycles per switch.
// When the execution clock reaches cfg_exec of the active partition,
// expiry_flag is set; if no switch is under way the partition is then
// switched out to the idle state (ptr_c_flag2 = 0, no partition active),
// using the same SWITCH_TIME sequence. A switch started by a period clock
// takes precedence over one into the idle state; a period clock that fires
// while another partition is being switched in is ignored (the schedule is
// assumed conflict-free, as all partitions have uniform priority) and
// raises the sticky sched_conflict output.
// The period clocks, execution clock, expiry flag and the ptr_c_flag1 /
// ptr_c_flag2 sequence follow the published description; the idle
// switch-out on expiry, the conflict flag and the position of the pc save
// are this design's choices. All outputs are registered or decoded from
// registers.
module aero_swcu
  import aero_pkg::*;
#(
  parameter int unsigned NPART       = 3,
  parameter int unsigned CNT_W       = 32,
  parameter int unsigned SWITCH_TIME = 10
) (
  input  logic             clk,
  input  logic             rst,
  input  logic [NPART-1:0] cfg_en,
  input  logic [CNT_W-1:0] cfg_period [NPART],
  input  logic [CNT_W-1:0] cfg_exec   [NPART],
  input  logic [CNT_W-1:0] cfg_offset [NPART],
  output logic             ptr_c_flag1,
  output pid_t             ptr_c_flag2,
  output logic             pc_store,
  output pid_t             pc_store_pid,
  output logic             pc_load,
  output pid_t             pc_load_pid,
  output logic             expiry_flag,
  output logic             sched_conflict,
  output logic [CNT_W-1:0] exec_clk
);

  typedef logic [CNT_W-1:0] cnt_t;

  cnt_t period_clk [NPART];
  cnt_t sw_cnt;
  pid_t target;
  logic to_partition;   // current switch targets a partition (not idle)

  // Period-clock trigger: lowest-index partition whose clock is at SWITCH_TIME+1.
  logic trig;
  pid_t trig_pid;
  always_comb begin
    trig     = 1'b0;
    trig_pid = '0;
    for (int i = NPART - 1; i >= 0; i--)
      if (cfg_en[i] && period_clk[i] == cnt_t'(SWITCH_TIME + 1)) begin
        trig     = 1'b1;
        trig_pid = pid_t'(i + 1);
      end
  end

  logic expire_now;
  assign expire_now = (ptr_c_flag2 != '0) && !expiry_flag &&
                      (exec_clk == cfg_exec[int'(ptr_c_flag2) - 1] - 1'b1);

  assign pc_store     = ptr_c_flag1 && sw_cnt == cnt_t'(2) && ptr_c_flag2 != '0;
  assign pc_store_pid = ptr_c_flag2;
  assign pc_load      = ptr_c_flag1 && sw_cnt == cnt_t'(1) && target != '0;
  assign pc_load_pid  = target;

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < NPART; i++) period_clk[i] <= cfg_offset[i];
      sw_cnt         <= '0;
      target         <= '0;
      to_partition   <= 1'b0;
      ptr_c_flag1    <= 1'b0;
      ptr_c_flag2    <= '0;
      expiry_flag    <= 1'b0;
      sched_conflict <= 1'b0;
      exec_clk       <= '0;
    end else begin
      for (int i = 0; i < NPART; i++)
        period_clk[i] <= (period_clk[i] == cnt_t'(1)) ? cfg_period[i]
                                                       : period_clk[i] - 1'b1;
      exec_clk <= exec_clk + 1'b1;
      if (expire_now) expiry_flag <= 1'b1;

      if (trig && !(ptr_c_flag1 && to_partition)) begin
        // start switching to the partition whose period clock fired
        ptr_c_flag1  <= 1'b1;
        sw_cnt       <= cnt_t'(SWITCH_TIME);
        target       <= trig_pid;
        to_partition <= 1'b1;
      end else if (ptr_c_flag1) begin
        if (trig) sched_conflict <= 1'b1;
        if (sw_cnt == cnt_t'(1)) begin
          ptr_c_flag1  <= 1'b0;
          ptr_c_flag2  <= target;
          to_partition <= 1'b0;
          exec_clk     <= '0;
          expiry_flag  <= 1'b0;
        end else begin
          sw_cnt <= sw_cnt - 1'b1;
        end
      end else if (expire_now) begin
        // execution time used up and nobody is due: switch out to idle
        ptr_c_flag1  <= 1'b1;
        sw_cnt       <= cnt_t'(SWITCH_TIME);
        target       <= '0;
        to_partition <= 1'b0;
      end
    end
  end

  initial assert (SWITCH_TIME >= 4)
    else $error("SWITCH_TIME must cover the pipeline drain (>= 4)");

endmodule
