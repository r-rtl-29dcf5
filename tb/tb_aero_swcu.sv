// Self-checking testbench of the switching control unit.
//
// Runs the three-partition schedule of the reference experiment scaled down
// by 4000 (execution times 50/150/100 cycles, periods 220/440/440, with an
// idle slot in every 440-cycle frame) and compares ptr_c_flag1,
// ptr_c_flag2, the pc store/load strobes and the expiry flag, every cycle,
// with values computed here from the list of partition start times. A
// second phase runs one partition alone whose execution time exceeds its
// period, so it is switched back in to itself without an idle slot.
module tb_aero_swcu;
  import aero_pkg::*;
  localparam int NPART = 3;
  localparam int SW = 10;
  localparam int HORIZON = 3000;

  logic clk = 0, rst = 1;
  logic [NPART-1:0] cfg_en;
  logic [31:0] cfg_period [NPART], cfg_exec [NPART], cfg_offset [NPART];
  logic ptr_c_flag1, pc_store, pc_load, expiry_flag, sched_conflict;
  pid_t ptr_c_flag2, pc_store_pid, pc_load_pid;
  logic [31:0] exec_clk;
  int checks = 0, failures = 0;
  int n_switch = 0, n_idle = 0, n_expiry = 0;

  aero_swcu #(.NPART(NPART), .CNT_W(32), .SWITCH_TIME(SW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(logic cond, string what, int c);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL cycle %0d: %s", c, what);
    end
  endtask

  // expected state at cycle c (cycle 0 = first cycle out of reset)
  task automatic expect_at(int c, output logic f1, output int f2, output logic ld,
                           output int ld_pid, output logic st, output int st_pid);
    int s = -1, p = 0, n = 1 << 30, np = 0, pprev = 0, sprev = -1;
    for (int i = 0; i < NPART; i++) begin
      if (!cfg_en[i]) continue;
      for (int k = int'(cfg_offset[i]); k < HORIZON + 2000; k += int'(cfg_period[i])) begin
        if (k <= c && k > s) begin s = k; p = i + 1; end
        if (k > c && k < n)  begin n = k; np = i + 1; end
      end
    end
    // active partition just before the next start (needed for the pc store)
    f1 = (c >= n - SW);
    if (s < 0) f2 = 0;
    else begin
      int e = int'(cfg_exec[p-1]);
      if (c >= s + e && c < s + e + SW) f1 = 1;
      if (n <= s + e + 2 * SW) f2 = p;
      else f2 = (c < s + e + SW) ? p : 0;
    end
    ld = (c == n - 1); ld_pid = np;
    st = 0; st_pid = 0;
    if (c == n - 2) begin
      st_pid = f2;
      st = (f2 != 0);
    end
    // leaving a partition for the idle state also saves its pc
    if (s >= 0 && n > s + int'(cfg_exec[p-1]) + 2 * SW &&
        c == s + int'(cfg_exec[p-1]) + SW - 2) begin
      st_pid = p;
      st = 1;
    end
  endtask

  task automatic run(int cycles);
    for (int c = 0; c < cycles; c++) begin
      logic f1, ld, st; int f2, ldp, stp;
      #1;
      expect_at(c, f1, f2, ld, ldp, st, stp);
      chk(ptr_c_flag1 == f1, $sformatf("flag1 %0d exp %0d", ptr_c_flag1, f1), c);
      chk(int'(ptr_c_flag2) == f2, $sformatf("flag2 %0d exp %0d", ptr_c_flag2, f2), c);
      chk(pc_load == ld && (!ld || int'(pc_load_pid) == ldp),
          $sformatf("pc_load %0d/%0d exp %0d/%0d", pc_load, pc_load_pid, ld, ldp), c);
      chk(pc_store == st && (!st || int'(pc_store_pid) == stp),
          $sformatf("pc_store %0d/%0d exp %0d/%0d", pc_store, pc_store_pid, st, stp), c);
      if (pc_load) n_switch++;
      if (ptr_c_flag1 && !pc_load && dut.sw_cnt == 1 && dut.target == 0) n_idle++;
      if (dut.expire_now) n_expiry++;
      @(posedge clk);
    end
  endtask

  initial begin
    // phase 1: scaled reference schedule
    cfg_en = 3'b111;
    cfg_exec   = '{50, 150, 100};
    cfg_period = '{220, 440, 440};
    cfg_offset = '{20, 80, 300};
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    run(HORIZON);
    chk(!sched_conflict, "no schedule conflict", HORIZON);
    // phase 2: one partition, execution time longer than its period
    rst = 1;
    cfg_en = 3'b010;
    cfg_exec   = '{0, 500, 0};
    cfg_period = '{100, 130, 100};
    cfg_offset = '{50, 40, 50};
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    run(1000);
    $display("switches=%0d idle_switches=%0d expiries=%0d", n_switch, n_idle, n_expiry);
    chk(n_switch > 20 && n_idle > 3 && n_expiry > 10, "all mechanisms exercised", 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
