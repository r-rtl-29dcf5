// End-to-end testbench of the platform at reduced size (4 clocks per UART bit, schedule scaled down by 400).
//
// The same application is loaded into all three partitions (each copy
// built for its own partition, as the code of every partition is assembled
// separately). It is the counting loop of the reference timing experiment:
// m += i until m reaches a threshold; when m == i and when m reaches the
// threshold it sends the partition id and the timer to the UART. In this
// version the threshold branch calls a subroutine that also copies a
// sampling port and another partition's shared-memory slot into its own
// memory. Every iteration stores m in the partition's private word 5 and in
// its shared slot 0x100+p.
// The testbench loads code and static data through the loader ports, runs
// the schedule of the reference experiment scaled down by 400 (execution times 500/1500/1000 cycles, frame 4040 cycles: P1, P2, P1, P3, idle), and checks:
//   * every partition start (ptr_c_flag2 becoming p) at the cycle given by
//     its offset and period, ptr_c_flag1 high exactly SWITCH_TIME cycles per
//     switch, an idle slot (ptr_c_flag2 = 0) in every frame;
//   * the private counter writes of each partition form the unbroken
//     sequence 2, 3, ..., threshold, 1, 2, ... across all preemptions (no
//     instruction skipped or repeated when a partition resumes);
//   * every write lands in the writing partition's own segment (or the
//     shared region), checked in the data cache at the end;
//   * subroutine results: the sampling port value and the neighbour's
//     shared slot arrive in each partition's private words 7 and 6;
//   * the UART line carries exactly the words the buffer accepted, and the
//     words written to a full buffer are counted as dropped;
//   * timing isolation: a computation cycle (threshold to threshold) takes
//     the same number of the partition's own execution cycles in every
//     partition and across preemptions, within the 2 cycles a taken jump
//     can lose or not lose when it meets a switch; and partition 1's first
//     computation ends at the cycle predicted from its period, execution
//     time and its own-cycle length (wall time = offset + (n-1) * period +
//     length - (n-1) * execution time, n = slots it needs);
// and counts how often each mechanism happened (switches, idle slots,
// expiries, taken jumps, calls, returns, UART drops, received samples).
module tb_aero_soc;
  import aero_pkg::*;
  localparam int NPART = 3;
  localparam int SW = 10;
  localparam int CPB = 4;
  localparam int THRESH = 30;
  localparam int RUN = 13000;
  localparam int EXEC [3]   = '{500, 1500, 1000};
  localparam int PERIOD [3] = '{2020, 4040, 4040};
  localparam int OFFSET [3] = '{20, 530, 2550};
  localparam word_t SAMPLE0 = 32'hcafe_0001, SAMPLE1 = 32'hcafe_0002;

  logic clk = 0, rst = 1;
  logic imem_ld_we, dmem_ld_we;
  logic [15:0] imem_ld_addr;
  instr_t imem_ld_data;
  logic [10:0] dmem_ld_addr;
  word_t dmem_ld_data;
  logic [2:0] cfg_en;
  logic [31:0] cfg_period [3], cfg_exec [3], cfg_offset [3];
  logic ptr_c_flag1, expiry_flag, sched_conflict, uart_txd, uart_rxd;
  pid_t ptr_c_flag2;
  logic [31:0] exec_clk;
  logic [15:0] uart_tx_dropped, uart_rx_count;
  logic [63:0] timer;
  logic ev_jump, ev_call, ev_ret;
  int checks = 0, failures = 0;
  int cyc = -1;

  aero_soc #(.CLKS_PER_BIT(4)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(logic cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 30) $display("FAIL cycle %0d: %s", cyc, what);
    end
  endtask

  // ---------------------------------------------------------------- program
  task automatic load_program(int p);
    instr_t prog [64];
    int q;
    q = (p % NPART) + 1;                // neighbour partition
    foreach (prog[k]) prog[k] = NOP_INSTR;
    prog[0]  = enc_ld(1, 0);            // m
    prog[1]  = enc_ld(2, 1);            // i
    prog[2]  = enc_ld(3, 3);            // threshold
    prog[3]  = enc_ld(4, 2);            // zro
    prog[4]  = enc_jad(10);             // loop:
    prog[5]  = enc_op(OP_JNE, 1, 2);    //   if (m == i) {
    prog[6]  = enc_ld(5, MM_PID);       //     uart = p_id
    prog[7]  = enc_ld(6, MM_TIMER);     //     uart = timer }
    prog[8]  = enc_st(5, MM_UART);
    prog[9]  = enc_st(6, MM_UART);
    prog[10] = enc_op(OP_ADD, 1, 2);    //   m += i
    prog[11] = enc_jad(4);
    prog[12] = enc_st(1, 5);            //   private progress word
    prog[13] = enc_st(1, daddr_t'(9'h100 + p));  // shared slot of p
    prog[14] = enc_op(OP_JNE, 1, 3);    //   if (m != threshold) loop
    prog[15] = enc_jad(30);
    prog[16] = enc_op(OP_CALL, 0, 0);   //   report()
    prog[17] = enc_jad(4);
    prog[18] = enc_op(OP_JUC, 0, 0);
    prog[30] = enc_ld(5, MM_PID);       // report: uart = p_id
    prog[31] = enc_ld(6, MM_TIMER);     //         uart = timer
    prog[32] = enc_st(5, MM_UART);
    prog[33] = enc_st(6, MM_UART);
    prog[34] = enc_ld(1, 2);            //         m = zro
    prog[35] = enc_ld(7, daddr_t'(9'h100 + q)); // neighbour's shared slot
    prog[36] = enc_ld(8, MM_PORT0);     //         sampling port 0
    prog[37] = enc_st(7, 6);
    prog[38] = enc_st(8, 7);
    prog[39] = enc_op(OP_RET, 0, 0);
    foreach (prog[k]) begin
      @(negedge clk);
      imem_ld_we = 1; imem_ld_addr = {2'(p), 14'(k)}; imem_ld_data = prog[k];
    end
    begin
      word_t d [4];
      d = '{1, 1, 0, THRESH};
      for (int k = 0; k < 8; k++) begin
        @(negedge clk);
        dmem_ld_we = 1; dmem_ld_addr = {2'(p), 9'(k)};
        dmem_ld_data = (k < 4) ? d[k] : 0;
      end
    end
    @(negedge clk);
    dmem_ld_we = 1; dmem_ld_addr = 11'(9'h100 + p); dmem_ld_data = 0;   // shared slot
    @(negedge clk);
    imem_ld_we = 0; dmem_ld_we = 0;
  endtask

  // ---------------------------------------------------------------- UART
  task automatic send_byte(logic [7:0] b);
    uart_rxd = 0; repeat (CPB) @(posedge clk);
    for (int i = 0; i < 8; i++) begin uart_rxd = b[i]; repeat (CPB) @(posedge clk); end
    uart_rxd = 1; repeat (CPB) @(posedge clk);
  endtask
  task automatic send_packet(logic [7:0] port, word_t v);
    send_byte(port);
    for (int i = 0; i < 4; i++) send_byte(v[8*i +: 8]);
  endtask

  word_t accepted [$];
  word_t decoded [$];
  int n_written = 0, n_acc_run = 0;
  always @(posedge clk) if (!rst && dut.uart_tx_we) begin
    n_written++;
    if (!dut.uart_tx_full) accepted.push_back(dut.uart_tx_data);
    if (cyc < RUN) n_acc_run = accepted.size();
  end
  initial begin
    logic [7:0] b; word_t w; int nb;
    nb = 0; w = 0;
    forever begin
      @(negedge uart_txd);
      repeat (CPB / 2) @(posedge clk);
      for (int i = 0; i < 8; i++) begin
        repeat (CPB) @(posedge clk);
        b[i] = uart_txd;
      end
      repeat (CPB) @(posedge clk);
      w = {b, w[31:8]};
      if (++nb == 4) begin decoded.push_back(w); nb = 0; end
    end
  end

  // ---------------------------------------------------------------- monitors
  int exp_m [4] = '{0, 2, 2, 2};
  int n_m [4] = '{0, 0, 0, 0};
  int n_switch = 0, n_idle = 0, n_expiry = 0, n_jump = 0, n_call = 0, n_ret = 0;
  int f1_run = 0;
  pid_t last_f2 = 0;
  int starts [$];
  int own [4] = '{0, 0, 0, 0};
  int last_own [4] = '{-1, -1, -1, -1};
  int own_min [4] = '{-1, -1, -1, -1};
  int own_max [4] = '{0, 0, 0, 0};
  int n_comp [4] = '{0, 0, 0, 0};
  int t_end [4] = '{-1, -1, -1, -1};
  int own_first [4] = '{0, 0, 0, 0};

  always @(posedge clk) if (cyc >= 0) begin
    // private counter sequence per partition
    if (dut.u_core.dmem_we && dut.u_core.dmem_waddr == 5) begin
      int p;
      p = int'(dut.u_core.dmem_wpid);
      chk(p >= 1 && p <= 3, "counter write outside a partition");
      chk(int'(dut.u_core.dmem_wdata) == exp_m[p],
          $sformatf("partition %0d counter %0d expected %0d", p, dut.u_core.dmem_wdata, exp_m[p]));
      exp_m[p] = (int'(dut.u_core.dmem_wdata) == THRESH) ? 1 : int'(dut.u_core.dmem_wdata) + 1;
      n_m[p]++;
    end
    // switching flags
    if (ptr_c_flag1) f1_run++;
    else if (f1_run != 0) begin
      chk(f1_run == SW, $sformatf("ptr_c_flag1 high for %0d cycles", f1_run));
      f1_run = 0;
    end
    if (ptr_c_flag2 != last_f2 && timer < 64'(RUN)) begin
      chk(!ptr_c_flag1, "ptr_c_flag2 changed while ptr_c_flag1 high");
      if (ptr_c_flag2 == 0) n_idle++;
      else begin
        n_switch++;
        starts.push_back(int'(timer) * 4 + int'(ptr_c_flag2));
      end
    end
    last_f2 = ptr_c_flag2;
    if (dut.u_swcu.expire_now) n_expiry++;
    // own execution cycles per computation cycle (threshold to threshold)
    if (!ptr_c_flag1 && ptr_c_flag2 != 0) own[ptr_c_flag2]++;
    if (dut.u_core.dmem_we && dut.u_core.dmem_waddr == 5 && int'(dut.u_core.dmem_wdata) == THRESH) begin
      int p;
      p = int'(dut.u_core.dmem_wpid);
      if (p >= 1 && p <= 3) begin
        if (last_own[p] >= 0) begin
          int d;
          d = own[p] - last_own[p];
          if (own_min[p] < 0 || d < own_min[p]) own_min[p] = d;
          if (d > own_max[p]) own_max[p] = d;
          n_comp[p]++;
        end
        last_own[p] = own[p];
        if (t_end[p] < 0) begin t_end[p] = int'(timer); own_first[p] = own[p]; end
      end
    end
    n_jump += int'(ev_jump); n_call += int'(ev_call); n_ret += int'(ev_ret);
  end

  // ---------------------------------------------------------------- stimulus
  initial begin
    imem_ld_we = 0; dmem_ld_we = 0; imem_ld_addr = 0; imem_ld_data = 0;
    dmem_ld_addr = 0; dmem_ld_data = 0; uart_rxd = 1;
    cfg_en = 3'b111;
    for (int i = 0; i < 3; i++) begin
      cfg_exec[i] = EXEC[i]; cfg_period[i] = PERIOD[i]; cfg_offset[i] = OFFSET[i];
    end
    repeat (3) @(posedge clk);
    for (int p = 1; p <= NPART; p++) load_program(p);
    @(negedge clk) rst = 0;
    fork
      for (cyc = 0; cyc < RUN; cyc++) @(posedge clk);
      begin
        send_packet(8'd0, SAMPLE0);
        repeat (RUN / 4) @(posedge clk);
        send_packet(8'd4, SAMPLE1);     // port index 4 selects port 0 again
      end
    join_any
    wait (cyc >= RUN);
    repeat (CPB * 40 * 7) @(posedge clk);

    // schedule: every observed start must be one of the programmed ones
    begin
      int exp_starts [$];
      for (int i = 0; i < 3; i++)
        for (int k = OFFSET[i]; k < RUN; k += PERIOD[i]) exp_starts.push_back(k * 4 + i + 1);
      exp_starts.sort();
      chk(starts.size() == exp_starts.size(),
          $sformatf("%0d partition starts, expected %0d", starts.size(), exp_starts.size()));
      foreach (exp_starts[k]) if (k < starts.size())
        chk(starts[k] == exp_starts[k], $sformatf("start %0d: cycle %0d partition %0d, expected cycle %0d partition %0d",
            k, starts[k] / 4, starts[k] % 4, exp_starts[k] / 4, exp_starts[k] % 4));
    end
    // spatial isolation: each partition's words in its own segment
    for (int p = 1; p <= NPART; p++) begin
      int q, last;
      q = (p % NPART) + 1;
      last = (exp_m[p] == 1) ? THRESH : exp_m[p] - 1;
      chk(int'(dut.u_dcache.mem[p * 512 + 5]) == last,
          $sformatf("partition %0d private counter %0d expected %0d", p, dut.u_dcache.mem[p * 512 + 5], last));
      chk(int'(dut.u_dcache.mem[9'h100 + p]) == last || int'(dut.u_dcache.mem[9'h100 + p]) == last - 1,
          $sformatf("partition %0d shared slot %0d expected %0d", p, dut.u_dcache.mem[9'h100 + p], last));
      chk(dut.u_dcache.mem[p * 512 + 3] == THRESH, "static data intact");
      chk(dut.u_dcache.mem[p * 512 + 7] == SAMPLE1,
          $sformatf("partition %0d sampling-port copy %h", p, dut.u_dcache.mem[p * 512 + 7]));
      chk(int'(dut.u_dcache.mem[p * 512 + 6]) >= 0 && int'(dut.u_dcache.mem[p * 512 + 6]) <= THRESH,
          $sformatf("partition %0d copy of partition %0d slot: %0d", p, q, dut.u_dcache.mem[p * 512 + 6]));
      chk(n_m[p] > THRESH, $sformatf("partition %0d made %0d iterations", p, n_m[p]));
    end
    // UART: line carries exactly the accepted words
    chk(decoded.size() >= n_acc_run && decoded.size() <= accepted.size(),
        $sformatf("%0d words on the line, %0d accepted by the end of the run", decoded.size(), n_acc_run));
    foreach (decoded[k]) if (k < accepted.size())
      chk(decoded[k] == accepted[k], $sformatf("line word %0d %h expected %h", k, decoded[k], accepted[k]));
    chk(n_written == accepted.size() + int'(uart_tx_dropped), "written = accepted + dropped");
    chk(!sched_conflict, "no schedule conflict");
    $display("switches=%0d idle_slots=%0d expiries=%0d jumps=%0d calls=%0d returns=%0d uart_words=%0d dropped=%0d samples=%0d iterations=%0d/%0d/%0d",
             n_switch, n_idle, n_expiry, n_jump, n_call, n_ret, accepted.size(), uart_tx_dropped,
             uart_rx_count, n_m[1], n_m[2], n_m[3]);
    for (int p = 1; p <= NPART; p++)
      $display("partition %0d: %0d computation cycles of %0d..%0d own cycles", p, n_comp[p], own_min[p], own_max[p]);
    // effective time of the first computation cycle of partition 1
    begin
      int L, n, t_exp;
      L = own_first[1];
      n = (L + EXEC[0] - 1) / EXEC[0];
      t_exp = OFFSET[0] + (n - 1) * PERIOD[0] + L - (n - 1) * EXEC[0] - 1;
      $display("partition 1 first computation ends at cycle %0d, expected %0d (%0d slots)", t_end[1], t_exp, n);
      chk(t_end[1] == t_exp, "effective execution time of partition 1's first computation");
    end
    begin
      int lo, hi;
      lo = own_min[1]; hi = own_max[1];
      for (int p = 1; p <= NPART; p++) begin
        chk(n_comp[p] > 0, $sformatf("partition %0d completed a computation cycle", p));
        if (n_comp[p] > 0 && own_min[p] < lo) lo = own_min[p];
        if (own_max[p] > hi) hi = own_max[p];
      end
      chk(hi - lo <= 2, $sformatf("own cycles per computation cycle vary from %0d to %0d", lo, hi));
    end
    chk(n_switch > 0, "partition switches happened");
    chk(n_idle > 0, "idle slot happened");
    chk(n_expiry > 0, "execution-time expiry happened");
    chk(n_jump > 0 && n_call > 0 && n_ret > 0, "jumps, calls and returns happened");
    chk(uart_tx_dropped > 0, "UART buffer overflow happened");
    chk(uart_rx_count == 2, "two samples received");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
