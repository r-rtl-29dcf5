// Self-checking testbench of the program counter unit: random sequences of
// hold, jump-address writes, jumps, calls, returns and partition store/load
// strobes against a reference model of pc_reg, the saved pcs and the
// per-partition jump registers.
module tb_aero_pc_unit;
  import aero_pkg::*;
  localparam int NPART = 3;
  logic clk = 0, rst = 1;
  logic hold, jad_we, jump, call, ret, sw_store, sw_load;
  pid_t jad_pid, ex_pid, sw_store_pid, sw_load_pid;
  pc_t jad_target, ret_addr, pc;
  int checks = 0, failures = 0;
  pc_t m_pc;
  pc_t m_save [NPART+1];
  pc_t m_jr [NPART+1];

  aero_pc_unit #(.NPART(NPART)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    {jad_we, jump, call, ret, sw_store, sw_load} = '0;
    hold = 1;
    jad_pid = 0; ex_pid = 0; sw_store_pid = 0; sw_load_pid = 0;
    jad_target = 0; ret_addr = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    m_pc = 0;
    foreach (m_save[p]) begin m_save[p] = 0; m_jr[p] = 0; end
    repeat (5000) begin
      @(negedge clk);
      checks++;
      if (pc !== m_pc) begin failures++; $display("FAIL pc %h expected %h", pc, m_pc); end
      hold = ($urandom % 4) == 0;
      jad_we = ($urandom % 3) == 0; jad_pid = pid_t'($urandom); jad_target = pc_t'($urandom);
      ex_pid = pid_t'($urandom);
      {jump, call, ret} = '0;
      case ($urandom % 8)
        0: jump = 1;
        1: call = 1;
        2: ret = 1;
        default: ;
      endcase
      ret_addr = pc_t'($urandom);
      sw_store = ($urandom % 10) == 0; sw_store_pid = pid_t'($urandom);
      sw_load  = ($urandom % 10) == 0; sw_load_pid  = pid_t'($urandom);
      @(posedge clk);
      begin
        pc_t n;
        n = m_pc;
        if (sw_load) n = m_save[sw_load_pid];
        else if (jump || call) n = m_jr[ex_pid];
        else if (ret) n = ret_addr;
        else if (!hold) n = m_pc + 1;
        if (sw_store) m_save[sw_store_pid] = m_pc;
        if (jad_we) m_jr[jad_pid] = jad_target;
        m_pc = n;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
