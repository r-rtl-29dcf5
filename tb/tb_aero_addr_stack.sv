// Self-checking testbench of the address stack: random pushes and pops in
// random partitions against one reference stack per partition; the top of
// stack of the selected partition must always match, so calls in one
// partition never disturb another partition's return addresses.
module tb_aero_addr_stack;
  import aero_pkg::*;
  localparam int NPART = 3;
  logic clk = 0, rst = 1;
  pid_t pid;
  logic push, pop;
  pc_t din, dout;
  int checks = 0, failures = 0;
  pc_t ref_stk [NPART+1][$];

  aero_addr_stack #(.NPART(NPART), .DEPTH_W(6)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    pid = 1; push = 0; pop = 0; din = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    repeat (4000) begin
      @(negedge clk);
      pid = pid_t'(1 + $urandom % NPART);
      push = 0; pop = 0;
      if (ref_stk[pid].size() > 0) begin
        #1;
        checks++;
        if (dout !== ref_stk[pid][$]) begin
          failures++;
          $display("FAIL p%0d top %h expected %h", pid, dout, ref_stk[pid][$]);
        end
      end
      case ($urandom % 3)
        0: if (ref_stk[pid].size() < 60) begin push = 1; din = pc_t'($urandom); end
        1: if (ref_stk[pid].size() > 0) pop = 1;
        default: ;
      endcase
      @(posedge clk);
      if (push) ref_stk[pid].push_back(din);
      if (pop)  void'(ref_stk[pid].pop_back());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
