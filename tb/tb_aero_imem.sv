// Self-checking testbench of the instruction cache: loader writes to random
// physical addresses (all four partition segments), then asynchronous reads
// checked against a reference; reads follow the address in the same cycle.
module tb_aero_imem;
  import aero_pkg::*;
  logic clk = 0;
  logic [15:0] raddr, waddr;
  instr_t rdata, wdata;
  logic we;
  int checks = 0, failures = 0;
  instr_t ref_mem [int];

  aero_imem dut (.*);

  always #5 clk = ~clk;

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; raddr = 0; waddr = 0; wdata = 0;
    repeat (2000) begin
      @(negedge clk);
      we = 1; waddr = 16'($urandom); wdata = 16'($urandom);
      @(posedge clk); #1;
      ref_mem[int'(waddr)] = wdata;
    end
    we = 0;
    foreach (ref_mem[a]) begin
      raddr = 16'(a); #1;
      checks++;
      if (rdata !== ref_mem[a]) begin
        failures++; $display("FAIL %h: %h expected %h", a, rdata, ref_mem[a]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
