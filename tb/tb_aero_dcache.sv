// Self-checking testbench of the data cache: random concurrent reads and
// writes against a reference array, checking one-cycle read latency, that
// the read port holds its data when not enabled, and old-data behaviour
// when a word is read and written in the same cycle.
module tb_aero_dcache;
  import aero_pkg::*;
  logic clk = 0;
  logic re, we;
  logic [10:0] raddr, waddr;
  word_t rdata, wdata;
  int checks = 0, failures = 0;
  word_t ref_mem [2048];
  word_t exp_q;
  logic exp_v;

  aero_dcache dut (.*);

  always #5 clk = ~clk;

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    re = 0; we = 0; raddr = 0; waddr = 0; wdata = 0; exp_v = 0;
    for (int a = 0; a < 2048; a++) begin
      @(negedge clk);
      we = 1; waddr = 11'(a); wdata = $urandom; ref_mem[a] = wdata;
    end
    @(negedge clk); we = 0;
    repeat (5000) begin
      @(negedge clk);
      if (exp_v) begin
        checks++;
        if (rdata !== exp_q) begin failures++; $display("FAIL read %h expected %h", rdata, exp_q); end
      end
      re = $urandom % 2; we = $urandom % 2;
      raddr = 11'($urandom); wdata = $urandom;
      waddr = ($urandom % 3 == 0) ? raddr : 11'($urandom);
      if (re) exp_q = ref_mem[raddr];
      exp_v = 1;
      @(posedge clk);
      if (we) ref_mem[waddr] = wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
