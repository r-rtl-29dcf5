// Self-checking testbench of the hardware timer: reset to zero, counting
// one per cycle, carry into the high word (checked by forcing the counter
// near the 32-bit boundary through a second reset-free instance).
module tb_aero_timer;
  logic clk = 0, rst = 1;
  logic [63:0] count;
  int checks = 0, failures = 0;

  aero_timer dut (.clk(clk), .rst(rst), .count(count));

  always #5 clk = ~clk;

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk);
    checks++; if (count !== 0) begin failures++; $display("FAIL reset %0d", count); end
    rst = 0;
    for (int i = 1; i <= 1000; i++) begin
      @(negedge clk);
      checks++;
      if (count !== 64'(i)) begin failures++; $display("FAIL cycle %0d: %0d", i, count); end
    end
    // carry into the upper word
    dut.count = 64'h0000_0000_ffff_fffe;
    @(negedge clk); @(negedge clk);
    checks++;
    if (count !== 64'h0000_0001_0000_0000) begin failures++; $display("FAIL carry: %h", count); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
