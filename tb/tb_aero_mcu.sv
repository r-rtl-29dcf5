// Self-checking testbench of the memory control unit: exhaustive over
// partition index and local address, for the data-cache mapping (shared
// region at local addresses with the MSB set) and the plain mapping.
module tb_aero_mcu;
  import aero_pkg::*;

  pid_t pid;
  logic [8:0]  la;
  logic [10:0] pa_s, pa_p;
  logic sh_s, sh_p;
  int checks = 0, failures = 0;

  aero_mcu #(.AW(9), .SHARED(1'b1)) dut_s (.pid(pid), .laddr(la), .paddr(pa_s), .shared(sh_s));
  aero_mcu #(.AW(9), .SHARED(1'b0)) dut_p (.pid(pid), .laddr(la), .paddr(pa_p), .shared(sh_p));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int p = 0; p < 4; p++)
      for (int a = 0; a < 512; a++) begin
        int exp_s, exp_p;
        pid = pid_t'(p); la = 9'(a); #1;
        exp_p = p * 512 + a;
        exp_s = (a >= 256) ? a : p * 512 + a;
        checks += 2;
        if (int'(pa_s) != exp_s || sh_s != (a >= 256)) begin
          failures++;
          $display("FAIL shared map p=%0d a=%h: %h/%b", p, a, pa_s, sh_s);
        end
        if (int'(pa_p) != exp_p || sh_p) begin
          failures++;
          $display("FAIL plain map p=%0d a=%h: %h/%b", p, a, pa_p, sh_p);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
