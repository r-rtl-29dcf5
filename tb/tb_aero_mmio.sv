// Self-checking testbench of the data-side decoder. It is connected to a
// data cache and driven with random reads and writes from random
// partitions; a reference model of the memory (per physical address) and of
// the devices gives the expected read data one cycle later, the expected
// UART write strobes and the absence of cache writes for I/O addresses.
module tb_aero_mmio;
  import aero_pkg::*;
  localparam int NPORTS = 4;

  logic clk = 0, rst = 1;
  pid_t rd_pid, wr_pid;
  logic re, we, dc_re, dc_we, uart_tx_full, uart_tx_we;
  daddr_t raddr, waddr;
  word_t rdata, wdata, dc_rdata, dc_wdata, uart_tx_data;
  logic [10:0] dc_raddr, dc_waddr;
  logic [63:0] timer;
  word_t port_data [NPORTS];
  int checks = 0, failures = 0;
  word_t ref_mem [2048];
  int n_uart = 0, n_shared = 0, n_io_rd = 0;

  aero_mmio #(.NPORTS(NPORTS)) dut (.*);
  aero_dcache u_dc (.clk(clk), .re(dc_re), .raddr(dc_raddr), .rdata(dc_rdata),
                    .we(dc_we), .waddr(dc_waddr), .wdata(dc_wdata));

  always #5 clk = ~clk;

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int phys(pid_t p, daddr_t a);
    return a[8] ? int'(a) : int'(p) * 512 + int'(a);
  endfunction
  function automatic logic io(daddr_t a);
    return a >= 9'h018 && a <= 9'h01F;
  endfunction

  task automatic chk(logic cond, string what);
    checks++;
    if (!cond) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  initial begin
    word_t exp_rd; logic exp_v;
    re = 0; we = 0; raddr = 0; waddr = 0; wdata = 0; rd_pid = 0; wr_pid = 0;
    uart_tx_full = 0; timer = 64'h0000_0012_3456_789a;
    foreach (port_data[p]) port_data[p] = $urandom;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    // fill the cache through the write path
    for (int p = 0; p < 4; p++)
      for (int a = 0; a < 512; a++) begin
        @(negedge clk);
        we = 1; wr_pid = pid_t'(p); waddr = daddr_t'(a); wdata = $urandom;
        #1;
        chk(dc_we == !io(waddr), "cache write only outside I/O");
        chk(uart_tx_we == (waddr == 9'h018), "uart strobe");
        @(posedge clk);
        if (!io(waddr)) ref_mem[phys(wr_pid, waddr)] = wdata;
      end
    @(negedge clk) we = 0;
    exp_v = 0;
    repeat (6000) begin
      @(negedge clk);
      if (exp_v) chk(rdata == exp_rd, $sformatf("read %h expected %h", rdata, exp_rd));
      timer = timer + 1;
      uart_tx_full = $urandom;
      re = $urandom % 2; rd_pid = pid_t'($urandom);
      raddr = ($urandom % 4 == 0) ? daddr_t'(9'h018 + $urandom % 8) : daddr_t'($urandom);
      we = $urandom % 2; wr_pid = pid_t'($urandom); wdata = $urandom;
      waddr = ($urandom % 4 == 0) ? daddr_t'(9'h018 + $urandom % 8) : daddr_t'($urandom);
      #1;
      chk(dc_we == (we && !io(waddr)), "cache write enable");
      chk(uart_tx_we == (we && waddr == 9'h018) && (!uart_tx_we || uart_tx_data == wdata), "uart write");
      if (uart_tx_we) n_uart++;
      if (re) begin
        exp_v = 1;
        if (raddr[8]) n_shared++;
        if (io(raddr)) n_io_rd++;
        case (raddr)
          9'h018: exp_rd = {31'd0, uart_tx_full};
          9'h019: exp_rd = timer[31:0];
          9'h01A: exp_rd = word_t'(rd_pid);
          9'h01B: exp_rd = timer[63:32];
          9'h01C, 9'h01D, 9'h01E, 9'h01F: exp_rd = port_data[raddr - 9'h01C];
          default: exp_rd = ref_mem[phys(rd_pid, raddr)];
        endcase
      end else if (io(raddr) || 1) begin
        // no read: the decoder's output is not checked next cycle
        exp_v = 0;
      end
      @(posedge clk);
      if (we && !io(waddr)) ref_mem[phys(wr_pid, waddr)] = wdata;
    end
    chk(n_uart > 0 && n_shared > 0 && n_io_rd > 0, "all paths exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
