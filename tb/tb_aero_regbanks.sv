// Self-checking testbench of the replicated register banks: random writes
// and reads across all partitions against a reference array, checking that
// a write in one partition never shows in another, that pid 0 writes are
// dropped, that reset clears every bank and that a same-cycle write is seen
// by the read ports.
module tb_aero_regbanks;
  import aero_pkg::*;
  localparam int NPART = 3;

  logic clk = 0, rst = 1;
  pid_t rd_pid, wr_pid;
  raddr_t ra, rb, wa;
  word_t qa, qb, wd;
  logic we;
  int checks = 0, failures = 0;
  word_t ref_bank [NPART+1][NREG];

  aero_regbanks #(.NPART(NPART)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(word_t got, word_t exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    we = 0; wr_pid = 0; wa = 0; wd = 0; rd_pid = 1; ra = 0; rb = 0;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    foreach (ref_bank[p, r]) ref_bank[p][r] = '0;
    // reset state
    for (int p = 1; p <= NPART; p++)
      for (int r = 0; r < NREG; r++) begin
        rd_pid = pid_t'(p); ra = raddr_t'(r); rb = raddr_t'(r); #1;
        chk(qa, 0, "reset qa"); chk(qb, 0, "reset qb");
      end
    repeat (3000) begin
      @(negedge clk);
      we = ($urandom % 3) != 0;
      wr_pid = pid_t'($urandom % 4);
      wa = raddr_t'($urandom); wd = $urandom;
      rd_pid = pid_t'($urandom % 4);
      ra = raddr_t'($urandom); rb = raddr_t'($urandom);
      if ($urandom % 4 == 0) begin rd_pid = wr_pid; ra = wa; end
      #1;
      // expected read values, including write-through
      begin
        word_t ea, eb;
        ea = (rd_pid == 0) ? 0 : ref_bank[rd_pid][ra];
        eb = (rd_pid == 0) ? 0 : ref_bank[rd_pid][rb];
        if (we && wr_pid != 0 && wr_pid == rd_pid && wa == ra) ea = wd;
        if (we && wr_pid != 0 && wr_pid == rd_pid && wa == rb) eb = wd;
        chk(qa, ea, $sformatf("qa p%0d r%0d", rd_pid, ra));
        chk(qb, eb, $sformatf("qb p%0d r%0d", rd_pid, rb));
      end
      @(posedge clk);
      if (we && wr_pid != 0) ref_bank[wr_pid][wa] = wd;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
