// Self-checking testbench of the processor core.
//
// The core runs, in partition 1, a program with loads, arithmetic, a
// counted loop (taken and not-taken conditional jumps), an unconditional
// jump, a nested subroutine call with returns, and instructions that must
// be flushed behind taken branches. A cycle-counting instruction-set model
// in this testbench runs the same program (one instruction per cycle, two
// extra cycles per taken jump, call or return, fetch frozen while
// ptr_c_flag1 is high) and predicts every data-memory write with its cycle;
// the core's writes must match in address, data and cycle. Midway the
// testbench raises ptr_c_flag1 for a few cycles, as a partition switch
// would, to check that the fetch stage holds the pc and inserts no-ops.
// Then NRAND random programs follow, each from reset: loads of random
// values, all eight ALU operations, stores, and forward conditional and
// unconditional jumps, half of them with a store in the slot right behind
// the jump that must be flushed when the jump is taken. Each program ends
// by storing all 16 registers. The same cycle-exact comparison applies.
module tb_aero_core;
  import aero_pkg::*;
  localparam int NRAND = 40;         // random programs after the directed one
  int tmax = 400;
  int w0 = 20, w1 = 26;              // ptr_c_flag1 window (cycles)

  logic clk = 0, rst = 1;
  logic ptr_c_flag1, sw_store, sw_load;
  pid_t ptr_c_flag2, sw_store_pid, sw_load_pid;
  pc_t imem_addr;
  instr_t imem_rdata;
  logic dmem_re, dmem_we;
  daddr_t dmem_raddr, dmem_waddr;
  pid_t dmem_rpid, dmem_wpid;
  word_t dmem_rdata, dmem_wdata;
  logic ev_jump, ev_call, ev_ret;
  int checks = 0, failures = 0;
  int cyc;

  instr_t prog [2**PC_W];
  word_t  dmem [512];
  word_t  dmem_init [512];

  typedef struct { int addr; word_t data; int cycle; } wr_t;
  wr_t exp_wr [$];
  wr_t got_wr [$];

  aero_core #(.NPART(3)) dut (.*);

  assign imem_rdata = prog[imem_addr];

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // data memory: registered read, write strobe recorded with its cycle
  always @(posedge clk) begin
    if (dmem_re) dmem_rdata <= dmem[dmem_raddr];
    if (!rst && dmem_we) begin
      dmem[dmem_waddr] <= dmem_wdata;
      got_wr.push_back('{int'(dmem_waddr), dmem_wdata, cyc});
      if (dmem_wpid != 1) begin
        failures++;
        $display("FAIL write tagged with partition %0d", dmem_wpid);
      end
    end
  end

  int n_jump = 0, n_call = 0, n_ret = 0;
  always @(posedge clk) if (!rst && ptr_c_flag2 != 0) begin
    n_jump += int'(ev_jump); n_call += int'(ev_call); n_ret += int'(ev_ret);
  end

  task automatic put(int a, instr_t i);
    prog[a] = i;
  endtask

  // reference instruction-set model with cycle counting
  task automatic iss();
    word_t r [NREG];
    word_t m [512];
    pc_t pc, jr;
    pc_t stk [$];
    int t;
    foreach (r[i]) r[i] = 0;
    m = dmem_init;
    pc = 0; jr = 0; t = 0;
    while (t < tmax) begin
      instr_t ins;
      pc_t next;
      int taken;
      if (t >= w0 && t < w1) t = w1;
      ins = prog[pc];
      next = pc + 1;
      taken = 0;
      if (!ins[15]) begin
        raddr_t a = ins[7:4], b = ins[3:0];
        int signed sa = r[a], sb = r[b];
        case (ins[14:8])
          7'h11: r[a] = r[a] + r[b];
          7'h12: r[a] = r[a] - r[b];
          7'h13: r[a] = r[a] * r[b];
          7'h31: r[a] = r[a] ^ r[b];
          7'h32: r[a] = r[a] & r[b];
          7'h33: r[a] = r[a] | r[b];
          7'h34: r[a] = r[a] >> r[b][4:0];
          7'h35: r[a] = r[a] << r[b][4:0];
          7'h21: taken = int'(sa <= sb);
          7'h22: taken = int'(sa >= sb);
          7'h23: taken = int'(sa < sb);
          7'h24: taken = int'(sa > sb);
          7'h25: taken = int'(r[a] == r[b]);
          7'h26: taken = int'(r[a] != r[b]);
          7'h27: taken = 1;
          7'h28: begin stk.push_back(pc + 1); taken = 1; end
          7'h29: begin next = stk.pop_back(); taken = 2; end
          default: ;
        endcase
        if (taken == 1) next = jr;
      end else if (!ins[14]) begin
        jr = ins[13:0];
      end else if (!ins[13]) begin
        r[ins[12:9]] = m[ins[8:0]];
      end else begin
        m[ins[8:0]] = r[ins[12:9]];
        exp_wr.push_back('{int'(ins[8:0]), r[ins[12:9]], t + 3});
      end
      pc = next;
      t += (taken != 0) ? 3 : 1;
    end
  endtask

  // reset the core, run the loaded program for tmax cycles from reset
  // release, then compare its data-memory writes with the model's
  task automatic run_and_compare();
    exp_wr.delete();
    iss();
    @(negedge clk);
    rst = 1; ptr_c_flag1 = 0;
    repeat (3) @(negedge clk);
    got_wr.delete();
    dmem = dmem_init;
    rst = 0; ptr_c_flag2 = 1;
    for (cyc = 0; cyc < tmax + 5; cyc++) begin
      ptr_c_flag1 = (cyc >= w0 && cyc < w1);
      @(negedge clk);
    end
    checks++;
    if (got_wr.size() != exp_wr.size()) begin
      failures++;
      $display("FAIL %0d writes, expected %0d", got_wr.size(), exp_wr.size());
    end
    foreach (exp_wr[k]) if (k < got_wr.size()) begin
      checks++;
      if (got_wr[k] != exp_wr[k]) begin
        failures++;
        if (failures < 20)
          $display("FAIL write %0d: [%0d]=%0h @%0d, expected [%0d]=%0h @%0d", k,
                   got_wr[k].addr, got_wr[k].data, got_wr[k].cycle,
                   exp_wr[k].addr, exp_wr[k].data, exp_wr[k].cycle);
      end
    end
  endtask

  // random program: every instruction is followed by a no-op, which meets
  // the hazard rules (register and store-to-load); jumps go forward only
  // and never land on a jump condition; half of the jumps have a store
  // (to an address never loaded) right behind them instead of the no-op;
  // the program ends by storing all registers and spinning
  task automatic random_program(int n);
    int a, k;
    foreach (prog[i]) prog[i] = NOP_INSTR;
    foreach (dmem_init[i]) dmem_init[i] = $urandom;
    for (int i = 0; i < 16; i++) begin
      k = $urandom_range(0, 3);
      dmem_init[i] = (k == 0) ? word_t'($urandom_range(0, 40)) : (k == 1) ? -word_t'($urandom_range(0, 40)) : $urandom;
    end
    a = 0;
    for (int i = 0; i < 16; i++) begin put(a, enc_ld(raddr_t'(i), daddr_t'(i))); a += 2; end
    for (int i = 0; i < n; i++) begin
      k = $urandom_range(0, 9);
      case (k)
        0, 1, 2, 3: begin
          opcode_e ops [8];
          ops = '{OP_ADD, OP_SUB, OP_MUL, OP_XOR, OP_AND, OP_OR, OP_SHR, OP_SHL};
          put(a, enc_op(ops[$urandom_range(0, 7)], raddr_t'($urandom), raddr_t'($urandom)));
        end
        4: put(a, enc_ld(raddr_t'($urandom), daddr_t'($urandom_range(0, 127))));
        5, 6: put(a, enc_st(raddr_t'($urandom), daddr_t'($urandom_range(64, 127))));
        default: begin
          opcode_e jops [7];
          jops = '{OP_JLE, OP_JGE, OP_JL, OP_JG, OP_JE, OP_JNE, OP_JUC};
          put(a, enc_jad(pc_t'(a + 4 + 2 * $urandom_range(0, 5))));
          a += 2;
          put(a, enc_op(jops[$urandom_range(0, 6)], raddr_t'($urandom), raddr_t'($urandom)));
          // a store right behind the jump: executed only if not taken
          if ($urandom_range(0, 1) != 0)
            put(a + 1, enc_st(raddr_t'($urandom), daddr_t'($urandom_range(128, 191))));
        end
      endcase
      a += 2;
    end
    // a target must not be a jump condition, which would run with the jump
    // register of an earlier pair: move such targets to the next slot pair
    for (int i = 0; i < a; i += 2)
      if (prog[i][15:14] == 2'b10 && prog[prog[i][13:0]][15:12] == 4'h2)
        prog[i] = enc_jad(pc_t'(prog[i][13:0] + 2));
    a += 12;
    for (int i = 0; i < 16; i++) begin put(a, enc_st(raddr_t'(i), daddr_t'(200 + i))); a += 2; end
    put(a, enc_jad(pc_t'(a))); put(a + 2, enc_op(OP_JUC, 0, 0));
    tmax = 2 * a + 40;
  endtask

  initial begin
    ptr_c_flag1 = 0; ptr_c_flag2 = 0; sw_store = 0; sw_load = 0;
    sw_store_pid = 0; sw_load_pid = 0;
    foreach (prog[i]) prog[i] = NOP_INSTR;
    foreach (dmem_init[i]) dmem_init[i] = $urandom;
    dmem_init[0] = 5; dmem_init[1] = 7; dmem_init[2] = 3; dmem_init[3] = 0; dmem_init[4] = 1;
    dmem_init[14] = 32'hdead;
    dmem = dmem_init;
    put( 0, enc_ld(1, 0));       put( 1, enc_ld(2, 1));
    put( 3, enc_op(OP_ADD, 1, 2));
    put( 4, enc_ld(3, 2));       put( 5, enc_st(1, 10));
    put( 6, enc_op(OP_MUL, 1, 3));
    put( 8, enc_st(1, 11));
    put( 9, enc_ld(4, 3));       put(10, enc_ld(5, 4));
    put(12, enc_op(OP_ADD, 4, 5));                 // loop
    put(13, enc_jad(12));        put(14, enc_op(OP_JL, 4, 2));
    put(15, enc_st(4, 12));
    put(16, enc_jad(30));        put(17, enc_op(OP_CALL, 0, 0));
    put(18, enc_st(6, 13));
    put(19, enc_op(OP_SUB, 1, 5));
    put(20, enc_jad(24));        put(21, enc_op(OP_JUC, 0, 0));
    put(22, enc_st(5, 14));      put(23, enc_st(5, 14));
    put(24, enc_st(1, 15));
    put(25, enc_op(OP_XOR, 1, 2));
    put(26, enc_jad(40));        put(27, enc_op(OP_JNE, 1, 2));
    put(28, enc_st(5, 14));
    put(41, enc_st(1, 16));
    put(42, enc_jad(42));        put(43, enc_op(OP_JUC, 0, 0));
    // subroutine at 30, nested subroutine at 50
    put(30, enc_ld(6, 2));
    put(31, enc_jad(50));        put(32, enc_op(OP_CALL, 0, 0));
    put(33, enc_op(OP_SHL, 6, 5));
    put(34, enc_op(OP_RET, 0, 0));
    put(50, enc_op(OP_SUB, 6, 5));
    put(51, enc_op(OP_RET, 0, 0));
    repeat (3) @(posedge clk);
    run_and_compare();
    // results worked out by hand from the program
    checks += 7;
    if (dmem[10] != 12 || dmem[11] != 36 || dmem[12] != 7 || dmem[13] != 4 ||
        dmem[15] != 35 || dmem[16] != 36) begin
      failures++;
      $display("FAIL results %0d %0d %0d %0d %0d %0d", dmem[10], dmem[11], dmem[12],
               dmem[13], dmem[15], dmem[16]);
    end
    if (dmem[14] != 32'hdead) begin failures++; $display("FAIL flushed store executed"); end
    checks++;
    if (n_jump < 8 || n_call != 2 || n_ret != 2) begin
      failures++;
      $display("FAIL events jumps=%0d calls=%0d returns=%0d", n_jump, n_call, n_ret);
    end
    $display("directed: writes=%0d jumps=%0d calls=%0d returns=%0d", got_wr.size(), n_jump, n_call, n_ret);
    // random programs, no switching window
    w0 = -1; w1 = -1;
    for (int r = 0; r < NRAND; r++) begin
      random_program(150);
      run_and_compare();
    end
    $display("random programs: %0d, taken jumps in total %0d", NRAND, n_jump);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
