// Partitioned four-stage processor core: fetch (F), decode (D), execute (E),
// memory-access / write-back (M).
//
// One instruction enters per cycle; there is no forwarding and no hazard
// detection: software separates dependent instructions by one no-op.
//   F  pc_reg addresses the instruction cache (asynchronous read). The fetch
//      multiplexer latches the instruction, or the all-zero no-op while
//      ptr_c_flag1 is high, while no partition is active (ptr_c_flag2 = 0) or
//      while a taken branch flushes the front of the pipeline.
//   D  The instruction is sliced by format. Operand registers a and b are
//      read from the bank of the active partition (for a store, the
//      register field is read as operand a). A memory-address instruction
//      writes the partition's jump register here.
//   E  The ALU operates on the two operands; jump conditions, call and
//      return are resolved. A taken jump or a call loads pc_reg from the jump
//      register, a return loads it from the address stack, and the fetch
//      and decode registers are flushed (two cycles lost). A call pushes its
//      own address + 1. A load presents its address to the data side here.
//   M  alu_reg is written back to operand register a, or load data from the
//      data side is written to the register named in the instruction, or
//      alu_reg (the store's source register) is written to the data side.
// Every pipeline register carries the partition index the instruction was
// fetched under, so write-back, stack and jump-register accesses always
// land in that partition's own resources. Partition switching is driven
// from outside (the switching control unit) through ptr_c_flag1,
// ptr_c_flag2 and the pc store/load strobes.
// Interface timing: imem_rdata is combinational on imem_addr; dmem_rdata is
// valid the cycle after dmem_re/dmem_raddr; dmem_we/waddr/wdata are a
// one-cycle write strobe.
// Stage contents follow the published pipeline description and block
// diagram; the asynchronous instruction read, branch resolution in the
// execute stage with a two-cycle flush and the per-instruction partition tag
// are this design's choices.
module aero_core
  import aero_pkg::*;
#(
  parameter int unsigned NPART         = 3,
  parameter int unsigned STACK_DEPTH_W = 6
) (
  input  logic   clk,
  input  logic   rst,
  // partition switching
  input  logic   ptr_c_flag1,
  input  pid_t   ptr_c_flag2,
  input  logic   sw_store,
  input  pid_t   sw_store_pid,
  input  logic   sw_load,
  input  pid_t   sw_load_pid,
  // instruction cache
  output pc_t    imem_addr,
  input  instr_t imem_rdata,
  // data side
  output logic   dmem_re,
  output daddr_t dmem_raddr,
  output pid_t   dmem_rpid,
  input  word_t  dmem_rdata,
  output logic   dmem_we,
  output daddr_t dmem_waddr,
  output pid_t   dmem_wpid,
  output word_t  dmem_wdata,
  // observation of control events
  output logic   ev_jump,
  output logic   ev_call,
  output logic   ev_ret
);

  // ---------------------------------------------------------------- fetch
  logic   hold, flush;
  pc_t    pc, ret_addr;
  instr_t fd_instr;
  pc_t    fd_pc;
  pid_t   fd_pid;

  assign hold      = ptr_c_flag1 || ptr_c_flag2 == '0;
  assign imem_addr = pc;

  always_ff @(posedge clk) begin
    if (rst) begin
      fd_instr <= NOP_INSTR;
      fd_pc    <= '0;
      fd_pid   <= '0;
    end else begin
      fd_instr <= (hold || flush) ? NOP_INSTR : imem_rdata;
      fd_pc    <= pc;
      fd_pid   <= ptr_c_flag2;
    end
  end

  // ---------------------------------------------------------------- decode
  iclass_e d_class;
  raddr_t  d_ra, d_rb;
  word_t   d_qa, d_qb;
  logic    jad_we;

  assign d_class = instr_class(fd_instr);
  assign d_ra    = (d_class == IC_OP) ? fd_instr[7:4] : fd_instr[12:9];
  assign d_rb    = fd_instr[3:0];
  assign jad_we  = (d_class == IC_JADDR) && !flush;

  iclass_e    de_class;
  logic [6:0] de_opcode;
  raddr_t     de_rd;
  word_t      de_a, de_b;
  daddr_t     de_daddr;
  pc_t        de_pc;
  pid_t       de_pid;

  // write-back signals (declared here, driven in the M stage)
  logic   wb_we;
  raddr_t wb_addr;
  word_t  wb_data;
  pid_t   em_pid;

  aero_regbanks #(.NPART(NPART)) u_regs (
    .clk(clk), .rst(rst),
    .rd_pid(fd_pid), .ra(d_ra), .rb(d_rb), .qa(d_qa), .qb(d_qb),
    .we(wb_we), .wr_pid(em_pid), .wa(wb_addr), .wd(wb_data));

  always_ff @(posedge clk) begin
    if (rst || flush) begin
      de_class  <= IC_OP;
      de_opcode <= OP_NOP;
      de_rd     <= '0;
      de_a      <= '0;
      de_b      <= '0;
      de_daddr  <= '0;
      de_pc     <= '0;
      de_pid    <= '0;
    end else begin
      de_class  <= d_class;
      de_opcode <= fd_instr[14:8];
      de_rd     <= d_ra;
      de_a      <= d_qa;
      de_b      <= d_qb;
      de_daddr  <= fd_instr[DA_W-1:0];
      de_pc     <= fd_pc;
      de_pid    <= fd_pid;
    end
  end

  // ---------------------------------------------------------------- execute
  word_t alu_y;
  logic  alu_wr, alu_j, alu_call, alu_ret;
  logic  is_op, take_jump, take_call, take_ret;

  aero_alu u_alu (
    .opcode(de_opcode), .op_a(de_a), .op_b(de_b),
    .result(alu_y), .wr_en(alu_wr), .j_en(alu_j),
    .call_en(alu_call), .ret_en(alu_ret));

  assign is_op     = (de_class == IC_OP);
  assign take_jump = is_op && alu_j;
  assign take_call = is_op && alu_call;
  assign take_ret  = is_op && alu_ret;
  assign flush     = take_jump || take_call || take_ret;
  assign ev_jump   = take_jump;
  assign ev_call   = take_call;
  assign ev_ret    = take_ret;

  aero_addr_stack #(.NPART(NPART), .DEPTH_W(STACK_DEPTH_W)) u_stack (
    .clk(clk), .rst(rst), .pid(de_pid),
    .push(take_call), .din(de_pc + 1'b1), .pop(take_ret), .dout(ret_addr));

  aero_pc_unit #(.NPART(NPART)) u_pc (
    .clk(clk), .rst(rst), .hold(hold),
    .jad_we(jad_we), .jad_pid(fd_pid), .jad_target(fd_instr[PC_W-1:0]),
    .jump(take_jump), .call(take_call), .ret(take_ret), .ex_pid(de_pid),
    .ret_addr(ret_addr),
    .sw_store(sw_store), .sw_store_pid(sw_store_pid),
    .sw_load(sw_load), .sw_load_pid(sw_load_pid),
    .pc(pc));

  assign dmem_re    = (de_class == IC_LOAD);
  assign dmem_raddr = de_daddr;
  assign dmem_rpid  = de_pid;

  iclass_e em_class;
  logic    em_wr;
  raddr_t  em_rd;
  word_t   alu_reg;
  daddr_t  em_daddr;

  always_ff @(posedge clk) begin
    if (rst) begin
      em_class <= IC_OP;
      em_wr    <= 1'b0;
      em_rd    <= '0;
      alu_reg  <= '0;
      em_daddr <= '0;
      em_pid   <= '0;
    end else begin
      em_class <= de_class;
      em_wr    <= (is_op && alu_wr) || de_class == IC_LOAD;
      em_rd    <= de_rd;
      alu_reg  <= (de_class == IC_STORE) ? de_a : alu_y;
      em_daddr <= de_daddr;
      em_pid   <= de_pid;
    end
  end

  // ---------------------------------------------------------------- memory / write-back
  assign wb_we      = em_wr;
  assign wb_addr    = em_rd;
  assign wb_data    = (em_class == IC_LOAD) ? dmem_rdata : alu_reg;
  assign dmem_we    = (em_class == IC_STORE);
  assign dmem_waddr = em_daddr;
  assign dmem_wpid  = em_pid;
  assign dmem_wdata = alu_reg;

endmodule
