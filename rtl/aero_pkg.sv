// Shared types and constants of the partitioned four-stage processor.
//
// The instruction word is 16 bits and comes in three formats, told apart by
// the top one or two bits:
//   memory-access  : [15:14]=2'b11, [13]=store (1) / load (0), [12:9] register,
//                    [8:0] data-cache word address (partition-local)
//   memory-address : [15:14]=2'b10, [13:0] instruction address (jump target)
//   operational    : [15]=1'b0, [14:8] 7-bit opcode, [7:4] operand a
//                    (also the destination), [3:0] operand b
// The opcodes in opcode_e follow the published opcode table. Call, return and
// the all-zero no-operation have no published encoding; the values used here
// (0x28, 0x29, 0x00) are this design's own choice.
package aero_pkg;

  localparam int unsigned XLEN   = 32;  // data path width
  localparam int unsigned ILEN   = 16;  // instruction width
  localparam int unsigned NREG   = 16;  // registers per bank (4-bit register field)
  localparam int unsigned RA_W   = 4;
  localparam int unsigned PC_W   = 14;  // partition-local instruction address
  localparam int unsigned DA_W   = 9;   // partition-local data address
  localparam int unsigned SEG_W  = 2;   // address MSBs driven by the memory control unit
  localparam int unsigned PID_W  = 2;   // width of ptr_c_flag2 (0 = no partition active)

  typedef logic [XLEN-1:0]  word_t;
  typedef logic [ILEN-1:0]  instr_t;
  typedef logic [PC_W-1:0]  pc_t;
  typedef logic [DA_W-1:0]  daddr_t;
  typedef logic [RA_W-1:0]  raddr_t;
  typedef logic [PID_W-1:0] pid_t;

  typedef enum logic [6:0] {
    OP_NOP = 7'h00,
    OP_ADD = 7'h11,
    OP_SUB = 7'h12,
    OP_MUL = 7'h13,
    OP_JLE = 7'h21,
    OP_JGE = 7'h22,
    OP_JL  = 7'h23,
    OP_JG  = 7'h24,
    OP_JE  = 7'h25,
    OP_JNE = 7'h26,
    OP_JUC = 7'h27,
    OP_CALL = 7'h28,
    OP_RET  = 7'h29,
    OP_XOR = 7'h31,
    OP_AND = 7'h32,
    OP_OR  = 7'h33,
    OP_SHR = 7'h34,
    OP_SHL = 7'h35
  } opcode_e;

  localparam instr_t NOP_INSTR = 16'h0000;

  // Memory-mapped locations (partition-local word addresses).
  localparam daddr_t MM_UART    = 9'h018;
  localparam daddr_t MM_TIMER   = 9'h019;
  localparam daddr_t MM_PID     = 9'h01A;
  localparam daddr_t MM_TIMER_H = 9'h01B;
  localparam daddr_t MM_PORT0   = 9'h01C;  // sampling ports 0x01C..0x01F

  // Decoded instruction class.
  typedef enum logic [1:0] {
    IC_OP    = 2'd0,
    IC_JADDR = 2'd1,
    IC_LOAD  = 2'd2,
    IC_STORE = 2'd3
  } iclass_e;

  function automatic iclass_e instr_class(instr_t i);
    if (!i[15])      return IC_OP;
    else if (!i[14]) return IC_JADDR;
    else if (i[13])  return IC_STORE;
    else             return IC_LOAD;
  endfunction

  // Instruction encoders, used by testbenches to build programs.
  function automatic instr_t enc_op(opcode_e op, raddr_t a, raddr_t b);
    return {1'b0, op, a, b};
  endfunction
  function automatic instr_t enc_jad(pc_t target);
    return {2'b10, target};
  endfunction
  function automatic instr_t enc_ld(raddr_t r, daddr_t addr);
    return {2'b11, 1'b0, r, addr};
  endfunction
  function automatic instr_t enc_st(raddr_t r, daddr_t addr);
    return {2'b11, 1'b1, r, addr};
  endfunction

endpackage
