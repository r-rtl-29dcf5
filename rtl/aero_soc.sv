// Mixed-criticality platform: the partitioned processor with its memories,
// switching control unit and I/O.
//
// Up to NPART software partitions share one four-stage processor. Spatial
// isolation comes from replicated state (register bank, pc, jump register,
// stack pointers per partition) and from the memory control units, which put
// the active partition index in the two MSBs of every instruction, data and
// stack address. Temporal isolation comes from the switching control unit
// (SwCU), which switches partitions in at fixed periods for fixed execution
// times, with a constant SWITCH_TIME-cycle overhead per switch.
//
// Blocks: aero_core (pipeline, register banks, pc unit, address stack),
// aero_imem (instruction cache), aero_dcache (data cache), aero_mmio (data
// decoder with the memory control units), aero_swcu (scheduler),
// aero_timer (64-bit cycle counter), aero_uart_ip (UART with transmit buffer
// and sampling ports).
//
// Interface:
//   clk, rst                 processor clock (50 MHz on the reference board)
//                            and synchronous active-high reset
//   imem_ld_*                program loader port of the instruction cache
//                            (physical address: partition in bits [15:14])
//   dmem_ld_*                static-data loader port of the data cache,
//                            used while rst is held
//   cfg_*                    schedule: enable, period, execution time and
//                            starting offset of each partition, in cycles;
//                            cfg_offset is sampled during reset
//   ptr_c_flag1/2            switching control lines, for monitoring pins
//   expiry_flag, sched_conflict, exec_clk   SwCU status
//   uart_txd, uart_rxd       serial lines; uart_tx_dropped, uart_rx_count
//                            count dropped transmit words and received samples
//   timer                    hardware timer value
//   ev_jump/ev_call/ev_ret   one-cycle pulses: taken branch, call, return
module aero_soc
  import aero_pkg::*;
#(
  parameter int unsigned NPART         = 3,
  parameter int unsigned SWITCH_TIME   = 10,
  parameter int unsigned CNT_W         = 32,
  parameter int unsigned STACK_DEPTH_W = 6,
  parameter int unsigned CLKS_PER_BIT  = 434,
  parameter int unsigned TXBUF_DEPTH   = 4,
  parameter int unsigned NPORTS        = 4
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic                     imem_ld_we,
  input  logic [PC_W+SEG_W-1:0]    imem_ld_addr,
  input  instr_t                   imem_ld_data,
  input  logic                     dmem_ld_we,
  input  logic [DA_W+SEG_W-1:0]    dmem_ld_addr,
  input  word_t                    dmem_ld_data,
  input  logic [NPART-1:0]         cfg_en,
  input  logic [CNT_W-1:0]         cfg_period [NPART],
  input  logic [CNT_W-1:0]         cfg_exec   [NPART],
  input  logic [CNT_W-1:0]         cfg_offset [NPART],
  output logic                     ptr_c_flag1,
  output pid_t                     ptr_c_flag2,
  output logic                     expiry_flag,
  output logic                     sched_conflict,
  output logic [CNT_W-1:0]         exec_clk,
  output logic                     uart_txd,
  input  logic                     uart_rxd,
  output logic [15:0]              uart_tx_dropped,
  output logic [15:0]              uart_rx_count,
  output logic [63:0]              timer,
  output logic                     ev_jump,
  output logic                     ev_call,
  output logic                     ev_ret
);

  // switching control unit
  logic pc_store, pc_load;
  pid_t pc_store_pid, pc_load_pid;

  aero_swcu #(.NPART(NPART), .CNT_W(CNT_W), .SWITCH_TIME(SWITCH_TIME)) u_swcu (
    .clk(clk), .rst(rst),
    .cfg_en(cfg_en), .cfg_period(cfg_period), .cfg_exec(cfg_exec),
    .cfg_offset(cfg_offset),
    .ptr_c_flag1(ptr_c_flag1), .ptr_c_flag2(ptr_c_flag2),
    .pc_store(pc_store), .pc_store_pid(pc_store_pid),
    .pc_load(pc_load), .pc_load_pid(pc_load_pid),
    .expiry_flag(expiry_flag), .sched_conflict(sched_conflict),
    .exec_clk(exec_clk));

  // processor core
  pc_t    imem_addr;
  instr_t imem_rdata;
  logic   dmem_re, dmem_we;
  daddr_t dmem_raddr, dmem_waddr;
  pid_t   dmem_rpid, dmem_wpid;
  word_t  dmem_rdata, dmem_wdata;

  aero_core #(.NPART(NPART), .STACK_DEPTH_W(STACK_DEPTH_W)) u_core (
    .clk(clk), .rst(rst),
    .ptr_c_flag1(ptr_c_flag1), .ptr_c_flag2(ptr_c_flag2),
    .sw_store(pc_store), .sw_store_pid(pc_store_pid),
    .sw_load(pc_load), .sw_load_pid(pc_load_pid),
    .imem_addr(imem_addr), .imem_rdata(imem_rdata),
    .dmem_re(dmem_re), .dmem_raddr(dmem_raddr), .dmem_rpid(dmem_rpid),
    .dmem_rdata(dmem_rdata),
    .dmem_we(dmem_we), .dmem_waddr(dmem_waddr), .dmem_wpid(dmem_wpid),
    .dmem_wdata(dmem_wdata),
    .ev_jump(ev_jump), .ev_call(ev_call), .ev_ret(ev_ret));

  // instruction cache behind its memory control unit
  logic [PC_W+SEG_W-1:0] imem_paddr;
  logic                  imem_shared_unused;

  aero_mcu #(.AW(PC_W), .SHARED(1'b0)) u_imcu (
    .pid(ptr_c_flag2), .laddr(imem_addr), .paddr(imem_paddr),
    .shared(imem_shared_unused));

  aero_imem #(.AW(PC_W + SEG_W)) u_imem (
    .clk(clk), .raddr(imem_paddr), .rdata(imem_rdata),
    .we(imem_ld_we), .waddr(imem_ld_addr), .wdata(imem_ld_data));

  // data side: decoder, data cache, devices
  logic                  dc_re, dc_we, dc_we_core;
  logic [DA_W+SEG_W-1:0] dc_raddr, dc_waddr, dc_waddr_core;
  word_t                 dc_rdata, dc_wdata, dc_wdata_core;
  logic                  uart_tx_we, uart_tx_full;
  word_t                 uart_tx_data;
  word_t                 port_data [NPORTS];

  aero_timer u_timer (.clk(clk), .rst(rst), .count(timer));

  aero_mmio #(.NPORTS(NPORTS)) u_mmio (
    .clk(clk), .rst(rst), .rd_pid(dmem_rpid), .wr_pid(dmem_wpid),
    .re(dmem_re), .raddr(dmem_raddr), .rdata(dmem_rdata),
    .we(dmem_we), .waddr(dmem_waddr), .wdata(dmem_wdata),
    .dc_re(dc_re), .dc_raddr(dc_raddr), .dc_rdata(dc_rdata),
    .dc_we(dc_we_core), .dc_waddr(dc_waddr_core), .dc_wdata(dc_wdata_core),
    .timer(timer), .uart_tx_full(uart_tx_full),
    .uart_tx_we(uart_tx_we), .uart_tx_data(uart_tx_data),
    .port_data(port_data));

  assign dc_we    = dmem_ld_we || dc_we_core;
  assign dc_waddr = dmem_ld_we ? dmem_ld_addr : dc_waddr_core;
  assign dc_wdata = dmem_ld_we ? dmem_ld_data : dc_wdata_core;

  aero_dcache #(.AW(DA_W + SEG_W)) u_dcache (
    .clk(clk), .re(dc_re), .raddr(dc_raddr), .rdata(dc_rdata),
    .we(dc_we), .waddr(dc_waddr), .wdata(dc_wdata));

  aero_uart_ip #(.CLKS_PER_BIT(CLKS_PER_BIT), .TXBUF_DEPTH(TXBUF_DEPTH),
                 .NPORTS(NPORTS)) u_uart (
    .clk(clk), .rst(rst),
    .tx_we(uart_tx_we), .tx_data(uart_tx_data), .tx_full(uart_tx_full),
    .tx_dropped(uart_tx_dropped), .port_data(port_data),
    .rx_count(uart_rx_count), .txd(uart_txd), .rxd(uart_rxd));

endmodule
