// Data-side address decoder: memory-mapped I/O in front of the data cache.
//
// The processor's data accesses carry partition-local word addresses. This
// block decodes them, for every partition alike:
//   0x018  UART: a write queues a 32-bit word for transmission; a read
//          returns the transmit-buffer-full flag in bit 0
//   0x019  hardware timer, low 32 bits (read only)
//   0x01A  active partition id, ptr_c_flag2 (read only)
//   0x01B  hardware timer, high 32 bits (read only)
//   0x01C..0x01F  UART sampling ports 0..3 (read only)
// Every other address goes to the data cache through the memory control
// unit, which puts the partition index in the two MSBs (local addresses
// 0x100..0x1FF are the shared region). Writes to the read-only I/O words are
// ignored. The read address is presented in the execute stage; the
// selection is registered so the read data, from the cache or from a
// device, is valid in the following (memory) stage. UART, timer and
// partition-id addresses are the published ones; the high timer word, the
// port addresses, the status bit and the shared-region placement are this
// design's choices.
module aero_mmio
  import aero_pkg::*;
#(
  parameter int unsigned NPORTS = 4
) (
  input  logic               clk,
  input  logic               rst,
  input  pid_t               rd_pid,   // partition of the read (execute stage)
  input  pid_t               wr_pid,   // partition of the write (memory stage)
  // processor side
  input  logic               re,
  input  daddr_t             raddr,
  output word_t              rdata,
  input  logic               we,
  input  daddr_t             waddr,
  input  word_t              wdata,
  // data cache side
  output logic               dc_re,
  output logic [DA_W+SEG_W-1:0] dc_raddr,
  input  word_t              dc_rdata,
  output logic               dc_we,
  output logic [DA_W+SEG_W-1:0] dc_waddr,
  output word_t              dc_wdata,
  // devices
  input  logic [63:0]        timer,
  input  logic               uart_tx_full,
  output logic               uart_tx_we,
  output word_t              uart_tx_data,
  input  word_t              port_data [NPORTS]
);

  function automatic logic is_io(daddr_t a);
    return a >= MM_UART && a <= MM_PORT0 + daddr_t'(NPORTS - 1);
  endfunction

  logic rd_shared_unused, wr_shared_unused;

  aero_mcu #(.AW(DA_W), .SHARED(1'b1)) u_rd_mcu (
    .pid(rd_pid), .laddr(raddr), .paddr(dc_raddr), .shared(rd_shared_unused));
  aero_mcu #(.AW(DA_W), .SHARED(1'b1)) u_wr_mcu (
    .pid(wr_pid), .laddr(waddr), .paddr(dc_waddr), .shared(wr_shared_unused));

  assign dc_re        = re && !is_io(raddr);
  assign dc_we        = we && !is_io(waddr);
  assign dc_wdata     = wdata;
  assign uart_tx_we   = we && waddr == MM_UART;
  assign uart_tx_data = wdata;

  // Registered device read, aligned with the cache's registered read.
  logic  io_sel;
  word_t io_data;

  always_ff @(posedge clk) begin
    if (rst) begin
      io_sel  <= 1'b0;
      io_data <= '0;
    end else if (re) begin
      io_sel <= is_io(raddr);
      case (raddr)
        MM_UART:    io_data <= {31'd0, uart_tx_full};
        MM_TIMER:   io_data <= timer[31:0];
        MM_PID:     io_data <= word_t'(rd_pid);
        MM_TIMER_H: io_data <= timer[63:32];
        default:    io_data <= port_data[32'(raddr - MM_PORT0) % NPORTS];
      endcase
    end
  end

  assign rdata = io_sel ? io_data : dc_rdata;

endmodule
